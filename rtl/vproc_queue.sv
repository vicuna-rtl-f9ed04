// Vector instruction queue.
//
// A first-in first-out buffer of DEPTH decoded vector instructions between
// the decoder and the issue logic. Instructions leave in the order they
// arrived, which keeps the coprocessor strictly in order. The queue also
// reports whether it holds a load or store, which the memory arbiter needs
// to know (a vector memory access is pending as soon as it is queued).
//
// Interface: push_i is taken when ready_o is high; the oldest entry is shown
// on head_o with valid_o and is removed by pop_i. A pushed entry is visible
// at the head from the next cycle. When the queue is full the decoder stops
// acknowledging instructions, which stalls the main core.
//
// That decoded instructions wait in an in-order queue follows the document;
// its depth is not given there, so DEPTH = 4 is this design's choice.
//
// Lint note: the assertions in this module are disabled during reset with
// `disable iff (!rst_ni)`; lint counts that as a synchronous use of the
// asynchronous reset (SYNCASYNCNET). The assertions are not part of the
// circuit, so the warning stands.
module vproc_queue
  import vproc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic    clk_i,
  input  logic    rst_ni,
  input  logic    push_i,
  input  vinstr_t instr_i,
  output logic    ready_o,
  output logic    valid_o,
  output vinstr_t head_o,
  input  logic    pop_i,
  output logic    has_lsu_o
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  vinstr_t           mem_q [DEPTH];
  logic [AW-1:0]     rd_ptr_q, wr_ptr_q;
  logic [AW:0]       count_q;

  logic do_push, do_pop;
  assign ready_o = (count_q != (AW+1)'(DEPTH));
  assign valid_o = (count_q != '0);
  assign head_o  = mem_q[rd_ptr_q];
  assign do_push = push_i && ready_o;
  assign do_pop  = pop_i && valid_o;

  always_comb begin
    has_lsu_o = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      logic [AW:0] age;   // position counted from the head
      age = (AW+1)'((i + DEPTH - 32'(rd_ptr_q)) % DEPTH);
      if (age < count_q && mem_q[i].unit == UNIT_VLSU) begin
        has_lsu_o = 1'b1;
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
      count_q  <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        mem_q[i] <= '0;
      end
    end else begin
      if (do_push) begin
        mem_q[wr_ptr_q] <= instr_i;
        wr_ptr_q        <= (32'(wr_ptr_q) == DEPTH - 1) ? '0 : wr_ptr_q + 1'b1;
      end
      if (do_pop) begin
        rd_ptr_q <= (32'(rd_ptr_q) == DEPTH - 1) ? '0 : rd_ptr_q + 1'b1;
      end
      count_q <= count_q + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  no_pop_when_empty: assert property (@(posedge clk_i) disable iff (!rst_ni)
    pop_i |-> valid_o);

endmodule
