// Memory arbiter between the two caches and the external memory.
//
// Decides which cache may use the external memory next, so that memory is
// accessed in program order and no access of the main core can delay the
// vector core:
//   * a data-cache transaction caused by the vector core may always start;
//   * a data-cache transaction caused by the main core (a miss or a
//     written-through store) and every instruction-cache transaction are
//     held back while vec_pending_i reports vector loads or stores that are
//     queued or executing; they start only once those are complete;
//   * when the data cache and the instruction cache ask at the same time
//     (the main core's two pipeline stages conflict), the data access goes
//     first.
// A transaction is one or more word beats (a line fill, or one write). Once
// its first beat is granted, the arbiter stays with that cache until the
// beat marked last is granted, and a new transaction starts only when every
// response of the previous one has returned, so responses are routed back
// to the cache that asked for them.
//
// External memory protocol: one word per beat, req held until gnt, and one
// rvalid (with rdata for a read) per beat, in order, after the memory's
// latency.
//
// The rules above follow the document; the beat/transaction protocol and the
// outstanding-response counter are this design's.
//
// Lint note: the assertions in this module are disabled during reset with
// `disable iff (!rst_ni)`; lint counts that as a synchronous use of the
// asynchronous reset (SYNCASYNCNET). The assertions are not part of the
// circuit, so the warning stands.
module mem_arbiter (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        vec_pending_i,
  // data cache
  input  logic        d_req_i,
  input  logic        d_we_i,
  input  logic [31:0] d_addr_i,
  input  logic [31:0] d_wdata_i,
  input  logic [3:0]  d_be_i,
  input  logic        d_scalar_i,
  input  logic        d_last_i,
  output logic        d_gnt_o,
  output logic        d_rvalid_o,
  // instruction cache
  input  logic        i_req_i,
  input  logic [31:0] i_addr_i,
  input  logic        i_last_i,
  output logic        i_gnt_o,
  output logic        i_rvalid_o,
  // shared read data
  output logic [31:0] rdata_o,
  // external memory
  output logic        mem_req_o,
  output logic        mem_we_o,
  output logic [31:0] mem_addr_o,
  output logic [31:0] mem_wdata_o,
  output logic [3:0]  mem_be_o,
  input  logic        mem_gnt_i,
  input  logic        mem_rvalid_i,
  input  logic [31:0] mem_rdata_i,
  // an access of the main core is being held back for the vector core
  output logic        hold_o
);

  logic       locked_q, owner_q;   // owner: 0 data cache, 1 instruction cache
  logic [4:0] outstanding_q;

  logic can_start, d_may, i_may, sel_d, sel_i;
  assign can_start = !locked_q && (outstanding_q == '0);
  assign d_may     = d_req_i && (!d_scalar_i || !vec_pending_i);
  assign i_may     = i_req_i && !vec_pending_i && !d_req_i;

  always_comb begin
    sel_d = 1'b0;
    sel_i = 1'b0;
    if (locked_q) begin
      sel_d = !owner_q && d_req_i;
      sel_i = owner_q && i_req_i;
    end else if (can_start) begin
      sel_d = d_may;
      sel_i = !d_may && i_may;
    end
  end

  assign hold_o = can_start && ((d_req_i && d_scalar_i && vec_pending_i) ||
                                (i_req_i && vec_pending_i));

  always_comb begin
    mem_req_o   = sel_d || sel_i;
    mem_we_o    = sel_d && d_we_i;
    mem_addr_o  = sel_d ? d_addr_i : i_addr_i;
    mem_wdata_o = d_wdata_i;
    mem_be_o    = sel_d ? d_be_i : 4'hF;
    d_gnt_o     = sel_d && mem_gnt_i;
    i_gnt_o     = sel_i && mem_gnt_i;
    d_rvalid_o  = mem_rvalid_i && !owner_q;
    i_rvalid_o  = mem_rvalid_i && owner_q;
    rdata_o     = mem_rdata_i;
  end

  logic granted, last;
  assign granted = mem_req_o && mem_gnt_i;
  assign last    = sel_d ? d_last_i : i_last_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      locked_q      <= 1'b0;
      owner_q       <= 1'b0;
      outstanding_q <= '0;
    end else begin
      outstanding_q <= outstanding_q + 5'(granted) - 5'(mem_rvalid_i);
      if (granted) begin
        owner_q  <= sel_i;
        locked_q <= !last;
      end
    end
  end

  no_response_without_request: assert property (@(posedge clk_i) disable iff (!rst_ni)
    mem_rvalid_i |-> (outstanding_q != '0));

endmodule
