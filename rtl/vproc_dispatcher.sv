// In-order issue logic with register hazard tracking.
//
// Looks at the oldest instruction in the queue and issues it to the one
// functional unit that executes its type as soon as (a) that unit is free
// and (b) no instruction still in a unit writes a register the new one reads
// or writes (read-after-write, write-after-write), or reads a register the
// new one writes (write-after-read). Nothing overtakes the head of the
// queue, so instructions start in program order.
//
// Tracking: for every unit a 32-bit mask of the registers its current
// instruction reads and one of those it writes are set at issue. They stay
// valid while the unit is occupied. A unit is occupied while its busy signal
// is high; for the units that give way on a shared write port (NONPRIO) it
// stays occupied one more cycle, so the hazards of their destination
// register clear one cycle after the operation completes whether or not
// the write was actually delayed. This makes each instruction's timing
// independent of what the other unit on the port did.
//
// Interface: pop_o removes the head in the same cycle issue_o[unit] starts
// it; the unit latches instr_o at the clock edge.
//
// The issue conditions and the extra cycle for non-precedence units follow
// the document; the register masks are this design's way of checking them.
module vproc_dispatcher
  import vproc_pkg::*;
#(
  parameter logic [NUM_UNITS-1:0] NONPRIO = 5'b10010   // VALU and VIDXU
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 valid_i,
  input  vinstr_t              instr_i,
  output logic                 pop_o,
  input  logic [NUM_UNITS-1:0] busy_i,
  output logic [NUM_UNITS-1:0] issue_o,
  output vinstr_t              instr_o,
  output logic                 hazard_stall_o,   // head waits for a register
  output logic                 unit_stall_o      // head waits for its unit
);

  logic [NUM_UNITS-1:0]        busy_q, occupied;
  logic [NUM_UNITS-1:0][31:0]  rd_mask_q, wr_mask_q;
  logic [31:0]                 rd_any, wr_any, rd_new, wr_new;

  assign occupied = busy_i | (busy_q & NONPRIO);

  always_comb begin
    rd_any = '0;
    wr_any = '0;
    for (int u = 0; u < NUM_UNITS; u++) begin
      if (occupied[u]) begin
        rd_any |= rd_mask_q[u];
        wr_any |= wr_mask_q[u];
      end
    end
    rd_new = '0;
    wr_new = '0;
    if (instr_i.rd_vs1) rd_new[instr_i.vs1] = 1'b1;
    if (instr_i.rd_vs2) rd_new[instr_i.vs2] = 1'b1;
    if (instr_i.rd_vd)  rd_new[instr_i.vd]  = 1'b1;
    if (instr_i.wr_vd)  wr_new[instr_i.vd]  = 1'b1;
  end

  logic hazard, unit_free;
  assign hazard    = (((rd_new | wr_new) & wr_any) != '0) || ((wr_new & rd_any) != '0);
  assign unit_free = !occupied[instr_i.unit];

  assign pop_o          = valid_i && !hazard && unit_free;
  assign hazard_stall_o = valid_i && hazard;
  assign unit_stall_o   = valid_i && !hazard && !unit_free;
  assign instr_o        = instr_i;

  always_comb begin
    issue_o = '0;
    if (pop_o) begin
      issue_o[instr_i.unit] = 1'b1;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q    <= '0;
      rd_mask_q <= '0;
      wr_mask_q <= '0;
    end else begin
      busy_q <= busy_i;
      for (int u = 0; u < NUM_UNITS; u++) begin
        if (issue_o[u]) begin
          rd_mask_q[u] <= rd_new;
          wr_mask_q[u] <= wr_new;
        end
      end
    end
  end

endmodule
