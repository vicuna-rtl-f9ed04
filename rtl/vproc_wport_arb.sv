// Shared register-file write port for two functional units.
//
// Unit A takes precedence. When only one unit writes, its request goes
// straight to the register file. When both write in the same cycle, A's
// request is passed through and B's address, data and byte enables are
// captured in a one-entry buffer (enabled by the AND of both write enables);
// the buffered request is written in the next cycle. Because a unit
// accumulates a whole register before writing it, neither unit writes in two
// consecutive cycles, so the cycle after a collision is always free and the
// delayed write always succeeds. The port's write enable is the OR of both
// requests and the buffer's valid flag.
//
// Timing: A is never delayed; B is delayed by exactly one cycle on a
// collision and not at all otherwise. The issue logic therefore releases B's
// destination register one cycle after B finishes in every case, which keeps
// B's timing independent of what A does.
//
// The structure (AND-enabled buffer, three-way multiplexer, OR of the enables)
// is the one the document draws for the VALU and VLSU; which pairs of units
// share a port elsewhere is this design's choice.
//
// Lint note: the assertions in this module are disabled during reset with
// `disable iff (!rst_ni)`; lint counts that as a synchronous use of the
// asynchronous reset (SYNCASYNCNET). The assertions are not part of the
// circuit, so the warning stands.
module vproc_wport_arb #(
  parameter int unsigned VREG_W = 2048
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  // unit with precedence
  input  logic                a_we_i,
  input  logic [4:0]          a_addr_i,
  input  logic [VREG_W-1:0]   a_data_i,
  input  logic [VREG_W/8-1:0] a_be_i,
  // unit that is delayed on a collision
  input  logic                b_we_i,
  input  logic [4:0]          b_addr_i,
  input  logic [VREG_W-1:0]   b_data_i,
  input  logic [VREG_W/8-1:0] b_be_i,
  // register-file write port
  output logic                we_o,
  output logic [4:0]          addr_o,
  output logic [VREG_W-1:0]   data_o,
  output logic [VREG_W/8-1:0] be_o,
  output logic                collision_o   // a collision happened this cycle
);

  logic                buf_valid_q;
  logic [4:0]          buf_addr_q;
  logic [VREG_W-1:0]   buf_data_q;
  logic [VREG_W/8-1:0] buf_be_q;

  assign collision_o = a_we_i & b_we_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      buf_valid_q <= 1'b0;
      buf_addr_q  <= '0;
      buf_data_q  <= '0;
      buf_be_q    <= '0;
    end else begin
      buf_valid_q <= collision_o;
      if (collision_o) begin
        buf_addr_q <= b_addr_i;
        buf_data_q <= b_data_i;
        buf_be_q   <= b_be_i;
      end
    end
  end

  assign we_o = a_we_i | b_we_i | buf_valid_q;

  always_comb begin
    if (a_we_i) begin
      addr_o = a_addr_i;
      data_o = a_data_i;
      be_o   = a_be_i;
    end else if (buf_valid_q) begin
      addr_o = buf_addr_q;
      data_o = buf_data_q;
      be_o   = buf_be_q;
    end else begin
      addr_o = b_addr_i;
      data_o = b_data_i;
      be_o   = b_be_i;
    end
  end

  // Neither unit writes twice in a row, and nothing competes with the buffer
  a_no_back_to_back: assert property (@(posedge clk_i) disable iff (!rst_ni)
    a_we_i |=> !a_we_i);
  b_no_back_to_back: assert property (@(posedge clk_i) disable iff (!rst_ni)
    b_we_i |=> !b_we_i);
  buffer_slot_free: assert property (@(posedge clk_i) disable iff (!rst_ni)
    buf_valid_q |-> !a_we_i && !b_we_i);

endmodule
