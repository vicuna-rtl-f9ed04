// Vector slide unit (VSLDU).
//
// Executes vslideup and vslidedown with the offset taken from a scalar
// register or an immediate. Slide-up: vd[i + off] = vs2[i] for
// off <= i + off < vl, elements below off keep their old value. Slide-down:
// vd[i] = vs2[i + off] for i < vl, or 0 where i + off is past the end of the
// register. vslide1up / vslide1down slide by one element and put the scalar
// operand into the freed element: vd[0] = x (up) or vd[vl-1] = x (down).
//
// How it works: the whole source register is read through the unit's read
// port into a register; the slide is a shift of the whole register by
// off * SEW bits, and the byte enables of the write-back select exactly the
// destination elements that the instruction changes. All elements move
// together, so the unit needs no per-element selection.
//
// Timing: after the issue cycle come the read, the shift (read data
// arrives) and the write-back cycle; busy_o is high for these 3 cycles,
// independent of the offset and vl.
//
// The unit and its instructions come from the document; doing the shift in
// one step over the whole register is this design's choice. Masked execution
// is not supported.
module vproc_vsldu
  import vproc_pkg::*;
#(
  parameter int unsigned VREG_W = 2048
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                issue_i,
  input  vinstr_t             instr_i,
  output logic                busy_o,
  output logic [4:0]          rd_addr_o,
  input  logic [VREG_W-1:0]   rd_data_i,
  output logic                wr_we_o,
  output logic [4:0]          wr_addr_o,
  output logic [VREG_W-1:0]   wr_data_o,
  output logic [VREG_W/8-1:0] wr_be_o
);

  localparam int unsigned VB = VREG_W / 8;   // bytes per register

  typedef enum logic [1:0] {S_IDLE, S_RD, S_SHIFT, S_WB} state_e;

  state_e            state_q;
  vinstr_t           ins_q;
  logic [VREG_W-1:0] res_q;
  logic [VB-1:0]     be_q;

  assign busy_o    = (state_q != S_IDLE);
  assign rd_addr_o = ins_q.vs2;

  // Offset in bytes, saturated to the register size
  function automatic int unsigned off_bytes(logic [31:0] off, sew_e sew);
    logic [63:0] ob;
    ob = 64'(off) * 64'(sew_bytes(sew));
    return (ob >= 64'(VB)) ? VB : int'(ob);
  endfunction

  // offset and vl in bytes of the instruction in progress
  int unsigned ob, vb;
  logic one;   // vslide1up / vslide1down
  assign one = (sld_op_e'(ins_q.op) == SLD_1UP) || (sld_op_e'(ins_q.op) == SLD_1DOWN);
  assign ob  = one ? sew_bytes(ins_q.sew) : off_bytes(ins_q.scalar, ins_q.sew);
  assign vb = ins_q.vl * sew_bytes(ins_q.sew);

  // source shifted by one element for vslide1up / vslide1down
  logic [VREG_W-1:0] up1, down1;
  assign up1   = rd_data_i << (8 * ob);
  assign down1 = rd_data_i >> (8 * ob);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      ins_q   <= '0;
      res_q   <= '0;
      be_q    <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (issue_i) begin
          ins_q   <= instr_i;
          state_q <= S_RD;
        end
        S_RD: state_q <= S_SHIFT;
        S_SHIFT: begin
          if (sld_op_e'(ins_q.op) == SLD_UP) begin
            res_q <= (ob >= VB) ? '0 : rd_data_i << (8 * ob);
            for (int b = 0; b < VB; b++) begin
              be_q[b] <= (32'(b) >= ob) && (32'(b) < vb);
            end
          end else if (sld_op_e'(ins_q.op) == SLD_1UP) begin
            for (int b = 0; b < VB; b++) begin
              res_q[8*b +: 8] <= (32'(b) < ob) ? ins_q.scalar[8*(b%4) +: 8] : up1[8*b +: 8];
              be_q[b]         <= 32'(b) < vb;
            end
          end else if (sld_op_e'(ins_q.op) == SLD_1DOWN) begin
            for (int b = 0; b < VB; b++) begin
              res_q[8*b +: 8] <= (32'(b) + ob >= vb) ? ins_q.scalar[8*(32'(b) & (ob-1)) +: 8]
                                                      : down1[8*b +: 8];
              be_q[b]         <= 32'(b) < vb;
            end
          end else begin
            res_q <= (ob >= VB) ? '0 : rd_data_i >> (8 * ob);
            for (int b = 0; b < VB; b++) begin
              be_q[b] <= 32'(b) < vb;
            end
          end
          state_q <= S_WB;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign wr_we_o   = (state_q == S_WB);
  assign wr_addr_o = ins_q.vd;
  assign wr_data_o = res_q;
  assign wr_be_o   = be_q;

endmodule
