// Vector multiplier unit (VMUL).
//
// Executes vmul, vmulh, vmulhu, vmulhsu and the multiply-accumulate
// instructions vmacc (vd = vs1*vs2 + vd) and vnmsac (vd = -(vs1*vs2) + vd),
// on 8-, 16- and 32-bit elements. Operand B is vs1 or a broadcast scalar.
//
// How it works: the unit has two register-file read ports, so vs1 and vs2
// are fetched in the same cycle; the accumulator vd of a multiply-accumulate
// is fetched in the next cycle on the first port. The registers are held in
// shift registers and consumed MUL_W bits per cycle: one stage registers the
// operands, a row of fracturable 32-bit multipliers and fracturable adders
// (for the accumulation) forms the result into a register, and the result
// parts are collected into a whole register that is written back in one
// cycle, with byte enables covering the first vl elements.
//
// Timing (from the cycle after issue): 1 read cycle (2 with accumulator),
// +1 read latency, one cycle per MUL_W-bit part, 2 pipeline cycles, 1
// write-back cycle; busy_o is high from the cycle after issue up to and including
// the write. The time
// depends only on the instruction type and vl.
//
// The two read ports, the fracturable multiplier and MUL_W (Table 2: 1024
// bits in the fast configuration) follow the document; the instruction
// list and cycle sequence are this design's choices. Masked execution is not
// supported.
//
// Lint note: the unit keeps the whole decoded instruction in ins_q but
// needs only some of its fields (the register-read and -write flags, for
// example, serve the issue logic), so lint reports the other bits of ins_q
// as unused.
//
// Lint note: the accumulate adders' per-element carry outputs are not
// needed (the multiplier has no compare), so lint reports cout as unused.
module vproc_vmul
  import vproc_pkg::*;
#(
  parameter int unsigned VREG_W = 2048,
  parameter int unsigned MUL_W  = 1024
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                issue_i,
  input  vinstr_t             instr_i,
  output logic                busy_o,
  output logic [1:0][4:0]     rd_addr_o,
  input  logic [1:0][VREG_W-1:0] rd_data_i,
  output logic                wr_we_o,
  output logic [4:0]          wr_addr_o,
  output logic [VREG_W-1:0]   wr_data_o,
  output logic [VREG_W/8-1:0] wr_be_o
);

  localparam int unsigned ALU_W  = MUL_W;
  localparam int unsigned NCHUNK = VREG_W / ALU_W;
  localparam int unsigned NG     = ALU_W / 32;     // 32-bit groups per chunk
  localparam int unsigned CW     = $clog2(NCHUNK + 1);

  typedef enum logic [2:0] {S_IDLE, S_RD1, S_RD2, S_RD3, S_EXEC, S_WB} state_e;

  state_e              state_q;
  vinstr_t             ins_q;
  logic [VREG_W-1:0]   op1_sr_q, op2_sr_q;   // vs1 and vs2 shift registers
  logic [VREG_W-1:0]   acc_sr_q;             // vd shift register (accumulator)
  logic [ALU_W-1:0]    opc_q;
  logic [VREG_W-1:0]   res_q;                // result accumulation
  logic [CW-1:0]       nchunk_q, feed_cnt_q, res_cnt_q;
  logic                s1_valid_q, s2_valid_q;
  logic [ALU_W-1:0]    opa_q, opb_q;         // Operand A (vs2) / Operand B (vs1 or scalar)
  logic [ALU_W-1:0]    result_q;
  logic [31:0]         scalar_rep;

  // Scalar operand replicated into every element of a 32-bit group
  always_comb begin
    case (ins_q.sew)
      EW8:     scalar_rep = {4{ins_q.scalar[7:0]}};
      EW16:    scalar_rep = {2{ins_q.scalar[15:0]}};
      default: scalar_rep = ins_q.scalar;
    endcase
  end

  // Number of ALU_W-bit parts covering vl elements
  function automatic logic [CW-1:0] chunks_for(logic [31:0] vl, sew_e sew);
    logic [31:0] bytes;
    bytes = vl * sew_bytes(sew);
    return CW'((bytes + ALU_W / 8 - 1) / (ALU_W / 8));
  endfunction

  // ---------------------------------------------------------------------
  // Element-wise datapath on one ALU_W-bit part
  // ---------------------------------------------------------------------
  logic [ALU_W-1:0] alu_out;
  mul_op_e          op;
  assign op = mul_op_e'(ins_q.op);

  for (genvar g = 0; g < NG; g++) begin : g_grp
    logic [31:0] lo, hi, acc_sum;
    logic [3:0]  cout;
    logic        a_signed, b_signed;

    always_comb begin
      a_signed = (op == MUL_MULH) || (op == MUL_MULHSU);
      b_signed = (op == MUL_MULH);
    end

    vproc_frac_mul u_mul (
      .a_i       (opa_q[32*g +: 32]),
      .b_i       (opb_q[32*g +: 32]),
      .a_signed_i(a_signed),
      .b_signed_i(b_signed),
      .sew_i     (ins_q.sew),
      .lo_o      (lo),
      .hi_o      (hi)
    );

    vproc_frac_adder u_acc (
      .a_i   (opc_q[32*g +: 32]),
      .b_i   (lo),
      .sub_i (op == MUL_NMSAC),
      .sew_i (ins_q.sew),
      .sum_o (acc_sum),
      .cout_o(cout)
    );

    always_comb begin
      case (op)
        MUL_MUL:                        alu_out[32*g +: 32] = lo;
        MUL_MULH, MUL_MULHU, MUL_MULHSU: alu_out[32*g +: 32] = hi;
        default:                        alu_out[32*g +: 32] = acc_sum;
      endcase
    end
  end

  // ---------------------------------------------------------------------
  // Control
  // ---------------------------------------------------------------------
  always_comb begin
    rd_addr_o[0] = (state_q == S_RD2) ? ins_q.vd : ins_q.vs1;
    rd_addr_o[1] = ins_q.vs2;
  end

  assign busy_o = (state_q != S_IDLE);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q    <= S_IDLE;
      ins_q      <= '0;
      op1_sr_q   <= '0;
      op2_sr_q   <= '0;
      acc_sr_q   <= '0;
      opc_q      <= '0;
      res_q      <= '0;
      nchunk_q   <= '0;
      feed_cnt_q <= '0;
      res_cnt_q  <= '0;
      s1_valid_q <= 1'b0;
      s2_valid_q <= 1'b0;
      opa_q      <= '0;
      opb_q      <= '0;
      result_q   <= '0;
    end else begin
      s1_valid_q <= 1'b0;
      s2_valid_q <= s1_valid_q;
      case (state_q)
        S_IDLE: if (issue_i) begin
          ins_q      <= instr_i;
          nchunk_q   <= chunks_for(instr_i.vl, instr_i.sew);
          feed_cnt_q <= '0;
          res_cnt_q  <= '0;
          state_q    <= S_RD1;
        end
        S_RD1: state_q <= ins_q.rd_vd ? S_RD2 : S_RD3;
        S_RD2: begin   // vs1 and vs2 arrive, vd is being read
          op1_sr_q <= rd_data_i[0];
          op2_sr_q <= rd_data_i[1];
          state_q  <= S_RD3;
        end
        S_RD3: begin   // vs1 and vs2 arrive, or vd arrives
          if (ins_q.rd_vd) begin
            acc_sr_q <= rd_data_i[0];
          end else begin
            op1_sr_q <= rd_data_i[0];
            op2_sr_q <= rd_data_i[1];
          end
          state_q <= (nchunk_q == 0) ? S_WB : S_EXEC;
        end
        S_EXEC: begin
          // feed one part per cycle into the Operand registers
          if (feed_cnt_q != nchunk_q) begin
            opa_q <= op2_sr_q[ALU_W-1:0];
            for (int g = 0; g < NG; g++) begin
              opb_q[32*g +: 32] <= ins_q.use_scalar ? scalar_rep : op1_sr_q[32*g +: 32];
            end
            opc_q      <= acc_sr_q[ALU_W-1:0];
            acc_sr_q   <= acc_sr_q >> ALU_W;
            op1_sr_q   <= op1_sr_q >> ALU_W;
            op2_sr_q   <= op2_sr_q >> ALU_W;
            feed_cnt_q <= feed_cnt_q + 1'b1;
            s1_valid_q <= 1'b1;
          end
          if (s1_valid_q) begin
            result_q <= alu_out;
          end
          if (s2_valid_q) begin
            res_q     <= {result_q, res_q[VREG_W-1:ALU_W]};
            res_cnt_q <= res_cnt_q + 1'b1;
            if (res_cnt_q + 1'b1 == nchunk_q) begin
              state_q <= S_WB;
            end
          end
        end
        S_WB: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Results enter the collecting register from the top; after n parts they
  // sit in its top n*ALU_W bits and are moved down at write-back.
  always_comb begin
    wr_we_o   = (state_q == S_WB);
    wr_addr_o = ins_q.vd;
    wr_data_o = res_q >> (ALU_W * (NCHUNK - 32'(nchunk_q)));
    for (int b = 0; b < VREG_W / 8; b++) begin
      wr_be_o[b] = 32'(b) < ins_q.vl * sew_bytes(ins_q.sew);
    end
  end

endmodule
