// Vector arithmetic and logic unit (VALU).
//
// Executes element-wise integer instructions on whole vector registers:
// add, subtract, reverse subtract, and, or, xor, signed and unsigned min and
// max, logical and arithmetic shifts, and move (vmv.v.*). Operand B is vs1,
// or a scalar register / immediate broadcast to every element.
//
// How it works: the unit reads its source registers one after the other
// through a single register-file read port into two operand shift registers
// (vs1 first, then vs2; a scalar instruction reads only vs2). Each cycle the
// lowest ALU_W bits of both shift registers go into the Operand A / Operand
// B registers and the shift registers move down by ALU_W bits, exposing the
// next elements. The elements then pass through a row of fracturable 32-bit
// adders and the logic/shift functions into the Result register, and from
// there into the result register that collects the whole vector. When all
// ceil(vl * SEW / ALU_W) parts are done, the whole register is written back
// in a single cycle, with byte enables covering the first vl elements (the
// tail keeps its old contents).
//
// Timing (from the cycle after issue): 1 cycle per source register read,
// +1 for the read latency, one cycle per ALU_W-bit part, 2 pipeline cycles,
// 1 write-back cycle. busy_o is high from the cycle after issue up to and
// including the write cycle. The time depends only on the instruction type and vl.
//
// The shift-register organisation, the Operand/Result registers and the
// fracturable adders follow the document; the operation list, ALU_W and
// the exact cycle sequence are this design's choices. Masked execution is
// not supported.
//
// Lint note: the unit keeps the whole decoded instruction in ins_q but
// needs only some of its fields (the register-read and -write flags, for
// example, serve the issue logic), so lint reports the other bits of ins_q
// as unused.
module vproc_valu
  import vproc_pkg::*;
#(
  parameter int unsigned VREG_W = 2048,
  parameter int unsigned ALU_W  = 512
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

  localparam int unsigned NCHUNK = VREG_W / ALU_W;
  localparam int unsigned NG     = ALU_W / 32;     // 32-bit groups per chunk
  localparam int unsigned CW     = $clog2(NCHUNK + 1);

  typedef enum logic [2:0] {S_IDLE, S_RD1, S_RD2, S_RD3, S_EXEC, S_WB} state_e;

  state_e              state_q;
  vinstr_t             ins_q;
  logic [VREG_W-1:0]   op1_sr_q, op2_sr_q;   // vs1 and vs2 shift registers
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
  alu_op_e          op;
  assign op = alu_op_e'(ins_q.op);

  for (genvar g = 0; g < NG; g++) begin : g_grp
    logic [31:0] a, b, add_a, add_b, sum, res;
    logic [3:0]  cout;
    logic        sub;

    assign a = opa_q[32*g +: 32];
    assign b = opb_q[32*g +: 32];

    always_comb begin
      add_a = a;
      add_b = b;
      sub   = 1'b0;
      case (op)
        ALU_ADD:  sub = 1'b0;
        ALU_RSUB: begin add_a = b; add_b = a; sub = 1'b1; end
        default:  sub = 1'b1;   // vs2 - vs1, also used for min/max compares
      endcase
    end

    vproc_frac_adder u_add (
      .a_i   (add_a),
      .b_i   (add_b),
      .sub_i (sub),
      .sew_i (ins_q.sew),
      .sum_o (sum),
      .cout_o(cout)
    );

    always_comb begin
      res = '0;
      case (op)
        ALU_ADD, ALU_SUB, ALU_RSUB: res = sum;
        ALU_AND: res = a & b;
        ALU_OR:  res = a | b;
        ALU_XOR: res = a ^ b;
        ALU_MV:  res = b;
        ALU_MINU, ALU_MIN, ALU_MAXU, ALU_MAX: begin
          // per element: lt = (vs2 < vs1), from the subtraction vs2 - vs1
          for (int k = 0; k < 4; k++) begin
            int unsigned eb, top;
            logic lt, sa, sb, sd;
            eb  = sew_bytes(ins_q.sew);
            top = (k / eb) * eb + eb - 1;    // top byte of the element holding byte k
            sa  = a[8*top+7];
            sb  = b[8*top+7];
            sd  = sum[8*top+7];
            if (op == ALU_MINU || op == ALU_MAXU) begin
              lt = ~cout[top];
            end else begin
              lt = sd ^ ((sa != sb) && (sd != sa));
            end
            if (op == ALU_MINU || op == ALU_MIN) begin
              res[8*k +: 8] = lt ? a[8*k +: 8] : b[8*k +: 8];
            end else begin
              res[8*k +: 8] = lt ? b[8*k +: 8] : a[8*k +: 8];
            end
          end
        end
        ALU_SLL, ALU_SRL, ALU_SRA: begin
          case (ins_q.sew)
            EW8: for (int k = 0; k < 4; k++) begin
              logic [7:0] e;
              e = a[8*k +: 8];
              case (op)
                ALU_SLL: res[8*k +: 8] = e << b[8*k +: 3];
                ALU_SRL: res[8*k +: 8] = e >> b[8*k +: 3];
                default: res[8*k +: 8] = 8'($signed(e) >>> b[8*k +: 3]);
              endcase
            end
            EW16: for (int k = 0; k < 2; k++) begin
              logic [15:0] e;
              e = a[16*k +: 16];
              case (op)
                ALU_SLL: res[16*k +: 16] = e << b[16*k +: 4];
                ALU_SRL: res[16*k +: 16] = e >> b[16*k +: 4];
                default: res[16*k +: 16] = 16'($signed(e) >>> b[16*k +: 4]);
              endcase
            end
            default: begin
              case (op)
                ALU_SLL: res = a << b[4:0];
                ALU_SRL: res = a >> b[4:0];
                default: res = 32'($signed(a) >>> b[4:0]);
              endcase
            end
          endcase
        end
        default: res = '0;
      endcase
    end

    assign alu_out[32*g +: 32] = res;
  end

  // ---------------------------------------------------------------------
  // Control
  // ---------------------------------------------------------------------
  always_comb begin
    rd_addr_o = ins_q.vs2;
    if (state_q == S_RD1 && !ins_q.use_scalar) begin
      rd_addr_o = ins_q.vs1;
    end
  end

  assign busy_o = (state_q != S_IDLE);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q    <= S_IDLE;
      ins_q      <= '0;
      op1_sr_q   <= '0;
      op2_sr_q   <= '0;
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
        S_RD1: state_q <= ins_q.use_scalar ? S_RD3 : S_RD2;
        S_RD2: begin   // vs1 arrives, vs2 is being read
          op1_sr_q <= rd_data_i;
          state_q  <= S_RD3;
        end
        S_RD3: begin   // vs2 arrives
          op2_sr_q <= rd_data_i;
          state_q  <= (nchunk_q == 0) ? S_WB : S_EXEC;
        end
        S_EXEC: begin
          // feed one part per cycle into the Operand registers
          if (feed_cnt_q != nchunk_q) begin
            opa_q <= op2_sr_q[ALU_W-1:0];
            for (int g = 0; g < NG; g++) begin
              opb_q[32*g +: 32] <= ins_q.use_scalar ? scalar_rep : op1_sr_q[32*g +: 32];
            end
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
