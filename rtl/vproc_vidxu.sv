// Vector indexing unit (VIDXU).
//
// Executes the instructions whose register access pattern is irregular:
//   vrgather.vv      vd[i] = vs1[i] < VLMAX ? vs2[vs1[i]] : 0
//   vrgather.vx/.vi  vd[i] = x < VLMAX ? vs2[x] : 0
//   vmv.s.x          vd[0] = x[rs1]
//   vmv.x.s          x[rd] = vs2[0] (sign-extended), sent to the main core
// It is the only unit that returns a scalar result to the main core.
//
// How it works: vs1 (for vrgather.vv) and vs2 are read through the unit's
// read port into registers. The index register is a shift register that
// exposes one index per cycle; the indexed element of vs2 is selected and
// shifted into the top of the result register. One element is produced per
// cycle, so an indexed instruction takes vl cycles; after the last element
// the result is moved down into place and written back with byte enables
// covering the first vl elements.
//
// Timing: issue, then 1 read cycle per source register, 1 cycle of read
// latency, vl element cycles (none for vmv.x.s and vmv.s.x), 1 write-back
// or result cycle. busy_o is high from the cycle after issue up to and
// including the write cycle; res_valid_o is a single-cycle pulse.
//
// That this unit handles indexed instructions and is the only one writing
// scalar registers follows the document; the one-element-per-cycle rate and
// the instruction list are this design's choices. Masked execution is not
// supported.
//
// Lint note: the unit keeps the whole decoded instruction in ins_q but
// needs only some of its fields (the register-read and -write flags, for
// example, serve the issue logic), so lint reports the other bits of ins_q
// as unused.
module vproc_vidxu
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
  output logic [VREG_W/8-1:0] wr_be_o,
  output logic                res_valid_o,
  output logic [31:0]         res_data_o
);

  localparam int unsigned VB = VREG_W / 8;

  typedef enum logic [2:0] {S_IDLE, S_RD1, S_RD2, S_RD3, S_ELEM, S_WB} state_e;

  state_e            state_q;
  vinstr_t           ins_q;
  logic [VREG_W-1:0] idx_sr_q, src_q, res_q;
  logic [31:0]       cnt_q;
  logic [31:0]       res_data_q;
  logic              res_valid_q;

  idx_op_e op;
  assign op = idx_op_e'(ins_q.op);

  assign busy_o      = (state_q != S_IDLE);
  assign res_valid_o = res_valid_q;
  assign res_data_o  = res_data_q;

  always_comb begin
    rd_addr_o = ins_q.vs2;
    if (state_q == S_RD1 && op == IDX_GATHER_VV) begin
      rd_addr_o = ins_q.vs1;
    end
  end

  // Current index and the element of vs2 it selects
  logic [31:0] cur_idx;
  logic [31:0] cur_elem;
  always_comb begin
    int unsigned eb;
    logic [63:0] byte_off;
    eb = sew_bytes(ins_q.sew);
    case (ins_q.sew)
      EW8:     cur_idx = (op == IDX_GATHER_VV) ? 32'(idx_sr_q[7:0])  : ins_q.scalar;
      EW16:    cur_idx = (op == IDX_GATHER_VV) ? 32'(idx_sr_q[15:0]) : ins_q.scalar;
      default: cur_idx = (op == IDX_GATHER_VV) ? idx_sr_q[31:0]      : ins_q.scalar;
    endcase
    byte_off = 64'(cur_idx) * 64'(eb);
    if (byte_off >= 64'(VB)) begin
      cur_elem = '0;
    end else begin
      cur_elem = 32'(src_q >> (8 * byte_off));
      if (eb == 1) cur_elem = 32'(cur_elem[7:0]);
      if (eb == 2) cur_elem = 32'(cur_elem[15:0]);
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      ins_q       <= '0;
      idx_sr_q    <= '0;
      src_q       <= '0;
      res_q       <= '0;
      cnt_q       <= '0;
      res_data_q  <= '0;
      res_valid_q <= 1'b0;
    end else begin
      res_valid_q <= 1'b0;
      case (state_q)
        S_IDLE: if (issue_i) begin
          ins_q   <= instr_i;
          cnt_q   <= '0;
          state_q <= (idx_op_e'(instr_i.op) == IDX_MV_SX) ? S_WB : S_RD1;
          if (idx_op_e'(instr_i.op) == IDX_MV_SX) begin
            res_q <= VREG_W'(instr_i.scalar);
          end
        end
        S_RD1: state_q <= (op == IDX_GATHER_VV) ? S_RD2 : S_RD3;
        S_RD2: begin
          idx_sr_q <= rd_data_i;
          state_q  <= S_RD3;
        end
        S_RD3: begin
          src_q <= rd_data_i;
          if (op == IDX_MV_XS) begin
            case (ins_q.sew)
              EW8:     res_data_q <= 32'($signed(rd_data_i[7:0]));
              EW16:    res_data_q <= 32'($signed(rd_data_i[15:0]));
              default: res_data_q <= rd_data_i[31:0];
            endcase
            res_valid_q <= 1'b1;
            state_q     <= S_IDLE;
          end else begin
            state_q <= (ins_q.vl == 0) ? S_WB : S_ELEM;
          end
        end
        S_ELEM: begin
          // one element per cycle into the top of the result register
          case (ins_q.sew)
            EW8:     res_q <= {cur_elem[7:0],  res_q[VREG_W-1:8]};
            EW16:    res_q <= {cur_elem[15:0], res_q[VREG_W-1:16]};
            default: res_q <= {cur_elem,       res_q[VREG_W-1:32]};
          endcase
          case (ins_q.sew)
            EW8:     idx_sr_q <= idx_sr_q >> 8;
            EW16:    idx_sr_q <= idx_sr_q >> 16;
            default: idx_sr_q <= idx_sr_q >> 32;
          endcase
          cnt_q <= cnt_q + 1;
          if (cnt_q + 1 == ins_q.vl) begin
            state_q <= S_WB;
          end
        end
        S_WB: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    int unsigned vb;
    vb        = ins_q.vl * sew_bytes(ins_q.sew);
    wr_we_o   = (state_q == S_WB);
    wr_addr_o = ins_q.vd;
    if (op == IDX_MV_SX) begin
      wr_data_o = res_q;
      for (int b = 0; b < VB; b++) begin
        wr_be_o[b] = (ins_q.vl != 0) && (32'(b) < sew_bytes(ins_q.sew));
      end
    end else begin
      wr_data_o = res_q >> (VREG_W - 8 * vb);
      for (int b = 0; b < VB; b++) begin
        wr_be_o[b] = 32'(b) < vb;
      end
    end
  end

endmodule
