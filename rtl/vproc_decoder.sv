// Vector instruction decoder (V-Decoder) with the vector configuration state.
//
// The main core offers every instruction whose major opcode is OP-V,
// LOAD-FP or STORE-FP on the coprocessor interface, together with the values
// of its scalar source registers rs1 and rs2. The decoder checks the
// instruction, and in the same cycle acknowledges it (ack_o) and tells the
// main core whether it must wait for a scalar result (wait_o). A decoded
// instruction is pushed into the instruction queue tagged with the functional
// unit that executes it, its operands and the current vl and SEW.
//
// vsetvli / vsetvl are executed here: they update vl and vtype and return
// the new vl as a scalar result one cycle after the acknowledge. Unsupported
// configurations (LMUL other than 1, SEW above 32) set vill, as the vector
// specification requires, and every later vector instruction is refused
// until a valid configuration is set. vl = min(AVL, VLMAX) with
// VLMAX = VREG_W / SEW; rs1 = x0 with rd != x0 requests VLMAX, and
// rs1 = rd = x0 keeps vl.
//
// Handshake: valid_i is held until ack_o. The acknowledge waits while the
// queue is full (except for configuration and refused instructions, which
// need no queue entry). illegal_o flags, together with ack_o, an instruction
// this implementation does not support; it is not queued.
//
// The decoder's role (decode, acknowledge, wait flag, queue) follows the
// document. The supported instruction subset (RVV 0.10 encodings: integer
// add/sub/logic/min/max/shift/move, multiply and multiply-accumulate,
// slides, register gather, scalar moves, unit-stride loads and stores; all
// unmasked, LMUL = 1) and the refusal flag are this design's choices.
// The tail- and mask-agnostic bits vta / vma of vtype are accepted and
// ignored: tail elements are always left undisturbed, which both settings
// allow. Lint therefore reports new_vtype[7:6] as unused.
module vproc_decoder
  import vproc_pkg::*;
#(
  parameter int unsigned VREG_W = 2048
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // coprocessor interface
  input  logic        valid_i,
  input  logic [31:0] instr_i,
  input  logic [31:0] rs1_i,
  input  logic [31:0] rs2_i,
  output logic        ack_o,
  output logic        wait_o,
  output logic        illegal_o,
  output logic        cfg_res_valid_o,   // vsetvl result, cycle after ack
  output logic [31:0] cfg_res_data_o,
  // instruction queue
  input  logic        q_ready_i,
  output logic        q_push_o,
  output vinstr_t     q_instr_o
);

  localparam logic [6:0] OPC_OPV   = 7'b1010111;
  localparam logic [6:0] OPC_LOADV = 7'b0000111;
  localparam logic [6:0] OPC_STORV = 7'b0100111;

  // configuration state
  logic [31:0] vl_q;
  sew_e        sew_q;
  logic        vill_q;
  logic        res_valid_q;
  logic [31:0] res_data_q;

  // instruction fields
  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [5:0] funct6;
  logic       vm;
  logic [4:0] f_vd, f_vs1, f_vs2;
  assign opcode = instr_i[6:0];
  assign funct3 = instr_i[14:12];
  assign funct6 = instr_i[31:26];
  assign vm     = instr_i[25];
  assign f_vd   = instr_i[11:7];
  assign f_vs1  = instr_i[19:15];
  assign f_vs2  = instr_i[24:20];

  logic    is_cfg, legal, needs_wait;
  vinstr_t d;

  // new configuration for vsetvl(i)
  logic [10:0] new_vtype;
  logic        new_vill;
  sew_e        new_sew;
  logic [31:0] new_vl, vlmax_new;

  always_comb begin
    new_vtype = instr_i[31] ? rs2_i[10:0] : instr_i[30:20];
    // vtype (0.10 layout): vlmul[1:0] = [1:0], vsew = [4:2], vlmul[2] = [5],
    // vta = [6], vma = [7], bits above reserved
    new_vill  = ({new_vtype[5], new_vtype[1:0]} != 3'b000) || (new_vtype[4:2] > 3'b010) ||
                (new_vtype[10:8] != 3'b000) || (instr_i[31] && (rs2_i[31:11] != '0));
    new_sew   = sew_e'(new_vtype[3:2]);
    vlmax_new = 32'(VREG_W / 8) >> new_vtype[3:2];
    if (f_vs1 != 5'd0) begin
      new_vl = (rs1_i > vlmax_new) ? vlmax_new : rs1_i;
    end else if (f_vd != 5'd0) begin
      new_vl = vlmax_new;
    end else begin
      new_vl = (vl_q > vlmax_new) ? vlmax_new : vl_q;
    end
    if (new_vill) begin
      new_vl = '0;
    end
  end

  always_comb begin
    logic [31:0] simm, uimm;
    simm = {{27{f_vs1[4]}}, f_vs1};
    uimm = {27'd0, f_vs1};

    d            = '0;
    d.vd         = f_vd;
    d.vs1        = f_vs1;
    d.vs2        = f_vs2;
    d.sew        = sew_q;
    d.vl         = vl_q;
    d.wr_vd      = 1'b1;
    is_cfg       = 1'b0;
    legal        = 1'b0;
    needs_wait   = 1'b0;

    if (opcode == OPC_OPV && funct3 == 3'b111) begin
      // vsetvli (bit 31 = 0) / vsetvl (bits 31:25 = 1000000)
      is_cfg     = 1'b1;
      needs_wait = 1'b1;
      legal      = !instr_i[31] || (instr_i[30:25] == 6'd0);
    end else if (opcode == OPC_OPV && !vill_q && vm) begin
      logic opi, opm, is_vv, is_vi;
      opi   = (funct3 == 3'b000) || (funct3 == 3'b011) || (funct3 == 3'b100);
      opm   = (funct3 == 3'b010) || (funct3 == 3'b110);
      is_vv = (funct3 == 3'b000) || (funct3 == 3'b010);
      is_vi = (funct3 == 3'b011);
      d.use_scalar = !is_vv;
      d.scalar     = is_vi ? simm : rs1_i;
      d.rd_vs1     = is_vv;
      d.rd_vs2     = 1'b1;
      if (opi) begin
        d.unit = UNIT_VALU;
        legal  = 1'b1;
        case (funct6)
          6'b000000: d.op = 5'(ALU_ADD);
          6'b000010: begin d.op = 5'(ALU_SUB);  legal = !is_vi; end
          6'b000011: begin d.op = 5'(ALU_RSUB); legal = !is_vv; end
          6'b000100: begin d.op = 5'(ALU_MINU); legal = !is_vi; end
          6'b000101: begin d.op = 5'(ALU_MIN);  legal = !is_vi; end
          6'b000110: begin d.op = 5'(ALU_MAXU); legal = !is_vi; end
          6'b000111: begin d.op = 5'(ALU_MAX);  legal = !is_vi; end
          6'b001001: d.op = 5'(ALU_AND);
          6'b001010: d.op = 5'(ALU_OR);
          6'b001011: d.op = 5'(ALU_XOR);
          6'b010111: begin   // vmv.v.v / vmv.v.x / vmv.v.i
            d.op     = 5'(ALU_MV);
            d.rd_vs2 = 1'b0;
            legal    = (f_vs2 == 5'd0);
          end
          6'b100101: begin d.op = 5'(ALU_SLL); if (is_vi) d.scalar = uimm; end
          6'b101000: begin d.op = 5'(ALU_SRL); if (is_vi) d.scalar = uimm; end
          6'b101001: begin d.op = 5'(ALU_SRA); if (is_vi) d.scalar = uimm; end
          6'b001100: begin   // vrgather
            d.unit = UNIT_VIDXU;
            d.op   = is_vv ? 5'(IDX_GATHER_VV) : 5'(IDX_GATHER_X);
            if (is_vi) d.scalar = uimm;
          end
          6'b001110: begin   // vslideup
            d.unit = UNIT_VSLDU;
            d.op   = 5'(SLD_UP);
            legal  = !is_vv;
            if (is_vi) d.scalar = uimm;
          end
          6'b001111: begin   // vslidedown
            d.unit = UNIT_VSLDU;
            d.op   = 5'(SLD_DOWN);
            legal  = !is_vv;
            if (is_vi) d.scalar = uimm;
          end
          default: legal = 1'b0;
        endcase
      end else if (opm) begin
        d.unit = UNIT_VMUL;
        legal  = 1'b1;
        case (funct6)
          6'b100100: d.op = 5'(MUL_MULHU);
          6'b100101: d.op = 5'(MUL_MUL);
          6'b100110: d.op = 5'(MUL_MULHSU);
          6'b100111: d.op = 5'(MUL_MULH);
          6'b101101: begin d.op = 5'(MUL_MACC);  d.rd_vd = 1'b1; end
          6'b101111: begin d.op = 5'(MUL_NMSAC); d.rd_vd = 1'b1; end
          6'b001110: begin   // vslide1up.vx
            d.unit = UNIT_VSLDU;
            d.op   = 5'(SLD_1UP);
            legal  = !is_vv;
          end
          6'b001111: begin   // vslide1down.vx
            d.unit = UNIT_VSLDU;
            d.op   = 5'(SLD_1DOWN);
            legal  = !is_vv;
          end
          6'b010000: begin
            d.unit = UNIT_VIDXU;
            if (is_vv) begin   // vmv.x.s
              d.op       = 5'(IDX_MV_XS);
              d.rd_vs1   = 1'b0;
              d.wr_vd    = 1'b0;
              needs_wait = 1'b1;
              legal      = (f_vs1 == 5'd0);
            end else begin     // vmv.s.x
              d.op     = 5'(IDX_MV_SX);
              d.rd_vs2 = 1'b0;
              legal    = (f_vs2 == 5'd0);
            end
          end
          default: legal = 1'b0;
        endcase
      end
    end else if ((opcode == OPC_LOADV || opcode == OPC_STORV) && !vill_q && vm) begin
      // unit-stride, nf = 0, mew = 0, lumop/sumop = 0
      d.unit       = UNIT_VLSU;
      d.use_scalar = 1'b1;
      d.scalar     = rs1_i;
      legal        = (instr_i[31:26] == 6'd0) && (f_vs2 == 5'd0);
      case (funct3)
        3'b000:  d.sew = EW8;
        3'b101:  d.sew = EW16;
        3'b110:  d.sew = EW32;
        default: legal = 1'b0;
      endcase
      // element width above SEW would need a register group
      if (d.sew > sew_q) begin
        legal = 1'b0;
      end
      if (opcode == OPC_STORV) begin
        d.op    = 5'(LSU_STORE);
        d.rd_vd = 1'b1;
        d.wr_vd = 1'b0;
      end else begin
        d.op = 5'(LSU_LOAD);
      end
    end
  end

  assign ack_o     = valid_i && (q_ready_i || is_cfg || !legal);
  assign illegal_o = !legal;
  assign wait_o    = legal && needs_wait;
  assign q_push_o  = valid_i && legal && !is_cfg && q_ready_i;
  assign q_instr_o = d;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      vl_q        <= '0;
      sew_q       <= EW8;
      vill_q      <= 1'b1;
      res_valid_q <= 1'b0;
      res_data_q  <= '0;
    end else begin
      res_valid_q <= 1'b0;
      if (valid_i && is_cfg && legal) begin
        vl_q        <= new_vl;
        sew_q       <= new_vill ? EW8 : new_sew;
        vill_q      <= new_vill;
        res_valid_q <= 1'b1;
        res_data_q  <= new_vl;
      end
    end
  end

  assign cfg_res_valid_o = res_valid_q;
  assign cfg_res_data_o  = res_data_q;

endmodule
