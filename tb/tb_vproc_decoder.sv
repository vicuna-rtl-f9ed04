// Self-checking testbench of the vector decoder (256-bit registers).
// Checks vsetvli (AVL from rs1, VLMAX request, keep-vl form, unsupported
// vtype setting vill), the vl result one cycle after the acknowledge, the
// unit, operation, register fields, operand source and vl/SEW of decoded
// arithmetic, multiply, slide, gather, move and load/store instructions, the
// wait flag of vmv.x.s, refusal of masked and unknown instructions, and that
// the acknowledge is held back while the queue is full.
module tb_vproc_decoder;
  import vproc_pkg::*;
  import rvv_enc_pkg::*;
  localparam int VW = 256;

  logic clk = 0, rst_n = 0;
  logic valid, ack, wt, ill, res_valid, q_ready, q_push;
  logic [31:0] instr, rs1, rs2, res_data;
  vinstr_t qi;
  int checks = 0, failures = 0;

  vproc_decoder #(.VREG_W(VW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .instr_i(instr), .rs1_i(rs1), .rs2_i(rs2),
    .ack_o(ack), .wait_o(wt), .illegal_o(ill), .cfg_res_valid_o(res_valid),
    .cfg_res_data_o(res_data), .q_ready_i(q_ready), .q_push_o(q_push), .q_instr_o(qi));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // present an instruction for one cycle (expects an immediate acknowledge)
  task automatic send(input logic [31:0] i, input logic [31:0] r1);
    @(negedge clk);
    valid = 1; instr = i; rs1 = r1; rs2 = 0;
    #1;
  endtask

  task automatic setvl(input logic [31:0] avl, input logic [2:0] vsew, input logic [31:0] exp_vl);
    send(vsetvli(5'd5, 5'd6, vsew), avl);
    check(ack && wt && !ill && !q_push, "vsetvli ack/wait");
    @(negedge clk);
    valid = 0;
    #1;
    check(res_valid && res_data == exp_vl, $sformatf("vsetvli vl %0d exp %0d", res_data, exp_vl));
  endtask

  initial begin
    valid = 0; instr = 0; rs1 = 0; rs2 = 0; q_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // before any vsetvl, vector instructions are refused (vill)
    send(opv(6'b000000, 3'b000, 5'd1, 5'd2, 5'd3), 0);
    check(ack && ill && !q_push, "refused while vill");
    setvl(10, 3'b000, 10);         // SEW 8: VLMAX 32
    setvl(100, 3'b001, 16);        // SEW 16: VLMAX 16
    setvl(5, 3'b010, 5);           // SEW 32
    // rs1 = x0, rd != x0: VLMAX
    send(vsetvli(5'd5, 5'd0, 3'b000), 0);
    @(negedge clk); valid = 0; #1;
    check(res_data == 32, "vsetvli VLMAX");
    setvl(7, 3'b000, 7);
    // vadd.vv v1, v2, v3
    send(opv(6'b000000, 3'b000, 5'd1, 5'd2, 5'd3), 0);
    check(ack && !wt && !ill && q_push, "vadd.vv handshake");
    check(qi.unit == UNIT_VALU && qi.op == 5'(ALU_ADD) && qi.vd == 1 && qi.vs2 == 2 && qi.vs1 == 3, "vadd.vv fields");
    check(qi.rd_vs1 && qi.rd_vs2 && qi.wr_vd && !qi.use_scalar && qi.vl == 7 && qi.sew == EW8, "vadd.vv operands");
    // vsub.vx v4, v5, x
    send(opv(6'b000010, 3'b100, 5'd4, 5'd5, 5'd9), 32'hdead_beef);
    check(q_push && qi.op == 5'(ALU_SUB) && qi.use_scalar && qi.scalar == 32'hdead_beef && !qi.rd_vs1, "vsub.vx");
    // vadd.vi v4, v5, -3
    send(opv(6'b000000, 3'b011, 5'd4, 5'd5, 5'b11101), 0);
    check(q_push && qi.scalar == 32'hffff_fffd, "vadd.vi sign extension");
    // vsrl.vi uses an unsigned immediate
    send(opv(6'b101000, 3'b011, 5'd4, 5'd5, 5'b11101), 0);
    check(q_push && qi.op == 5'(ALU_SRL) && qi.scalar == 29, "vsrl.vi immediate");
    // vmacc.vv v8, v9, v10
    send(opv(6'b101101, 3'b010, 5'd8, 5'd10, 5'd9), 0);
    check(q_push && qi.unit == UNIT_VMUL && qi.op == 5'(MUL_MACC) && qi.rd_vd, "vmacc.vv");
    // vmul.vx
    send(opv(6'b100101, 3'b110, 5'd8, 5'd10, 5'd9), 3);
    check(q_push && qi.unit == UNIT_VMUL && qi.op == 5'(MUL_MUL) && qi.use_scalar && qi.scalar == 3, "vmul.vx");
    // vslidedown.vi
    send(opv(6'b001111, 3'b011, 5'd8, 5'd10, 5'd2), 0);
    check(q_push && qi.unit == UNIT_VSLDU && qi.op == 5'(SLD_DOWN) && qi.scalar == 2, "vslidedown.vi");
    // vrgather.vv
    send(opv(6'b001100, 3'b000, 5'd8, 5'd10, 5'd11), 0);
    check(q_push && qi.unit == UNIT_VIDXU && qi.op == 5'(IDX_GATHER_VV), "vrgather.vv");
    // vmv.x.s x5, v3 : waits for a scalar result, reads no vs1
    send(opv(6'b010000, 3'b010, 5'd5, 5'd3, 5'd0), 0);
    check(ack && wt && q_push && qi.unit == UNIT_VIDXU && qi.op == 5'(IDX_MV_XS) && !qi.wr_vd, "vmv.x.s");
    // vle16 with SEW 8 needs a register group: refused; vle8 accepted
    send(vle(1, 5'd2, 5'd10), 32'h100);
    check(ack && ill && !q_push, "vle16 at SEW 8 refused");
    send(vle(0, 5'd2, 5'd10), 32'h100);
    check(q_push && qi.unit == UNIT_VLSU && qi.op == 5'(LSU_LOAD) && qi.scalar == 32'h100 && qi.wr_vd, "vle8");
    send(vse(0, 5'd3, 5'd10), 32'h200);
    check(q_push && qi.op == 5'(LSU_STORE) && qi.rd_vd && !qi.wr_vd && qi.vd == 3, "vse8");
    // masked instruction (vm = 0) refused
    send(opv(6'b000000, 3'b000, 5'd1, 5'd2, 5'd3) & ~32'h0200_0000, 0);
    check(ack && ill && !q_push, "masked refused");
    // unknown funct6 refused
    send(opv(6'b111111, 3'b000, 5'd1, 5'd2, 5'd3), 0);
    check(ack && ill, "unknown refused");
    // queue full: no acknowledge, no push
    q_ready = 0;
    send(opv(6'b000000, 3'b000, 5'd1, 5'd2, 5'd3), 0);
    check(!ack && !q_push, "queue full holds ack");
    @(negedge clk);
    q_ready = 1; #1;
    check(ack && q_push, "ack after queue frees");
    // LMUL != 1 sets vill and vl = 0
    send({1'b0, 11'b000_000_001, 5'd6, 3'b111, 5'd5, 7'b1010111}, 4);
    @(negedge clk); valid = 0; #1;
    check(res_valid && res_data == 0, "LMUL 2 gives vl 0");
    send(opv(6'b000000, 3'b000, 5'd1, 5'd2, 5'd3), 0);
    check(ill, "refused after vill");
    @(negedge clk); valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
