// Self-checking testbench of the indexing unit with 128-bit registers:
// vrgather.vv with random indices (some out of range), vrgather with a scalar
// index, vmv.s.x and vmv.x.s, all element widths, random vl. Checks written
// elements, byte enables, the sign-extended scalar result, and the cycle
// counts (vrgather: reads + 2 + vl, scalar moves fixed).
module tb_vproc_vidxu;
  import vproc_pkg::*;
  import rvv_enc_pkg::*;
  localparam int VW = 128;

  logic clk = 0, rst_n = 0;
  logic issue, busy, we, res_valid;
  vinstr_t ins;
  logic [4:0] rd_addr, wr_addr;
  logic [VW-1:0] rd_data, wr_data;
  logic [VW/8-1:0] wr_be;
  logic [31:0] res_data;
  logic [VW-1:0] regs [32];
  int checks = 0, failures = 0;

  vproc_vidxu #(.VREG_W(VW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .issue_i(issue), .instr_i(ins), .busy_o(busy),
    .rd_addr_o(rd_addr), .rd_data_i(rd_data), .wr_we_o(we), .wr_addr_o(wr_addr),
    .wr_data_o(wr_data), .wr_be_o(wr_be), .res_valid_o(res_valid), .res_data_o(res_data));

  always #5 clk = ~clk;
  always_ff @(posedge clk) rd_data <= regs[rd_addr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) regs[r] = {$urandom, $urandom, $urandom, $urandom};
    issue = 0; ins = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int eb, vlmax, cyc, exp_lat;
      ins = '0;
      ins.unit = UNIT_VIDXU;
      ins.op = 5'(it % 4);
      ins.sew = sew_e'($urandom % 3);
      eb = sew_bytes(ins.sew);
      vlmax = VW / 8 / eb;
      ins.vl = 32'($urandom % (vlmax + 1));
      ins.scalar = (it % 3 == 0) ? 32'($urandom) : 32'($urandom % (vlmax + 2));
      ins.vs1 = 5'(1 + $urandom % 10);
      ins.vs2 = 5'(11 + $urandom % 10);
      ins.vd = 5'(21 + $urandom % 10);
      // small indices in vs1 so that most are in range
      if (it % 2 == 0) for (int e = 0; e < vlmax; e++) regs[ins.vs1][8*eb*e +: 8] = 8'($urandom % (vlmax + 3));
      case (ins.op)
        5'(IDX_MV_XS):     exp_lat = 3;
        5'(IDX_MV_SX):     exp_lat = 1;
        5'(IDX_GATHER_VV): exp_lat = 4 + int'(ins.vl);
        default:           exp_lat = 3 + int'(ins.vl);
      endcase
      issue = 1;
      @(negedge clk);
      issue = 0;
      cyc = 1;
      while (!we && !res_valid && cyc < 100) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != exp_lat) begin failures++; $display("op %0d latency %0d exp %0d", ins.op, cyc, exp_lat); end
      if (ins.op == 5'(IDX_MV_XS)) begin
        checks++;
        if (res_data != 32'(sx(32'(regs[ins.vs2]), eb))) begin failures++; $display("vmv.x.s got %h", res_data); end
      end else begin
        for (int e = 0; e < vlmax; e++) begin
          logic en_exp;
          logic [31:0] exp, got, idx;
          if (ins.op == 5'(IDX_MV_SX)) begin
            en_exp = (e == 0) && (ins.vl != 0);
            exp = trunc(ins.scalar, eb);
          end else begin
            en_exp = e < int'(ins.vl);
            idx = (ins.op == 5'(IDX_GATHER_VV)) ? trunc(32'(regs[ins.vs1] >> (8 * eb * e)), eb) : ins.scalar;
            exp = (idx < 32'(vlmax)) ? trunc(32'(regs[ins.vs2] >> (8 * eb * idx)), eb) : 0;
          end
          got = trunc(32'(wr_data >> (8 * eb * e)), eb);
          checks++;
          if (wr_be[e * eb] != en_exp || (en_exp && got != exp)) begin
            failures++;
            if (failures < 10) $display("op %0d sew %0d e %0d got %h exp %h", ins.op, eb, e, got, exp);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
