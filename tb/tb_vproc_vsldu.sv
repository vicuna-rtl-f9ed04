// Self-checking testbench of the slide unit with 128-bit registers:
// random slide-up, slide-down, slide1up and slide1down instructions (all
// element widths, random offsets including offsets past the register end,
// random scalars, random vl). The written
// elements and byte enables are compared with the element-wise definition,
// and the write must come 3 cycles after the issue cycle.
module tb_vproc_vsldu;
  import vproc_pkg::*;
  import rvv_enc_pkg::*;
  localparam int VW = 128;

  logic clk = 0, rst_n = 0;
  logic issue, busy, we;
  vinstr_t ins;
  logic [4:0] rd_addr, wr_addr;
  logic [VW-1:0] rd_data, wr_data;
  logic [VW/8-1:0] wr_be;
  logic [VW-1:0] regs [32];
  int checks = 0, failures = 0;

  vproc_vsldu #(.VREG_W(VW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .issue_i(issue), .instr_i(ins), .busy_o(busy),
    .rd_addr_o(rd_addr), .rd_data_i(rd_data), .wr_we_o(we), .wr_addr_o(wr_addr),
    .wr_data_o(wr_data), .wr_be_o(wr_be));

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
    for (int it = 0; it < 500; it++) begin
      int eb, vlmax, cyc, off;
      ins = '0;
      ins.unit = UNIT_VSLDU;
      ins.op = 5'(it % 4);
      ins.sew = sew_e'($urandom % 3);
      eb = sew_bytes(ins.sew);
      vlmax = VW / 8 / eb;
      ins.vl = 32'($urandom % (vlmax + 1));
      off = (it % 10 == 9) ? 1000 : int'($urandom % (vlmax + 2));
      ins.scalar = (ins.op >= 5'(SLD_1UP)) ? $urandom : 32'(off);
      if (ins.op >= 5'(SLD_1UP)) off = 1;
      ins.use_scalar = 1;
      ins.vs2 = 5'(1 + $urandom % 15);
      ins.vd = 5'(16 + $urandom % 15);
      issue = 1;
      @(negedge clk);
      issue = 0;
      cyc = 1;
      while (!we && cyc < 50) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 3) begin failures++; $display("latency %0d", cyc); end
      for (int e = 0; e < vlmax; e++) begin
        logic en_exp;
        logic [31:0] exp, got;
        if (ins.op == 5'(SLD_UP)) begin
          en_exp = (e >= off) && (e < int'(ins.vl));
          exp = en_exp ? trunc(32'(regs[ins.vs2] >> (8 * eb * (e - off))), eb) : 0;
        end else if (ins.op == 5'(SLD_1UP)) begin
          en_exp = e < int'(ins.vl);
          exp = (e == 0) ? trunc(ins.scalar, eb) : trunc(32'(regs[ins.vs2] >> (8 * eb * (e - 1))), eb);
        end else if (ins.op == 5'(SLD_1DOWN)) begin
          en_exp = e < int'(ins.vl);
          exp = (e == int'(ins.vl) - 1) ? trunc(ins.scalar, eb) : trunc(32'(regs[ins.vs2] >> (8 * eb * (e + 1))), eb);
        end else begin
          en_exp = e < int'(ins.vl);
          exp = (e + off < vlmax) ? trunc(32'(regs[ins.vs2] >> (8 * eb * (e + off))), eb) : 0;
        end
        got = trunc(32'(wr_data >> (8 * eb * e)), eb);
        checks++;
        if (wr_be[e * eb] != en_exp || (en_exp && got != exp)) begin
          failures++;
          if (failures < 10) $display("op %0d sew %0d off %0d e %0d got %h/%0d exp %h/%0d", ins.op, eb, off, e, got, wr_be[e*eb], exp, en_exp);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
