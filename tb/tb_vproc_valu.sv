// Self-checking testbench of the vector ALU with 128-bit registers and a
// 32-bit datapath. A register-file model answers the unit's read port one
// cycle after the address. Random instructions (every operation, all element
// widths, vector and scalar operand, random vl) are issued; the written
// register is compared byte by byte with a reference model, the byte enables
// must cover exactly vl elements, and the number of cycles from issue to the
// write must match reads + 2 + (parts + 2), parts = ceil(vl*SEW/32).
module tb_vproc_valu;
  import vproc_pkg::*;
  import rvv_enc_pkg::*;
  localparam int VW = 128, AW = 32;

  logic clk = 0, rst_n = 0;
  logic issue, busy, we;
  vinstr_t ins;
  logic [4:0] rd_addr, wr_addr;
  logic [VW-1:0] rd_data, wr_data;
  logic [VW/8-1:0] wr_be;
  logic [VW-1:0] regs [32];
  int checks = 0, failures = 0;

  vproc_valu #(.VREG_W(VW), .ALU_W(AW)) dut (
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
    for (int it = 0; it < 600; it++) begin
      int eb, vlmax, cyc, nparts, exp_lat, reads;
      logic [VW-1:0] old_vd;
      ins = '0;
      ins.unit = UNIT_VALU;
      ins.op = 5'(it % 14);
      ins.sew = sew_e'($urandom % 3);
      eb = sew_bytes(ins.sew);
      vlmax = VW / 8 / eb;
      ins.vl = (it % 7 == 0) ? 32'(vlmax) : 32'($urandom % (vlmax + 1));
      ins.vs1 = 5'(1 + $urandom % 10);
      ins.vs2 = 5'(11 + $urandom % 10);
      ins.vd = 5'(21 + $urandom % 10);
      ins.use_scalar = $urandom % 2;
      ins.scalar = $urandom;
      ins.wr_vd = 1;
      old_vd = regs[ins.vd];
      reads = ins.use_scalar ? 1 : 2;
      nparts = (int'(ins.vl) * eb * 8 + AW - 1) / AW;
      exp_lat = reads + 2 + (nparts > 0 ? nparts + 2 : 0);
      issue = 1;
      @(negedge clk);
      issue = 0;
      cyc = 1;
      while (!we && cyc < 200) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != exp_lat) begin
        failures++;
        $display("latency %0d expected %0d (vl %0d sew %0d)", cyc, exp_lat, ins.vl, eb);
      end
      checks++;
      if (wr_addr != ins.vd) failures++;
      for (int e = 0; e < vlmax; e++) begin
        logic [31:0] a, b, r, got;
        a = trunc(32'(regs[ins.vs2] >> (8 * eb * e)), eb);
        b = ins.use_scalar ? trunc(ins.scalar, eb) : trunc(32'(regs[ins.vs1] >> (8 * eb * e)), eb);
        r = ref_alu(int'(ins.op), a, b, eb);
        got = trunc(32'(wr_data >> (8 * eb * e)), eb);
        checks++;
        if (e < int'(ins.vl)) begin
          if (got != r || !wr_be[e * eb]) begin
            failures++;
            if (failures < 10) $display("op %0d sew %0d e %0d a %h b %h got %h exp %h", ins.op, eb, e, a, b, got, r);
          end
        end else if (wr_be[e * eb]) begin
          failures++;
          $display("tail element %0d enabled", e);
        end
      end
      for (int by = 0; by < VW / 8; by++) if (wr_be[by]) regs[ins.vd][8*by +: 8] = wr_data[8*by +: 8];
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("still busy after write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
