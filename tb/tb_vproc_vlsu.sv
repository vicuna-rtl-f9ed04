// Self-checking testbench of the vector load/store unit with 128-bit
// registers. A memory model answers each access either in the same cycle
// (as a cache hit does) or after random wait cycles (as a miss does).
// Random unit-stride loads and stores of all element widths and random vl:
// loaded registers and their byte enables, and the stored memory bytes
// (nothing past vl may be written), are compared with a model. With
// zero-wait memory a load must write after words + 1 cycles and a store must
// be busy for words + 2 cycles.
module tb_vproc_vlsu;
  import vproc_pkg::*;
  import rvv_enc_pkg::*;
  localparam int VW = 128, MB = 1024;

  logic clk = 0, rst_n = 0;
  logic issue, busy, we;
  vinstr_t ins;
  logic [4:0] rd_addr, wr_addr;
  logic [VW-1:0] rd_data, wr_data;
  logic [VW/8-1:0] wr_be;
  logic req, mwe, done;
  logic [31:0] addr, wdata, rdata;
  logic [3:0] be;
  logic [VW-1:0] regs [32];
  logic [7:0] mem [MB];
  logic [7:0] ref_mem [MB];
  int wait_max, waitc;
  int checks = 0, failures = 0;

  vproc_vlsu #(.VREG_W(VW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .issue_i(issue), .instr_i(ins), .busy_o(busy),
    .rd_addr_o(rd_addr), .rd_data_i(rd_data), .wr_we_o(we), .wr_addr_o(wr_addr),
    .wr_data_o(wr_data), .wr_be_o(wr_be), .req_o(req), .we_o(mwe), .addr_o(addr),
    .wdata_o(wdata), .be_o(be), .done_i(done), .rdata_i(rdata));

  always #5 clk = ~clk;
  always_ff @(posedge clk) rd_data <= regs[rd_addr];

  // memory: completes a request after waitc cycles
  assign done  = req && (waitc == 0);
  assign rdata = {mem[(addr + 3) % MB], mem[(addr + 2) % MB], mem[(addr + 1) % MB], mem[addr % MB]};
  always @(posedge clk) begin
    if (req && waitc == 0) begin
      if (mwe) for (int b = 0; b < 4; b++) if (be[b]) mem[(addr + 32'(b)) % MB] <= wdata[8*b +: 8];
      waitc <= (wait_max == 0) ? 0 : int'($urandom % (wait_max + 1));
    end else if (req) begin
      waitc <= waitc - 1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) regs[r] = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < MB; i++) begin mem[i] = 8'($urandom); ref_mem[i] = mem[i]; end
    issue = 0; ins = '0; waitc = 0; wait_max = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int eb, vlmax, cyc, nb, nw;
      logic [31:0] base;
      wait_max = (it < 200) ? 0 : 3;
      ins = '0;
      ins.unit = UNIT_VLSU;
      ins.op = 5'(it % 2);
      ins.sew = sew_e'($urandom % 3);
      eb = sew_bytes(ins.sew);
      vlmax = VW / 8 / eb;
      ins.vl = 32'($urandom % (vlmax + 1));
      base = 32'(($urandom % (MB / 4 - VW / 32)) * 4);
      ins.scalar = base;
      ins.use_scalar = 1;
      ins.vd = 5'($urandom % 32);
      ins.rd_vd = (ins.op == 5'(LSU_STORE));
      ins.wr_vd = !ins.rd_vd;
      nb = int'(ins.vl) * eb;
      nw = (nb + 3) / 4;
      issue = 1;
      @(negedge clk);
      issue = 0;
      cyc = 1;
      if (ins.op == 5'(LSU_LOAD)) begin
        while (!we && cyc < 500) begin @(negedge clk); cyc++; end
        if (wait_max == 0) begin
          checks++;
          if (cyc != nw + 1) begin failures++; $display("load latency %0d exp %0d", cyc, nw + 1); end
        end
        for (int by = 0; by < VW / 8; by++) begin
          checks++;
          if (wr_be[by] != (by < nb) || (by < nb && wr_data[8*by +: 8] != ref_mem[base + 32'(by)])) begin
            failures++;
            if (failures < 10) $display("load byte %0d wrong", by);
          end
        end
      end else begin
        int busyc;
        busyc = 0;
        while (busy && busyc < 500) begin @(negedge clk); busyc++; end
        for (int by = 0; by < nb; by++) ref_mem[base + 32'(by)] = regs[ins.vd][8*by +: 8];
        if (wait_max == 0) begin
          checks++;
          if (busyc != nw + 2) begin failures++; $display("store busy %0d exp %0d", busyc, nw + 2); end
        end
        for (int i = 0; i < MB; i++) begin
          if (mem[i] != ref_mem[i]) begin
            failures++;
            if (failures < 10) $display("memory byte %0d wrong after store", i);
          end
        end
        checks++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
