// Self-checking testbench of the two-port, two-way cache (512 bytes, 32-byte
// lines, so that misses and evictions are frequent) in front of the external
// memory model (5-cycle latency). Both ports issue random reads and
// byte-masked writes over 2 kB; every read is compared with a reference copy
// of memory. Checks that a read hit completes in the cycle it is presented,
// that a read miss completes after 8 beats + 5 cycles latency, that a write
// completes after the memory latency, that port 0 is served first when both
// ports ask, and that LRU replacement keeps the most recently used line of a
// set.
module tb_cache;
  logic clk = 0, rst_n = 0;
  logic [1:0] req, we, done;
  logic [1:0][31:0] addr, wdata;
  logic [1:0][3:0] be;
  logic [31:0] rdata;
  logic miss;
  logic m_req, m_we, m_scalar, m_last, m_gnt, m_rvalid;
  logic [31:0] m_addr, m_wdata, m_rdata;
  logic [3:0] m_be;
  logic [31:0] refm [512];
  int checks = 0, failures = 0, hits = 0, misses = 0, both = 0;

  cache #(.SIZE_B(512), .LINE_B(32)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata),
    .be_i(be), .done_o(done), .rdata_o(rdata), .miss_o(miss),
    .m_req_o(m_req), .m_we_o(m_we), .m_addr_o(m_addr), .m_wdata_o(m_wdata), .m_be_o(m_be),
    .m_scalar_o(m_scalar), .m_last_o(m_last), .m_gnt_i(m_gnt), .m_rvalid_i(m_rvalid),
    .m_rdata_i(m_rdata));

  ext_mem_model #(.LAT(5), .WORDS(512)) u_mem (
    .clk_i(clk), .req_i(m_req), .we_i(m_we), .addr_i(m_addr), .wdata_i(m_wdata), .be_i(m_be),
    .gnt_o(m_gnt), .rvalid_o(m_rvalid), .rdata_o(m_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one access on port p; returns the number of cycles until done
  task automatic access(input int p, input logic w, input logic [31:0] a, input logic [31:0] d,
                        input logic [3:0] b, output int cyc, output logic [31:0] rd);
    req[p] = 1; we[p] = w; addr[p] = a; wdata[p] = d; be[p] = b;
    cyc = 0;
    #1;
    while (!done[p]) begin @(negedge clk); #1; cyc++; end
    rd = rdata;
    if (w) for (int k = 0; k < 4; k++) if (b[k]) refm[a[10:2]][8*k +: 8] = d[8*k +: 8];
    @(negedge clk);
    req[p] = 0;
  endtask

  task automatic check_read(input int p, input logic [31:0] a, output int cyc);
    logic [31:0] rd;
    access(p, 0, a, 0, 0, cyc, rd);
    checks++;
    if (rd != refm[a[10:2]]) begin
      failures++;
      if (failures < 10) $display("port %0d read %h got %h exp %h", p, a, rd, refm[a[10:2]]);
    end
  endtask

  int cyc;
  logic [31:0] rd;

  initial begin
    req = 0; we = 0; addr = 0; wdata = 0; be = 0;
    for (int i = 0; i < 512; i++) begin refm[i] = $urandom; u_mem.mem[i] = refm[i]; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // miss then hit timing
    check_read(1, 32'h40, cyc);
    checks++; if (cyc != 13) begin failures++; $display("miss took %0d", cyc); end
    check_read(1, 32'h44, cyc);
    checks++; if (cyc != 0) begin failures++; $display("hit took %0d", cyc); end
    // write latency
    access(0, 1, 32'h48, 32'h1234_5678, 4'b0101, cyc, rd);
    checks++; if (cyc != 5) begin failures++; $display("write took %0d", cyc); end
    check_read(0, 32'h48, cyc);
    checks++; if (cyc != 0) failures++;
    // LRU: sets repeat every 256 bytes; lines A=0x40, B=0x140, C=0x240 share a set
    check_read(0, 32'h140, cyc);   // B fills the second way
    check_read(0, 32'h40, cyc);    // A used again -> B is LRU
    check_read(0, 32'h240, cyc);   // C replaces B
    check_read(0, 32'h40, cyc);
    checks++; if (cyc != 0) begin failures++; $display("LRU evicted the recently used line"); end
    check_read(0, 32'h140, cyc);
    checks++; if (cyc == 0) begin failures++; $display("LRU kept the least recently used line"); end
    // precedence: both ports ask in the same cycle for hit lines
    req = 2'b11; we = 0; addr[0] = 32'h40; addr[1] = 32'h44;
    #1;
    checks++; if (done != 2'b01) begin failures++; $display("port 0 not first"); end
    @(negedge clk);
    req[0] = 0;
    #1;
    checks++; if (done != 2'b10) failures++;
    @(negedge clk);
    req = 0;
    // random traffic from both ports
    fork
      for (int i = 0; i < 1500; i++) begin
        logic [31:0] a;
        a = 32'($urandom % 512) * 4;
        if ($urandom % 3 == 0) access(0, 1, a, $urandom, 4'($urandom), cyc, rd);
        else begin check_read(0, a, cyc); if (cyc == 0) hits++; else misses++; end
      end
      for (int i = 0; i < 1500; i++) begin
        logic [31:0] a;
        a = 32'($urandom % 512) * 4;
        if (req[0]) both++;
        if ($urandom % 3 == 0) access(1, 1, a, $urandom, 4'($urandom), cyc, rd);
        else check_read(1, a, cyc);
      end
    join
    checks += 2;
    if (hits == 0 || misses == 0) failures++;
    if (both == 0) failures++;
    $display("port 0 hits %0d misses %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
