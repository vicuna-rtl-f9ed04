// Self-checking testbench of the memory arbiter with the external memory
// model (5-cycle latency). Two request generators stand in for the data and
// instruction caches: each sends random transactions of 1 or 8 word beats
// (last beat flagged) and waits for all responses; the data side's
// transactions are randomly vector or main-core (scalar) ones and sometimes
// writes. vec_pending is toggled at random. Checked every cycle:
//   * a scalar data transaction or an instruction transaction never starts
//     while vec_pending is high, and hold_o reports it;
//   * a vector data transaction is never held back by vec_pending;
//   * when both caches may start, the data cache goes first;
//   * a started transaction is never interrupted by the other cache;
//   * every response goes to the cache that asked, with the right data.
module tb_mem_arbiter;
  logic clk = 0, rst_n = 0;
  logic vec_pending;
  logic d_req, d_we, d_scalar, d_last, d_gnt, d_rvalid;
  logic [31:0] d_addr, d_wdata;
  logic [3:0] d_be;
  logic i_req, i_last, i_gnt, i_rvalid;
  logic [31:0] i_addr, rdata;
  logic mem_req, mem_we, mem_gnt, mem_rvalid, hold;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0] mem_be;
  int checks = 0, failures = 0;
  int n_hold = 0, n_vec_pass = 0, n_dfirst = 0;

  mem_arbiter dut (
    .clk_i(clk), .rst_ni(rst_n), .vec_pending_i(vec_pending),
    .d_req_i(d_req), .d_we_i(d_we), .d_addr_i(d_addr), .d_wdata_i(d_wdata), .d_be_i(d_be),
    .d_scalar_i(d_scalar), .d_last_i(d_last), .d_gnt_o(d_gnt), .d_rvalid_o(d_rvalid),
    .i_req_i(i_req), .i_addr_i(i_addr), .i_last_i(i_last), .i_gnt_o(i_gnt), .i_rvalid_o(i_rvalid),
    .rdata_o(rdata), .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_addr_o(mem_addr),
    .mem_wdata_o(mem_wdata), .mem_be_o(mem_be), .mem_gnt_i(mem_gnt), .mem_rvalid_i(mem_rvalid),
    .mem_rdata_i(mem_rdata), .hold_o(hold));

  ext_mem_model #(.LAT(5), .WORDS(1024)) u_mem (
    .clk_i(clk), .req_i(mem_req), .we_i(mem_we), .addr_i(mem_addr), .wdata_i(mem_wdata),
    .be_i(mem_be), .gnt_o(mem_gnt), .rvalid_o(mem_rvalid), .rdata_o(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected read data per side, in request order
  logic [31:0] d_exp[$], i_exp[$];
  logic        d_isw[$];   // the response answers a write
  logic in_d, in_i;   // a transaction of that side has had a beat granted

  // one cache-like requester
  task automatic d_side(input int n);
    for (int t = 0; t < n; t++) begin
      int beats;
      logic [31:0] base;
      beats = ($urandom % 2) ? 8 : 1;
      base = 32'($urandom % 128) * 32;
      d_scalar = $urandom % 2;
      d_we = (beats == 1) && ($urandom % 2);
      for (int b = 0; b < beats; b++) begin
        d_req = 1; d_addr = base + 32'(b) * 4; d_last = (b == beats - 1);
        d_wdata = $urandom; d_be = 4'hF;
        @(posedge clk);
        while (!d_gnt) @(posedge clk);
        #1;
      end
      d_req = 0; d_last = 0;
      while (d_exp.size() != 0 || in_d) @(posedge clk);
      #1;
      repeat ($urandom % 4) @(posedge clk);
      #1;
    end
  endtask

  task automatic i_side(input int n);
    for (int t = 0; t < n; t++) begin
      int beats;
      logic [31:0] base;
      beats = ($urandom % 2) ? 8 : 1;
      base = 32'($urandom % 128) * 32;
      for (int b = 0; b < beats; b++) begin
        i_req = 1; i_addr = base + 32'(b) * 4; i_last = (b == beats - 1);
        @(posedge clk);
        while (!i_gnt) @(posedge clk);
        #1;
      end
      i_req = 0; i_last = 0;
      while (i_exp.size() != 0 || in_i) @(posedge clk);
      #1;
      repeat ($urandom % 4) @(posedge clk);
      #1;
    end
  endtask

  logic [31:0] shadow [1024];
  logic        any_started;

  always @(posedge clk) if (rst_n) begin
    // starting a transaction: no beat of either side in flight
    any_started = d_gnt || i_gnt;
    if (d_gnt && !in_d) begin
      checks++;
      if (d_scalar && vec_pending) begin failures++; $display("scalar data started while pending"); end
      if (in_i) begin failures++; $display("data interrupted instruction transaction"); end
      if (!d_scalar && vec_pending) n_vec_pass++;
      if (i_req) n_dfirst++;
    end
    if (i_gnt && !in_i) begin
      checks++;
      if (vec_pending) begin failures++; $display("fetch started while pending"); end
      if (d_req && (!d_scalar || !vec_pending)) begin failures++; $display("fetch before data"); end
      if (in_d) begin failures++; $display("fetch interrupted data transaction"); end
    end
    if (hold) n_hold++;
    if (d_req && d_scalar && vec_pending && !in_d && !in_i) begin
      checks++;
      if (d_gnt || (!hold && dut.outstanding_q == 0)) begin
        failures++; $display("scalar data not held");
      end
    end
    // expected responses
    if (d_gnt) begin
      if (d_we) begin
        for (int k = 0; k < 4; k++) if (d_be[k]) shadow[d_addr[11:2]][8*k +: 8] = d_wdata[8*k +: 8];
        d_exp.push_back(0);
        d_isw.push_back(1);
      end else begin
        d_exp.push_back(shadow[d_addr[11:2]]);
        d_isw.push_back(0);
      end
      in_d <= !d_last;
    end
    if (i_gnt) begin
      i_exp.push_back(shadow[i_addr[11:2]]);
      in_i <= !i_last;
    end
    if (d_rvalid) begin
      logic [31:0] e;
      checks++;
      if (d_exp.size() == 0) begin failures++; $display("unexpected data response"); end
      else begin
        e = d_exp.pop_front();
        if (!d_isw.pop_front() && e != rdata) begin failures++; $display("data rdata %h exp %h", rdata, e); end
      end
    end
    if (i_rvalid) begin
      checks++;
      if (i_exp.size() == 0) begin failures++; $display("unexpected fetch response"); end
      else if (i_exp.pop_front() != rdata) begin failures++; $display("fetch rdata wrong"); end
    end
  end

  initial begin
    d_req = 0; d_we = 0; d_scalar = 0; d_last = 0; d_addr = 0; d_wdata = 0; d_be = 0;
    i_req = 0; i_last = 0; i_addr = 0; vec_pending = 0; in_d = 0; in_i = 0;
    for (int i = 0; i < 1024; i++) begin shadow[i] = $urandom; u_mem.mem[i] = shadow[i]; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      d_side(600);
      i_side(600);
      forever begin
        @(posedge clk);
        #1;
        if ($urandom % 10 == 0) vec_pending = !vec_pending;
      end
    join_any
    vec_pending = 0;
    wait (i_exp.size() == 0 && !i_req);
    repeat (20) @(posedge clk);
    checks += 3;
    if (n_hold == 0) begin failures++; $display("no hold seen"); end
    if (n_vec_pass == 0) begin failures++; $display("no vector pass seen"); end
    if (n_dfirst == 0) begin failures++; $display("no data-first seen"); end
    $display("holds %0d vector passes %0d data-first %0d", n_hold, n_vec_pass, n_dfirst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
