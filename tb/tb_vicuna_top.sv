// End-to-end self-checking testbench of the Vicuna processing system
// (vector coprocessor, shared data cache, instruction cache and memory
// arbiter) with the external memory model (5-cycle latency).
//
// FULL = 0 runs a reduced size (128-bit registers, 1 kB data cache, 512 B
// instruction cache) so that misses and evictions are frequent; FULL = 1
// instantiates vicuna_top with no parameter overrides, the document's fast
// configuration (see tb_vicuna_top_full).
//
// The testbench plays the main core. One process sends a random vector
// program through the coprocessor interface and checks every scalar result
// against the reference model in rvv_enc_pkg; concurrently, two processes
// issue random main-core data reads and writes (own memory window, checked
// against a shadow copy) and instruction fetches (checked against memory).
// Afterwards directed sequences make sure that a main-core data miss waits
// behind a long vector load, and that a data miss and a fetch miss raised in
// the same cycle are served data first. Finally all registers used and the
// vector data window are compared with the reference model, and the latency
// of a full-length vmul.vv is checked against the multiplier's rate
// (MUL_W / 8 8-bit products per cycle: 128 in the fast configuration).
//
// Every mechanism is counted and the test fails if one never occurs:
// write-port collision (delayed write), hazard stall, unit-busy stall, full
// queue, scalar wait, cache miss with line fill, main-core traffic held
// behind pending vector accesses, data before fetch, vector precedence at
// the data cache.
module tb_vicuna_top #(
  parameter bit FULL = 1'b0
);
  import rvv_enc_pkg::*;
  localparam int unsigned VW     = FULL ? 2048 : 128;
  localparam int unsigned MW     = FULL ? 1024 : 64;
  localparam int unsigned VB     = VW / 8;
  localparam int unsigned NINSTR = FULL ? 800 : 3000;
  localparam int unsigned VBASE  = 32'h1000, VSIZE = 1024, DUMP = 32'h4000;
  localparam int unsigned SBASE  = 32'h6000, SWORDS = 256, SSHADOW = 1024;
  localparam int unsigned CBASE  = 32'h8000, CWORDS = 1024;

  logic clk = 0, rst_n = 1;

  // the asynchronous reset is asserted with an edge, as at power-up
  initial #1 rst_n = 0;
  logic valid, ack, wt, illegal, res_valid;
  logic [31:0] instr, rs1, rs2, res_data;
  logic d_req, d_we, d_done, f_req, f_done;
  logic [31:0] d_addr, d_wdata, d_rdata, f_addr, f_rdata;
  logic [3:0] d_be;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0] mem_be;
  int checks = 0, failures = 0;

  if (FULL) begin : g_dut
    vicuna_top dut (
      .clk_i(clk), .rst_ni(rst_n),
      .instr_valid_i(valid), .instr_i(instr), .rs1_i(rs1), .rs2_i(rs2), .instr_ack_o(ack),
      .instr_wait_o(wt), .instr_illegal_o(illegal), .res_valid_o(res_valid),
      .res_data_o(res_data),
      .data_req_i(d_req), .data_we_i(d_we), .data_addr_i(d_addr), .data_wdata_i(d_wdata),
      .data_be_i(d_be), .data_done_o(d_done), .data_rdata_o(d_rdata),
      .fetch_req_i(f_req), .fetch_addr_i(f_addr), .fetch_done_o(f_done),
      .fetch_rdata_o(f_rdata),
      .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_addr_o(mem_addr), .mem_wdata_o(mem_wdata),
      .mem_be_o(mem_be), .mem_gnt_i(mem_gnt), .mem_rvalid_i(mem_rvalid),
      .mem_rdata_i(mem_rdata), .ev_hazard_o(), .ev_unit_o(), .ev_wdelay_o(), .ev_dc_miss_o(),
      .ev_ic_miss_o(), .ev_mem_hold_o());
  end else begin : g_dut
    vicuna_top #(.VREG_W(128), .ALU_W(32), .MUL_W(64), .Q_DEPTH(4), .DC_SIZE(1024),
                 .IC_SIZE(512), .LINE_B(32)) dut (
      .clk_i(clk), .rst_ni(rst_n),
      .instr_valid_i(valid), .instr_i(instr), .rs1_i(rs1), .rs2_i(rs2), .instr_ack_o(ack),
      .instr_wait_o(wt), .instr_illegal_o(illegal), .res_valid_o(res_valid),
      .res_data_o(res_data),
      .data_req_i(d_req), .data_we_i(d_we), .data_addr_i(d_addr), .data_wdata_i(d_wdata),
      .data_be_i(d_be), .data_done_o(d_done), .data_rdata_o(d_rdata),
      .fetch_req_i(f_req), .fetch_addr_i(f_addr), .fetch_done_o(f_done),
      .fetch_rdata_o(f_rdata),
      .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_addr_o(mem_addr), .mem_wdata_o(mem_wdata),
      .mem_be_o(mem_be), .mem_gnt_i(mem_gnt), .mem_rvalid_i(mem_rvalid),
      .mem_rdata_i(mem_rdata), .ev_hazard_o(), .ev_unit_o(), .ev_wdelay_o(), .ev_dc_miss_o(),
      .ev_ic_miss_o(), .ev_mem_hold_o());
  end

  ext_mem_model #(.LAT(5), .WORDS(16384)) u_mem (
    .clk_i(clk), .req_i(mem_req), .we_i(mem_we), .addr_i(mem_addr), .wdata_i(mem_wdata),
    .be_i(mem_be), .gnt_o(mem_gnt), .rvalid_o(mem_rvalid), .rdata_o(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (FULL ? 2000000 : 1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitors
  int n_coll = 0, n_hazard = 0, n_unit = 0, n_qfull = 0, n_wait = 0, n_miss = 0, n_fill = 0;
  int n_hold = 0, n_held_start = 0, n_dfirst = 0, n_vprec = 0;
  logic held_q = 0;
  int cyc = 0;

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    if (g_dut.dut.u_core.collision0 || g_dut.dut.u_core.collision2) n_coll++;
    if (g_dut.dut.u_core.hazard_stall) n_hazard++;
    if (g_dut.dut.u_core.unit_stall)   n_unit++;
    if (valid && !ack)                 n_qfull++;
    if (g_dut.dut.u_dcache.miss_o)     n_miss++;
    if (g_dut.dut.u_icache.miss_o)     n_miss++;
    if (g_dut.dut.u_dcache.state_q == 1 && g_dut.dut.dm_rvalid) n_fill++;
    // arbiter: main-core traffic behind pending vector accesses
    if (g_dut.dut.u_arbiter.hold_o) begin
      n_hold++;
      held_q <= 1;
    end
    if (g_dut.dut.u_arbiter.can_start) begin
      if (g_dut.dut.u_arbiter.sel_d && g_dut.dut.dm_scalar) begin
        checks++;
        if (g_dut.dut.vec_pending) begin
          failures++;
          $display("main-core data transaction started with vector accesses pending");
        end
        if (held_q) n_held_start++;
        held_q <= 0;
      end
      if (g_dut.dut.u_arbiter.sel_i) begin
        checks++;
        if (g_dut.dut.vec_pending || g_dut.dut.dm_req) begin
          failures++;
          $display("fetch transaction started before a data transaction");
        end
        if (held_q) n_held_start++;
        held_q <= 0;
      end
      if (g_dut.dut.u_arbiter.sel_d && g_dut.dut.im_req) n_dfirst++;
    end
    // data cache: vector port first
    if (g_dut.dut.u_dcache.state_q == 0 && g_dut.dut.v_req && d_req) begin
      checks++;
      if (d_done) begin
        failures++;
        $display("main core served before the vector core");
      end
      if (g_dut.dut.dc_done[0] || g_dut.dut.dm_req) n_vprec++;
    end
  end

  // ------------------------------------------------------- main-core driver
  task automatic send(input logic [31:0] i, input logic [31:0] a, input logic [31:0] b,
                      input bit has_res, input logic [31:0] exp);
    @(negedge clk);
    valid = 1; instr = i; rs1 = a; rs2 = b;
    #1;
    while (!ack) begin @(negedge clk); #1; end
    checks++;
    if (illegal || (wt != has_res)) begin
      failures++;
      $display("instr %h: illegal %b wait %b", i, illegal, wt);
    end
    @(posedge clk);
    #1;
    valid = 0;
    if (wt) begin
      n_wait++;
      while (!res_valid) begin @(posedge clk); #1; end
      checks++;
      if (res_data != exp) begin
        failures++;
        $display("instr %h: result %h expected %h", i, res_data, exp);
      end
    end
  endtask

  logic [31:0] shadow [SSHADOW];

  task automatic data_access(input logic w, input logic [31:0] a, input logic [31:0] wd,
                             input logic [3:0] be);
    @(negedge clk);
    d_req = 1; d_we = w; d_addr = a; d_wdata = wd; d_be = be;
    #1;
    while (!d_done) begin @(negedge clk); #1; end
    checks++;
    if (w) begin
      for (int k = 0; k < 4; k++) if (be[k]) shadow[(a - SBASE) / 4][8*k +: 8] = wd[8*k +: 8];
    end else if (d_rdata != shadow[(a - SBASE) / 4]) begin
      failures++;
      $display("scalar read %h: %h expected %h", a, d_rdata, shadow[(a - SBASE) / 4]);
    end
    @(posedge clk);
    #1;
    d_req = 0;
  endtask

  task automatic fetch(input logic [31:0] a);
    @(negedge clk);
    f_req = 1; f_addr = a;
    #1;
    while (!f_done) begin @(negedge clk); #1; end
    checks++;
    if (f_rdata != u_mem.mem[a / 4]) begin
      failures++;
      $display("fetch %h: %h expected %h", a, f_rdata, u_mem.mem[a / 4]);
    end
    @(posedge clk);
    #1;
    f_req = 0;
  endtask

  vref rf;
  bit  prog_done = 0;

  initial begin
    valid = 0; instr = 0; rs1 = 0; rs2 = 0;
    d_req = 0; d_we = 0; d_addr = 0; d_wdata = 0; d_be = 0; f_req = 0; f_addr = 0;
    rf = new(VB, VBASE, VSIZE);
    for (int i = 0; i < 16384; i++) u_mem.mem[i] = $urandom;
    for (int i = 0; i < VSIZE; i++) rf.m[VBASE + i] = u_mem.mem[(VBASE + i) / 4][8 * (i % 4) +: 8];
    for (int i = 0; i < SSHADOW; i++) shadow[i] = u_mem.mem[SBASE / 4 + i];
    repeat (3) @(posedge clk);
    rst_n = 1;

    // random phase: vector program, main-core data accesses and fetches
    fork
      begin
        logic [31:0] ins, a, b, e;
        bit hr;
        for (int n = 0; n < int'(NINSTR); n++) begin
          rf.gen(ins, a, b, hr, e);
          send(ins, a, b, hr, e);
          if ($urandom % 8 == 0) repeat ($urandom % 20) @(posedge clk);
        end
        prog_done = 1;
      end
      while (!prog_done) begin
        data_access($urandom % 3 == 0, SBASE + ($urandom % SWORDS) * 4, $urandom, 4'($urandom));
        repeat ($urandom % 30) @(posedge clk);
      end
      while (!prog_done) begin
        fetch(CBASE + ($urandom % CWORDS) * 4);
        repeat ($urandom % 30) @(posedge clk);
      end
    join
    wait (!g_dut.dut.vec_pending);

    // directed: a main-core data miss waits behind a long vector load
    begin
      int t_vec_done, t_data;
      send(vsetvli(5'd5, 5'd0, 3'd0), 0, 0, 1, VB);
      rf.eb = 1; rf.vl = VB; rf.vill = 0;
      send(vle(0, 5'd3, 5'd10), VBASE, 0, 0, 0);
      for (int i = 0; i < int'(VB); i++) rf.r[3][i] = rf.m[VBASE + i];
      fork
        begin
          data_access(0, SBASE + SWORDS * 4 + 64, 0, 0);
          t_data = cyc;
        end
        begin
          @(negedge clk);
          while (g_dut.dut.vec_pending) @(negedge clk);
          t_vec_done = cyc;
        end
      join
      checks++;
      if (t_data <= t_vec_done) begin
        failures++;
        $display("data miss finished before the vector load");
      end
    end

    // directed: data miss and fetch miss in the same cycle
    begin
      int t_d = 0, t_f = 0;
      fork
        begin data_access(0, SBASE + SWORDS * 4 + 256, 0, 0); t_d = cyc; end
        begin fetch(CBASE + CWORDS * 4 + 64); t_f = cyc; end
      join
      checks++;
      if (t_d >= t_f) begin
        failures++;
        $display("fetch miss served before data miss");
      end
    end

    // multiplier rate: full-length vmul.vv latency
    begin
      int t_iss, t_wb, nparts;
      send(vsetvli(5'd5, 5'd0, 3'd0), 0, 0, 1, VB);
      fork
        send(opv(6'b100101, 3'b010, 5'd4, 5'd3, 5'd3), 0, 0, 0, 0);
        begin
          @(posedge clk);
          while (!g_dut.dut.u_core.issue[2]) @(posedge clk);
          t_iss = cyc;
          @(posedge clk);
          while (!g_dut.dut.u_core.mul_we) @(posedge clk);
          t_wb = cyc;
        end
      join
      for (int i = 0; i < int'(VB); i++) rf.r[4][i] = 8'(ref_mul(0, rf.r[3][i], rf.r[3][i], 0, 1));
      nparts = VW / MW;
      checks++;
      if (t_wb - t_iss != nparts + 5) begin
        failures++;
        $display("vmul.vv took %0d cycles, expected %0d", t_wb - t_iss, nparts + 5);
      end
      $display("vmul.vv on %0d 8-bit elements: %0d cycles issue to write-back, %0d products per cycle",
               VB, t_wb - t_iss, VB / nparts);
    end

    // directed: a load (VLSU) and an add (VALU) that write port 0 in the same
    // cycle; vl is stepped until the two write-backs coincide
    begin
      int c0;
      logic [31:0] x;
      c0 = n_coll;
      for (int unsigned v = 1; v <= VB / 4 && n_coll == c0; v++) begin
        x = $urandom;
        send(vsetvli(5'd5, 5'd6, 3'd2), v, 0, 1, v);
        fork
          send(vle(0, 5'd1, 5'd10), VBASE, 0, 0, 0);
          begin
            @(posedge clk);
            #1;
            send(opv(6'b000000, 3'b100, 5'd2, 5'd3, 5'd10), x, 0, 0, 0);
          end
        join
        for (int unsigned i = 0; i < v; i++) rf.r[1][i] = rf.m[VBASE + i];
        for (int unsigned i = 0; i < v; i++) rf.put(2, i, 4, ref_alu(0, rf.get(3, i, 4), x, 4));
        wait (!g_dut.dut.vec_pending && !g_dut.dut.u_core.busy[1]);
        repeat (4) @(posedge clk);
      end
    end

    // dump registers and compare
    send(vsetvli(5'd5, 5'd0, 3'd0), 0, 0, 1, VB);
    for (int v = 0; v < 8; v++) send(vse(0, 5'(v), 5'd10), DUMP + v * VB, 0, 0, 0);
    wait (!g_dut.dut.vec_pending);
    repeat (20) @(posedge clk);
    for (int v = 0; v < 8; v++)
      for (int i = 0; i < int'(VB); i++) begin
        logic [7:0] got;
        got = u_mem.mem[(DUMP + v * VB + i) / 4][8 * (i % 4) +: 8];
        checks++;
        if (got !== rf.r[v][i]) begin
          failures++;
          if (failures < 10) $display("v%0d byte %0d: %h expected %h", v, i, got, rf.r[v][i]);
        end
      end
    for (int i = 0; i < int'(VSIZE); i++) begin
      logic [7:0] got;
      got = u_mem.mem[(VBASE + i) / 4][8 * (i % 4) +: 8];
      checks++;
      if (got !== rf.m[VBASE + i]) begin
        failures++;
        if (failures < 10) $display("mem %h: %h expected %h", VBASE + i, got, rf.m[VBASE + i]);
      end
    end
    for (int i = 0; i < int'(SSHADOW); i++) begin
      checks++;
      if (u_mem.mem[SBASE / 4 + i] != shadow[i]) failures++;
    end

    $display("write-port collisions %0d, hazard stalls %0d, unit stalls %0d, queue full %0d",
             n_coll, n_hazard, n_unit, n_qfull);
    $display("scalar waits %0d, cache misses %0d (fill beats %0d), held cycles %0d, held then started %0d",
             n_wait, n_miss, n_fill, n_hold, n_held_start);
    $display("data before fetch %0d, vector precedence at the cache %0d", n_dfirst, n_vprec);
    checks += 10;
    if (n_coll == 0)       begin failures++; $display("no write-port collision"); end
    if (n_hazard == 0)     begin failures++; $display("no hazard stall"); end
    if (n_unit == 0)       begin failures++; $display("no unit-busy stall"); end
    if (n_qfull == 0)      begin failures++; $display("queue never full"); end
    if (n_wait == 0)       begin failures++; $display("no scalar wait"); end
    if (n_miss == 0 || n_fill == 0) begin failures++; $display("no line fill"); end
    if (n_hold == 0)       begin failures++; $display("main core never held"); end
    if (n_held_start == 0) begin failures++; $display("held access never started"); end
    if (n_dfirst == 0)     begin failures++; $display("data never before fetch"); end
    if (n_vprec == 0)      begin failures++; $display("no vector precedence"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
