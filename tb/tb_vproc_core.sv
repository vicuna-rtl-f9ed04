// Self-checking testbench of the vector coprocessor core (128-bit registers,
// 32-bit ALU datapath, 64-bit multiplier datapath) with a data memory that
// answers each word access after 0 to 3 cycles.
//
// The testbench acts as the main core: it sends a random program of vsetvli,
// unit-stride loads and stores, ALU, multiply, slide, gather and move
// instructions through the coprocessor interface. A reference model in
// rvv_enc_pkg executes the same program in order; every scalar result
// (vsetvli, vmv.x.s) is compared when it arrives, and at the end every
// register used is stored to memory and compared, as is the data window.
// It also counts the core's internal events and fails if one never occurs:
// hazard stalls, busy-unit stalls, a full queue, write-port collisions on
// both shared ports, and scalar waits. A directed sequence at the end
// steps vl until a gather and a slide write port 2 in the same cycle.
module tb_vproc_core;
  import rvv_enc_pkg::*;
  localparam int unsigned VW = 128, VB = VW / 8;
  localparam int unsigned BASE = 32'h100, SIZE = 512, DUMP = 32'h400;

  logic clk = 0, rst_n = 1;

  // the asynchronous reset is asserted with an edge, as at power-up
  initial #1 rst_n = 0;
  logic valid, ack, wt, illegal, res_valid;
  logic [31:0] instr, rs1, rs2, res_data;
  logic m_req, m_we, m_done, vec_pending;
  logic [31:0] m_addr, m_wdata, m_rdata;
  logic [3:0] m_be;
  logic [7:0] dmem [2048];
  int checks = 0, failures = 0;
  int n_hazard = 0, n_unit = 0, n_qfull = 0, n_coll0 = 0, n_coll2 = 0, n_wait = 0;

  vproc_core #(.VREG_W(VW), .ALU_W(32), .MUL_W(64), .Q_DEPTH(4)) dut (
    .clk_i(clk), .rst_ni(rst_n), .instr_valid_i(valid), .instr_i(instr), .rs1_i(rs1),
    .rs2_i(rs2), .instr_ack_o(ack), .instr_wait_o(wt), .instr_illegal_o(illegal),
    .res_valid_o(res_valid), .res_data_o(res_data), .mem_req_o(m_req), .mem_we_o(m_we),
    .mem_addr_o(m_addr), .mem_wdata_o(m_wdata), .mem_be_o(m_be), .mem_done_i(m_done),
    .mem_rdata_i(m_rdata), .vec_pending_o(vec_pending),
    .ev_hazard_o(), .ev_unit_o(), .ev_wdelay_o());

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data memory: done after a random wait, read data with done
  int wcnt = -1;
  always @(negedge clk) begin
    m_done = 0;
    if (m_req) begin
      if (wcnt < 0) wcnt = $urandom % 4;
      if (wcnt == 0) begin
        m_done = 1;
        for (int k = 0; k < 4; k++) m_rdata[8*k +: 8] = dmem[(m_addr + k) % 2048];
        wcnt = -1;
      end else wcnt--;
    end
  end
  always @(posedge clk) if (m_done && m_we)
    for (int k = 0; k < 4; k++) if (m_be[k]) dmem[(m_addr + k) % 2048] <= m_wdata[8*k +: 8];

  // event counters
  always @(posedge clk) if (rst_n) begin
    if (dut.hazard_stall) n_hazard++;
    if (dut.unit_stall)   n_unit++;
    if (dut.collision0)   n_coll0++;
    if (dut.collision2)   n_coll2++;
    if (valid && !ack)    n_qfull++;
  end

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

  vref rf;
  logic [31:0] ins, a, b, e;
  bit hr;

  initial begin
    valid = 0; instr = 0; rs1 = 0; rs2 = 0; m_done = 0; m_rdata = 0;
    rf = new(VB, BASE, SIZE);
    for (int i = 0; i < 2048; i++) begin
      dmem[i] = 8'($urandom);
      if (i >= BASE && i < BASE + SIZE) rf.m[i] = dmem[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      rf.gen(ins, a, b, hr, e);
      send(ins, a, b, hr, e);
      // sometimes the main core pauses
      if ($urandom % 8 == 0) repeat ($urandom % 20) @(posedge clk);
    end
    // an illegal instruction is refused
    @(negedge clk);
    valid = 1; instr = 32'h0000_0057 | (32'b111111 << 26) | (1 << 25); rs1 = 0;
    #1;
    while (!ack) begin @(negedge clk); #1; end
    checks++;
    if (!illegal) begin
      failures++;
      $display("undefined instruction not refused");
    end
    @(negedge clk);
    valid = 0;
    // directed: a gather (VIDXU) and a slide (VSLDU) that write port 2 in the
    // same cycle; vl is stepped until the two write-backs coincide. Registers
    // v20 to v23 are outside the randomly used set.
    for (int unsigned v = 0; v <= VB / 4 && n_coll2 == 0; v++) begin
      send(vsetvli(5'd5, 5'd6, 3'd2), v, 0, 1, v);
      send(opv(6'b001100, 3'b100, 5'd20, 5'd21, 5'd10), 0, 0, 0, 0);
      send(opv(6'b001110, 3'b100, 5'd22, 5'd23, 5'd10), 0, 0, 0, 0);
      repeat (VB / 4 + 8) @(posedge clk);
    end
    // dump registers
    send(vsetvli(5'd5, 5'd0, 3'd0), 0, 0, 1, VB);
    for (int v = 0; v < 8; v++) send(vse(0, 5'(v), 5'd10), DUMP + v * VB, 0, 0, 0);
    wait (!vec_pending);
    repeat (10) @(posedge clk);
    for (int v = 0; v < 8; v++)
      for (int i = 0; i < VB; i++) begin
        checks++;
        if (dmem[DUMP + v * VB + i] !== rf.r[v][i]) begin
          failures++;
          if (failures < 10) $display("v%0d byte %0d: %h expected %h", v, i,
                                      dmem[DUMP + v * VB + i], rf.r[v][i]);
        end
      end
    for (int i = BASE; i < BASE + SIZE; i++) begin
      checks++;
      if (dmem[i] !== rf.m[i]) begin
        failures++;
        if (failures < 10) $display("mem %h: %h expected %h", i, dmem[i], rf.m[i]);
      end
    end
    $display("hazard stalls %0d unit stalls %0d queue full %0d collisions %0d/%0d waits %0d",
             n_hazard, n_unit, n_qfull, n_coll0, n_coll2, n_wait);
    checks += 6;
    if (n_hazard == 0) failures++;
    if (n_unit == 0) failures++;
    if (n_qfull == 0) failures++;
    if (n_coll0 == 0) failures++;
    if (n_coll2 == 0) failures++;
    if (n_wait == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
