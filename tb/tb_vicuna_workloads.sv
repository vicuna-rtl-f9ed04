// Benchmark kernels on the full-size Vicuna processing system.
//
// Runs the three 8-bit kernels used to evaluate the design on vicuna_top with
// its default (fast) configuration and the 5-cycle external memory model,
// with the testbench playing the main core:
//   * AXPY  Y <- a*X + Y on N_AXPY elements: strips of at most VLMAX
//     elements, each vle8 X, vle8 Y, vmacc.vx, vse8 Y;
//   * GEMM  C <- A*B + C on N_GEMM x N_GEMM matrices: one row of C per
//     vector register, C[i] += A[i][k] * B[k] with vmacc.vx, where the main
//     core loads each A[i][k] through its data port (that load waits for
//     the pending vector loads, as the memory ordering requires);
//   * CONV  3x3 convolution of a CW x CH image: per output row, three input
//     rows are loaded and multiplied into an accumulator by nine vmacc.vx,
//     the shifted neighbours being formed with vslidedown.vi 1 and 2.
// Inputs are random; every result byte in memory is compared with a
// reference computed here (all arithmetic modulo 256). Each kernel's cycle
// count is printed and checked against its bound: the memory bound (one
// 32-bit word per cycle) for AXPY and CONV, the multiplier bound (128 8-bit
// MACs per cycle) for GEMM. The sizes are smaller than the ones the design
// was evaluated with, so that the run takes seconds; the kernels are the
// same and scale by strip-mining.
module tb_vicuna_workloads;
  import rvv_enc_pkg::*;

  localparam int unsigned VB     = 256;          // VLMAX at SEW = 8
  localparam int unsigned N_AXPY = 1000;
  localparam int unsigned N_GEMM = 32;
  localparam int unsigned CW = 64, CH = 12;
  localparam int unsigned XA = 32'h0000, YA = 32'h0400;
  localparam int unsigned AA = 32'h1000, BA = 32'h1400, CA = 32'h1800;
  localparam int unsigned IA = 32'h2000, OA = 32'h2400;

  logic clk = 0, rst_n = 1;

  // the asynchronous reset is asserted with an edge, as at power-up
  initial #1 rst_n = 0;
  logic valid, ack, wt, illegal, res_valid;
  logic [31:0] instr, rs1, rs2, res_data;
  logic d_req, d_we, d_done, f_done;
  logic [31:0] d_addr, d_wdata, d_rdata, f_rdata;
  logic [3:0] d_be;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0] mem_be;
  int checks = 0, failures = 0;
  int cyc = 0;

  vicuna_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .instr_valid_i(valid), .instr_i(instr), .rs1_i(rs1), .rs2_i(rs2), .instr_ack_o(ack),
    .instr_wait_o(wt), .instr_illegal_o(illegal), .res_valid_o(res_valid),
    .res_data_o(res_data),
    .data_req_i(d_req), .data_we_i(d_we), .data_addr_i(d_addr), .data_wdata_i(d_wdata),
    .data_be_i(d_be), .data_done_o(d_done), .data_rdata_o(d_rdata),
    .fetch_req_i(1'b0), .fetch_addr_i(32'd0), .fetch_done_o(f_done),
    .fetch_rdata_o(f_rdata),
    .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_addr_o(mem_addr), .mem_wdata_o(mem_wdata),
    .mem_be_o(mem_be), .mem_gnt_i(mem_gnt), .mem_rvalid_i(mem_rvalid),
    .mem_rdata_i(mem_rdata), .ev_hazard_o(), .ev_unit_o(), .ev_wdelay_o(), .ev_dc_miss_o(),
    .ev_ic_miss_o(), .ev_mem_hold_o());

  ext_mem_model #(.LAT(5), .WORDS(16384)) u_mem (
    .clk_i(clk), .req_i(mem_req), .we_i(mem_we), .addr_i(mem_addr), .wdata_i(mem_wdata),
    .be_i(mem_be), .gnt_o(mem_gnt), .rvalid_o(mem_rvalid), .rdata_o(mem_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] mb(input int unsigned a);
    return u_mem.mem[a / 4][8 * (a % 4) +: 8];
  endfunction

  // one vector instruction through the coprocessor interface
  task automatic send(input logic [31:0] i, input logic [31:0] a, input bit has_res,
                      input logic [31:0] exp);
    @(negedge clk);
    valid = 1; instr = i; rs1 = a; rs2 = 0;
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
      while (!res_valid) begin @(posedge clk); #1; end
      checks++;
      if (res_data != exp) begin
        failures++;
        $display("instr %h: result %h expected %h", i, res_data, exp);
      end
    end
  endtask

  // main-core byte load through the data port
  task automatic load_byte(input logic [31:0] a, output logic [7:0] b);
    @(negedge clk);
    d_req = 1; d_we = 0; d_addr = {a[31:2], 2'b00}; d_be = 4'hF;
    #1;
    while (!d_done) begin @(negedge clk); #1; end
    b = d_rdata[8 * a[1:0] +: 8];
    @(posedge clk);
    #1;
    d_req = 0;
  endtask

  task automatic setvl(input int unsigned n);
    send(vsetvli(5'd5, 5'd6, 3'd0), n, 1, (n < VB) ? n : VB);
  endtask

  task automatic drain();
    @(posedge clk);
    while (dut.vec_pending || dut.u_core.busy != '0) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  function automatic logic [31:0] vmacc_vx(input logic [4:0] vd, input logic [4:0] vs2);
    return opv(6'b101101, 3'b110, vd, vs2, 5'd11);
  endfunction

  task automatic compare(input string what, input int unsigned a, input logic [7:0] exp);
    checks++;
    if (mb(a) !== exp) begin
      failures++;
      if (failures < 10) $display("%s at %h: %h expected %h", what, a, mb(a), exp);
    end
  endtask

  logic [7:0] ref_y [N_AXPY];
  logic [7:0] ref_c [N_GEMM][N_GEMM];
  logic [7:0] ref_o [CH][CW];
  logic [7:0] kern [9];

  initial begin
    int t0, t_axpy, t_gemm, t_conv;
    logic [7:0] alpha, aik;
    valid = 0; instr = 0; rs1 = 0; rs2 = 0;
    d_req = 0; d_we = 0; d_addr = 0; d_wdata = 0; d_be = 0;
    for (int i = 0; i < 16384; i++) u_mem.mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ------------------------------------------------------------ AXPY
    alpha = 8'($urandom);
    for (int i = 0; i < int'(N_AXPY); i++) ref_y[i] = 8'(alpha * mb(XA + i) + mb(YA + i));
    t0 = cyc;
    for (int unsigned s = 0; s < N_AXPY; s += VB) begin
      setvl(N_AXPY - s);
      send(vle(0, 5'd1, 5'd10), XA + s, 0, 0);
      send(vle(0, 5'd2, 5'd10), YA + s, 0, 0);
      send(vmacc_vx(5'd2, 5'd1), 32'(alpha), 0, 0);
      send(vse(0, 5'd2, 5'd10), YA + s, 0, 0);
    end
    drain();
    t_axpy = cyc - t0;
    for (int i = 0; i < int'(N_AXPY); i++) compare("AXPY", YA + i, ref_y[i]);

    // ------------------------------------------------------------ GEMM
    for (int i = 0; i < int'(N_GEMM); i++) begin
      for (int j = 0; j < int'(N_GEMM); j++) begin
        logic [7:0] acc;
        acc = mb(CA + i * N_GEMM + j);
        for (int k = 0; k < int'(N_GEMM); k++) begin
          acc = 8'(acc + mb(AA + i * N_GEMM + k) * mb(BA + k * N_GEMM + j));
        end
        ref_c[i][j] = acc;
      end
    end
    t0 = cyc;
    setvl(N_GEMM);
    for (int unsigned i = 0; i < N_GEMM; i++) begin
      send(vle(0, 5'd4, 5'd10), CA + i * N_GEMM, 0, 0);
      for (int unsigned k = 0; k < N_GEMM; k++) begin
        load_byte(AA + i * N_GEMM + k, aik);
        send(vle(0, 5'd8 + 5'(k % 2), 5'd10), BA + k * N_GEMM, 0, 0);
        send(vmacc_vx(5'd4, 5'd8 + 5'(k % 2)), 32'(aik), 0, 0);
      end
      send(vse(0, 5'd4, 5'd10), CA + i * N_GEMM, 0, 0);
    end
    drain();
    t_gemm = cyc - t0;
    for (int i = 0; i < int'(N_GEMM); i++)
      for (int j = 0; j < int'(N_GEMM); j++) compare("GEMM", CA + i * N_GEMM + j, ref_c[i][j]);

    // ------------------------------------------------------------ CONV
    for (int i = 0; i < 9; i++) kern[i] = 8'($urandom);
    for (int y = 0; y < int'(CH) - 2; y++) begin
      for (int x = 0; x < int'(CW) - 2; x++) begin
        logic [7:0] acc;
        acc = 0;
        for (int dy = 0; dy < 3; dy++)
          for (int dx = 0; dx < 3; dx++)
            acc = 8'(acc + kern[3 * dy + dx] * mb(IA + (y + dy) * CW + x + dx));
        ref_o[y][x] = acc;
      end
    end
    t0 = cyc;
    for (int unsigned y = 0; y < CH - 2; y++) begin
      setvl(CW);
      send(opv(6'b010111, 3'b011, 5'd4, 5'd0, 5'd0), 0, 0, 0);          // vmv.v.i v4, 0
      for (int unsigned dy = 0; dy < 3; dy++) begin
        send(vle(0, 5'd1, 5'd10), IA + (y + dy) * CW, 0, 0);
        send(opv(6'b001111, 3'b011, 5'd2, 5'd1, 5'd1), 0, 0, 0);       // vslidedown.vi v2, v1, 1
        send(opv(6'b001111, 3'b011, 5'd3, 5'd1, 5'd2), 0, 0, 0);       // vslidedown.vi v3, v1, 2
        send(vmacc_vx(5'd4, 5'd1), 32'(kern[3 * dy]), 0, 0);
        send(vmacc_vx(5'd4, 5'd2), 32'(kern[3 * dy + 1]), 0, 0);
        send(vmacc_vx(5'd4, 5'd3), 32'(kern[3 * dy + 2]), 0, 0);
      end
      setvl(CW - 2);
      send(vse(0, 5'd4, 5'd10), OA + y * CW, 0, 0);
    end
    drain();
    t_conv = cyc - t0;
    for (int y = 0; y < int'(CH) - 2; y++)
      for (int x = 0; x < int'(CW) - 2; x++) compare("CONV", OA + y * CW + x, ref_o[y][x]);

    // ------------------------------------------------------------ bounds
    $display("AXPY  n=%0d: %0d cycles (memory bound %0d)", N_AXPY, t_axpy, 3 * N_AXPY / 4);
    $display("GEMM  %0dx%0d: %0d cycles (multiplier bound %0d)", N_GEMM, N_GEMM, t_gemm,
             N_GEMM * N_GEMM * N_GEMM / 128);
    $display("CONV  %0dx%0d: %0d cycles (memory bound %0d)", CW, CH, t_conv,
             (CW * CH + CW * (CH - 2)) / 4);
    checks += 3;
    if (t_axpy < int'(3 * N_AXPY / 4)) begin
      failures++;
      $display("AXPY faster than the memory interface allows");
    end
    if (t_gemm < int'(N_GEMM * N_GEMM * N_GEMM / 128)) begin
      failures++;
      $display("GEMM faster than the multiplier allows");
    end
    if (t_conv < int'((CW * CH + CW * (CH - 2)) / 4)) begin
      failures++;
      $display("CONV faster than the memory interface allows");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
