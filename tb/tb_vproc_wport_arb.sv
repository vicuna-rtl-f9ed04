// Self-checking testbench of the shared write port: A alone, B alone, and
// collisions, checking that A is passed through at once and that B's
// request is written exactly one cycle later on a collision; random traffic
// that respects the no-back-to-back rule is compared with a model.
module tb_vproc_wport_arb;
  localparam int VW = 32;
  logic clk = 0, rst_n = 0;
  logic a_we, b_we, we, coll;
  logic [4:0] a_addr, b_addr, addr;
  logic [VW-1:0] a_data, b_data, data;
  logic [VW/8-1:0] a_be, b_be, be;
  int checks = 0, failures = 0, collisions = 0;

  vproc_wport_arb #(.VREG_W(VW)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .a_we_i(a_we), .a_addr_i(a_addr), .a_data_i(a_data), .a_be_i(a_be),
    .b_we_i(b_we), .b_addr_i(b_addr), .b_data_i(b_data), .b_be_i(b_be),
    .we_o(we), .addr_o(addr), .data_o(data), .be_o(be), .collision_o(coll));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output this cycle
  logic pend_q;
  logic [4:0] pend_addr_q;
  logic [VW-1:0] pend_data_q;

  initial begin
    logic a_prev, b_prev;
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_data = 0; b_data = 0; a_be = 0; b_be = 0;
    pend_q = 0; pend_addr_q = 0; pend_data_q = 0; a_prev = 0; b_prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      a_we = !a_prev && !pend_q && ($urandom % 2);
      b_we = !b_prev && !pend_q && ($urandom % 2);
      if (cyc < 4) begin a_we = (cyc == 0 || cyc == 2); b_we = (cyc == 2); end
      a_addr = 5'($urandom); b_addr = 5'($urandom);
      a_data = $urandom; b_data = $urandom; a_be = 4'hF; b_be = 4'($urandom);
      #1;
      checks++;
      if (a_we) begin
        if (!(we && addr == a_addr && data == a_data)) begin failures++; $display("A not passed at %0d", cyc); end
      end else if (pend_q) begin
        if (!(we && addr == pend_addr_q && data == pend_data_q)) begin failures++; $display("buffered B lost at %0d", cyc); end
      end else if (b_we) begin
        if (!(we && addr == b_addr && data == b_data)) begin failures++; $display("B not passed at %0d", cyc); end
      end else if (we) begin
        failures++; $display("spurious write at %0d", cyc);
      end
      checks++;
      if (coll != (a_we && b_we)) failures++;
      if (a_we && b_we) collisions++;
      pend_q = a_we && b_we; pend_addr_q = b_addr; pend_data_q = b_data;
      a_prev = a_we; b_prev = b_we;
    end
    checks++;
    if (collisions == 0) failures++;
    $display("collisions seen: %0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
