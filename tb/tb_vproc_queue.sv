// Self-checking testbench of the instruction queue (depth 4): random pushes
// and pops compared with a queue model, checking order, the full and empty
// flags and the pending-load/store flag.
module tb_vproc_queue;
  import vproc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic push, ready, valid, pop, has_lsu;
  vinstr_t din, head;
  vinstr_t model [$];
  int checks = 0, failures = 0, fulls = 0;

  vproc_queue #(.DEPTH(4)) dut (.clk_i(clk), .rst_ni(rst_n), .push_i(push), .instr_i(din),
    .ready_o(ready), .valid_o(valid), .head_o(head), .pop_i(pop), .has_lsu_o(has_lsu));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic exp_lsu;
      @(negedge clk);
      exp_lsu = 0;
      foreach (model[i]) if (model[i].unit == UNIT_VLSU) exp_lsu = 1;
      checks += 4;
      if (valid != (model.size() != 0)) failures++;
      if (ready != (model.size() != 4)) failures++;
      if (has_lsu != exp_lsu) failures++;
      if (valid && head != model[0]) begin failures++; $display("head mismatch"); end
      if (model.size() == 4) fulls++;
      push = ($urandom % 3) != 0 && (cyc % 400) < 300;
      pop  = valid && ($urandom % 2);
      din = '0;
      din.unit = unit_e'($urandom % 5);
      din.vd = 5'($urandom);
      din.vl = $urandom;
      if (pop) void'(model.pop_front());
      if (push && ready) model.push_back(din);
    end
    checks++;
    if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
