// Self-checking testbench of the issue logic. Fake units with fixed busy
// times execute the issued instructions; a model checks every cycle that
// the head issues exactly when its unit is free and no read-after-write,
// write-after-write or write-after-read conflict with an occupied unit
// exists, that the VALU and VIDXU stay occupied one cycle longer than their
// busy signal, and that instructions issue in order. Counts hazard and
// unit-busy stalls; both must happen.
module tb_vproc_dispatcher;
  import vproc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic valid, pop, hz, us;
  vinstr_t head, iout;
  logic [NUM_UNITS-1:0] busy, issue;
  int busy_cnt [NUM_UNITS];
  logic [NUM_UNITS-1:0] busy_prev;
  logic [31:0] rdm [NUM_UNITS], wrm [NUM_UNITS];
  int checks = 0, failures = 0, hazards = 0, unit_stalls = 0, issued = 0;

  vproc_dispatcher dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .instr_i(head),
    .pop_o(pop), .busy_i(busy), .issue_o(issue), .instr_o(iout),
    .hazard_stall_o(hz), .unit_stall_o(us));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vinstr_t rand_instr();
    vinstr_t i;
    i = '0;
    i.unit = unit_e'($urandom % 5);
    i.vd = 5'($urandom % 8);
    i.vs1 = 5'($urandom % 8);
    i.vs2 = 5'($urandom % 8);
    i.rd_vs1 = $urandom % 2;
    i.rd_vs2 = 1;
    i.rd_vd = ($urandom % 4) == 0;
    i.wr_vd = ($urandom % 4) != 0;
    return i;
  endfunction

  initial begin
    for (int u = 0; u < NUM_UNITS; u++) begin busy_cnt[u] = 0; rdm[u] = 0; wrm[u] = 0; end
    busy = '0; busy_prev = '0; valid = 0; head = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    head = rand_instr();
    valid = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic [NUM_UNITS-1:0] occ;
      logic [31:0] rany, wany, rnew, wnew;
      logic exp_issue;
      #1;
      // model
      occ = busy | (busy_prev & 5'b10010);
      rany = 0; wany = 0;
      for (int u = 0; u < NUM_UNITS; u++) if (occ[u]) begin rany |= rdm[u]; wany |= wrm[u]; end
      rnew = 0; wnew = 0;
      if (head.rd_vs1) rnew[head.vs1] = 1;
      if (head.rd_vs2) rnew[head.vs2] = 1;
      if (head.rd_vd)  rnew[head.vd] = 1;
      if (head.wr_vd)  wnew[head.vd] = 1;
      exp_issue = valid && !occ[head.unit] && (((rnew | wnew) & wany) == 0) && ((wnew & rany) == 0);
      checks++;
      if (pop != exp_issue || (pop && issue != (5'b1 << head.unit)) || (!pop && issue != 0)) begin
        failures++;
        if (failures < 10) $display("cyc %0d issue mismatch pop %0d exp %0d", cyc, pop, exp_issue);
      end
      if (hz) hazards++;
      if (us) unit_stalls++;
      @(negedge clk);
      busy_prev = busy;
      for (int u = 0; u < NUM_UNITS; u++) begin
        if (busy_cnt[u] > 0) busy_cnt[u]--;
      end
      if (exp_issue) begin
        busy_cnt[head.unit] = 2 + int'($urandom % 6);
        rdm[head.unit] = rnew;
        wrm[head.unit] = wnew;
        issued++;
      end
      for (int u = 0; u < NUM_UNITS; u++) busy[u] = busy_cnt[u] > 0;
      if (exp_issue) head = rand_instr();
    end
    checks += 2;
    if (hazards == 0) failures++;
    if (unit_stalls == 0) failures++;
    $display("issued %0d, hazard stalls %0d, unit stalls %0d", issued, hazards, unit_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
