// Self-checking testbench of the fracturable adder: random operands for all
// three element widths, addition and subtraction, compared with a per-element
// model; also checks the per-element carry out.
module tb_vproc_frac_adder;
  import vproc_pkg::*;
  import rvv_enc_pkg::*;

  logic [31:0] a, b, sum;
  logic        sub;
  sew_e        sew;
  logic [3:0]  cout;
  int checks = 0, failures = 0;

  vproc_frac_adder dut (.a_i(a), .b_i(b), .sub_i(sub), .sew_i(sew), .sum_o(sum), .cout_o(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int eb;
      a   = $urandom;
      b   = $urandom;
      sub = it[0];
      sew = sew_e'(it % 3);
      eb  = sew_bytes(sew);
      if (it % 50 == 0) begin a = '1; b = 32'd1; end   // full carry ripple
      #1;
      for (int e = 0; e < 4 / eb; e++) begin
        logic [31:0] ea, ebb, exp;
        logic [32:0] wide;
        ea  = trunc(a >> (8 * eb * e), eb);
        ebb = trunc(b >> (8 * eb * e), eb);
        exp = trunc(sub ? ea - ebb : ea + ebb, eb);
        wide = sub ? 33'(ea) + 33'(trunc(~ebb, eb)) + 33'd1 : 33'(ea) + 33'(ebb);
        checks++;
        if (trunc(sum >> (8 * eb * e), eb) != exp) begin
          failures++;
          $display("sum mismatch sew=%0d sub=%0d a=%h b=%h got %h", eb, sub, a, b, sum);
        end
        checks++;
        if (cout[eb * e + eb - 1] != wide[8 * eb]) begin
          failures++;
          $display("carry mismatch sew=%0d a=%h b=%h", eb, a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
