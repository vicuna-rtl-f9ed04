// Self-checking testbench of the fracturable multiplier: random operands for
// all element widths and signedness combinations, low and high halves
// compared with a per-element model.
module tb_vproc_frac_mul;
  import vproc_pkg::*;
  import rvv_enc_pkg::*;

  logic [31:0] a, b, lo, hi;
  logic        as, bs;
  sew_e        sew;
  int checks = 0, failures = 0;

  vproc_frac_mul dut (.a_i(a), .b_i(b), .a_signed_i(as), .b_signed_i(bs), .sew_i(sew),
                      .lo_o(lo), .hi_o(hi));

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
      as  = it[0];
      bs  = it[1] & it[0];
      sew = sew_e'(it % 3);
      eb  = sew_bytes(sew);
      #1;
      for (int e = 0; e < 4 / eb; e++) begin
        logic [31:0] ea, ebb;
        logic signed [63:0] xa, xb;
        logic [63:0] p;
        ea  = trunc(a >> (8 * eb * e), eb);
        ebb = trunc(b >> (8 * eb * e), eb);
        xa  = as ? sx(ea, eb) : 64'(ea);
        xb  = bs ? sx(ebb, eb) : 64'(ebb);
        p   = xa * xb;
        checks += 2;
        if (trunc(lo >> (8 * eb * e), eb) != trunc(p[31:0], eb)) begin
          failures++;
          $display("lo mismatch sew=%0d a=%h b=%h", eb, a, b);
        end
        if (trunc(hi >> (8 * eb * e), eb) != trunc(32'(p >> (8 * eb)), eb)) begin
          failures++;
          $display("hi mismatch sew=%0d as=%0d bs=%0d a=%h b=%h", eb, as, bs, a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
