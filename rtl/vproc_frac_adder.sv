// Fracturable 32-bit adder/subtractor.
//
// Four 8-bit adders whose carry chains are joined or cut according to the
// element width: four independent 8-bit sums (EW8), two 16-bit sums (EW16)
// or one 32-bit sum (EW32). Subtraction adds the inverted operand b with a
// carry of one into the lowest byte of every element, so a - b is formed in
// two's complement on the same hardware. The carry out of each byte is
// brought out as well; the carry out of the top byte of an element is that
// element's unsigned carry (for a subtraction: 1 means a >= b).
// Purely combinational.
//
// The four cascadable 8-bit adders follow the document's description of the
// ALU; the carry-chain cutting by a byte-position test is this design's own
// way of doing it.
module vproc_frac_adder
  import vproc_pkg::*;
(
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  logic        sub_i,   // 1: a - b, 0: a + b
  input  sew_e        sew_i,
  output logic [31:0] sum_o,
  output logic [3:0]  cout_o   // carry out of each 8-bit adder
);

  logic [3:0] cin;
  logic [31:0] b_eff;

  assign b_eff = sub_i ? ~b_i : b_i;

  always_comb begin
    logic carry;
    carry = 1'b0;
    for (int k = 0; k < 4; k++) begin
      logic elem_start;
      case (sew_i)
        EW8:     elem_start = 1'b1;
        EW16:    elem_start = (k % 2) == 0;
        default: elem_start = (k == 0);
      endcase
      cin[k] = elem_start ? sub_i : carry;
      {carry, sum_o[8*k +: 8]} = {1'b0, a_i[8*k +: 8]} + {1'b0, b_eff[8*k +: 8]} + 9'(cin[k]);
      cout_o[k] = carry;
    end
  end

endmodule
