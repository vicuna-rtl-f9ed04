// Fracturable 32-bit multiplier.
//
// Multiplies the elements packed in one 32-bit word: four 8-bit, two 16-bit
// or one 32-bit product, selected by the element width. For every element it
// returns the low half (what vmul / vmacc need) and the high half (vmulh,
// vmulhu, vmulhsu) of the double-width product. Each operand can be taken as
// signed or unsigned, by sign- or zero-extending it by one bit before a
// signed multiplication.
// Purely combinational.
//
// The document says the multiplier is fracturable and serves all three
// element widths; how partial products are shared is not given. Here a
// separate product is formed for each element width and the result is
// selected, leaving resource sharing to synthesis.
module vproc_frac_mul
  import vproc_pkg::*;
(
  input  logic [31:0] a_i,        // vs2 elements
  input  logic [31:0] b_i,        // vs1 / scalar elements
  input  logic        a_signed_i,
  input  logic        b_signed_i,
  input  sew_e        sew_i,
  output logic [31:0] lo_o,
  output logic [31:0] hi_o
);

  logic signed [17:0] p8  [4];
  logic signed [33:0] p16 [2];
  logic signed [63:0] p32;   // 33 x 33 bits, top two bits are sign copies

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      p8[k] = $signed({a_signed_i & a_i[8*k+7], a_i[8*k +: 8]}) *
              $signed({b_signed_i & b_i[8*k+7], b_i[8*k +: 8]});
    end
    for (int k = 0; k < 2; k++) begin
      p16[k] = $signed({a_signed_i & a_i[16*k+15], a_i[16*k +: 16]}) *
               $signed({b_signed_i & b_i[16*k+15], b_i[16*k +: 16]});
    end
    p32 = 64'($signed({a_signed_i & a_i[31], a_i}) * $signed({b_signed_i & b_i[31], b_i}));

    case (sew_i)
      EW8: begin
        for (int k = 0; k < 4; k++) begin
          lo_o[8*k +: 8] = p8[k][7:0];
          hi_o[8*k +: 8] = p8[k][15:8];
        end
      end
      EW16: begin
        for (int k = 0; k < 2; k++) begin
          lo_o[16*k +: 16] = p16[k][15:0];
          hi_o[16*k +: 16] = p16[k][31:16];
        end
      end
      default: begin
        lo_o = p32[31:0];
        hi_o = p32[63:32];
      end
    endcase
  end

endmodule
