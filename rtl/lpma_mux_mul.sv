// lpma_mux_mul: multiplier-free product of a 13-bit D coefficient and a G
// magnitude in 0..5.
//
// The six possible products 0, d, 2d, 3d, 4d, 5d are formed with shifts and two
// additions and a multiplexer picks the one selected by the magnitude.  The result
// is taken modulo 2^13 (Saber's q), which is exact for two's complement D.  The
// sign of G is not handled here: the computation unit's adder chooses between
// adding and subtracting.  Purely combinational.  The MUX-based multiplier is the
// document's; magnitudes 6 and 7 never occur and give 0 here.
module lpma_mux_mul
  import lpma_pkg::*;
(
  input  dcoef_t     d,
  input  logic [2:0] mag,
  output dcoef_t     prod
);

  dcoef_t d2, d3, d4, d5;

  always_comb begin
    d2 = d << 1;
    d4 = d << 2;
    d3 = d + d2;
    d5 = d + d4;
    unique case (mag)
      3'd0:    prod = '0;
      3'd1:    prod = d;
      3'd2:    prod = d2;
      3'd3:    prod = d3;
      3'd4:    prod = d4;
      3'd5:    prod = d5;
      default: prod = '0;
    endcase
  end

endmodule
