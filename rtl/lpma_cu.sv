// lpma_cu: computation unit, one per channel.
//
// Multiplies the shared G coefficient by this channel's D coefficient with the
// MUX-based multiplier and accumulates the products of a round in a 13-bit
// register (modulo 2^13).  The sign control cell XORs the G sign bit with the
// channel's flag from the sign control register; the result drives a 2-to-1 MUX
// that makes the adder add or subtract the product.
//
// Timing: when 'en' is high the product is added to the register, or, with
// 'first' also high, replaces it (start of a new round).  After the N-th product
// of a round the register holds the finished coefficient for one cycle, during
// which the output buffer captures it.  Datapath structure per the document;
// the restart-by-'first' mechanism is this design's choice.
module lpma_cu
  import lpma_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   first,
  input  gcoef_t g,
  input  logic   neg,    // flag from the sign control register
  input  dcoef_t d,
  output dcoef_t acc
);

  dcoef_t prod, base, sum;
  logic   sub;

  lpma_mux_mul u_mul (.d(d), .mag(g.mag), .prod(prod));

  always_comb begin
    sub  = g.sign ^ neg;
    base = first ? '0 : acc;
    sum  = sub ? base - prod : base + prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sum;
  end

endmodule
