// lpma_signctl: sign control shift register.
//
// Channel i of round k accumulates g * d_{(c-i) mod N}; in the first i cycles of
// a round the D index has wrapped around, which by x^N = -1 flips the sign of the
// product.  A V-bit register holds one flag per channel (1 = negate).  At the
// start of each round it is reloaded with ones and a zero is shifted in at bit 0
// every compute cycle, so in cycle c bit i is 1 exactly when c < i.
//
// Timing: 'reload' sets the pattern seen in cycle 0 of the next round, which is
// all ones already shifted once ({1..1,0}, so channel 0 is never negated);
// 'shift' moves it on by one.  A reload in the same cycle as a shift wins.  The
// register resets to the same pattern.  The ones-loaded, zero-fed register is
// the document's; the pre-shifted reload value is this design's way of meeting
// the one-cycle-per-product timing.
module lpma_signctl #(
  parameter int unsigned V = lpma_pkg::V_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         reload,
  input  logic         shift,
  output logic [V-1:0] neg
);

  localparam logic [V-1:0] START = {{(V-1){1'b1}}, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      neg <= START;
    else if (reload) neg <= START;
    else if (shift)  neg <= {neg[V-2:0], 1'b0};
  end

endmodule
