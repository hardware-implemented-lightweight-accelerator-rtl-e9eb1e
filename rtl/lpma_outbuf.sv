// lpma_outbuf: output buffer that turns the V parallel results of a round into a
// serial stream.
//
// V stages, each a 13-bit register behind a 2-to-1 MUX.  On 'load' stage i takes
// the accumulator of computation unit i; otherwise the stages shift towards stage
// V-1, which drives the output.  'valid' is high for the V cycles in which a
// loaded value is at the output, so the first value appears the cycle after the
// load, from channel V-1 down to channel 0.  A new load may come V or more cycles
// after the previous one; an earlier one overwrites values not yet delivered.
// Structure per the document; the valid tracking is this design's choice.
module lpma_outbuf
  import lpma_pkg::*;
#(
  parameter int unsigned V = V_DEF
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  dcoef_t acc [V],
  output dcoef_t w_out,
  output logic   valid
);

  dcoef_t r [V];
  logic [V-1:0] full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < V; i++) r[i] <= '0;
      full <= '0;
    end else if (load) begin
      r    <= acc;
      full <= '1;
    end else begin
      for (int i = 1; i < V; i++) r[i] <= r[i-1];
      r[0] <= '0;
      full <= {full[V-2:0], 1'b0};
    end
  end

  assign w_out = r[V-1];
  assign valid = full[V-1];

  // A new round must not overwrite results that are still being delivered.
  assert property (@(posedge clk) disable iff (!rst_n) load |-> (full[V-2:0] == '0))
    else $error("lpma_outbuf: load while previous results are still pending");

endmodule
