// lpma_dunit: processing unit for the large-coefficient polynomial D.
//
// A chain of V 13-bit registers.  Register i feeds computation unit i.  On each
// enabled cycle the chain shifts by one and d_in enters register 0, so that when
// the external source presents d_1, d_2, ..., d_{N-1}, d_0, d_1, ... register i
// holds d_{(c-i) mod N} in compute cycle c, the value channel i needs.  Before
// the first round the chain is filled with d_{N-V+1}, ..., d_{N-1}, d_0 so that
// it starts as {d_0, d_{N-1}, ..., d_{N-V+1}}; the same stream then repeats every
// N cycles for every round.
//
// Interface: shift enable and one coefficient per cycle in; all V registers out.
// The structure follows the document; the reset value 0 is this design's choice.
module lpma_dunit
  import lpma_pkg::*;
#(
  parameter int unsigned V = V_DEF
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   shift,
  input  dcoef_t d_in,
  output dcoef_t d_out [V]
);

  dcoef_t r [V];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < V; i++) r[i] <= '0;
    end else if (shift) begin
      r[0] <= d_in;
      for (int i = 1; i < V; i++) r[i] <= r[i-1];
    end
  end

  assign d_out = r;

endmodule
