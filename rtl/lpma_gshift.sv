// lpma_gshift: multi-position shift register that holds the small-coefficient
// polynomial G and presents one coefficient per cycle to all computation units.
//
// N cells r[0] .. r[N-1] each hold one 4-bit sign-magnitude coefficient; r[N-1]
// is the output cell.  Each cell selects its next value from one of three moves:
//   load : r[0] <= g_in, r[i] <= r[i-1]          (serial loading, first coefficient
//                                                  ends up in r[N-1] after N cycles)
//   rot  : r[0] <= r[N-1], r[i] <= r[i-1]        (1-position circular shift; N of
//                                                  them return the register to its state)
//   jump : r[i] <= r[(i-V-1) mod N], with the sign bit inverted for i < V
//                                                 (group switch from G^k to G^(k-1))
// With no move selected the register holds.
//
// The group switch follows the document's v-position circular shift with sign
// inversion of the coefficients that wrap around (x^N = -1).  In this design the
// switch shares its cycle with the last 1-position shift of a round, so one round
// takes exactly N cycles; the cell therefore takes its second source from V+1
// cells below instead of V.  The moves are one-hot; if several are requested,
// load has priority over jump over rot.  All cells reset to +0.
module lpma_gshift
  import lpma_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned V = V_DEF
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  logic   rot,
  input  logic   jump,
  input  gcoef_t g_in,
  output gcoef_t g_out
);

  gcoef_t r [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else if (load || rot) begin
      r[0] <= load ? g_in : r[N-1];
      for (int i = 1; i < N; i++) r[i] <= r[i-1];
    end else if (jump) begin
      for (int i = 0; i < N; i++) begin
        r[i] <= r[(i + N - V - 1) % N];
        if (i < V) r[i].sign <= ~r[(i + N - V - 1) % N].sign;
      end
    end
  end

  assign g_out = r[N-1];

  // Only one move per cycle.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({load, rot, jump}))
    else $error("lpma_gshift: more than one move requested");

endmodule
