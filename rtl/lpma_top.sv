// lpma_top: lightweight polynomial multiplication accelerator (LPMA) for Saber.
//
// Computes W = D * G mod (x^N + 1) with 13-bit coefficients modulo 2^13, where
// D has 13-bit two's complement coefficients and G has small coefficients in
// [-5,5] in 4-bit sign-magnitude form (bit 3 = sign).  The N outputs are split
// into u = N/V groups W_k = {w_{kV}, ..., w_{kV+V-1}}, computed one group per
// round, highest group first.  In a round V channels run in parallel for N cycles:
// every cycle one G coefficient, read from the multi-position shift register, is
// broadcast to all channels while each channel takes its own D coefficient from
// the V-register D unit; a sign register flags the products that wrapped around
// x^N = -1.  At the end of a round the G register switches to the next group
// (rotate and negate the wrapped coefficients) and the output buffer streams the
// V results out serially while the next round runs.
//
// Interface: pulse 'start'.  For N cycles the accelerator reads G, one
// coefficient per cycle at g_idx (g_{N-1} first); from then on it reads D at
// d_idx, one coefficient per cycle.  The source must drive g_in = g[g_idx] and
// d_in = d[d_idx] combinationally in the same cycle and hold G and D unchanged
// until 'done'.  Results appear as w_out with index w_idx whenever w_valid is
// high; 'done' pulses with the last one.  'state' shows the control unit's stage.
// Timing: N load cycles, then u*N computation cycles, then V cycles of output
// drain: the last result and 'done' are present N + u*N + V clock edges after
// the edge that samples 'start' (2336 cycles for N = 256, V = 32).
// Structure and u*N computation time follow the document; the index-addressed
// input interface and the output index are this design's choices.
module lpma_top
  import lpma_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned V = V_DEF,
  localparam int unsigned U  = N / V,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned KW = (U > 1) ? $clog2(U) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] g_idx,
  input  gcoef_t        g_in,
  output logic [AW-1:0] d_idx,
  input  dcoef_t        d_in,
  output logic          w_valid,
  output logic [AW-1:0] w_idx,
  output dcoef_t        w_out,
  output state_t        state,
  output logic          busy,
  output logic          done
);

  ctrl_t         ctl;
  logic [KW-1:0] out_grp;
  gcoef_t        g_cur;
  dcoef_t        d_ch   [V];
  dcoef_t        acc_ch [V];
  logic [V-1:0]  neg;

  lpma_ctrl #(.N(N), .V(V)) u_ctrl (
    .clk, .rst_n, .start,
    .ctl, .g_idx, .d_idx, .out_grp, .state, .busy, .done
  );

  lpma_gshift #(.N(N), .V(V)) u_gshift (
    .clk, .rst_n,
    .load(ctl.g_load), .rot(ctl.g_rot), .jump(ctl.g_jump),
    .g_in, .g_out(g_cur)
  );

  lpma_dunit #(.V(V)) u_dunit (
    .clk, .rst_n, .shift(ctl.d_shift), .d_in, .d_out(d_ch)
  );

  lpma_signctl #(.V(V)) u_signctl (
    .clk, .rst_n, .reload(ctl.s_reload), .shift(ctl.s_shift), .neg
  );

  for (genvar i = 0; i < V; i++) begin : g_ch
    lpma_cu u_cu (
      .clk, .rst_n,
      .en(ctl.mac_en), .first(ctl.mac_first),
      .g(g_cur), .neg(neg[i]), .d(d_ch[i]), .acc(acc_ch[i])
    );
  end

  lpma_outbuf #(.V(V)) u_outbuf (
    .clk, .rst_n, .load(ctl.buf_load), .acc(acc_ch), .w_out, .valid(w_valid)
  );

  // Channel V-1 leaves the buffer first; it holds w_{kV}.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             w_idx <= '0;
    else if (ctl.buf_load)  w_idx <= AW'(out_grp) * AW'(V);
    else if (w_valid)       w_idx <= w_idx + 1'b1;
  end

  // G coefficients are limited to [-5,5].
  assert property (@(posedge clk) disable iff (!rst_n) ctl.g_load |-> (g_in.mag <= 3'(GMAG_MAX)))
    else $error("lpma_top: G coefficient magnitude above %0d", GMAG_MAX);

endmodule
