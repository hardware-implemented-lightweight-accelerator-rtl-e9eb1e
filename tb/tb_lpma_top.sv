// tb_lpma_top: end-to-end test of the accelerator at its default size
// (N = 256, V = 32, u = 8).
//
// A behavioural coefficient memory answers the accelerator's g_idx / d_idx
// requests in the same cycle.  Six multiplications are run back to back: random
// G in each of Saber's ranges [-5,5], [-4,4], [-3,3] with 13-bit D, G in [-5,5]
// with 10-bit D, the extreme case G = -5 everywhere with D = 2^13-1, and a single
// coefficient g_{N-1} = 1 (a pure negacyclic shift).  Every output is compared
// with a schoolbook product mod (x^N + 1, 2^13) computed here, and each index
// must arrive exactly once.  Cycle counts are checked against the expected
// timing: u*N computation cycles and 'done' with the last result N + u*N + V clock edges after the one at which
// 'start' is sampled.  The mechanisms of the design (serial load, group switch with sign
// inversion, sign-register negation, output drain overlapping the next round,
// done) are counted, and one that never occurs is a failure.
module tb_lpma_top;
  import lpma_pkg::*;

  localparam int N   = N_DEF;
  localparam int V   = V_DEF;
  localparam int U   = N / V;
  localparam int AW  = $clog2(N);
  localparam int OPS = 6;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [AW-1:0] g_idx, d_idx, w_idx;
  gcoef_t        g_in;
  dcoef_t        d_in, w_out;
  logic          w_valid, busy, done;
  state_t        state;

  int checks = 0, failures = 0;
  int n_load = 0, n_jump = 0, n_neg = 0, n_overlap = 0, n_groups = 0, n_done = 0, n_comp = 0;

  gcoef_t g_mem [N];
  dcoef_t d_mem [N];
  int     w_ref [N];
  bit     seen  [N];

  lpma_top dut (.*);

  always #5 clk = ~clk;

  // Coefficient memory with combinational read.
  always_comb begin
    g_in = g_mem[g_idx];
    d_in = d_mem[d_idx];
  end

  initial begin
    repeat (OPS * (2 * N + U * N + V + 20) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Schoolbook negacyclic product, kept as plain integers.
  task automatic reference();
    for (int j = 0; j < N; j++) w_ref[j] = 0;
    for (int a = 0; a < N; a++) begin
      int gv;
      gv = g_mem[a].sign ? -int'(g_mem[a].mag) : int'(g_mem[a].mag);
      for (int b = 0; b < N; b++) begin
        if (a + b < N) w_ref[a + b]     += gv * int'(d_mem[b]);
        else           w_ref[a + b - N] -= gv * int'(d_mem[b]);
      end
    end
  endtask

  task automatic fill(input int op);
    int gmax, dbits;
    gmax  = (op == 1) ? 4 : (op == 2) ? 3 : 5;
    dbits = (op == 3) ? 10 : DW;
    for (int i = 0; i < N; i++) begin
      int gv;
      if (op == 4)      gv = -5;
      else if (op == 5) gv = (i == N - 1) ? 1 : 0;
      else              gv = $urandom_range(2 * gmax, 0) - gmax;
      g_mem[i].sign = (gv < 0);
      g_mem[i].mag  = 3'((gv < 0) ? -gv : gv);
      d_mem[i] = (op == 4) ? '1 : DW'($urandom & ((1 << dbits) - 1));
    end
  endtask

  // Monitors.
  always @(posedge clk) if (rst_n) begin
    if (dut.ctl.g_load) n_load++;
    if (dut.ctl.g_jump) n_jump++;
    if (dut.ctl.mac_en && dut.neg != '0) n_neg++;
    if (w_valid && (state == ST_COMP || state == ST_SWITCH)) n_overlap++;
    if (dut.ctl.buf_load) n_groups++;
    if (state == ST_COMP || state == ST_SWITCH) n_comp++;
    if (w_valid) begin
      checks++;
      if (seen[w_idx]) begin
        failures++;
        $display("FAIL index %0d delivered twice", w_idx);
      end
      seen[w_idx] = 1'b1;
      if (w_out !== DW'(w_ref[w_idx])) begin
        failures++;
        if (failures < 20) $display("FAIL w[%0d] = %0d exp %0d", w_idx, w_out, DW'(w_ref[w_idx]));
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      g_mem[i] = '0; d_mem[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < OPS; op++) begin
      longint t0, t1;
      int comp0;
      fill(op);
      reference();
      for (int i = 0; i < N; i++) seen[i] = 1'b0;
      comp0 = n_comp;
      @(negedge clk);
      start = 1'b1;
      @(posedge clk);
      t0 = $time;
      @(negedge clk);
      start = 1'b0;
      @(posedge done);
      @(negedge clk);
      t1 = $time;
      // done rises with the last result; it is sampled at the posedge below t1
      checks++;
      if (int'((t1 - t0) / 10) != N + U * N + V) begin
        failures++;
        $display("FAIL op %0d latency %0d cycles, exp %0d", op, int'((t1 - t0) / 10), N + U * N + V);
      end
      checks++;
      if (n_comp - comp0 != U * N) begin
        failures++;
        $display("FAIL op %0d computation took %0d cycles, exp %0d", op, n_comp - comp0, U * N);
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (!seen[i]) begin
          failures++;
          $display("FAIL op %0d index %0d never delivered", op, i);
        end
      end
      n_done++;
      $display("op %0d done, %0d cycles", op, int'((t1 - t0) / 10));
    end
    checks++;
    if (n_load != OPS * N) begin failures++; $display("FAIL load cycles %0d", n_load); end
    checks++;
    if (n_jump != OPS * (U - 1)) begin failures++; $display("FAIL group switches %0d", n_jump); end
    checks++;
    if (n_groups != OPS * U) begin failures++; $display("FAIL buffer loads %0d", n_groups); end
    checks++;
    if (n_neg == 0) begin failures++; $display("FAIL sign register never negated"); end
    checks++;
    if (n_overlap == 0) begin failures++; $display("FAIL output never overlapped computation"); end
    checks++;
    if (n_done != OPS) begin failures++; $display("FAIL done count %0d", n_done); end
    $display("mechanisms: load=%0d group_switch=%0d negated_cycles=%0d buffer_loads=%0d overlap=%0d done=%0d",
             n_load, n_jump, n_neg, n_groups, n_overlap, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
