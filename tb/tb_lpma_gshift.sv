// tb_lpma_gshift: self-checking test of the multi-position G shift register.
//
// Loads a random G (N = 16, V = 4) serially, g_{N-1} first, then drives the
// register the way the control unit does: per round N-1 single rotations and one
// group switch.  In cycle c of round k the output must be g_m with
// m = (kV+V-1-c) mod N, negated when that index wrapped (c > kV+V-1); this is
// worked out here from the coefficient list, not from the register.  Also checks
// that the register holds when no move is requested and runs two full passes.
module tb_lpma_gshift;
  import lpma_pkg::*;

  localparam int N = 16;
  localparam int V = 4;
  localparam int U = N / V;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   load = 1'b0, rot = 1'b0, jump = 1'b0;
  gcoef_t g_in = '0;
  gcoef_t g_out;
  int     checks = 0, failures = 0;
  gcoef_t g [N];

  lpma_gshift #(.N(N), .V(V)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input gcoef_t exp, input string what);
    checks++;
    // +0 and -0 are the same coefficient
    if (!(g_out == exp || (g_out.mag == 0 && exp.mag == 0))) begin
      failures++;
      $display("FAIL %s: got %b/%0d exp %b/%0d", what, g_out.sign, g_out.mag, exp.sign, exp.mag);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < N; i++) begin
        g[i].mag  = 3'($urandom_range(5, 0));
        g[i].sign = (g[i].mag == 0) ? 1'b0 : 1'($urandom_range(1, 0));
      end
      // serial load
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        load = 1'b1; g_in = g[N-1-t];
      end
      @(negedge clk);
      load = 1'b0;
      for (int k = U - 1; k >= 0; k--) begin
        for (int c = 0; c < N; c++) begin
          gcoef_t e;
          int m;
          m = (k*V + V - 1 - c + N) % N;
          e = g[m];
          if (c > k*V + V - 1) e.sign = ~e.sign;
          // hold check: one idle cycle in the middle of a round
          if (c == 3) begin
            rot = 1'b0; jump = 1'b0;
            @(negedge clk);
            check(e, "hold");
          end
          check(e, $sformatf("k=%0d c=%0d", k, c));
          rot  = (c < N - 1);
          jump = (c == N - 1) && (k != 0);
          @(negedge clk);
        end
        rot = 1'b0; jump = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
