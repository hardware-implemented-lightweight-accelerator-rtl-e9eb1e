// tb_lpma_sweep: runs the end-to-end test at every channel count the
// accelerator is evaluated with for N = 256: V = 2, 4, 8, 16, 32, 64
// (u = 128 ... 4 rounds, 32768 ... 1024 computation cycles).  Each size runs six
// multiplications with full output and latency checks; the counts are summed.
module tb_lpma_sweep;
  localparam int NV = 6;
  localparam int VS [NV] = '{2, 4, 8, 16, 32, 64};

  int   c [NV];
  int   f [NV];
  logic fin [NV];
  logic clk = 1'b0;

  for (genvar i = 0; i < NV; i++) begin : g_v
    tb_lpma_env #(.N(256), .V(VS[i])) u_env (.checks(c[i]), .failures(f[i]), .finished(fin[i]));
  end

  always #5 clk = ~clk;

  initial begin
    int checks, failures;
    bit all;
    checks = 0; failures = 0;
    fork
      begin
        repeat (6 * (2 * 256 + 32768 + 2 + 20) + 1000) @(posedge clk);
        failures++;
        $display("watchdog expired");
      end
      begin
        do begin
          @(posedge clk);
          all = 1;
          for (int i = 0; i < NV; i++) all &= fin[i];
        end while (!all);
      end
    join_any
    for (int i = 0; i < NV; i++) begin
      checks += c[i]; failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
