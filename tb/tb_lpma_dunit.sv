// tb_lpma_dunit: self-checking test of the D processing unit (V = 4).
// Streams random coefficients in and checks that register i always holds the
// value that entered i+1 shifts earlier, and that the chain holds when disabled.
module tb_lpma_dunit;
  import lpma_pkg::*;

  localparam int V = 4;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   shift = 1'b0;
  dcoef_t d_in = '0;
  dcoef_t d_out [V];
  int     checks = 0, failures = 0;
  dcoef_t hist [$];

  lpma_dunit #(.V(V)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < V; i++) hist.push_front('0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int i = 0; i < V; i++) begin
        checks++;
        if (d_out[i] !== hist[i]) begin
          failures++;
          $display("FAIL t=%0d reg %0d: got %h exp %h", t, i, d_out[i], hist[i]);
        end
      end
      shift = ($urandom_range(3, 0) != 0);
      d_in  = DW'($urandom);
      if (shift) begin
        hist.push_front(d_in);
        void'(hist.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
