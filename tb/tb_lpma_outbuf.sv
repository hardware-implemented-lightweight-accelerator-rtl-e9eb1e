// tb_lpma_outbuf: self-checking test of the output buffer (V = 4).
// Loads random accumulator sets at varying distances (>= V cycles) and checks
// that each set comes out serially, channel V-1 first, with 'valid' high for
// exactly V cycles starting the cycle after the load.
module tb_lpma_outbuf;
  import lpma_pkg::*;

  localparam int V = 4;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   load = 1'b0;
  dcoef_t acc [V];
  dcoef_t w_out;
  logic   valid;
  int     checks = 0, failures = 0;
  dcoef_t exp_q [$];

  lpma_outbuf #(.V(V)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: every valid word must be the next expected one, and
  // valid must be high exactly while words are pending.
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (valid !== (exp_q.size() != 0)) begin
      failures++;
      $display("FAIL valid=%b with %0d pending", valid, exp_q.size());
    end
    if (valid && exp_q.size() != 0) begin
      dcoef_t e;
      e = exp_q.pop_front();
      checks++;
      if (w_out !== e) begin
        failures++;
        $display("FAIL w_out %h exp %h", w_out, e);
      end
    end
  end

  initial begin
    for (int i = 0; i < V; i++) acc[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 30; s++) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < V; i++) acc[i] = DW'($urandom);
      load = 1'b1;
      @(posedge clk);
      #1;
      load = 1'b0;
      for (int i = V - 1; i >= 0; i--) exp_q.push_back(acc[i]);
      for (int i = 0; i < V; i++) acc[i] = DW'($urandom);   // must not leak out
      repeat ($urandom_range(V + 2, V - 2)) @(posedge clk);
    end
    repeat (V + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
