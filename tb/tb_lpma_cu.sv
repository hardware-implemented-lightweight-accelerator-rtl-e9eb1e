// tb_lpma_cu: self-checking test of one computation unit.
// Runs rounds of random length with random signed G, sign flags and D, with idle
// cycles in between, and compares the accumulator with a signed sum mod 2^13
// kept in the testbench.
module tb_lpma_cu;
  import lpma_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   en = 1'b0, first = 1'b0, neg = 1'b0;
  gcoef_t g = '0;
  dcoef_t d = '0;
  dcoef_t acc;
  int     checks = 0, failures = 0;
  int     model;

  lpma_cu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      int len;
      len = $urandom_range(40, 1);
      for (int c = 0; c < len; c++) begin
        int p;
        @(negedge clk);
        en = 1'b1; first = (c == 0);
        g.mag = 3'($urandom_range(5, 0)); g.sign = 1'($urandom);
        neg = 1'($urandom); d = DW'($urandom);
        p = int'(g.mag) * int'(d);
        if (g.sign ^ neg) p = -p;
        model = (c == 0) ? p : model + p;
        // an idle cycle now and then must not change the sum
        if ($urandom_range(7, 0) == 0) begin
          @(negedge clk);
          en = 1'b0;   // the next posedge is idle
        end
      end
      @(negedge clk);
      en = 1'b0; first = 1'b0;
      checks++;
      if (acc !== DW'(model)) begin
        failures++;
        $display("FAIL round %0d: got %0d exp %0d", r, acc, DW'(model));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
