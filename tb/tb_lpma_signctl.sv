// tb_lpma_signctl: self-checking test of the sign control register (V = 8).
// After a reload, cycle c of a round must flag exactly the channels i > c.
// Runs several rounds of different length and checks the reload priority.
module tb_lpma_signctl;
  localparam int V = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         reload = 1'b0, shift = 1'b0;
  logic [V-1:0] neg;
  int           checks = 0, failures = 0;

  lpma_signctl #(.V(V)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      int len;
      len = V + 3 * r;
      @(negedge clk);
      reload = 1'b1; shift = (r % 2 == 1);   // reload wins over shift
      @(negedge clk);
      reload = 1'b0;
      for (int c = 0; c < len; c++) begin
        for (int i = 0; i < V; i++) begin
          checks++;
          if (neg[i] !== (c < i)) begin
            failures++;
            $display("FAIL round %0d c=%0d bit %0d = %b", r, c, i, neg[i]);
          end
        end
        shift = 1'b1;
        @(negedge clk);
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
