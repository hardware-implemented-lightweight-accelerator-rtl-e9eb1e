// tb_lpma_mux_mul: exhaustive test of the MUX-based multiplier: every 13-bit D
// and every magnitude 0..5 against (d * mag) mod 2^13.
module tb_lpma_mux_mul;
  import lpma_pkg::*;

  dcoef_t     d;
  logic [2:0] mag;
  dcoef_t     prod;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  lpma_mux_mul dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dv = 0; dv < (1 << DW); dv++) begin
      for (int m = 0; m <= 5; m++) begin
        d = DW'(dv); mag = 3'(m);
        #1;
        checks++;
        if (prod !== DW'(dv * m)) begin
          failures++;
          if (failures < 10) $display("FAIL d=%0d mag=%0d got %0d", dv, m, prod);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
