// tb_lpma_ctrl: self-checking test of the control unit (N = 16, V = 4, u = 4).
// Follows the FSM cycle by cycle from 'start' and checks the stage sequence
// (N load cycles, then u rounds of N-1 compute cycles and one switch cycle,
// then V+1 done cycles), the requested G and D indices, every control strobe,
// the group index handed to the output buffer, and the total latency.
module tb_lpma_ctrl;
  import lpma_pkg::*;

  localparam int N  = 16;
  localparam int V  = 4;
  localparam int U  = N / V;
  localparam int AW = $clog2(N);
  localparam int KW = $clog2(U);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  ctrl_t         ctl;
  logic [AW-1:0] g_idx, d_idx;
  logic [KW-1:0] out_grp;
  state_t        state;
  logic          busy, done;
  int            checks = 0, failures = 0;

  lpma_ctrl #(.N(N), .V(V)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(input state_t st, input ctrl_t c, input int gi, input int di,
                              input logic dn, input string what);
    checks++;
    if (state !== st || ctl !== c || (st == ST_LOAD && g_idx !== AW'(gi)) ||
        (c.d_shift && d_idx !== AW'(di)) || done !== dn || busy !== (st != ST_RESET)) begin
      failures++;
      $display("FAIL %s: state %s ctl %b g_idx %0d d_idx %0d done %b", what, state.name(),
               ctl, g_idx, d_idx, done);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 2; op++) begin
      ctrl_t c;
      @(negedge clk);
      c = '0;
      expect_cycle(ST_RESET, c, 0, 0, 1'b0, "idle");
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int t = 0; t < N; t++) begin
        c = '0; c.g_load = 1'b1; c.s_reload = 1'b1; c.d_shift = (t >= N - V);
        expect_cycle(ST_LOAD, c, N - 1 - t, (t + 1) % N, 1'b0, $sformatf("load %0d", t));
        @(negedge clk);
      end
      for (int k = U - 1; k >= 0; k--) begin
        for (int t = 0; t < N; t++) begin
          c = '0;
          c.buf_load = (t == 0 && k != U - 1);
          c.d_shift = 1'b1; c.mac_en = 1'b1;
          if (t < N - 1) begin
            c.g_rot = 1'b1; c.s_shift = 1'b1; c.mac_first = (t == 0);
            expect_cycle(ST_COMP, c, 0, (t + 1) % N, 1'b0, $sformatf("comp k=%0d t=%0d", k, t));
          end else begin
            c.g_jump = (k != 0); c.s_reload = 1'b1;
            expect_cycle(ST_SWITCH, c, 0, 0, 1'b0, $sformatf("switch k=%0d", k));
          end
          if (c.buf_load) begin
            checks++;
            if (out_grp !== KW'(k + 1)) begin
              failures++;
              $display("FAIL out_grp %0d exp %0d", out_grp, k + 1);
            end
          end
          @(negedge clk);
        end
      end
      for (int t = 0; t <= V; t++) begin
        c = '0; c.buf_load = (t == 0);
        expect_cycle(ST_DONE, c, 0, 0, (t == V), $sformatf("done %0d", t));
        if (t == 0) begin
          checks++;
          if (out_grp !== '0) begin
            failures++;
            $display("FAIL last out_grp %0d", out_grp);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
