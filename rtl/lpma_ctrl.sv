// lpma_ctrl: control unit of the accelerator, a five-stage FSM
// (reset, load, computation, switch, done).
//
//   reset   : idle until 'start'.
//   load    : N cycles.  Cycle t requests g_{N-1-t} on g_idx and shifts it into
//             the G register.  In the last V cycles the D unit is filled too:
//             cycle t requests d_{(t+1) mod N} on d_idx.
//   comp    : cycles c = 0 .. N-2 of a round: all V channels multiply and
//             accumulate, G rotates by one, D shifts in d_{(c+1) mod N}, the
//             sign register shifts.
//   switch  : cycle c = N-1, the last product of the round; the G register does
//             the group switch (not after the last round) and the sign register
//             is reloaded.  Then comp again for the next of the u = N/V rounds,
//             or done.
//   done    : the output buffer delivers the last V results; 'done' pulses with
//             the last of them and the FSM returns to reset.
// The cycle after every switch, buf_load hands the V results to the output
// buffer; 'out_grp' is the index k of the group W_k being handed over.
//
// The coefficient source is addressed by g_idx / d_idx and must answer in the
// same cycle (a combinational read), which is this design's interface choice.
// N >= 2 and 2 <= V <= N with V dividing N.  One round is N cycles, so the computation takes u*N cycles, as in the document.
module lpma_ctrl
  import lpma_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned V = V_DEF,
  localparam int unsigned U  = N / V,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned KW = (U > 1) ? $clog2(U) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output ctrl_t         ctl,
  output logic [AW-1:0] g_idx,
  output logic [AW-1:0] d_idx,
  output logic [KW-1:0] out_grp,
  output state_t        state,
  output logic          busy,
  output logic          done
);

  logic [CW-1:0] cnt;   // cycle within a stage
  logic [KW-1:0] k;
  logic          sw_q;   // previous cycle was a switch

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_RESET;
      cnt     <= '0;
      k       <= '0;
      sw_q    <= 1'b0;
      out_grp <= '0;
    end else begin
      sw_q <= (state == ST_SWITCH);
      unique case (state)
        ST_RESET: begin
          cnt <= '0;
          if (start) state <= ST_LOAD;
        end
        ST_LOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(N-1)) begin
            cnt   <= '0;
            k     <= KW'(U-1);
            state <= ST_COMP;
          end
        end
        ST_COMP: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(N-2)) state <= ST_SWITCH;
        end
        ST_SWITCH: begin
          cnt     <= '0;
          out_grp <= k;
          if (k == '0) begin
            state <= ST_DONE;
          end else begin
            k     <= k - 1'b1;
            state <= ST_COMP;
          end
        end
        ST_DONE: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(V)) begin
            cnt   <= '0;
            state <= ST_RESET;
          end
        end
        default: state <= ST_RESET;
      endcase
    end
  end

  always_comb begin
    ctl   = '0;
    g_idx = AW'(CW'(N-1) - cnt);
    d_idx = AW'(cnt + 1'b1);   // wraps to 0 after N-1
    ctl.buf_load = sw_q;
    unique case (state)
      ST_LOAD: begin
        ctl.g_load   = 1'b1;
        ctl.d_shift  = (32'(cnt) >= N - V);
        ctl.s_reload = 1'b1;
      end
      ST_COMP: begin
        ctl.g_rot     = 1'b1;
        ctl.d_shift   = 1'b1;
        ctl.s_shift   = 1'b1;
        ctl.mac_en    = 1'b1;
        ctl.mac_first = (cnt == '0);
      end
      ST_SWITCH: begin
        ctl.g_jump    = (k != '0);
        ctl.d_shift   = 1'b1;
        ctl.s_reload  = 1'b1;
        ctl.mac_en    = 1'b1;
              end
      default: ;
    endcase
  end

  assign busy = (state != ST_RESET);
  assign done = (state == ST_DONE) && (cnt == CW'(V));

endmodule
