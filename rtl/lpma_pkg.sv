// lpma_pkg: shared sizes and types of the lightweight polynomial multiplication
// accelerator (LPMA) for Saber, which computes W = D * G mod (x^N + 1) over
// Z_q with q = 2^13.
//
// The polynomial degree N = 256, the 13-bit width of the D and W coefficients and
// the 4-bit sign-magnitude format of the G coefficients (range [-5,5]) follow the
// Saber parameter set.  The default channel count V = 32 is the configuration the
// accelerator is usually quoted at; N/V rounds of N cycles give the product.
// The control bundle struct and the FSM encoding are this design's own choices.
package lpma_pkg;

  // Default sizes.
  localparam int unsigned N_DEF  = 256;  // polynomial length
  localparam int unsigned V_DEF  = 32;   // parallel computation channels
  localparam int unsigned DW     = 13;   // width of D and W coefficients (q = 2^13)
  localparam int unsigned GMAG_MAX = 5;  // largest |g| (Saber secret range [-5,5])

  typedef logic [DW-1:0] dcoef_t;

  // Sign-magnitude G coefficient: sign = 1 means negative.
  typedef struct packed {
    logic       sign;
    logic [2:0] mag;
  } gcoef_t;

  // Stages of the control unit.
  typedef enum logic [2:0] {
    ST_RESET  = 3'd0,   // idle, waiting for start
    ST_LOAD   = 3'd1,   // serial load of G (N cycles), D window in the last V cycles
    ST_COMP   = 3'd2,   // first N-1 multiply-accumulate cycles of a round
    ST_SWITCH = 3'd3,   // last MAC cycle of a round plus the group switch of G
    ST_DONE   = 3'd4    // drain the output buffer after the last round
  } state_t;

  // Control bundle from the control unit to the datapath.
  typedef struct packed {
    logic g_load;     // G register: shift by one, new coefficient enters cell 0
    logic g_rot;      // G register: circular shift by one
    logic g_jump;     // G register: group switch (see lpma_gshift)
    logic d_shift;    // D unit: shift, d_in enters register 0
    logic s_reload;   // sign register: reload the start-of-round pattern
    logic s_shift;    // sign register: shift a zero in
    logic mac_en;     // computation units: accumulate this cycle
    logic mac_first;  // computation units: first product of a round (restart)
    logic buf_load;   // output buffer: capture the V accumulators
  } ctrl_t;

endpackage
