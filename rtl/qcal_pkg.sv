// qcal_pkg: shared fixed-point format, register map and constants of the
// embedded singleton-Sugeno calibration controller.
//
// All controller quantities (probabilities, errors, the amplitude step Delta,
// the calibrated parameter amp and the singleton consequents D0..D8) use one
// signed fixed-point word: DATA_W bits with FRAC_W fractional bits, so 1.0 is
// 2**FRAC_W. The format itself is a choice of this design; the document only
// says the arithmetic is fixed-size fixed point. Membership degrees and rule
// weights are unsigned values in [0,1] with the same FRAC_W fractional bits.
//
// Default register contents follow the document where it gives a number
// (E_tol = 0.125, DE_tol = 0.0625, window W = 16); the rest are this design's
// choices and are listed with the register map.
package qcal_pkg;

  // ---------------- fixed-point format ----------------
  localparam int unsigned DATA_W = 16;             // signed word width
  localparam int unsigned FRAC_W = 12;             // fractional bits (Q3.12)
  localparam int unsigned MU_W   = FRAC_W + 1;     // membership / weight, 0..1.0
  localparam int signed   ONE    = 1 <<< FRAC_W;   // 1.0

  typedef logic signed [DATA_W-1:0] fx_t;          // signed fixed-point word
  typedef logic        [MU_W-1:0]   mu_t;          // membership degree 0..1.0

  // Convert a real constant to fx_t (only for constants and testbenches).
  function automatic fx_t to_fx(input real r);
    return fx_t'($rtoi(r * real'(ONE) + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // ---------------- register interface ----------------
  localparam int unsigned ADDR_W = 6;

  typedef enum logic [ADDR_W-1:0] {
    REG_CTRL     = 6'h00,  // [0] enable loop, [1] manual mode, [2] restart (write 1, self-clearing)
    REG_P_TARGET = 6'h01,  // p_target
    REG_DMAX     = 6'h02,  // Delta_max (clip bound of the step)
    REG_AMP_MIN  = 6'h03,  // lower saturation bound of amp
    REG_AMP_MAX  = 6'h04,  // upper saturation bound of amp
    REG_AMP_SET  = 6'h05,  // write: load amp directly (initial value / manual setting)
    REG_E_TOL    = 6'h06,  // E_tol
    REG_DE_TOL   = 6'h07,  // DE_tol
    REG_EPS      = 6'h08,  // plateau epsilon
    REG_HITS     = 6'h09,  // H, consecutive hits before convergence
    REG_T_RST    = 6'h0A,  // restart threshold on (metric - baseline)
    REG_R_PERS   = 6'h0B,  // R, restart persistence
    REG_D0       = 6'h10,  // D0..D8 at 0x10..0x18, index = 3*e_term + de_term
    REG_P_MEAS   = 6'h20,  // read-only telemetry from here on
    REG_E        = 6'h21,
    REG_DE       = 6'h22,
    REG_DELTA    = 6'h23,
    REG_AMP      = 6'h24,
    REG_STATUS   = 6'h25,  // see status_t
    REG_METRIC   = 6'h26,  // W-poll average of |e|
    REG_K        = 6'h27,  // poll index k (low DATA_W bits)
    REG_BASELINE = 6'h28   // latched monitor baseline
  } reg_addr_e;

  // Status flags (REG_STATUS bits 0..7, LSB first = last field below).
  typedef struct packed {
    logic conv;          // converged: set at convergence, cleared by any restart
    logic restart_seen;  // a drift restart has occurred since the last clear
    logic manual;        // manual mode: amp is not changed by the loop
    logic conv_plateau;  // last convergence came from the plateau rule
    logic conv_hit;      // last convergence came from the hit rule
    logic mon;           // monitor mode: amp frozen
    logic upd;           // amp was updated in the last poll
    logic busy;          // an iteration is in progress
  } status_t;

  // Configuration as seen by the datapath.
  typedef struct packed {
    logic            enable;
    logic            manual;
    fx_t             p_target;
    fx_t             dmax;
    fx_t             amp_min;
    fx_t             amp_max;
    fx_t             e_tol;
    fx_t             de_tol;
    fx_t             eps;
    logic [7:0]      hits;
    fx_t             t_rst;
    logic [7:0]      r_pers;
    fx_t [8:0]       dtab;     // dtab[3*i+j] = D(3i+j), i: e term, j: de term (N,Z,P)
  } cfg_t;

  // Reset values of the configuration registers.
  localparam fx_t  RST_P_TARGET = fx_t'(ONE / 2);    // 0.5  (assumed)
  localparam fx_t  RST_DMAX     = fx_t'(ONE / 2);    // 0.5  (assumed)
  localparam fx_t  RST_AMP_MIN  = fx_t'(0);          // 0.0  (assumed)
  localparam fx_t  RST_AMP_MAX  = fx_t'(4 * ONE);    // 4.0  (assumed)
  localparam fx_t  RST_E_TOL    = fx_t'(ONE / 8);    // 0.125  (document)
  localparam fx_t  RST_DE_TOL   = fx_t'(ONE / 16);   // 0.0625 (document)
  localparam fx_t  RST_EPS      = fx_t'(ONE / 256);  // 1/256 (assumed)
  localparam logic [7:0] RST_HITS   = 8'd4;          // H (assumed)
  localparam fx_t  RST_T_RST    = fx_t'(ONE / 8);    // 0.125 (assumed)
  localparam logic [7:0] RST_R_PERS = 8'd8;          // R (assumed)

  // Default singleton table (assumed): rows e = N,Z,P; columns de = N,Z,P.
  // Positive e (p_meas below target) pushes amp up.
  localparam fx_t [8:0] RST_DTAB = '{
    fx_t'( ONE / 2),  fx_t'( ONE / 2),  fx_t'( ONE / 4),   // D8 D7 D6  (e = P)
    fx_t'( ONE / 8),  fx_t'(0),         fx_t'(-ONE / 8),   // D5 D4 D3  (e = Z)
    fx_t'(-ONE / 4),  fx_t'(-ONE / 2),  fx_t'(-ONE / 2)    // D2 D1 D0  (e = N)
  };

endpackage
