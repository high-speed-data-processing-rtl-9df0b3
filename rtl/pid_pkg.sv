// pid_pkg: types and constants shared by the particle-identification (PID)
// pipeline. Every calibrated quantity (position, time, energy, A/Q, Z) is a
// signed fixed-point number with FXW bits of which FXF are fraction bits
// (Q15.16). Raw detector values are unsigned 16-bit integers. Each value
// travelling between tasks carries an `ok` bit that says whether the event
// gave a usable value for it. The record layouts and the number format are
// this design's own; the detector counts (4 PPAC layers per focal plane,
// 2 photomultipliers per plastic, 6 ion-chamber channels) follow the source.
package pid_pkg;

  localparam int FXW = 32;                 // fixed-point width
  localparam int FXF = 16;                 // fraction bits
  typedef logic signed [FXW-1:0] fx_t;

  localparam fx_t FX_ONE     = fx_t'(1) <<< FXF;
  localparam fx_t FX_MAX     = {1'b0, {(FXW-1){1'b1}}};
  localparam fx_t FX_INVALID = {1'b1, {(FXW-1){1'b0}}};  // marks an unusable result
  localparam fx_t FX_LN2     = fx_t'(45426);               // ln(2) * 2^16

  // Pipeline depths of the arithmetic units (register stages input->output)
  localparam int DIV_LAT  = FXW + FXF + 2;  // fxp_div
  localparam int SQRT_LAT = (FXW + FXF) / 2 + 1; // fxp_sqrt
  localparam int LOG2_LAT = FXF + 1;        // fxp_log2
  localparam int EXP2_LAT = FXF + 2;        // fxp_exp2

  localparam int RAW_W         = 16;
  localparam int N_PPAC_LAYERS = 4;
  localparam int N_PL_PM       = 2;
  localparam int N_IC_CH       = 6;
  typedef logic [RAW_W-1:0] raw_t;

  // ---- raw event segments (one memory word per event and detector group)
  typedef struct packed { raw_t tx1; raw_t tx2; } ppac_layer_raw_t;
  typedef ppac_layer_raw_t [N_PPAC_LAYERS-1:0] ppac_raw_t;   // 128 bits
  typedef struct packed { raw_t tl; raw_t tr; } pl_raw_t;       // 32 bits
  typedef raw_t [N_IC_CH-1:0] ic_raw_t;                         // 96 bits

  // ---- intermediate records
  typedef struct packed {
    fx_t [N_PPAC_LAYERS-1:0]  x;      // layer positions, mm
    logic [N_PPAC_LAYERS-1:0] fired;  // layer gave a valid position
  } ppac_layers_t;

  typedef struct packed {
    fx_t  x;    // position at the focal plane, mm
    fx_t  a;    // angle, mrad
    logic ok;
  } fp_track_t;

  typedef struct packed {
    fx_t  v;
    logic ok;
  } fxv_t;

  typedef struct packed {
    fx_t aoq;
    fx_t z;
  } pid_out_t;

  // ---- run-time calibration constants
  typedef struct packed {
    fx_t  gain;     // mm per TDC channel of (TX1 - TX2)
    fx_t  offset;   // mm
    raw_t tsum_lo;  // TX1 + TX2 window
    raw_t tsum_hi;
  } ppac_layer_par_t;

  typedef struct packed {
    ppac_layer_par_t [N_PPAC_LAYERS-1:0] layer;
    fx_t [N_PPAC_LAYERS-1:0]             z;   // layer positions along the beam, m
  } ppac_par_t;

  typedef struct packed {
    fx_t c_xup;     // % per mm of upstream x
    fx_t c_xdn;     // % per mm of downstream x
    fx_t c_adn;     // % per mrad of downstream angle
    fx_t brho0;     // central B-rho, Tm
    fx_t brho0_pct; // brho0 / 100
  } traj_par_t;

  typedef struct packed {
    fx_t gain_l;    // ns per channel
    fx_t gain_r;
    fx_t offset;    // ns
  } pl_par_t;

  typedef struct packed {
    raw_t [N_IC_CH-1:0] ped;
    fx_t gain;
    fx_t offset;
  } ic_par_t;

  typedef struct packed {
    fx_t lc;          // flight path / c, ns
    fx_t inv_k;       // 1 / 3.1071 (e / (m_u c), per Tm)
    fx_t w35;         // weight of B-rho(F3-F5) in the B-rho used for A/Q
    fx_t ln_ionpair;  // ln(ionpair) of the Bethe-Bloch term
    fx_t zc0;         // Z = zc0 * beta * sqrt(dE / dE_v) + zc1
    fx_t zc1;
  } pid_par_t;

  typedef struct packed {
    ppac_par_t f3ppac;
    ppac_par_t f5ppac;
    ppac_par_t f7ppac;
    pl_par_t   f3pl;
    pl_par_t   f7pl;
    fx_t       tof_offset;
    ic_par_t   f7ic;
    traj_par_t traj35;
    traj_par_t traj57;
    pid_par_t  pid;
  } kernel_par_t;

  // Fixed-point product, truncated toward minus infinity.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FXW-1:0] p;
    p = a * b;
    return fx_t'(p >>> FXF);
  endfunction

endpackage
