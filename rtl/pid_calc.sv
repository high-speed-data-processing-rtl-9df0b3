// pid_calc: particle identification by the TOF-Brho-dE method. It joins the
// four streams Brho(F3-F5), Brho(F5-F7), TOF(F3-F7) and dE(F7) and computes
//   beta  = (L/c) / TOF
//   Brho  = Brho57 + w35 * (Brho35 - Brho57)
//   A/Q   = Brho * sqrt(1 - beta^2) / (3.1071 * beta)          [Brho in Tm]
//   dE_v  = ln(ionpair * beta^2 / (1 - beta^2)) - beta^2
//   Z     = zc0 * beta * sqrt(dE / dE_v) + zc1                  (Bethe-Bloch)
// with ln() formed as ln2 * (log2(beta^2) - log2(1 - beta^2)) + ln(ionpair).
// Invalid events (an input not ok, TOF <= 0, beta outside (0,1), dE_v <= 0)
// give FX_INVALID for both results.
// Pipeline: three dividers, two square roots and two log2 units in one
// stall-together pipeline of LAT = 2*DIV_LAT + SQRT_LAT + LOG2_LAT + 5
// stages; one event per clock; valid/ready on every stream.
// beta from TOF, A/Q from beta and Brho and Z from dE, beta and the
// Bethe-Bloch formula follow the source; the reduced Bethe-Bloch form, the
// weighting of the two Brho values and the number format are this design's.
module pid_calc
  import pid_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  pid_par_t par,
  input  logic     b35_valid,
  output logic     b35_ready,
  input  fxv_t     b35_data,
  input  logic     b57_valid,
  output logic     b57_ready,
  input  fxv_t     b57_data,
  input  logic     tof_valid,
  output logic     tof_ready,
  input  fxv_t     tof_data,
  input  logic     de_valid,
  output logic     de_ready,
  input  fxv_t     de_data,
  output logic     out_valid,
  input  logic     out_ready,
  output pid_out_t out_data
);
  localparam int D   = DIV_LAT;
  localparam int S   = SQRT_LAT;
  localparam int L   = LOG2_LAT;
  localparam int LAT = 2 * D + S + L + 5;

  logic [LAT-1:0] vld;
  logic           adv, all_valid, take;
  assign all_valid = b35_valid && b57_valid && tof_valid && de_valid;
  assign adv       = !vld[LAT-1] || out_ready;
  assign take      = adv && all_valid;
  assign b35_ready = take;
  assign b57_ready = take;
  assign tof_ready = take;
  assign de_ready  = take;
  assign out_valid = vld[LAT-1];

  always_ff @(posedge clk) begin
    if (!rst_n)   vld <= '0;
    else if (adv) vld <= {vld[LAT-2:0], all_valid};
  end

  // ---- t = 1: join, effective Brho
  fx_t  brho0, tof0, de0;
  logic ok0;
  always_ff @(posedge clk) begin
    if (adv) begin
      brho0 <= b57_data.v + fx_mul(par.w35, b35_data.v - b57_data.v);
      tof0  <= tof_data.v;
      de0   <= de_data.v;
      ok0   <= b35_data.ok && b57_data.ok && tof_data.ok && de_data.ok && (tof_data.v > 0);
    end
  end

  // ---- t = 1+D: beta
  fx_t beta_d;
  fxp_div u_beta (.clk, .en(adv), .num(par.lc), .den(tof0), .q(beta_d));

  typedef struct packed { fx_t brho; fx_t de; logic ok; } side1_t;
  side1_t s1_in, s1;
  assign s1_in = '{brho: brho0, de: de0, ok: ok0};
  pipe_delay #(.T(side1_t), .DEPTH(D)) u_s1 (.clk, .en(adv), .d(s1_in), .q(s1));

  // ---- t = 2+D: beta^2, 1-beta^2
  fx_t  beta1, b2, omb, brho1, de1;
  logic ok1;
  always_ff @(posedge clk) begin
    if (adv) begin
      fx_t sq;
      sq    = fx_mul(beta_d, beta_d);
      beta1 <= beta_d;
      b2    <= sq;
      omb   <= FX_ONE - sq;
      brho1 <= s1.brho;
      de1   <= s1.de;
      ok1   <= s1.ok && (beta_d > 0) && (beta_d < FX_ONE) && (sq < FX_ONE) && (sq > 0);
    end
  end

  // ---- A/Q branch: sqrt(1-beta^2), then Brho/(3.1071) * sqrt(1-beta^2) / beta
  fx_t ginv;
  fxp_sqrt u_ginv (.clk, .en(adv), .x(omb), .y(ginv));

  typedef struct packed { fx_t brho; fx_t beta; } side_a_t;
  side_a_t sa_in, sa;
  assign sa_in = '{brho: brho1, beta: beta1};
  pipe_delay #(.T(side_a_t), .DEPTH(S)) u_sa (.clk, .en(adv), .d(sa_in), .q(sa));

  fx_t num_aoq, beta_a;                          // t = 3+D+S
  always_ff @(posedge clk) begin
    if (adv) begin
      num_aoq <= fx_mul(fx_mul(sa.brho, par.inv_k), ginv);
      beta_a  <= sa.beta;
    end
  end

  fx_t aoq_d, aoq;                               // t = 3+2D+S
  fxp_div u_aoq (.clk, .en(adv), .num(num_aoq), .den(beta_a), .q(aoq_d));
  pipe_delay #(.T(fx_t), .DEPTH(L + 1)) u_aoq_al (.clk, .en(adv), .d(aoq_d), .q(aoq));

  // ---- Z branch: logarithms, dE_v, dE / dE_v, sqrt
  fx_t lb2, lomb;
  fxp_log2 u_lb2  (.clk, .en(adv), .x(b2),  .y(lb2));
  fxp_log2 u_lomb (.clk, .en(adv), .x(omb), .y(lomb));

  typedef struct packed { fx_t beta; fx_t b2; fx_t de; } side_z_t;
  side_z_t sz_in, sz;
  assign sz_in = '{beta: beta1, b2: b2, de: de1};
  pipe_delay #(.T(side_z_t), .DEPTH(L)) u_sz (.clk, .en(adv), .d(sz_in), .q(sz));

  fx_t  dev, de2, beta_z2;                       // t = 3+D+L
  logic dev_pos;
  always_ff @(posedge clk) begin
    if (adv) begin
      fx_t v;
      v       = fx_mul(FX_LN2, lb2 - lomb) + par.ln_ionpair - sz.b2;
      dev     <= v;
      dev_pos <= v > 0;
      de2     <= sz.de;
      beta_z2 <= sz.beta;
    end
  end

  fx_t ratio, sq_ratio;
  fxp_div  u_ratio (.clk, .en(adv), .num(de2), .den(dev), .q(ratio));      // t = 3+2D+L
  fxp_sqrt u_sqr   (.clk, .en(adv), .x(ratio), .y(sq_ratio));              // t = 3+2D+L+S

  typedef struct packed { fx_t beta; logic pos; } side_z3_t;
  side_z3_t z3_in, z3;
  assign z3_in = '{beta: beta_z2, pos: dev_pos};
  pipe_delay #(.T(side_z3_t), .DEPTH(D + S)) u_z3 (.clk, .en(adv), .d(z3_in), .q(z3));

  fx_t  zval;                                    // t = 4+2D+L+S
  logic z_ok;
  always_ff @(posedge clk) begin
    if (adv) begin
      zval <= fx_mul(fx_mul(par.zc0, z3.beta), sq_ratio) + par.zc1;
      z_ok <= z3.pos;
    end
  end

  // ---- validity, aligned with zval
  logic ok_f;
  pipe_delay #(.T(logic), .DEPTH(D + L + S + 2)) u_ok (.clk, .en(adv), .d(ok1), .q(ok_f));

  // ---- t = 5+2D+L+S: output
  always_ff @(posedge clk) begin
    if (adv) begin
      if (ok_f && z_ok) begin
        out_data.aoq <= aoq;
        out_data.z   <= zval;
      end else begin
        out_data.aoq <= FX_INVALID;
        out_data.z   <= FX_INVALID;
      end
    end
  end
endmodule
