// ic_calana: ion-chamber calibration and analysis at F7. The energy loss is
//   dE = gain * geometric_mean(raw_i - ped_i, i = 1..6) + offset,
// i.e. pedestal correction, geometric mean of the six channels and a linear
// transformation. The geometric mean is formed in the log domain,
// 2^(sum(log2 v_i) / 6), with pipelined log2 and exp2 units. The result is
// ok only when every channel lies above its pedestal.
// Pipeline: LAT = LOG2_LAT + EXP2_LAT + 3 stages, one event per clock,
// valid/ready, whole-pipeline stall. The three processing steps follow the
// source; the log-domain mean and the ok rule are this design's choice.
module ic_calana
  import pid_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  ic_par_t par,
  input  logic    in_valid,
  output logic    in_ready,
  input  ic_raw_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output fxv_t    out_data
);
  localparam int C     = N_IC_CH;
  localparam int LAT   = LOG2_LAT + EXP2_LAT + 3;
  localparam longint RECIP = ((longint'(1) << 24) + longint'(C) / 2) / longint'(C);   // 2^24 / C

  logic [LAT-1:0] vld;
  logic           adv;
  assign adv       = !vld[LAT-1] || out_ready;
  assign in_ready  = adv;
  assign out_valid = vld[LAT-1];

  always_ff @(posedge clk) begin
    if (!rst_n)   vld <= '0;
    else if (adv) vld <= {vld[LAT-2:0], in_valid};
  end

  // stage 1: pedestal subtraction
  fx_t  v  [C];
  logic ok1;
  always_ff @(posedge clk) begin
    if (adv) begin
      logic okc;
      okc = 1'b1;
      for (int i = 0; i < C; i++) begin
        logic [RAW_W-1:0] d;
        d = in_data[i] - par.ped[i];
        if (in_data[i] <= par.ped[i]) begin
          okc  = 1'b0;
          v[i] <= FX_ONE;
        end else if (d >= (RAW_W)'(1 << (FXW - FXF - 1))) begin
          v[i] <= FX_MAX;
        end else begin
          v[i] <= fx_t'(d) <<< FXF;
        end
      end
      ok1 <= okc;
    end
  end

  // log2 of every channel
  fx_t lg [C];
  for (genvar i = 0; i < C; i++) begin : g_log
    fxp_log2 u_log (.clk, .en(adv), .x(v[i]), .y(lg[i]));
  end

  // mean of the logarithms
  fx_t mean;
  always_ff @(posedge clk) begin
    if (adv) begin
      logic signed [63:0] s;
      s = '0;
      for (int i = 0; i < C; i++) s = s + 64'(lg[i]);
      mean <= fx_t'((s * RECIP) >>> 24);
    end
  end

  fx_t gm;
  fxp_exp2 u_exp (.clk, .en(adv), .x(mean), .y(gm));

  // linear transformation
  logic ok_d;
  pipe_delay #(.T(logic), .DEPTH(LOG2_LAT + EXP2_LAT + 1)) u_ok (.clk, .en(adv), .d(ok1), .q(ok_d));
  always_ff @(posedge clk) begin
    if (adv) begin
      out_data.v  <= fx_mul(par.gain, gm) + par.offset;
      out_data.ok <= ok_d;
    end
  end
endmodule
