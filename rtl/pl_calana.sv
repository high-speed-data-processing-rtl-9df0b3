// pl_calana: plastic-scintillator calibration and analysis for one focal
// plane. The passage time of the ion is the average of the calibrated times
// of the two photomultipliers: t = (gain_l*TL + gain_r*TR)/2 + offset [ns].
// The result is ok only when both TDC values are non-zero.
// Pipeline: 2 stages, one event per clock, valid/ready, whole-pipeline stall.
// Averaging the two PMs follows the source; the raw format, the gains and
// the ok rule are this design's choice.
module pl_calana
  import pid_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  pl_par_t par,
  input  logic    in_valid,
  output logic    in_ready,
  input  pl_raw_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output fxv_t    out_data
);
  logic [1:0] vld;
  logic       adv;
  assign adv       = !vld[1] || out_ready;
  assign in_ready  = adv;
  assign out_valid = vld[1];

  always_ff @(posedge clk) begin
    if (!rst_n)   vld <= '0;
    else if (adv) vld <= {vld[0], in_valid};
  end

  fx_t  tl, tr;
  logic ok1;
  always_ff @(posedge clk) begin
    if (adv) begin
      tl  <= fx_t'({1'b0, in_data.tl}) * par.gain_l;
      tr  <= fx_t'({1'b0, in_data.tr}) * par.gain_r;
      ok1 <= (in_data.tl != '0) && (in_data.tr != '0);
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      out_data.v  <= ((tl + tr) >>> 1) + par.offset;
      out_data.ok <= ok1;
    end
  end
endmodule
