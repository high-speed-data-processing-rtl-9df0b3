// ppac_calana: PPAC calibration and analysis for one focal plane. For each of
// the four PPAC layers it turns the two delay-line TDC times (TX1, TX2) into
// an X position, x = gain * (TX1 - TX2) - offset [mm], and a fired flag that
// is set when both times are non-zero and TX1 + TX2 lies inside the layer's
// [tsum_lo, tsum_hi] window. Positions of unfired layers are forced to 0.
// Pipeline: 2 stages, one event per clock; valid/ready on both sides; the
// whole pipeline stalls while a finished event waits at the output.
// The four layers and the position/fired outputs follow the source; the
// raw format, the formula and the TSum gate are this design's choice.
module ppac_calana
  import pid_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ppac_par_t    par,
  input  logic         in_valid,
  output logic         in_ready,
  input  ppac_raw_t    in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output ppac_layers_t out_data
);
  localparam int L = N_PPAC_LAYERS;
  logic [1:0] vld;
  logic       adv;
  assign adv       = !vld[1] || out_ready;
  assign in_ready  = adv;
  assign out_valid = vld[1];

  always_ff @(posedge clk) begin
    if (!rst_n)   vld <= '0;
    else if (adv) vld <= {vld[0], in_valid};
  end

  // stage 1: difference and fired flag
  logic signed [RAW_W:0] diff [L];
  logic [L-1:0]          fired1;
  always_ff @(posedge clk) begin
    if (adv) begin
      for (int i = 0; i < L; i++) begin
        logic [RAW_W:0] tsum;
        tsum      = {1'b0, in_data[i].tx1} + {1'b0, in_data[i].tx2};
        diff[i]   <= $signed({1'b0, in_data[i].tx1}) - $signed({1'b0, in_data[i].tx2});
        fired1[i] <= (in_data[i].tx1 != '0) && (in_data[i].tx2 != '0) &&
                     (tsum >= {1'b0, par.layer[i].tsum_lo}) &&
                     (tsum <= {1'b0, par.layer[i].tsum_hi});
      end
    end
  end

  // stage 2: position
  always_ff @(posedge clk) begin
    if (adv) begin
      for (int i = 0; i < L; i++) begin
        out_data.x[i] <= fired1[i] ? fx_t'(diff[i]) * par.layer[i].gain - par.layer[i].offset : '0;
      end
      out_data.fired <= fired1;
    end
  end
endmodule
