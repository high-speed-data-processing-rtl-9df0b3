// tof_calc: time of flight between the F3 and F7 plastics,
// TOF = t(F7) - t(F3) + offset [ns]. It joins the two time streams: an event
// is taken when both inputs are valid and the output register is free.
// Pipeline: 1 stage, one event per clock. The join and the offset are this
// design's choice; TOF from the time difference follows the source.
module tof_calc
  import pid_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  fx_t  offset,
  input  logic f3_valid,
  output logic f3_ready,
  input  fxv_t f3_data,
  input  logic f7_valid,
  output logic f7_ready,
  input  fxv_t f7_data,
  output logic out_valid,
  input  logic out_ready,
  output fxv_t out_data
);
  logic adv, take;
  assign adv      = !out_valid || out_ready;
  assign take     = adv && f3_valid && f7_valid;
  assign f3_ready = take;
  assign f7_ready = take;

  always_ff @(posedge clk) begin
    if (!rst_n)   out_valid <= 1'b0;
    else if (adv) out_valid <= f3_valid && f7_valid;
  end

  always_ff @(posedge clk) begin
    if (take) begin
      out_data.v  <= f7_data.v - f3_data.v + offset;
      out_data.ok <= f3_data.ok && f7_data.ok;
    end
  end
endmodule
