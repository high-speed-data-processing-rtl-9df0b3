// fxp_log2: pipelined base-2 logarithm of a positive Q15.16 value; result is
// signed Q15.16. The first stage finds the leading one (integer part of the
// result) and normalises the mantissa to [1,2); each of the FXF further
// stages squares the mantissa and takes one fraction bit (bit = 1 when the
// square reaches 2, which is then halved). Inputs <= 0 give FX_INVALID.
// Interface: x sampled when `en` is high, y valid LOG2_LAT enabled clocks
// later; registers hold while `en` is low. Algorithm is this design's own.
module fxp_log2
  import pid_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  fx_t  x,
  output fx_t  y
);
  logic [FXW-1:0] man [FXF+1];       // mantissa, 1 integer bit, FXW-1 fraction bits
  fx_t            acc [FXF+1];
  logic           bad [FXF+1];

  logic [$clog2(FXW)-1:0] msb;
  always_comb begin
    msb = '0;
    for (int i = 0; i < FXW; i++)
      if (x[i]) msb = i[$clog2(FXW)-1:0];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      man[0] <= FXW'(x) << (FXW - 1 - int'(msb));
      acc[0] <= fx_t'(int'(msb) - FXF) <<< FXF;
      bad[0] <= (x <= 0);
    end
  end

  for (genvar s = 0; s < FXF; s++) begin : g_bit
    logic [2*FXW-1:0] sq;
    assign sq = man[s] * man[s];     // [1,4) with 2*FXW-2 fraction bits
    always_ff @(posedge clk) begin
      if (en) begin
        bad[s+1] <= bad[s];
        if (sq[2*FXW-1]) begin
          man[s+1] <= sq[2*FXW-1:FXW];
          acc[s+1] <= acc[s] | (fx_t'(1) <<< (FXF - 1 - s));
        end else begin
          man[s+1] <= sq[2*FXW-2:FXW-1];
          acc[s+1] <= acc[s];
        end
      end
    end
  end

  assign y = bad[FXF] ? FX_INVALID : acc[FXF];
endmodule
