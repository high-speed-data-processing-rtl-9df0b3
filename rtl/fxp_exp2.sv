// fxp_exp2: pipelined power of two, y = 2^x for signed Q15.16 x; y is Q15.16.
// The fraction f of x is turned into 2^f as a product of the constants
// 2^(2^-k) for each set bit k (one multiply per stage, Q2.30 mantissa); the
// last stage shifts the mantissa by the integer part of x, saturating to
// FX_MAX and flushing to 0 when the value leaves the Q15.16 range.
// The constants are computed at elaboration by repeated integer square roots
// starting from 2 (C_k = sqrt(C_{k-1})).
// Interface: x sampled when `en` is high, y valid EXP2_LAT enabled clocks
// later; registers hold while `en` is low. Algorithm is this design's own.
module fxp_exp2
  import pid_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  fx_t  x,
  output fx_t  y
);
  localparam int MF = 30;            // mantissa fraction bits

  function automatic logic [63:0] isqrt64(logic [63:0] v);
    logic [63:0] r, b;
    r = 0;
    for (int i = 31; i >= 0; i--) begin
      b = r | (64'd1 << i);
      if (b * b <= v) r = b;
    end
    return r;
  endfunction

  // C_k = 2^(2^-k) in Q2.30, k = 1..FXF
  function automatic logic [31:0] exp2_const(int k);
    logic [63:0] c;
    c = 64'd2 << MF;
    for (int i = 0; i < k; i++) c = isqrt64(c << MF);
    return c[31:0];
  endfunction

  logic [31:0]    man [FXF+1];
  logic [FXF-1:0] frac[FXF+1];
  fx_t            ipart[FXF+1];

  always_ff @(posedge clk) begin
    if (en) begin
      man[0]   <= 32'd1 << MF;
      frac[0]  <= x[FXF-1:0];
      ipart[0] <= x >>> FXF;
    end
  end

  for (genvar s = 0; s < FXF; s++) begin : g_bit
    localparam logic [31:0] C = exp2_const(s + 1);
    logic [63:0] p;
    assign p = man[s] * C;
    always_ff @(posedge clk) begin
      if (en) begin
        man[s+1]   <= frac[s][FXF-1-s] ? p[MF+31:MF] : man[s];
        frac[s+1]  <= frac[s];
        ipart[s+1] <= ipart[s];
      end
    end
  end

  // final shift: value = man * 2^(ipart) with MF fraction bits -> FXF bits
  logic [63:0] wide;
  int          sh;
  always_comb begin
    sh   = int'(ipart[FXF]) + FXF - MF;  // left shift amount (may be negative)
    wide = '0;
    if (sh >= 0 && sh < 32) wide = {32'd0, man[FXF]} << sh;
    else if (sh < 0 && sh > -32) wide = {32'd0, man[FXF]} >> (-sh);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (int'(ipart[FXF]) >= FXW - FXF - 1) y <= FX_MAX;
      else if (sh <= -32)                    y <= '0;
      else if (wide[63:FXW-1] != '0)         y <= FX_MAX;
      else                                   y <= fx_t'(wide[FXW-1:0]);
    end
  end
endmodule
