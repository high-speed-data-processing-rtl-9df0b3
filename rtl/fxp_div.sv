// fxp_div: pipelined signed fixed-point divider, q = num / den in Q15.16.
// It divides the magnitudes with a restoring divider that resolves one
// quotient bit per pipeline stage (FXW+FXF stages for the (num << FXF)
// dividend), then applies the sign. A quotient that does not fit, or a zero
// denominator, saturates to the largest value of the right sign.
// Interface: operands are sampled when `en` is high; the result appears on
// `q` DIV_LAT (= FXW+FXF+2) enabled clocks later. Every register advances
// only when `en` is high, so a stalled pipeline holds its contents.
// The design uses it wherever a quotient is needed (beta, A/Q, fit slope);
// the algorithm is this design's own choice.
module fxp_div
  import pid_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  fx_t  num,
  input  fx_t  den,
  output fx_t  q
);
  localparam int N = FXW + FXF;      // dividend / quotient bits

  // stage 0: magnitudes and sign
  logic [N-1:0]   dq   [N+1];        // remaining dividend bits / quotient bits
  logic [FXW:0]   rem  [N+1];
  logic [FXW-1:0] dvs  [N+1];
  logic           neg  [N+1];
  logic           dz   [N+1];

  logic [FXW-1:0] abs_num, abs_den;
  assign abs_num = num[FXW-1] ? FXW'(-num) : FXW'(num);
  assign abs_den = den[FXW-1] ? FXW'(-den) : FXW'(den);

  always_ff @(posedge clk) begin
    if (en) begin
      dq[0]  <= {abs_num, {FXF{1'b0}}};
      rem[0] <= '0;
      dvs[0] <= abs_den;
      neg[0] <= num[FXW-1] ^ den[FXW-1];
      dz[0]  <= (den == '0);
    end
  end

  // stages 1..N: one restoring step each
  for (genvar s = 0; s < N; s++) begin : g_step
    logic [FXW:0] trial;
    logic         take;
    assign trial = {rem[s][FXW-1:0], dq[s][N-1]};
    assign take  = trial >= {1'b0, dvs[s]};
    always_ff @(posedge clk) begin
      if (en) begin
        rem[s+1] <= take ? trial - {1'b0, dvs[s]} : trial;
        dq[s+1]  <= {dq[s][N-2:0], take};
        dvs[s+1] <= dvs[s];
        neg[s+1] <= neg[s];
        dz[s+1]  <= dz[s];
      end
    end
  end

  // output stage: saturation and sign
  logic ovf;
  assign ovf = dz[N] || (dq[N][N-1:FXW-1] != '0);
  always_ff @(posedge clk) begin
    if (en) begin
      if (ovf)         q <= neg[N] ? -FX_MAX : FX_MAX;
      else if (neg[N]) q <= -fx_t'(dq[N][FXW-1:0]);
      else             q <= fx_t'(dq[N][FXW-1:0]);
    end
  end
endmodule
