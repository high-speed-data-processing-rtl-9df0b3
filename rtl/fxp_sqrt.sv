// fxp_sqrt: pipelined fixed-point square root, y = sqrt(x) in Q15.16.
// The radicand x << FXF is resolved digit by digit (one result bit per
// stage, non-restoring on the remainder). Negative inputs give 0.
// Interface: x is sampled when `en` is high; y appears SQRT_LAT enabled
// clocks later; all registers hold while `en` is low. The algorithm is this
// design's own choice.
module fxp_sqrt
  import pid_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  fx_t  x,
  output fx_t  y
);
  localparam int N = FXW + FXF;      // radicand bits
  localparam int M = N / 2;          // result bits

  logic [N-1:0] rad  [M+1];
  logic [M+2:0] rem  [M+1];
  logic [M-1:0] root [M+1];

  always_ff @(posedge clk) begin
    if (en) begin
      rad[0]  <= x[FXW-1] ? '0 : {x, {FXF{1'b0}}};
      rem[0]  <= '0;
      root[0] <= '0;
    end
  end

  for (genvar s = 0; s < M; s++) begin : g_step
    logic [M+2:0] cur, trial;
    assign cur   = {rem[s][M:0], rad[s][N-1:N-2]};
    assign trial = {1'b0, root[s], 2'b01};
    always_ff @(posedge clk) begin
      if (en) begin
        rad[s+1] <= {rad[s][N-3:0], 2'b00};
        if (cur >= trial) begin
          rem[s+1]  <= cur - trial;
          root[s+1] <= {root[s][M-2:0], 1'b1};
        end else begin
          rem[s+1]  <= cur;
          root[s+1] <= {root[s][M-2:0], 1'b0};
        end
      end
    end
  end

  assign y = fx_t'(root[M]);
endmodule
