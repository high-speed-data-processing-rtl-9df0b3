// pipe_delay: DEPTH-stage shift register of type T that advances only when
// `en` is high. The compute tasks use it to carry side values alongside an
// arithmetic unit of the same depth, so both leave the pipeline together.
// DEPTH = 0 is a wire.
module pipe_delay #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 1
) (
  input  logic clk,
  input  logic en,
  input  T     d,
  output T     q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    T r [DEPTH];
    always_ff @(posedge clk) begin
      if (en) begin
        r[0] <= d;
        for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
      end
    end
    assign q = r[DEPTH-1];
  end
endmodule
