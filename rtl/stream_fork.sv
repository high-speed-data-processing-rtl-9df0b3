// stream_fork: copies one valid/ready stream to N consumers. Each output
// takes the word on its own; the input word is released once every output
// has taken it, so a slow consumer stalls the producer but never loses or
// duplicates a word. Used where one task feeds two (the F5 track to both
// trajectory tasks, the PID result to the A/Q and Z writers).
module stream_fork #(
  parameter type T = logic [31:0],
  parameter int  N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  T             in_data,
  output logic [N-1:0] out_valid,
  input  logic [N-1:0] out_ready,
  output T             out_data
);
  logic [N-1:0] taken;

  assign out_valid = {N{in_valid}} & ~taken;
  assign in_ready  = &(out_ready | taken);
  assign out_data  = in_data;

  always_ff @(posedge clk) begin
    if (!rst_n)                     taken <= '0;
    else if (in_valid && in_ready)  taken <= '0;
    else                            taken <= taken | (out_valid & out_ready);
  end
endmodule
