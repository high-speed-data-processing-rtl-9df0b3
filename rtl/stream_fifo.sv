// stream_fifo: the FIFO that joins two tasks of the PID dataflow (the
// "pipeline register (FIFO)" between tasks). DEPTH entries of type T, with
// valid/ready on both sides: a word is written when in_valid && in_ready and
// read when out_valid && out_ready, both possible in the same clock.
// out_data is the oldest entry and is valid the cycle after it is written.
// The default depth 2 is that of the result FIFOs of the original kernel;
// the handshake and the reset behaviour are this design's choice.
module stream_fifo #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T        mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic    push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  // A producer must hold its word until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_data));
endmodule
