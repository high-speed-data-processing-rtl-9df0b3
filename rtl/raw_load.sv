// raw_load: the "load" task of one detector group. After `start` it reads the
// raw segments of events 0 .. nchunk-1 from consecutive words of memory
// (base, base+1, ...) and streams them, in order, to the calibration task.
// Read port: a request (rd_req, rd_addr) is taken when rd_ready is high;
// replies come back in order on rd_valid/rd_data after any latency. A request
// is issued only while the DEPTH-entry output buffer has room for every reply
// still outstanding, so replies are never dropped and one event per clock is
// possible when DEPTH is at least the read latency plus two. busy is high
// from start until the last event has left.
// What the task does follows the source; the memory protocol, the buffer and
// one event per memory word are this design's choice.
module raw_load #(
  parameter int DW    = 128,
  parameter int DEPTH = 4,
  parameter int AW    = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   nchunk,
  input  logic [AW-1:0] base,
  output logic          rd_req,
  input  logic          rd_ready,
  output logic [AW-1:0] rd_addr,
  input  logic          rd_valid,
  input  logic [DW-1:0] rd_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data,
  output logic          busy
);
  localparam int CW = $clog2(DEPTH + 1);

  logic [31:0]   to_issue;    // requests still to send
  logic [31:0]   to_deliver;  // events still to hand on
  logic [CW-1:0] pending;     // requests without reply
  logic [CW-1:0] fill;
  logic          issue, fifo_in_ready;

  assign rd_req  = (to_issue != 0) && (32'(pending) + 32'(fill) < DEPTH);
  assign issue   = rd_req && rd_ready;
  assign busy    = (to_deliver != 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      to_issue   <= '0;
      to_deliver <= '0;
      pending    <= '0;
      rd_addr    <= '0;
    end else if (start) begin
      to_issue   <= nchunk;
      to_deliver <= nchunk;
      pending    <= '0;
      rd_addr    <= base;
    end else begin
      if (issue) begin
        to_issue <= to_issue - 1;
        rd_addr  <= rd_addr + 1'b1;
      end
      pending <= pending + CW'(issue) - CW'(rd_valid);
      if (out_valid && out_ready) to_deliver <= to_deliver - 1;
    end
  end

  stream_fifo #(.T(logic [DW-1:0]), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .in_valid(rd_valid), .in_ready(fifo_in_ready), .in_data(rd_data),
    .out_valid, .out_ready, .out_data, .count(fill)
  );

  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) rd_valid |-> fifo_in_ready);
endmodule
