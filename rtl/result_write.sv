// result_write: the "write" task for one result (A/Q or Z). After `start` it
// writes each word of the result stream to base, base+1, ... and raises done
// once nchunk words have been written; done stays high until the next start.
// Write port: a word is written when wr_en and wr_ready are both high, so the
// memory can stall the task, which then stalls the stream behind it.
// The task follows the source; the memory protocol is this design's choice.
module result_write #(
  parameter int AW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   nchunk,
  input  logic [AW-1:0] base,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [31:0]   in_data,
  output logic          wr_en,
  input  logic          wr_ready,
  output logic [AW-1:0] wr_addr,
  output logic [31:0]   wr_data,
  output logic          done
);
  logic [31:0] left;

  assign wr_en    = in_valid && (left != 0);
  assign in_ready = wr_ready && (left != 0);
  assign wr_data  = in_data;
  assign done     = (left == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left    <= '0;
      wr_addr <= '0;
    end else if (start) begin
      left    <= nchunk;
      wr_addr <= base;
    end else if (wr_en && wr_ready) begin
      left    <= left - 1;
      wr_addr <= wr_addr + 1'b1;
    end
  end
endmodule
