// tb_raw_load: a behavioural memory with a 3-cycle in-order read latency and
// random request stalls feeds the load task; the consumer takes words at
// random. Checks that exactly nchunk words arrive, each equal to
// mem[base + i] in order, that busy falls at the end, and that with a
// memory and consumer that never stall one event leaves per clock (the
// buffer is sized to the read latency plus two, which full rate needs).
module tb_raw_load;
  localparam int DW = 32, MLAT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start; logic [31:0] nchunk, base;
  logic rd_req, rd_ready, rd_valid, out_valid, out_ready, busy;
  logic [31:0] rd_addr;
  logic [DW-1:0] rd_data, out_data;
  int checks = 0, failures = 0;

  raw_load #(.DW(DW), .DEPTH(MLAT + 2), .AW(32)) dut (.*);

  // memory: word at address a holds a*7 + 3, reply MLAT cycles after request
  logic [MLAT-1:0] pv;
  logic [31:0]     pa [MLAT];
  always_ff @(posedge clk) begin
    if (!rst_n) pv <= '0;
    else begin
      pv <= {pv[MLAT-2:0], rd_req && rd_ready};
      pa[0] <= rd_addr;
      for (int i = 1; i < MLAT; i++) pa[i] <= pa[i-1];
    end
  end
  assign rd_valid = pv[MLAT-1];
  assign rd_data  = pa[MLAT-1] * 7 + 3;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, int b, bit stall);
    int got = 0, cyc = 0;
    @(negedge clk); start = 1; nchunk = n; base = b;
    @(negedge clk); start = 0;
    while (got < n && cyc < 10000) begin
      @(negedge clk);
      rd_ready  = stall ? ($urandom % 3 != 0) : 1'b1;
      out_ready = stall ? ($urandom % 2 != 0) : 1'b1;
      @(posedge clk);
      cyc++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != DW'((b + got) * 7 + 3)) begin
          failures++; $display("word %0d: %h", got, out_data);
        end
        got++;
      end
    end
    @(negedge clk);
    checks++;
    if (got != n || busy) begin failures++; $display("got %0d of %0d busy=%b", got, n, busy); end
    if (!stall) begin
      checks++;
      if (cyc > n + MLAT + 2) begin failures++; $display("rate: %0d events in %0d cycles", n, cyc); end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (out_valid || rd_req) begin failures++; $display("extra activity after the last event"); end
  endtask

  initial begin
    start = 0; nchunk = 0; base = 0; rd_ready = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(50, 100, 1'b1);
    run(200, 7, 1'b0);
    run(1, 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
