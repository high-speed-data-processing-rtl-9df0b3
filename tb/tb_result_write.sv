// tb_result_write: streams words into the writer with random gaps while the
// memory stalls at random; checks every write's address and data, that
// exactly nchunk words are written, and that done rises only after the
// last one and stays high.
module tb_result_write;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, in_valid, in_ready, wr_en, wr_ready, done;
  logic [31:0] nchunk, base, in_data, wr_addr, wr_data;
  int checks = 0, failures = 0;

  result_write #(.AW(32)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, int b);
    int sent = 0, wrote = 0;
    logic hold = 0;
    @(negedge clk); start = 1; nchunk = n; base = b; in_valid = 0;
    @(negedge clk); start = 0;
    checks++;
    if (done && n != 0) begin failures++; $display("done too early"); end
    // offer n + 3 words: the extra ones must not be taken
    while (wrote < n) begin
      if (!hold) begin
        in_valid = ($urandom % 3 != 0);
        in_data  = 32'hA000_0000 + sent;
      end
      wr_ready = ($urandom % 3 != 0);
      @(posedge clk);
      checks++;
      if (done != (wrote == n)) begin
        failures++; $display("done=%b after %0d of %0d writes", done, wrote, n);
      end
      if (wr_en && wr_ready) begin
        checks++;
        if (wr_addr != 32'(b + wrote) || wr_data != 32'hA000_0000 + wrote) begin
          failures++; $display("write %0d: addr %0d data %h", wrote, wr_addr, wr_data);
        end
        wrote++;
      end
      if (in_valid && in_ready) sent++;
      hold = in_valid && !in_ready;
      @(negedge clk);
    end
    in_valid = 1; wr_ready = 1;
    repeat (3) begin
      @(posedge clk);
      checks++;
      if (wr_en || in_ready || !done) begin failures++; $display("write after the last word"); end
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    start = 0; nchunk = 0; base = 0; in_valid = 0; in_data = 0; wr_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(40, 1000);
    run(5, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
