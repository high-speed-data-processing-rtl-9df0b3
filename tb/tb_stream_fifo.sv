// tb_stream_fifo: random valid/ready traffic through a 3-entry FIFO,
// compared word by word with a queue model; also checks the fill count,
// that in_ready drops exactly when DEPTH words are held, and that a full
// FIFO reads and writes in the same clock.
module tb_stream_fifo;
  localparam int DEPTH = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [1:0]  count;
  int checks = 0, failures = 0, full_seen = 0, n_out = 0;
  logic hold = 0;
  logic [15:0] model [$];

  stream_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_data = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // producer keeps its word while it is not taken
      if (!hold) begin
        in_valid = ($urandom % 3) != 0;
        in_data  = 16'($urandom);
      end
      out_ready = (cyc < 2000) ? (($urandom % 4) == 0) : (($urandom % 4) != 0);
      @(posedge clk);
      checks++;
      if (count != 2'(model.size()) || in_ready != (model.size() < DEPTH) ||
          out_valid != (model.size() != 0)) begin
        failures++;
        $display("status mismatch count=%0d model=%0d", count, model.size());
      end
      if (model.size() == DEPTH) full_seen++;
      if (out_valid && out_ready) begin
        checks++; n_out++;
        if (out_data != model[0]) begin
          failures++;
          $display("data mismatch %h vs %h", out_data, model[0]);
        end
        void'(model.pop_front());
      end
      if (in_valid && in_ready) model.push_back(in_data);
      hold = in_valid && !in_ready;
    end
    checks++;
    if (full_seen == 0 || n_out < 1000) failures++;
    $display("words=%0d full_cycles=%0d", n_out, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
