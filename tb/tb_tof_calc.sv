// tb_tof_calc: the F3 and F7 time streams are driven by two independent
// producers with random gaps, so the join sees every skew; the consumer
// stalls at random. Expected TOF = t7 - t3 + offset and ok = ok3 && ok7,
// computed here. Checks the 1-cycle latency.
module tb_tof_calc;
  import pid_pkg::*;
  import tb_fx_pkg::*;
  localparam int N = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fx_t offset;
  logic f3_valid, f3_ready, f7_valid, f7_ready, out_valid, out_ready;
  fxv_t f3_data, f7_data, out_data;
  fxv_t s3 [N], s7 [N];
  int checks = 0, failures = 0, n_out = 0, n_bad = 0;

  tof_calc dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      real e;
      e = fx_r(s7[n_out].v) - fx_r(s3[n_out].v) + fx_r(offset);
      checks++;
      if (out_data.ok != (s3[n_out].ok && s7[n_out].ok) || rabs(fx_r(out_data.v) - e) > 1.0e-4) begin
        failures++; $display("event %0d tof=%f expected %f", n_out, fx_r(out_data.v), e);
      end
      n_out++;
    end
  end

  initial begin
    f3_valid = 0; f7_valid = 0; out_ready = 1; f3_data = '0; f7_data = '0;
    offset = to_fx(3.25);
    for (int k = 0; k < N; k++) begin
      s3[k].v  = to_fx(($urandom % 100000) / 1000.0);
      s7[k].v  = to_fx(200.0 + ($urandom % 100000) / 1000.0);
      s3[k].ok = ($urandom % 10 != 0);
      s7[k].ok = ($urandom % 10 != 0);
      if (!(s3[k].ok && s7[k].ok)) n_bad++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency: both inputs together, output the next cycle
    f3_valid = 1; f7_valid = 1; f3_data = s3[0]; f7_data = s7[0];
    @(negedge clk);
    f3_valid = 0; f7_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("latency not 1"); end
    @(negedge clk);
    fork
      for (int k = 1; k < N; k++) begin
        while ($urandom % 3 == 0) begin f3_valid = 0; @(negedge clk); end
        f3_valid = 1; f3_data = s3[k];
        do @(posedge clk); while (!f3_ready);
        @(negedge clk); f3_valid = 0;
      end
      for (int k = 1; k < N; k++) begin
        while ($urandom % 2 == 0) begin f7_valid = 0; @(negedge clk); end
        f7_valid = 1; f7_data = s7[k];
        do @(posedge clk); while (!f7_ready);
        @(negedge clk); f7_valid = 0;
      end
      forever begin @(negedge clk); out_ready = ($urandom % 3 != 0); end
    join_any
    wait (n_out >= N - 1 || $time > 64'd3000000);
    repeat (10) @(negedge clk);
    disable fork;
    checks++;
    if (n_out != N || n_bad == 0) failures++;
    $display("events=%0d not_ok=%0d", n_out, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
