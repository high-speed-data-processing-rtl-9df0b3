// tb_ic_calana: six random ADC values per event above (and sometimes below)
// their pedestals; the expected dE = gain * (prod(raw_i - ped_i))^(1/6) +
// offset is computed here with real arithmetic ($ln/$exp). Relative error
// allowed 2e-4. Checks the latency LOG2_LAT + EXP2_LAT + 3.
module tb_ic_calana;
  import pid_pkg::*;
  import tb_fx_pkg::*;
  localparam int N = 400;
  localparam int LAT = LOG2_LAT + EXP2_LAT + 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ic_par_t par;
  logic in_valid, in_ready, out_valid, out_ready;
  ic_raw_t in_data;
  fxv_t out_data;
  int checks = 0, failures = 0, n_out = 0, n_bad = 0;
  real gain, off;
  real qe [$];
  logic qok [$];

  ic_calana dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      real ee; logic eok;
      ee = qe.pop_front(); eok = qok.pop_front();
      checks++;
      if (out_data.ok != eok || (eok && rabs(fx_r(out_data.v) - ee) > 2.0e-4 * rabs(ee) + 1.0e-3)) begin
        failures++; $display("dE=%f ok=%b expected %f %b", fx_r(out_data.v), out_data.ok, ee, eok);
      end
      n_out++;
    end
  end

  task automatic make();
    real sl = 0;
    logic ok = 1;
    int base = 200 + $urandom % 3000;
    for (int i = 0; i < N_IC_CH; i++) begin
      int r = base + int'($urandom % 400) - 200;
      if ($urandom % 40 == 0) r = int'(par.ped[i]) - 1;
      in_data[i] = 16'(r);
      if (r <= int'(par.ped[i])) ok = 0;
      else sl += $ln(real'(r - int'(par.ped[i])));
    end
    qok.push_back(ok);
    if (!ok) n_bad++;
    qe.push_back(gain * $exp(sl / N_IC_CH) + off);
  endtask

  initial begin
    in_valid = 0; out_ready = 1; in_data = '0;
    for (int i = 0; i < N_IC_CH; i++) par.ped[i] = 16'(80 + 5 * i);
    par.gain = to_fx(0.0123); par.offset = to_fx(0.75);
    gain = fx_r(par.gain); off = fx_r(par.offset);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    begin
      int lat = 0;
      make(); in_valid = 1;
      @(negedge clk); in_valid = 0;
      while (!out_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat + 1 != LAT) begin failures++; $display("latency %0d", lat + 1); end
      @(negedge clk);
    end
    fork
      for (int k = 0; k < N; k++) begin
        make();
        while ($urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
      end
      forever begin @(negedge clk); out_ready = ($urandom % 3 != 0); end
    join_any
    disable fork;
    out_ready = 1;
    repeat (LAT + 10) @(posedge clk);
    checks++;
    if (n_out != N + 1 || n_bad == 0) failures++;
    $display("events=%0d not_ok=%0d", n_out, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
