// tb_pid_calc: events with known A/Q (2.4..2.8), Z (25..50) and beta
// (0.5..0.7) are turned into Brho35, Brho57, TOF and dE with the inverse
// formulas, fed through four independent producers with random gaps, and
// the outputs are compared with the reference PID computed here in real
// arithmetic (A/Q within 5e-4, Z within 0.02). Some events carry a not-ok
// input and must give the invalid marker. Checks the pipeline latency
// 2*DIV_LAT + SQRT_LAT + LOG2_LAT + 5 and one event per clock.
module tb_pid_calc;
  import pid_pkg::*;
  import tb_fx_pkg::*;
  localparam int N = 300;
  localparam int LAT = 2 * DIV_LAT + SQRT_LAT + LOG2_LAT + 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pid_par_t par;
  logic b35_valid, b35_ready, b57_valid, b57_ready, tof_valid, tof_ready, de_valid, de_ready;
  logic out_valid, out_ready;
  fxv_t b35_data, b57_data, tof_data, de_data;
  pid_out_t out_data;
  fxv_t s35 [N], s57 [N], stof [N], sde [N];
  int checks = 0, failures = 0, n_out = 0, n_bad = 0;
  real lc, ik, w, lip, z0, z1;

  pid_calc dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      real ea, ez;
      logic ok;
      ok = s35[n_out].ok && s57[n_out].ok && stof[n_out].ok && sde[n_out].ok;
      pid_ref(fx_r(s35[n_out].v), fx_r(s57[n_out].v), fx_r(stof[n_out].v), fx_r(sde[n_out].v),
              lc, ik, w, lip, z0, z1, ea, ez);
      checks++;
      if (!ok) begin
        if (out_data.aoq != FX_INVALID || out_data.z != FX_INVALID) begin
          failures++; $display("event %0d should be invalid", n_out);
        end
      end else if (rabs(fx_r(out_data.aoq) - ea) > 5.0e-4 || rabs(fx_r(out_data.z) - ez) > 0.02) begin
        failures++;
        $display("event %0d A/Q=%f (%f) Z=%f (%f)", n_out, fx_r(out_data.aoq), ea, fx_r(out_data.z), ez);
      end
      n_out++;
    end
  end

  initial begin
    b35_valid = 0; b57_valid = 0; tof_valid = 0; de_valid = 0; out_ready = 1;
    b35_data = '0; b57_data = '0; tof_data = '0; de_data = '0;
    par.lc = to_fx(155.44); par.inv_k = to_fx(1.0 / 3.1071); par.w35 = to_fx(0.5);
    par.ln_ionpair = to_fx($ln(4866.0)); par.zc0 = to_fx(18.0); par.zc1 = to_fx(0.5);
    lc = fx_r(par.lc); ik = fx_r(par.inv_k); w = fx_r(par.w35); lip = fx_r(par.ln_ionpair);
    z0 = fx_r(par.zc0); z1 = fx_r(par.zc1);
    for (int k = 0; k < N; k++) begin
      real aoq, z, beta, brho, tof, de;
      aoq  = 2.4 + ($urandom % 4000) / 10000.0;
      z    = 25.0 + ($urandom % 2500) / 100.0;
      beta = 0.5 + ($urandom % 2000) / 10000.0;
      pid_gen(aoq, z, beta, lc, ik, lip, z0, z1, brho, tof, de);
      s35[k].v = to_fx(brho * (1.0 + 0.002 * (($urandom % 100) / 100.0 - 0.5)));
      s57[k].v = to_fx(brho);
      stof[k].v = to_fx(tof);
      sde[k].v = to_fx(de);
      s35[k].ok = 1; s57[k].ok = 1; stof[k].ok = 1; sde[k].ok = 1;
      case ($urandom % 20)
        0: s35[k].ok = 0;
        1: s57[k].ok = 0;
        2: stof[k].ok = 0;
        3: sde[k].ok = 0;
        default: ;
      endcase
      if (!(s35[k].ok && s57[k].ok && stof[k].ok && sde[k].ok)) n_bad++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency of event 0
    begin
      int lat = 0;
      b35_valid = 1; b57_valid = 1; tof_valid = 1; de_valid = 1;
      b35_data = s35[0]; b57_data = s57[0]; tof_data = stof[0]; de_data = sde[0];
      @(negedge clk);
      b35_valid = 0; b57_valid = 0; tof_valid = 0; de_valid = 0;
      while (!out_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat + 1 != LAT) begin failures++; $display("latency %0d, expected %0d", lat + 1, LAT); end
      @(negedge clk);
    end
    // events 1..99 back to back: one per clock
    begin
      int cyc = 0;
      for (int k = 1; k < 100; k++) begin
        b35_valid = 1; b57_valid = 1; tof_valid = 1; de_valid = 1;
        b35_data = s35[k]; b57_data = s57[k]; tof_data = stof[k]; de_data = sde[k];
        @(negedge clk);
      end
      b35_valid = 0; b57_valid = 0; tof_valid = 0; de_valid = 0;
      while (n_out < 100) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc > LAT + 1) begin failures++; $display("drain %0d cycles", cyc); end
    end
    fork
      for (int k = 100; k < N; k++) begin
        while ($urandom % 3 == 0) begin b35_valid = 0; @(negedge clk); end
        b35_valid = 1; b35_data = s35[k];
        do @(posedge clk); while (!b35_ready);
        @(negedge clk); b35_valid = 0;
      end
      for (int k = 100; k < N; k++) begin
        while ($urandom % 2 == 0) begin b57_valid = 0; @(negedge clk); end
        b57_valid = 1; b57_data = s57[k];
        do @(posedge clk); while (!b57_ready);
        @(negedge clk); b57_valid = 0;
      end
      for (int k = 100; k < N; k++) begin
        while ($urandom % 4 == 0) begin tof_valid = 0; @(negedge clk); end
        tof_valid = 1; tof_data = stof[k];
        do @(posedge clk); while (!tof_ready);
        @(negedge clk); tof_valid = 0;
      end
      for (int k = 100; k < N; k++) begin
        de_valid = 1; de_data = sde[k];
        do @(posedge clk); while (!de_ready);
        @(negedge clk); de_valid = 0;
      end
      forever begin @(negedge clk); out_ready = ($urandom % 3 != 0); end
    join_any
    wait (n_out >= N - 1 || $time > 64'd5000000);
    out_ready = 1;
    repeat (10) @(negedge clk);
    disable fork;
    checks++;
    if (n_out != N || n_bad == 0) failures++;
    $display("events=%0d invalid=%0d", n_out, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
