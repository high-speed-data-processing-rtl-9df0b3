// tb_trajectory: upstream and downstream tracks come from two independent
// producers with random gaps; the consumer stalls at random. The expected
// rigidity brho0*(1 + delta/100), delta = c_xup*x_up + c_xdn*x_dn +
// c_adn*a_dn, is computed here in real arithmetic. Checks the 3-cycle
// latency.
module tb_trajectory;
  import pid_pkg::*;
  import tb_fx_pkg::*;
  localparam int N = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  traj_par_t par;
  logic up_valid, up_ready, dn_valid, dn_ready, out_valid, out_ready;
  fp_track_t up_data, dn_data;
  fxv_t out_data;
  fp_track_t su [N], sd [N];
  int checks = 0, failures = 0, n_out = 0, n_bad = 0;
  real cu, cx, ca, b0;

  trajectory dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      real d, e;
      d = cu * fx_r(su[n_out].x) + cx * fx_r(sd[n_out].x) + ca * fx_r(sd[n_out].a);
      e = b0 * (1.0 + d / 100.0);
      checks++;
      if (out_data.ok != (su[n_out].ok && sd[n_out].ok) || rabs(fx_r(out_data.v) - e) > 2.0e-4) begin
        failures++; $display("event %0d brho=%f expected %f", n_out, fx_r(out_data.v), e);
      end
      n_out++;
    end
  end

  initial begin
    up_valid = 0; dn_valid = 0; out_ready = 1; up_data = '0; dn_data = '0;
    par.c_xup = to_fx(-0.0213); par.c_xdn = to_fx(0.0302); par.c_adn = to_fx(-0.0047);
    par.brho0 = to_fx(7.2135);  par.brho0_pct = to_fx(0.072135);
    cu = fx_r(par.c_xup); cx = fx_r(par.c_xdn); ca = fx_r(par.c_adn); b0 = 7.2135;
    for (int k = 0; k < N; k++) begin
      su[k].x = to_fx(($urandom % 20000) / 100.0 - 100.0);
      su[k].a = to_fx(($urandom % 4000) / 100.0 - 20.0);
      sd[k].x = to_fx(($urandom % 20000) / 100.0 - 100.0);
      sd[k].a = to_fx(($urandom % 4000) / 100.0 - 20.0);
      su[k].ok = ($urandom % 10 != 0);
      sd[k].ok = ($urandom % 10 != 0);
      if (!(su[k].ok && sd[k].ok)) n_bad++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    begin
      int lat = 0;
      up_valid = 1; dn_valid = 1; up_data = su[0]; dn_data = sd[0];
      @(negedge clk);
      up_valid = 0; dn_valid = 0;
      while (!out_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat + 1 != 3) begin failures++; $display("latency %0d", lat + 1); end
      @(negedge clk);
    end
    fork
      for (int k = 1; k < N; k++) begin
        while ($urandom % 3 == 0) begin up_valid = 0; @(negedge clk); end
        up_valid = 1; up_data = su[k];
        do @(posedge clk); while (!up_ready);
        @(negedge clk); up_valid = 0;
      end
      for (int k = 1; k < N; k++) begin
        while ($urandom % 2 == 0) begin dn_valid = 0; @(negedge clk); end
        dn_valid = 1; dn_data = sd[k];
        do @(posedge clk); while (!dn_ready);
        @(negedge clk); dn_valid = 0;
      end
      forever begin @(negedge clk); out_ready = ($urandom % 3 != 0); end
    join_any
    wait (n_out >= N - 1 || $time > 64'd3000000);
    out_ready = 1;
    repeat (10) @(negedge clk);
    disable fork;
    checks++;
    if (n_out != N || n_bad == 0) failures++;
    $display("events=%0d not_ok=%0d", n_out, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
