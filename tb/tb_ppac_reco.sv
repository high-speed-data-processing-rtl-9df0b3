// tb_ppac_reco: straight tracks x(z) = x0 + a*z sampled at four layer
// positions (with a little scatter and random unfired layers) are fitted by
// the block; the expected x0 and a come from a least-squares fit done here
// in real arithmetic. Events with fewer than two fired layers must come out
// with ok = 0. Checks the latency DIV_LAT + 3 and one event per clock.
module tb_ppac_reco;
  import pid_pkg::*;
  import tb_fx_pkg::*;
  localparam int N = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fx_t [3:0] par_z;
  logic in_valid, in_ready, out_valid, out_ready;
  ppac_layers_t in_data;
  fp_track_t out_data;
  int checks = 0, failures = 0, n_out = 0, n_bad = 0, n_partial = 0;
  real zr [4];
  real qx [$], qa [$];
  logic qok [$];

  ppac_reco dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      real ex, ea; logic eok;
      ex = qx.pop_front(); ea = qa.pop_front(); eok = qok.pop_front();
      checks++;
      if (out_data.ok != eok) begin failures++; $display("ok %b vs %b", out_data.ok, eok); end
      else if (eok) begin
        checks++;
        if (rabs(fx_r(out_data.x) - ex) > 0.01 || rabs(fx_r(out_data.a) - ea) > 0.02) begin
          failures++;
          $display("x=%f (%f) a=%f (%f)", fx_r(out_data.x), ex, fx_r(out_data.a), ea);
        end
      end
      n_out++;
    end
  end

  task automatic make();
    real x0 = ($urandom % 20000) / 100.0 - 100.0;    // mm
    real a  = ($urandom % 4000) / 100.0 - 20.0;      // mrad = mm/m
    real n = 0, sz = 0, szz = 0, sx = 0, szx = 0, d;
    logic [3:0] f;
    f = ($urandom % 4 == 0) ? 4'($urandom) : 4'hF;
    for (int i = 0; i < 4; i++) begin
      real x = x0 + a * zr[i] + (($urandom % 100) / 100.0 - 0.5);
      in_data.x[i] = f[i] ? to_fx(x) : '0;
      x = fx_r(in_data.x[i]);
      if (f[i]) begin n += 1; sz += zr[i]; szz += zr[i]*zr[i]; sx += x; szx += zr[i]*x; end
    end
    in_data.fired = f;
    if (f != 4'hF) n_partial++;
    d = n * szz - sz * sz;
    qok.push_back(n >= 2);
    if (n < 2) n_bad++;
    qx.push_back(n >= 2 ? (szz * sx - sz * szx) / d : 0.0);
    qa.push_back(n >= 2 ? (n * szx - sz * sx) / d : 0.0);
  endtask

  initial begin
    in_valid = 0; out_ready = 1; in_data = '0;
    zr[0] = -0.52; zr[1] = -0.48; zr[2] = 0.48; zr[3] = 0.52;
    for (int i = 0; i < 4; i++) begin par_z[i] = to_fx(zr[i]); zr[i] = fx_r(par_z[i]); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency of one event
    begin
      int lat = 0;
      make(); in_valid = 1;
      @(negedge clk); in_valid = 0;
      while (!out_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat + 1 != DIV_LAT + 3) begin failures++; $display("latency %0d", lat + 1); end
      @(negedge clk);
    end
    // back-to-back events, no stalls: one per clock
    begin
      int cyc = 0, start_n = n_out;
      for (int k = 0; k < 100; k++) begin make(); in_valid = 1; @(negedge clk); end
      in_valid = 0;
      while (n_out < start_n + 100) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc > DIV_LAT + 4) begin failures++; $display("drain took %0d", cyc); end
    end
    // random gaps and stalls
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
    repeat (DIV_LAT + 10) @(posedge clk);
    checks++;
    if (n_out != N + 101 || n_bad == 0 || n_partial == 0) failures++;
    $display("events=%0d partial=%0d rejected=%0d", n_out, n_partial, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
