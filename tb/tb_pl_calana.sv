// tb_pl_calana: random PM times (some zero) under random gaps and stalls;
// the expected passage time (gain_l*TL + gain_r*TR)/2 + offset and the ok
// flag are computed here in real arithmetic. Checks the 2-cycle latency.
module tb_pl_calana;
  import pid_pkg::*;
  import tb_fx_pkg::*;
  localparam int N = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pl_par_t par;
  logic in_valid, in_ready, out_valid, out_ready;
  pl_raw_t in_data;
  fxv_t out_data;
  int checks = 0, failures = 0, n_out = 0, n_bad = 0;
  real gl, gr, off;
  real qt [$];
  logic qok [$];

  pl_calana dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      real et; logic eok;
      et = qt.pop_front(); eok = qok.pop_front();
      checks++;
      if (out_data.ok != eok || (eok && rabs(fx_r(out_data.v) - et) > 1.0e-4)) begin
        failures++; $display("t=%f ok=%b expected %f %b", fx_r(out_data.v), out_data.ok, et, eok);
      end
      n_out++;
    end
  end

  task automatic make();
    int tl = $urandom % 30000, tr = $urandom % 30000;
    if ($urandom % 8 == 0) tl = 0;
    in_data.tl = 16'(tl); in_data.tr = 16'(tr);
    qok.push_back(tl != 0 && tr != 0);
    if (tl == 0 || tr == 0) n_bad++;
    qt.push_back((gl * tl + gr * tr) / 2.0 + off);
  endtask

  initial begin
    in_valid = 0; out_ready = 1; in_data = '0;
    par.gain_l = to_fx(0.0244); par.gain_r = to_fx(0.0251); par.offset = to_fx(-12.5);
    gl = fx_r(par.gain_l); gr = fx_r(par.gain_r); off = fx_r(par.offset);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    begin
      int lat = 0;
      make(); in_valid = 1;
      @(negedge clk); in_valid = 0;
      while (!out_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat + 1 != 2) begin failures++; $display("latency %0d", lat + 1); end
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
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != N + 1 || n_bad == 0) failures++;
    $display("events=%0d not_ok=%0d", n_out, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
