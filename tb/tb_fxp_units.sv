// tb_fxp_units: drives the four pipelined arithmetic units (fxp_div,
// fxp_sqrt, fxp_log2, fxp_exp2) with a new random operand every clock and
// compares each result, DIV_LAT/SQRT_LAT/LOG2_LAT/EXP2_LAT clocks later,
// with the real-arithmetic value. Edge cases: division by zero and overflow
// (saturation), negative root (0), log2 of 0 (invalid marker), exp2 out of
// range (saturation / flush to 0). A pause of `en` checks that the
// pipelines hold their contents.
module tb_fxp_units;
  import pid_pkg::*;
  import tb_fx_pkg::*;
  localparam int N = 3000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en;
  fx_t dn, dd, dq, sx, sy, lx, ly, ex, ey;
  fx_t hdn [$], hdd [$], hsx [$], hlx [$], hex [$];
  int checks = 0, failures = 0, cyc = 0;

  fxp_div  u_div  (.clk, .en, .num(dn), .den(dd), .q(dq));
  fxp_sqrt u_sqrt (.clk, .en, .x(sx), .y(sy));
  fxp_log2 u_log  (.clk, .en, .x(lx), .y(ly));
  fxp_exp2 u_exp  (.clk, .en, .x(ex), .y(ey));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd_real(real lo, real hi);
    return lo + (hi - lo) * ($urandom % 1000000) / 1000000.0;
  endfunction

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if (rabs(got - exp) > tol) begin
      failures++;
      $display("%s: got %f expected %f", what, got, exp);
    end
  endtask

  // reference checks, done when a value leaves a pipeline
  task automatic check_outputs();
    if (hdn.size() >= DIV_LAT) begin
      fx_t a = hdn.pop_front(), b = hdd.pop_front();
      real e;
      if (b == 0) e = (a[FXW-1] ? -fx_r(FX_MAX) : fx_r(FX_MAX));
      else begin
        e = fx_r(a) / fx_r(b);
        if (e > fx_r(FX_MAX)) e = fx_r(FX_MAX);
        if (e < -fx_r(FX_MAX)) e = -fx_r(FX_MAX);
      end
      check("div", fx_r(dq), e, 2.0 / 65536.0);
    end
    if (hsx.size() >= SQRT_LAT) begin
      fx_t a = hsx.pop_front();
      check("sqrt", fx_r(sy), a < 0 ? 0.0 : $sqrt(fx_r(a)), 2.0 / 65536.0);
    end
    if (hlx.size() >= LOG2_LAT) begin
      fx_t a = hlx.pop_front();
      checks++;
      if (a <= 0) begin
        if (ly != FX_INVALID) begin failures++; $display("log2 of %0d not invalid", a); end
      end else check("log2", fx_r(ly), $ln(fx_r(a)) / $ln(2.0), 4.0 / 65536.0);
    end
    if (hex.size() >= EXP2_LAT) begin
      fx_t a = hex.pop_front();
      real e = 2.0 ** fx_r(a);
      if (e > fx_r(FX_MAX)) e = fx_r(FX_MAX);
      check("exp2", fx_r(ey), e, 4.0 / 65536.0 + 2.0e-5 * e);
    end
  endtask

  initial begin
    en = 1; dn = 0; dd = 1; sx = 0; lx = 1; ex = 0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      // operands
      case (k % 10)
        0: begin dn = to_fx(rnd_real(-100, 100)); dd = '0; end                // divide by zero
        1: begin dn = to_fx(30000.0); dd = to_fx(0.01); end                    // overflow
        default: begin dn = to_fx(rnd_real(-500, 500)); dd = to_fx(rnd_real(-300, 300)); end
      endcase
      sx = (k % 17 == 0) ? to_fx(-3.0) : fx_t'($urandom % 32'h7FFF_FFFF);
      lx = (k % 19 == 0) ? '0 : fx_t'(1 + $urandom % 32'h7FFF_FFFE);
      ex = (k % 23 == 0) ? to_fx(20.0) : (k % 29 == 0) ? to_fx(-20.0) : to_fx(rnd_real(-14.0, 14.0));
      hdn.push_back(dn); hdd.push_back(dd); hsx.push_back(sx); hlx.push_back(lx); hex.push_back(ex);
      // pause the pipelines for a few clocks now and then
      if (k % 500 == 250) begin
        en = 0;
        repeat (7) @(negedge clk);
        en = 1;
      end
      @(posedge clk);
      #1 check_outputs();
    end
    checks++;
    if (hdn.size() != DIV_LAT - 1) begin failures++; $display("queue %0d", hdn.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
