// tb_ppac_calana: random TDC pairs for the four layers (some zero, some with
// TX1+TX2 outside the window) under random input gaps and output stalls.
// Expected positions x = gain*(TX1-TX2) - offset and fired flags are
// computed here in real arithmetic. Also checks the 2-cycle latency.
module tb_ppac_calana;
  import pid_pkg::*;
  import tb_fx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ppac_par_t par;
  logic in_valid, in_ready, out_valid, out_ready;
  ppac_raw_t in_data;
  ppac_layers_t out_data;
  int checks = 0, failures = 0, n_out = 0, n_unfired = 0;
  real   ex [$];
  logic [3:0] ef [$];
  real   gain [4], offs [4];

  ppac_calana dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      real e [4];
      for (int i = 0; i < 4; i++) e[i] = ex.pop_front();
      checks++;
      if (out_data.fired != ef[0]) begin failures++; $display("fired %b vs %b", out_data.fired, ef[0]); end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (rabs(fx_r(out_data.x[i]) - e[i]) > 2.0e-4) begin
          failures++; $display("layer %0d x=%f expected %f fired=%b ef=%b n=%0d", i, fx_r(out_data.x[i]), e[i], out_data.fired, ef[0], n_out);
        end
      end
      void'(ef.pop_front());
      n_out++;
    end
  end

  task automatic send(bit gaps);
    real e [4];
    logic [3:0] f;
    for (int i = 0; i < 4; i++) begin
      int r = $urandom % 10;
      int t1 = 1000 + $urandom % 2000, t2 = 1000 + $urandom % 2000;
      if (r == 0) t1 = 0;
      if (r == 1) t2 = 0;
      if (r == 2) begin t1 = 6000; t2 = 5000; end   // outside TSum window
      in_data[i].tx1 = 16'(t1);
      in_data[i].tx2 = 16'(t2);
      f[i] = (t1 != 0) && (t2 != 0) && (t1 + t2 >= 2000) && (t1 + t2 <= 6000);
      e[i] = f[i] ? gain[i] * (t1 - t2) - offs[i] : 0.0;
      if (!f[i]) n_unfired++;
    end
    for (int i = 0; i < 4; i++) ex.push_back(e[i]);
    ef.push_back(f);
    while (gaps && ($urandom % 3 == 0)) begin in_valid = 0; @(negedge clk); end
    in_valid = 1;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; out_ready = 1; in_data = '0;
    for (int i = 0; i < 4; i++) begin
      gain[i] = 0.04 + 0.005 * i;
      offs[i] = -1.5 + i;
      par.layer[i].gain    = to_fx(gain[i]);
      par.layer[i].offset  = to_fx(offs[i]);
      par.layer[i].tsum_lo = 16'd2000;
      par.layer[i].tsum_hi = 16'd6000;
      par.z[i] = to_fx(0.1 * i);
      gain[i] = fx_r(par.layer[i].gain);
      offs[i] = fx_r(par.layer[i].offset);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency
    begin
      int lat = 0;
      send(1'b0);
      while (!out_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 1) begin failures++; $display("latency %0d", lat + 1); end
      @(negedge clk);
    end
    fork
      for (int k = 0; k < 400; k++) send(1'b1);
      forever begin @(negedge clk); out_ready = ($urandom % 3 != 0); end
    join_any
    disable fork;
    out_ready = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != 401 || n_unfired == 0) failures++;
    $display("events=%0d unfired_layers=%0d", n_out, n_unfired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
