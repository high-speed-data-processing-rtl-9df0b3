// tb_pid_top: end-to-end run of the PID kernel at its default parameters.
// Behavioural memories hold the raw segments of NEV events for the six
// detector groups (3-cycle read latency) and collect the A/Q and Z results.
// Events are generated from chosen TOF, dE and random PPAC hits; the
// expected A/Q and Z are computed here in real arithmetic from the same raw
// words through every step (PPAC positions, least-squares tracks, B-rho,
// plastic times, TOF, ion-chamber geometric mean, PID).
// Run 1: memories never stall; checks the first-result latency (at most
// 1000 clocks) and the rate (at most 5 clocks per event, the initiation
// interval reported for the original kernel).
// Run 2: random read and write stalls, unfired PPAC layers and events made
// invalid by a missing plastic time; every mechanism must occur at least
// once (counted below).
module tb_pid_top;
  import pid_pkg::*;
  import tb_fx_pkg::*;
  localparam int NEV  = 400;
  localparam int MLAT = 3;
  localparam int AW   = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done;
  logic [31:0] nchunk;
  kernel_par_t par;
  logic [2:0][AW-1:0] ppac_base, ppac_rd_addr;
  logic [2:0] ppac_rd_req, ppac_rd_ready, ppac_rd_valid;
  ppac_raw_t [2:0] ppac_rd_data;
  logic [1:0][AW-1:0] pl_base, pl_rd_addr;
  logic [1:0] pl_rd_req, pl_rd_ready, pl_rd_valid;
  pl_raw_t [1:0] pl_rd_data;
  logic [AW-1:0] ic_base, ic_rd_addr, aoq_base, aoq_wr_addr, z_base, z_wr_addr;
  logic ic_rd_req, ic_rd_ready, ic_rd_valid;
  ic_raw_t ic_rd_data;
  logic aoq_wr_en, aoq_wr_ready, z_wr_en, z_wr_ready;
  fx_t aoq_wr_data, z_wr_data;

  pid_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_rd_stall = 0, n_wr_stall = 0, n_unfired = 0, n_invalid = 0, n_pid_stall = 0, n_fifo_full = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ memories
  ppac_raw_t mppac [3][NEV];
  pl_raw_t   mpl   [2][NEV];
  ic_raw_t   mic   [NEV];
  fx_t       maoq  [NEV], mz [NEV];
  int        naoq, nz;
  bit        stall_mode;

  logic [6:0]            rv   [MLAT];
  logic [6:0][AW-1:0]    ra   [MLAT];
  logic [6:0] req_now;
  logic [6:0][AW-1:0] addr_now;
  always_comb begin
    for (int i = 0; i < 3; i++) begin req_now[i] = ppac_rd_req[i] && ppac_rd_ready[i]; addr_now[i] = ppac_rd_addr[i]; end
    for (int i = 0; i < 2; i++) begin req_now[3+i] = pl_rd_req[i] && pl_rd_ready[i]; addr_now[3+i] = pl_rd_addr[i]; end
    req_now[5] = ic_rd_req && ic_rd_ready; addr_now[5] = ic_rd_addr;
    req_now[6] = 1'b0; addr_now[6] = '0;
  end
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < MLAT; s++) rv[s] <= '0;
    end else begin
      rv[0] <= req_now; ra[0] <= addr_now;
      for (int s = 1; s < MLAT; s++) begin rv[s] <= rv[s-1]; ra[s] <= ra[s-1]; end
    end
  end
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      ppac_rd_valid[i] = rv[MLAT-1][i];
      ppac_rd_data[i]  = mppac[i][(ra[MLAT-1][i] - ppac_base[i]) % NEV];
    end
    for (int i = 0; i < 2; i++) begin
      pl_rd_valid[i] = rv[MLAT-1][3+i];
      pl_rd_data[i]  = mpl[i][(ra[MLAT-1][3+i] - pl_base[i]) % NEV];
    end
    ic_rd_valid = rv[MLAT-1][5];
    ic_rd_data  = mic[(ra[MLAT-1][5] - ic_base) % NEV];
  end

  always @(negedge clk) begin
    ppac_rd_ready = stall_mode ? 3'($urandom) | 3'($urandom) : '1;
    pl_rd_ready   = stall_mode ? 2'($urandom) | 2'($urandom) : '1;
    ic_rd_ready   = stall_mode ? ($urandom % 4 != 0) : 1'b1;
    aoq_wr_ready  = stall_mode ? ($urandom % 3 != 0) : 1'b1;
    z_wr_ready    = stall_mode ? ($urandom % 4 != 0) : 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if ((ppac_rd_req & ~ppac_rd_ready) != 0 || (pl_rd_req & ~pl_rd_ready) != 0 || (ic_rd_req && !ic_rd_ready))
        n_rd_stall++;
      if ((aoq_wr_en && !aoq_wr_ready) || (z_wr_en && !z_wr_ready)) n_wr_stall++;
      if (dut.u_pid.out_valid && !dut.u_pid.out_ready) n_pid_stall++;
      if (!dut.u_deq.in_ready || !dut.u_b35.in_ready || !dut.u_tofq.in_ready) n_fifo_full++;
      if (aoq_wr_en && aoq_wr_ready) begin maoq[aoq_wr_addr - 32'd5000] <= aoq_wr_data; naoq++; end
      if (z_wr_en && z_wr_ready)     begin mz[z_wr_addr - 32'd6000] <= z_wr_data; nz++; end
    end
  end

  // ------------------------------------------------------------ parameters
  real pg [3][4], po [3][4], pz [3][4];
  real tr_cu [2], tr_cx [2], tr_ca [2], brho0;
  real gl [2], gr [2], to [2], tofoff, icg, ico;
  real lc, ik, w, lip, z0, z1;

  task automatic set_par();
    ppac_par_t pp;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < 4; i++) begin
        pp.layer[i].gain    = to_fx(0.05 + 0.001 * (i + f));
        pp.layer[i].offset  = to_fx(0.3 * i - 0.4 * f);
        pp.layer[i].tsum_lo = 16'd1500;
        pp.layer[i].tsum_hi = 16'd7000;
        pp.z[i] = to_fx((i < 2 ? -0.5 : 0.5) + (i % 2 == 0 ? -0.02 : 0.02));
        pg[f][i] = fx_r(pp.layer[i].gain); po[f][i] = fx_r(pp.layer[i].offset); pz[f][i] = fx_r(pp.z[i]);
      end
      if (f == 0) par.f3ppac = pp; else if (f == 1) par.f5ppac = pp; else par.f7ppac = pp;
    end
    par.traj35.c_xup = to_fx(-0.0213); par.traj35.c_xdn = to_fx(0.0302); par.traj35.c_adn = to_fx(-0.0047);
    par.traj57.c_xup = to_fx(-0.0198); par.traj57.c_xdn = to_fx(0.0311); par.traj57.c_adn = to_fx(0.0052);
    par.traj35.brho0 = to_fx(7.0); par.traj35.brho0_pct = to_fx(0.07);
    par.traj57.brho0 = to_fx(7.0); par.traj57.brho0_pct = to_fx(0.07);
    tr_cu[0] = fx_r(par.traj35.c_xup); tr_cx[0] = fx_r(par.traj35.c_xdn); tr_ca[0] = fx_r(par.traj35.c_adn);
    tr_cu[1] = fx_r(par.traj57.c_xup); tr_cx[1] = fx_r(par.traj57.c_xdn); tr_ca[1] = fx_r(par.traj57.c_adn);
    brho0 = 7.0;
    par.f3pl.gain_l = to_fx(0.0244); par.f3pl.gain_r = to_fx(0.0251); par.f3pl.offset = to_fx(-3.0);
    par.f7pl.gain_l = to_fx(0.0247); par.f7pl.gain_r = to_fx(0.0249); par.f7pl.offset = to_fx(2.0);
    gl[0] = fx_r(par.f3pl.gain_l); gr[0] = fx_r(par.f3pl.gain_r); to[0] = fx_r(par.f3pl.offset);
    gl[1] = fx_r(par.f7pl.gain_l); gr[1] = fx_r(par.f7pl.gain_r); to[1] = fx_r(par.f7pl.offset);
    par.tof_offset = to_fx(1.5); tofoff = 1.5;
    for (int i = 0; i < N_IC_CH; i++) par.f7ic.ped[i] = 16'(100 + 3 * i);
    par.f7ic.gain = to_fx(0.05); par.f7ic.offset = to_fx(0.2);
    icg = fx_r(par.f7ic.gain); ico = fx_r(par.f7ic.offset);
    par.pid.lc = to_fx(46600.0 / 299.792458);     // flight path 46.6 m over c, ns
    par.pid.inv_k = to_fx(1.0 / 3.1071); par.pid.w35 = to_fx(0.5);
    par.pid.ln_ionpair = to_fx($ln(4866.0)); par.pid.zc0 = to_fx(18.0); par.pid.zc1 = to_fx(0.5);
    lc = fx_r(par.pid.lc); ik = fx_r(par.pid.inv_k); w = fx_r(par.pid.w35);
    lip = fx_r(par.pid.ln_ionpair); z0 = fx_r(par.pid.zc0); z1 = fx_r(par.pid.zc1);
  endtask

  // ------------------------------------------------------------ events
  real ref_aoq [NEV], ref_z [NEV];
  bit  ref_ok  [NEV];

  function automatic void fit(int f, ppac_raw_t r, output real x, output real a, output bit ok);
    real n = 0, sz = 0, szz = 0, sx = 0, szx = 0, d;
    for (int i = 0; i < 4; i++) begin
      int t1 = r[i].tx1, t2 = r[i].tx2;
      if (t1 != 0 && t2 != 0 && t1 + t2 >= 1500 && t1 + t2 <= 7000) begin
        real xi = pg[f][i] * (t1 - t2) - po[f][i];
        n += 1; sz += pz[f][i]; szz += pz[f][i] * pz[f][i]; sx += xi; szx += pz[f][i] * xi;
      end
    end
    d  = n * szz - sz * sz;
    ok = (n >= 2);
    x  = ok ? (szz * sx - sz * szx) / d : 0.0;
    a  = ok ? (n * szx - sz * sx) / d : 0.0;
  endfunction

  task automatic make_events(bit faults);
    for (int k = 0; k < NEV; k++) begin
      real beta, zt, x [3], a [3], b35, b57, t [2], tof, de, v, dev, sl;
      bit ok [3], okt;
      int t3l;
      // PPAC hits along a straight line per focal plane
      for (int f = 0; f < 3; f++) begin
        real x0 = ($urandom % 8000) / 100.0 - 40.0, a0 = ($urandom % 2000) / 100.0 - 10.0;
        for (int i = 0; i < 4; i++) begin
          real xi = x0 + a0 * pz[f][i];
          int diff = $rtoi((xi + po[f][i]) / pg[f][i]);
          int sum = 4000 + $urandom % 200;
          mppac[f][k][i].tx1 = 16'((sum + diff) / 2);
          mppac[f][k][i].tx2 = 16'((sum - diff) / 2);
          if (faults && ($urandom % 12 == 0)) begin mppac[f][k][i].tx1 = '0; n_unfired++; end
        end
        fit(f, mppac[f][k], x[f], a[f], ok[f]);
      end
      b35 = brho0 * (1.0 + (tr_cu[0] * x[0] + tr_cx[0] * x[1] + tr_ca[0] * a[1]) / 100.0);
      b57 = brho0 * (1.0 + (tr_cu[1] * x[1] + tr_cx[1] * x[2] + tr_ca[1] * a[2]) / 100.0);
      // plastics from a chosen beta
      beta = 0.55 + ($urandom % 1000) / 10000.0;
      t3l  = 3000 + $urandom % 1000;
      mpl[0][k].tl = 16'(t3l); mpl[0][k].tr = 16'(t3l + 20);
      t[0] = (gl[0] * t3l + gr[0] * (t3l + 20)) / 2.0 + to[0];
      begin
        real t7 = t[0] + lc / beta - tofoff;
        int raw7 = $rtoi((t7 - to[1]) * 2.0 / (gl[1] + gr[1]));
        mpl[1][k].tl = 16'(raw7); mpl[1][k].tr = 16'(raw7);
        t[1] = (gl[1] * raw7 + gr[1] * raw7) / 2.0 + to[1];
      end
      okt = 1;
      if (faults && ($urandom % 15 == 0)) begin mpl[1][k].tr = '0; okt = 0; end
      tof = t[1] - t[0] + tofoff;
      // ion chamber from a chosen Z
      zt  = 30.0 + ($urandom % 2000) / 100.0;
      dev = $ln(beta * beta / (1.0 - beta * beta)) + lip - beta * beta;
      de  = ((zt - z1) / (z0 * beta)) ** 2 * dev;
      v   = (de - ico) / icg;
      sl  = 0;
      for (int i = 0; i < N_IC_CH; i++) begin
        int r = $rtoi(v * (1.0 + 0.02 * (($urandom % 100) / 100.0 - 0.5))) + 100 + 3 * i;
        mic[k][i] = 16'(r);
        sl += $ln(real'(r - (100 + 3 * i)));
      end
      de = icg * $exp(sl / N_IC_CH) + ico;
      ref_ok[k] = ok[0] && ok[1] && ok[2] && okt;
      pid_ref(b35, b57, tof, de, lc, ik, w, lip, z0, z1, ref_aoq[k], ref_z[k]);
      if (!ref_ok[k]) n_invalid++;
    end
  endtask

  task automatic run(bit faults, int n);
    int cyc = 0, first = -1;
    make_events(faults);
    stall_mode = faults;
    naoq = 0; nz = 0;
    @(negedge clk);
    start = 1; nchunk = n;
    @(negedge clk);
    start = 0;
    while (!done && cyc < 100000) begin
      @(negedge clk);
      cyc++;
      if (first < 0 && naoq > 0) first = cyc;
    end
    checks++;
    if (naoq != n || nz != n) begin failures++; $display("wrote %0d/%0d results of %0d", naoq, nz, n); end
    for (int k = 0; k < n; k++) begin
      checks++;
      if (!ref_ok[k]) begin
        if (maoq[k] != FX_INVALID || mz[k] != FX_INVALID) begin failures++; $display("event %0d not marked invalid", k); end
      end else if (rabs(fx_r(maoq[k]) - ref_aoq[k]) > 1.0e-3 || rabs(fx_r(mz[k]) - ref_z[k]) > 0.05) begin
        failures++;
        $display("event %0d A/Q=%f (%f) Z=%f (%f)", k, fx_r(maoq[k]), ref_aoq[k], fx_r(mz[k]), ref_z[k]);
      end
    end
    $display("run faults=%0d: %0d events in %0d clocks, first result after %0d", faults, n, cyc, first);
    if (!faults) begin
      checks++;
      if (first > 1000) begin failures++; $display("latency above 1000 clocks"); end
      checks++;
      if (cyc - first > 5 * n) begin failures++; $display("slower than 5 clocks per event"); end
    end
  endtask

  initial begin
    start = 0; nchunk = 0; stall_mode = 0;
    for (int i = 0; i < 3; i++) ppac_base[i] = AW'(i * 1000);
    for (int i = 0; i < 2; i++) pl_base[i] = AW'(3000 + i * 500);
    ic_base = 4000; aoq_base = 5000; z_base = 6000;
    set_par();
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1'b0, NEV);
    run(1'b1, NEV);
    $display("read stalls=%0d write stalls=%0d pid output stalls=%0d fifo full=%0d unfired layers=%0d invalid events=%0d",
             n_rd_stall, n_wr_stall, n_pid_stall, n_fifo_full, n_unfired, n_invalid);
    checks++; if (n_rd_stall == 0)  begin failures++; $display("no read stall"); end
    checks++; if (n_wr_stall == 0)  begin failures++; $display("no write stall"); end
    checks++; if (n_pid_stall == 0) begin failures++; $display("no PID stall"); end
    checks++; if (n_fifo_full == 0) begin failures++; $display("no full FIFO"); end
    checks++; if (n_unfired == 0)   begin failures++; $display("no unfired layer"); end
    checks++; if (n_invalid == 0)   begin failures++; $display("no invalid event"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
