// pid_top: streaming particle identification (PID) of BigRIPS events.
// For each of nchunk events it reads the raw segments of the F3, F5 and F7
// PPACs, the F3 and F7 plastic scintillators and the F7 ion chamber, and
// writes the mass-to-charge ratio A/Q and the atomic number Z of the ion.
// Every task runs concurrently and tasks are joined by FIFOs:
//   PPAC load -> PPAC cal+ana -> [4 PPAC layers] -> PPAC reco   (F3, F5, F7)
//   F3 x, F5 x, F5 a -> trajectory -> [Brho35]
//   F5 x, F7 x, F7 a -> trajectory -> [Brho57]
//   PL load -> PL cal+ana -> [F3 t], [F7 t] -> TOF -> [TOF]
//   IC load -> IC cal+ana -> [F7 dE]
//   PID (TOF-Brho-dE) -> [A/Q] -> A/Q write, [Z] -> Z write
// Interface: pulse `start` with nchunk, the base addresses and the
// calibration constants `par` stable; `done` rises when both result streams
// are written. Six memory read ports (one event per word, in-order replies
// of any latency) and two memory write ports (wr_ready may stall) connect to
// the card memory. Timing: one event per clock when the memories keep up
// (read latency <= LOAD_DEPTH - 2); 214 clocks from start to the first
// result with a 3-clock memory (PPAC path: load 5, cal+ana 2, FIFO 1,
// reco DIV_LAT+3, trajectory 3, PID 2*DIV_LAT+SQRT_LAT+LOG2_LAT+5, plus FIFOs). The task graph follows the source; the number format, the memory
// protocol and the FIFO depths other than those of the time and result
// FIFOs are this design's choice.
module pid_top
  import pid_pkg::*;
#(
  parameter int FIFO_DEPTH   = 2,   // default FIFO between tasks
  parameter int T_FIFO_DEPTH = 3,   // F3 t / F7 t FIFOs
  parameter int LOAD_DEPTH   = 8,   // read buffer of each load task (>= read latency + 2 for full rate)
  parameter int AW           = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [31:0]         nchunk,
  input  kernel_par_t         par,
  output logic                done,
  // PPAC read ports, index 0/1/2 = F3/F5/F7
  input  logic [2:0][AW-1:0]  ppac_base,
  output logic [2:0]          ppac_rd_req,
  input  logic [2:0]          ppac_rd_ready,
  output logic [2:0][AW-1:0]  ppac_rd_addr,
  input  logic [2:0]          ppac_rd_valid,
  input  ppac_raw_t [2:0]     ppac_rd_data,
  // plastic read ports, index 0/1 = F3/F7
  input  logic [1:0][AW-1:0]  pl_base,
  output logic [1:0]          pl_rd_req,
  input  logic [1:0]          pl_rd_ready,
  output logic [1:0][AW-1:0]  pl_rd_addr,
  input  logic [1:0]          pl_rd_valid,
  input  pl_raw_t [1:0]       pl_rd_data,
  // F7 ion chamber read port
  input  logic [AW-1:0]       ic_base,
  output logic                ic_rd_req,
  input  logic                ic_rd_ready,
  output logic [AW-1:0]       ic_rd_addr,
  input  logic                ic_rd_valid,
  input  ic_raw_t             ic_rd_data,
  // result write ports
  input  logic [AW-1:0]       aoq_base,
  output logic                aoq_wr_en,
  input  logic                aoq_wr_ready,
  output logic [AW-1:0]       aoq_wr_addr,
  output fx_t                 aoq_wr_data,
  input  logic [AW-1:0]       z_base,
  output logic                z_wr_en,
  input  logic                z_wr_ready,
  output logic [AW-1:0]       z_wr_addr,
  output fx_t                 z_wr_data
);
  // ---------------------------------------------------------------- PPAC
  ppac_par_t    ppar [3];
  assign ppar[0] = par.f3ppac;
  assign ppar[1] = par.f5ppac;
  assign ppar[2] = par.f7ppac;

  logic      trk_valid [3], trk_ready [3];
  fp_track_t trk_data  [3];

  for (genvar f = 0; f < 3; f++) begin : g_ppac
    logic         raw_valid, raw_ready, lay_valid, lay_ready, lq_valid, lq_ready;
    ppac_raw_t    raw_data;
    ppac_layers_t lay_data, lq_data;
    logic         busy_unused;

    raw_load #(.DW($bits(ppac_raw_t)), .DEPTH(LOAD_DEPTH), .AW(AW)) u_load (
      .clk, .rst_n, .start, .nchunk, .base(ppac_base[f]),
      .rd_req(ppac_rd_req[f]), .rd_ready(ppac_rd_ready[f]), .rd_addr(ppac_rd_addr[f]),
      .rd_valid(ppac_rd_valid[f]), .rd_data(ppac_rd_data[f]),
      .out_valid(raw_valid), .out_ready(raw_ready), .out_data(raw_data), .busy(busy_unused));

    ppac_calana u_cal (
      .clk, .rst_n, .par(ppar[f]),
      .in_valid(raw_valid), .in_ready(raw_ready), .in_data(raw_data),
      .out_valid(lay_valid), .out_ready(lay_ready), .out_data(lay_data));

    stream_fifo #(.T(ppac_layers_t), .DEPTH(FIFO_DEPTH)) u_layers (
      .clk, .rst_n, .in_valid(lay_valid), .in_ready(lay_ready), .in_data(lay_data),
      .out_valid(lq_valid), .out_ready(lq_ready), .out_data(lq_data), .count());

    ppac_reco u_reco (
      .clk, .rst_n, .par_z(ppar[f].z),
      .in_valid(lq_valid), .in_ready(lq_ready), .in_data(lq_data),
      .out_valid(trk_valid[f]), .out_ready(trk_ready[f]), .out_data(trk_data[f]));
  end

  // F3 track -> trajectory 3-5 (upstream)
  logic      f3x_valid, f3x_ready;
  fp_track_t f3x_data;
  stream_fifo #(.T(fp_track_t), .DEPTH(FIFO_DEPTH)) u_f3x (
    .clk, .rst_n, .in_valid(trk_valid[0]), .in_ready(trk_ready[0]), .in_data(trk_data[0]),
    .out_valid(f3x_valid), .out_ready(f3x_ready), .out_data(f3x_data), .count());

  // F5 track -> both trajectories
  logic [1:0] f5_fv, f5_fr;
  fp_track_t  f5_fd;
  stream_fork #(.T(fp_track_t), .N(2)) u_f5_fork (
    .clk, .rst_n, .in_valid(trk_valid[1]), .in_ready(trk_ready[1]), .in_data(trk_data[1]),
    .out_valid(f5_fv), .out_ready(f5_fr), .out_data(f5_fd));

  logic      f5a_valid, f5a_ready, f5b_valid, f5b_ready;
  fp_track_t f5a_data, f5b_data;
  stream_fifo #(.T(fp_track_t), .DEPTH(FIFO_DEPTH)) u_f5_35 (
    .clk, .rst_n, .in_valid(f5_fv[0]), .in_ready(f5_fr[0]), .in_data(f5_fd),
    .out_valid(f5a_valid), .out_ready(f5a_ready), .out_data(f5a_data), .count());
  stream_fifo #(.T(fp_track_t), .DEPTH(FIFO_DEPTH)) u_f5_57 (
    .clk, .rst_n, .in_valid(f5_fv[1]), .in_ready(f5_fr[1]), .in_data(f5_fd),
    .out_valid(f5b_valid), .out_ready(f5b_ready), .out_data(f5b_data), .count());

  // F7 track -> trajectory 5-7 (downstream)
  logic      f7x_valid, f7x_ready;
  fp_track_t f7x_data;
  stream_fifo #(.T(fp_track_t), .DEPTH(FIFO_DEPTH)) u_f7x (
    .clk, .rst_n, .in_valid(trk_valid[2]), .in_ready(trk_ready[2]), .in_data(trk_data[2]),
    .out_valid(f7x_valid), .out_ready(f7x_ready), .out_data(f7x_data), .count());

  // ---------------------------------------------------------- trajectories
  logic b35_valid, b35_ready, b35q_valid, b35q_ready;
  logic b57_valid, b57_ready, b57q_valid, b57q_ready;
  fxv_t b35_data, b35q_data, b57_data, b57q_data;

  trajectory u_traj35 (
    .clk, .rst_n, .par(par.traj35),
    .up_valid(f3x_valid), .up_ready(f3x_ready), .up_data(f3x_data),
    .dn_valid(f5a_valid), .dn_ready(f5a_ready), .dn_data(f5a_data),
    .out_valid(b35_valid), .out_ready(b35_ready), .out_data(b35_data));
  trajectory u_traj57 (
    .clk, .rst_n, .par(par.traj57),
    .up_valid(f5b_valid), .up_ready(f5b_ready), .up_data(f5b_data),
    .dn_valid(f7x_valid), .dn_ready(f7x_ready), .dn_data(f7x_data),
    .out_valid(b57_valid), .out_ready(b57_ready), .out_data(b57_data));

  stream_fifo #(.T(fxv_t), .DEPTH(FIFO_DEPTH)) u_b35 (
    .clk, .rst_n, .in_valid(b35_valid), .in_ready(b35_ready), .in_data(b35_data),
    .out_valid(b35q_valid), .out_ready(b35q_ready), .out_data(b35q_data), .count());
  stream_fifo #(.T(fxv_t), .DEPTH(FIFO_DEPTH)) u_b57 (
    .clk, .rst_n, .in_valid(b57_valid), .in_ready(b57_ready), .in_data(b57_data),
    .out_valid(b57q_valid), .out_ready(b57q_ready), .out_data(b57q_data), .count());

  // ------------------------------------------------------------- plastics
  pl_par_t lpar [2];
  assign lpar[0] = par.f3pl;
  assign lpar[1] = par.f7pl;
  logic tq_valid [2], tq_ready [2];
  fxv_t tq_data  [2];

  for (genvar f = 0; f < 2; f++) begin : g_pl
    logic    raw_valid, raw_ready, t_valid, t_ready;
    pl_raw_t raw_data;
    fxv_t    t_data;
    logic    busy_unused;

    raw_load #(.DW($bits(pl_raw_t)), .DEPTH(LOAD_DEPTH), .AW(AW)) u_load (
      .clk, .rst_n, .start, .nchunk, .base(pl_base[f]),
      .rd_req(pl_rd_req[f]), .rd_ready(pl_rd_ready[f]), .rd_addr(pl_rd_addr[f]),
      .rd_valid(pl_rd_valid[f]), .rd_data(pl_rd_data[f]),
      .out_valid(raw_valid), .out_ready(raw_ready), .out_data(raw_data), .busy(busy_unused));

    pl_calana u_cal (
      .clk, .rst_n, .par(lpar[f]),
      .in_valid(raw_valid), .in_ready(raw_ready), .in_data(raw_data),
      .out_valid(t_valid), .out_ready(t_ready), .out_data(t_data));

    stream_fifo #(.T(fxv_t), .DEPTH(T_FIFO_DEPTH)) u_t (
      .clk, .rst_n, .in_valid(t_valid), .in_ready(t_ready), .in_data(t_data),
      .out_valid(tq_valid[f]), .out_ready(tq_ready[f]), .out_data(tq_data[f]), .count());
  end

  logic tof_valid, tof_ready, tofq_valid, tofq_ready;
  fxv_t tof_data, tofq_data;
  tof_calc u_tof (
    .clk, .rst_n, .offset(par.tof_offset),
    .f3_valid(tq_valid[0]), .f3_ready(tq_ready[0]), .f3_data(tq_data[0]),
    .f7_valid(tq_valid[1]), .f7_ready(tq_ready[1]), .f7_data(tq_data[1]),
    .out_valid(tof_valid), .out_ready(tof_ready), .out_data(tof_data));
  stream_fifo #(.T(fxv_t), .DEPTH(FIFO_DEPTH)) u_tofq (
    .clk, .rst_n, .in_valid(tof_valid), .in_ready(tof_ready), .in_data(tof_data),
    .out_valid(tofq_valid), .out_ready(tofq_ready), .out_data(tofq_data), .count());

  // ---------------------------------------------------------- ion chamber
  logic    icr_valid, icr_ready, de_valid, de_ready, deq_valid, deq_ready, ic_busy_unused;
  ic_raw_t icr_data;
  fxv_t    de_data, deq_data;
  raw_load #(.DW($bits(ic_raw_t)), .DEPTH(LOAD_DEPTH), .AW(AW)) u_ic_load (
    .clk, .rst_n, .start, .nchunk, .base(ic_base),
    .rd_req(ic_rd_req), .rd_ready(ic_rd_ready), .rd_addr(ic_rd_addr),
    .rd_valid(ic_rd_valid), .rd_data(ic_rd_data),
    .out_valid(icr_valid), .out_ready(icr_ready), .out_data(icr_data), .busy(ic_busy_unused));
  ic_calana u_ic (
    .clk, .rst_n, .par(par.f7ic),
    .in_valid(icr_valid), .in_ready(icr_ready), .in_data(icr_data),
    .out_valid(de_valid), .out_ready(de_ready), .out_data(de_data));
  stream_fifo #(.T(fxv_t), .DEPTH(FIFO_DEPTH)) u_deq (
    .clk, .rst_n, .in_valid(de_valid), .in_ready(de_ready), .in_data(de_data),
    .out_valid(deq_valid), .out_ready(deq_ready), .out_data(deq_data), .count());

  // ------------------------------------------------------------------ PID
  logic     pid_valid, pid_ready;
  pid_out_t pid_data;
  pid_calc u_pid (
    .clk, .rst_n, .par(par.pid),
    .b35_valid(b35q_valid), .b35_ready(b35q_ready), .b35_data(b35q_data),
    .b57_valid(b57q_valid), .b57_ready(b57q_ready), .b57_data(b57q_data),
    .tof_valid(tofq_valid), .tof_ready(tofq_ready), .tof_data(tofq_data),
    .de_valid(deq_valid),   .de_ready(deq_ready),   .de_data(deq_data),
    .out_valid(pid_valid), .out_ready(pid_ready), .out_data(pid_data));

  logic [1:0] res_fv, res_fr;
  pid_out_t   res_fd;
  stream_fork #(.T(pid_out_t), .N(2)) u_res_fork (
    .clk, .rst_n, .in_valid(pid_valid), .in_ready(pid_ready), .in_data(pid_data),
    .out_valid(res_fv), .out_ready(res_fr), .out_data(res_fd));

  logic aoq_valid, aoq_ready, z_valid, z_ready, aoq_done, z_done;
  fx_t  aoq_q, z_q;
  stream_fifo #(.T(fx_t), .DEPTH(FIFO_DEPTH)) u_aoq_q (
    .clk, .rst_n, .in_valid(res_fv[0]), .in_ready(res_fr[0]), .in_data(res_fd.aoq),
    .out_valid(aoq_valid), .out_ready(aoq_ready), .out_data(aoq_q), .count());
  stream_fifo #(.T(fx_t), .DEPTH(FIFO_DEPTH)) u_z_q (
    .clk, .rst_n, .in_valid(res_fv[1]), .in_ready(res_fr[1]), .in_data(res_fd.z),
    .out_valid(z_valid), .out_ready(z_ready), .out_data(z_q), .count());

  result_write #(.AW(AW)) u_wr_aoq (
    .clk, .rst_n, .start, .nchunk, .base(aoq_base),
    .in_valid(aoq_valid), .in_ready(aoq_ready), .in_data(aoq_q),
    .wr_en(aoq_wr_en), .wr_ready(aoq_wr_ready), .wr_addr(aoq_wr_addr), .wr_data(aoq_wr_data),
    .done(aoq_done));
  result_write #(.AW(AW)) u_wr_z (
    .clk, .rst_n, .start, .nchunk, .base(z_base),
    .in_valid(z_valid), .in_ready(z_ready), .in_data(z_q),
    .wr_en(z_wr_en), .wr_ready(z_wr_ready), .wr_addr(z_wr_addr), .wr_data(z_wr_data),
    .done(z_done));

  assign done = aoq_done && z_done && !start;
endmodule
