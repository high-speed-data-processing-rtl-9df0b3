// trajectory: magnetic rigidity of the ion between two focal planes. From the
// upstream position x_up and the downstream position and angle (x_dn, a_dn)
// the momentum deviation is
//   delta[%] = c_xup*x_up + c_xdn*x_dn + c_adn*a_dn
// (first-order inverse transfer matrix of the beam-line section), and
//   Brho = brho0 + brho0_pct*delta   (brho0_pct = brho0/100).
// It joins the two track streams; ok needs both tracks ok.
// Pipeline: 3 stages, one event per clock, valid/ready, whole-pipeline stall.
// The inputs (F3 x, F5 x, F5 a for F3-F5; F5 x, F7 x, F7 a for F5-F7) follow
// the source's dataflow; the linear matrix form is this design's choice.
module trajectory
  import pid_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  traj_par_t par,
  input  logic      up_valid,
  output logic      up_ready,
  input  fp_track_t up_data,
  input  logic      dn_valid,
  output logic      dn_ready,
  input  fp_track_t dn_data,
  output logic      out_valid,
  input  logic      out_ready,
  output fxv_t      out_data
);
  logic [2:0] vld;
  logic       adv, take;
  assign adv       = !vld[2] || out_ready;
  assign take      = adv && up_valid && dn_valid;
  assign up_ready  = take;
  assign dn_ready  = take;
  assign out_valid = vld[2];

  always_ff @(posedge clk) begin
    if (!rst_n)   vld <= '0;
    else if (adv) vld <= {vld[1:0], up_valid && dn_valid};
  end

  fx_t  p0, p1, p2, delta;
  logic ok1, ok2;
  always_ff @(posedge clk) begin
    if (adv) begin
      p0    <= fx_mul(par.c_xup, up_data.x);
      p1    <= fx_mul(par.c_xdn, dn_data.x);
      p2    <= fx_mul(par.c_adn, dn_data.a);
      ok1   <= up_data.ok && dn_data.ok;
      delta <= p0 + p1 + p2;
      ok2   <= ok1;
      out_data.v  <= par.brho0 + fx_mul(par.brho0_pct, delta);
      out_data.ok <= ok2;
    end
  end
endmodule
