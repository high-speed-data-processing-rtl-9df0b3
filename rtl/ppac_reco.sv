// ppac_reco: track reconstruction at one focal plane. A straight line
// x(z) = x + a*z is fitted by least squares through the positions of the
// fired PPAC layers, at the layers' positions z_i along the beam:
//   n = #fired, Sz = sum z, Szz = sum z^2, Sx = sum x, Szx = sum z*x,
//   D = n*Szz - Sz^2, a = (n*Szx - Sz*Sx)/D, x = (Szz*Sx - Sz*Szx)/D.
// With x in mm and z in m the slope a is directly in mrad. The track is ok
// when at least two layers fired (and D > 0).
// The sums are kept with 32 fraction bits and, before the two pipelined
// dividers, the numerators and D are scaled by a common power of two so that
// closely spaced layers (small D) keep their precision.
// Pipeline: 3 stages, then the dividers (DIV_LAT), so LAT = DIV_LAT + 3; one event per clock, valid/ready, whole-pipeline stall.
// The least-squares fit of positions and detector positions follows the
// source; units and the two-layer minimum are this design's choice.
module ppac_reco
  import pid_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  fx_t [N_PPAC_LAYERS-1:0]  par_z,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  ppac_layers_t             in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output fp_track_t                out_data
);
  localparam int L   = N_PPAC_LAYERS;
  localparam int LAT = DIV_LAT + 3;

  logic [LAT-1:0] vld;
  logic           adv;
  assign adv       = !vld[LAT-1] || out_ready;
  assign in_ready  = adv;
  assign out_valid = vld[LAT-1];

  always_ff @(posedge clk) begin
    if (!rst_n)   vld <= '0;
    else if (adv) vld <= {vld[LAT-2:0], in_valid};
  end

  // stage 1: sums over fired layers, 32 fraction bits (products exact)
  typedef logic signed [63:0] w_t;
  w_t sz, szz, sx, szx;
  logic [$clog2(L+1)-1:0] n;
  always_ff @(posedge clk) begin
    if (adv) begin
      w_t a_sz, a_szz, a_sx, a_szx;
      logic [$clog2(L+1)-1:0] a_n;
      a_sz = '0; a_szz = '0; a_sx = '0; a_szx = '0; a_n = '0;
      for (int i = 0; i < L; i++) begin
        if (in_data.fired[i]) begin
          a_n   = a_n + 1'b1;
          a_sz  = a_sz  + (w_t'(par_z[i]) <<< FXF);
          a_szz = a_szz + w_t'(par_z[i]) * w_t'(par_z[i]);
          a_sx  = a_sx  + (w_t'(in_data.x[i]) <<< FXF);
          a_szx = a_szx + w_t'(par_z[i]) * w_t'(in_data.x[i]);
        end
      end
      n <= a_n; sz <= a_sz; szz <= a_szz; sx <= a_sx; szx <= a_szx;
    end
  end

  // stage 2: determinant and numerators, 32 fraction bits
  function automatic w_t mul32(w_t a, w_t b);
    logic signed [127:0] p;
    p = 128'(a) * 128'(b);
    return w_t'(p >>> 32);
  endfunction

  w_t   det, num_a, num_x;
  logic ok2;
  always_ff @(posedge clk) begin
    if (adv) begin
      w_t d;
      d      = szz * w_t'(n) - mul32(sz, sz);
      det    <= d;
      num_a  <= szx * w_t'(n) - mul32(sz, sx);
      num_x  <= mul32(szz, sx) - mul32(sz, szx);
      ok2    <= (n >= 2) && (d > 0);
    end
  end

  // stage 3: scale numerators and determinant by the same power of two so
  // the largest fits FXW bits; the quotients are unchanged
  function automatic w_t wabs(w_t v);
    return v[63] ? -v : v;
  endfunction

  fx_t  det3, num_a3, num_x3;
  logic ok3;
  always_ff @(posedge clk) begin
    if (adv) begin
      w_t   m;
      int   sh;
      m  = wabs(det) | wabs(num_a) | wabs(num_x);
      sh = 0;
      for (int b = FXW - 1; b < 64; b++)
        if (m[b]) sh = b - (FXW - 2);
      det3   <= fx_t'(det   >>> sh);
      num_a3 <= fx_t'(num_a >>> sh);
      num_x3 <= fx_t'(num_x >>> sh);
      ok3    <= ok2;
    end
  end

  fxp_div u_div_a (.clk, .en(adv), .num(num_a3), .den(det3), .q(out_data.a));
  fxp_div u_div_x (.clk, .en(adv), .num(num_x3), .den(det3), .q(out_data.x));
  pipe_delay #(.T(logic), .DEPTH(DIV_LAT)) u_ok (.clk, .en(adv), .d(ok3), .q(out_data.ok));
endmodule
