// tf_fitter: the Fitter of the Track Fitter. For one hit combination x it
// evaluates the linearised fit of the document in six scalar products,
// computed in parallel:
//   p_k   = sum_j W[k][j] * (x_j - x0_j) + p0_k     k = curvature, phi, d
//   chi_k = sum_j V[k][j] * (x_j - x0_j) + b_k      k = 0..2
// W, V, x0, p0 and b are the constants of the sector (one set per 30 degree
// wedge is enough, as the document states). Coefficients are signed
// COEF_W-bit fixed-point numbers with FRAC fraction bits; results are
// rounded down and saturated to PAR_W bits. The chi components use the same
// difference x - x0 as the parameters, so their offsets b absorb V*x0.
//
// Constants are written through the configuration bus, target CFG_TF:
// addr 0..17 W[k][j] (k*6+j), 18..35 V[k][j], 36..41 x0_j, 42..44 p0_k,
// 45..47 b_k (addr 48 is the chi-square cut, held by tf_output). Timing: one
// combination per cycle, result one cycle later (valid/ready, one register
// stage). End Event markers pass through. Number formats are this design's
// choice.
module tf_fitter
  import svt_pkg::*;
#(
  parameter int COEF_W = 16,
  parameter int FRAC   = 10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cfg_t  cfg,
  input  logic  in_valid,
  output logic  in_ready,
  input  comb_t in_comb,
  output logic  out_valid,
  input  logic  out_ready,
  output logic  out_ee,
  output logic [ROAD_W-1:0]      out_road,
  output logic signed [PAR_W-1:0] out_par [3],
  output logic signed [PAR_W-1:0] out_chi [3]
);
  localparam int DW   = COORD_W + 1;
  localparam int PRW  = COEF_W + DW;
  localparam int ACCW = PRW + 3;

  logic signed [COEF_W-1:0] w [3][NMEAS];
  logic signed [COEF_W-1:0] v [3][NMEAS];
  logic        [COORD_W-1:0] x0 [NMEAS];
  logic signed [PAR_W-1:0]  p0 [3];
  logic signed [PAR_W-1:0]  b  [3];

  wire cw = cfg.we && cfg.target == CFG_TF;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) begin
        p0[k] <= '0; b[k] <= '0;
        for (int j = 0; j < NMEAS; j++) begin w[k][j] <= '0; v[k][j] <= '0; end
      end
      for (int j = 0; j < NMEAS; j++) x0[j] <= '0;
    end else if (cw) begin
      for (int k = 0; k < 3; k++)
        for (int j = 0; j < NMEAS; j++) begin
          if (int'(cfg.addr) == k * NMEAS + j)      w[k][j] <= cfg.data[COEF_W-1:0];
          if (int'(cfg.addr) == 18 + k * NMEAS + j) v[k][j] <= cfg.data[COEF_W-1:0];
        end
      for (int j = 0; j < NMEAS; j++) if (int'(cfg.addr) == 36 + j) x0[j] <= cfg.data[COORD_W-1:0];
      for (int k = 0; k < 3; k++) begin
        if (int'(cfg.addr) == 42 + k) p0[k] <= cfg.data[PAR_W-1:0];
        if (int'(cfg.addr) == 45 + k) b[k]  <= cfg.data[PAR_W-1:0];
      end
    end
  end

  function automatic logic signed [PAR_W-1:0] sat(logic signed [ACCW-FRAC:0] a);
    localparam logic signed [ACCW-FRAC:0] MAXV = (ACCW-FRAC+1)'((2 ** (PAR_W - 1)) - 1);
    localparam logic signed [ACCW-FRAC:0] MINV = -(ACCW-FRAC+1)'(2 ** (PAR_W - 1));
    if (a > MAXV) return PAR_W'(MAXV);
    if (a < MINV) return PAR_W'(MINV);
    return PAR_W'(a);
  endfunction

  // six scalar products
  logic signed [DW-1:0]   d [NMEAS];
  logic signed [ACCW-1:0] dx [NMEAS], wx [3][NMEAS], vx [3][NMEAS];  // sign-extended operands
  logic signed [ACCW-1:0] accp [3], accc [3];
  logic signed [PAR_W-1:0] par_n [3], chi_n [3];
  always_comb begin
    for (int j = 0; j < NMEAS; j++) begin
      d[j]  = $signed({1'b0, in_comb.x[j]}) - $signed({1'b0, x0[j]});
      dx[j] = ACCW'(d[j]);
      for (int k = 0; k < 3; k++) begin wx[k][j] = ACCW'(w[k][j]); vx[k][j] = ACCW'(v[k][j]); end
    end
    for (int k = 0; k < 3; k++) begin
      accp[k] = '0;
      accc[k] = '0;
      for (int j = 0; j < NMEAS; j++) begin
        accp[k] = accp[k] + wx[k][j] * dx[j];
        accc[k] = accc[k] + vx[k][j] * dx[j];
      end
      par_n[k] = sat((ACCW-FRAC+1)'(accp[k] >>> FRAC) + (ACCW-FRAC+1)'(p0[k]));
      chi_n[k] = sat((ACCW-FRAC+1)'(accc[k] >>> FRAC) + (ACCW-FRAC+1)'(b[k]));
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_ee <= 1'b0; out_road <= '0;
      for (int k = 0; k < 3; k++) begin out_par[k] <= '0; out_chi[k] <= '0; end
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_ee   <= in_comb.ee;
        out_road <= in_comb.road;
        for (int k = 0; k < 3; k++) begin out_par[k] <= par_n[k]; out_chi[k] <= chi_n[k]; end
      end
    end
  end
endmodule
