// tf_output: Output processor of the Track Fitter. From the three chi
// components of a fit it forms the total chi-square, chi2 = sum chi_k^2, and
// keeps the track only if chi2 <= the cut, rejecting fake tracks as the
// document describes. Tracks that pass leave towards the Level 2 decision
// logic as track_t {road, curvature, phi, d, chi2}; End Event markers pass
// through (road = {err, tag}). The cut is written through the configuration
// bus (target CFG_TF, addr 48); it resets to the largest value, so nothing
// is rejected until it is set. Timing: one fit per cycle, one register
// stage; 'rejected' pulses for each track cut away.
module tf_output
  import svt_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  cfg_t                    cfg,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic                    in_ee,
  input  logic [ROAD_W-1:0]       in_road,
  input  logic signed [PAR_W-1:0] in_par [3],
  input  logic signed [PAR_W-1:0] in_chi [3],
  output logic                    out_valid,
  input  logic                    out_ready,
  output track_t                  out_track,
  output logic                    rejected
);
  logic [CHI2_W-1:0] cut, chi2;
  logic signed [CHI2_W-1:0] c [3];

  always_comb begin
    chi2 = '0;
    for (int k = 0; k < 3; k++) begin
      c[k] = CHI2_W'(in_chi[k]);
      chi2 = chi2 + CHI2_W'(c[k] * c[k]);
    end
  end

  wire pass = in_ee || chi2 <= cut;
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cut <= '1; out_valid <= 1'b0; out_track <= '0; rejected <= 1'b0;
    end else begin
      if (cfg.we && cfg.target == CFG_TF && cfg.addr == 20'd48) cut <= cfg.data;
      rejected <= 1'b0;
      if (in_ready) begin
        out_valid <= in_valid && pass;
        rejected  <= in_valid && !pass;
        if (in_valid) begin
          out_track.ee   <= in_ee;
          out_track.road <= in_road;
          out_track.crv  <= in_par[0];
          out_track.phi  <= in_par[1];
          out_track.d    <= in_par[2];
          out_track.chi2 <= in_ee ? '0 : chi2;
        end
      end
    end
  end
endmodule
