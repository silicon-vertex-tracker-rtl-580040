// svt_top: the complete Silicon Vertex Tracker, NSECTORS identical sectors
// (12 in the document, one per 30 degree phi wedge) working in parallel,
// each with its own Hit Finder inputs, XFT input and track output. Each
// sector stands for one crate with its Spy Control board; the Spy Control of
// sector 0 is the master and drives the system-wide freeze line, so a freeze
// command to it (or an error in its crate with auto-freeze on) freezes every
// spy buffer of the system. CDF_ERROR is the OR of all crates' Spy Control
// boards and of every board's own CDF_ERROR output.
//
// Configuration: one cfg bus, written into the sector chosen by cfg_sector.
// Spy and error readback come out per sector. The crate-per-sector grouping
// and the choice of sector 0 as master are this design's choices.
module svt_top
  import svt_pkg::*;
#(
  parameter int NSECTORS  = 12,
  parameter int NHF       = 3,
  parameter int NBOARDS   = 2,
  parameter int NPLUGS    = 16,
  parameter int NCHIPS    = 8,
  parameter int NPATT     = 128,
  parameter int HIT_DEPTH = 1024,
  parameter int SPY_D     = 1024
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  cfg_t                      cfg,
  input  logic [3:0]                cfg_sector,
  input  logic [NHF-1:0]            hf_valid  [NSECTORS],
  output logic [NHF-1:0]            hf_ready  [NSECTORS],
  input  raw_t                      hf_raw    [NSECTORS][NHF],
  input  logic [NSECTORS-1:0]       xft_valid,
  output logic [NSECTORS-1:0]       xft_ready,
  input  word_t                     xft_word  [NSECTORS],
  output logic [NSECTORS-1:0]       trk_valid,
  input  logic [NSECTORS-1:0]       trk_ready,
  output track_t                    trk       [NSECTORS],
  output logic [NSECTORS-1:0]       trk_rejected,
  input  logic [NSECTORS-1:0]       spy_cmd_freeze,
  input  logic [NSECTORS-1:0]       spy_cmd_release,
  input  logic                      auto_freeze_en,
  output logic [NSECTORS-1:0]       spy_frozen,
  output logic [$bits(track_t)-1:0] spy_rdata [NSECTORS],
  output logic [7*ERR_W-1:0]        err_regs  [NSECTORS],
  output logic [NSECTORS-1:0]       svt_error,
  output logic                      cdf_error
);
  logic [NSECTORS-1:0] freeze, gfo, crate_cdf, sec_cdf;
  logic                global_freeze;

  assign global_freeze = gfo[0];

  for (genvar s = 0; s < NSECTORS; s++) begin : g_sector
    cfg_t scfg;
    always_comb begin
      scfg    = cfg;
      scfg.we = cfg.we && cfg_sector == 4'(s);
    end

    svt_sector #(.NHF(NHF), .NBOARDS(NBOARDS), .NPLUGS(NPLUGS), .NCHIPS(NCHIPS),
                 .NPATT(NPATT), .HIT_DEPTH(HIT_DEPTH), .SPY_D(SPY_D)) u_sector (
      .clk, .rst_n, .cfg(scfg),
      .hf_valid(hf_valid[s]), .hf_ready(hf_ready[s]), .hf_raw(hf_raw[s]),
      .xft_valid(xft_valid[s]), .xft_ready(xft_ready[s]), .xft_word(xft_word[s]),
      .trk_valid(trk_valid[s]), .trk_ready(trk_ready[s]), .trk(trk[s]),
      .trk_rejected(trk_rejected[s]),
      .spy_freeze(freeze[s]), .spy_rdata(spy_rdata[s]), .err_regs(err_regs[s]),
      .svt_error(svt_error[s]), .cdf_error(sec_cdf[s]));

    spy_control #(.MASTER(s == 0)) u_spyctl (
      .clk, .rst_n,
      .cmd_freeze(spy_cmd_freeze[s]), .cmd_release(spy_cmd_release[s]),
      .auto_freeze_en, .svt_error(svt_error[s]), .global_freeze_in(global_freeze),
      .freeze_out(freeze[s]), .global_freeze_out(gfo[s]), .cdf_error_out(crate_cdf[s]));
  end

  assign spy_frozen = freeze;
  assign cdf_error  = (|crate_cdf) || (|sec_cdf);
endmodule
