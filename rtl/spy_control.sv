// spy_control: Spy Control board of one crate. It freezes the spy buffers of
// all boards in its crate and reports errors to the experiment. A crate
// freeze happens on a slow-control command, on the crate's SVT_ERROR line
// (when auto-freeze is enabled), or on the system-wide freeze line. The one
// board configured as master drives that system-wide line, so one master
// freezes every spy buffer of the SVT. Any SVT_ERROR also raises the
// CDF_ERROR line towards the data acquisition. 'release' unfreezes.
// Command set, auto-freeze option and master selection by parameter are this
// design's choices; the document gives the board's role only.
// Timing: freeze_out rises one cycle after the cause, global_freeze_out in
// the same cycle as freeze_out.
module spy_control #(
  parameter bit MASTER = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cmd_freeze,        // slow-control freeze command
  input  logic cmd_release,       // slow-control release command
  input  logic auto_freeze_en,    // freeze on SVT_ERROR
  input  logic svt_error,         // wired-OR of the crate's SVT_ERROR line
  input  logic global_freeze_in,  // system-wide freeze line
  output logic freeze_out,        // to every spy buffer of the crate
  output logic global_freeze_out, // driven by the master only
  output logic cdf_error_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      freeze_out    <= 1'b0;
      cdf_error_out <= 1'b0;
    end else begin
      if (cmd_release) freeze_out <= 1'b0;
      else if (cmd_freeze || global_freeze_in || (auto_freeze_en && svt_error))
        freeze_out <= 1'b1;
      cdf_error_out <= svt_error;
    end
  end

  assign global_freeze_out = MASTER ? freeze_out : 1'b0;
endmodule
