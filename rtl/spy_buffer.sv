// spy_buffer: circular spy memory that copies every word moving over one
// link, for debugging and monitoring. As the document describes, the copy is
// continuous, the buffer can be frozen, and it is read out through the
// board's slow-control port without touching the data flow: the spied link
// is only observed (the handshake signals are inputs here).
//
// A word is written at wr_ptr whenever the link transfers (valid && ready)
// and 'freeze' is low; the pointer wraps at DEPTH and 'wrapped' tells that
// the whole memory holds valid data. Readback is one cycle: rd_data holds
// mem[rd_addr] of the previous cycle. The depth is this design's choice; the
// document gives none.
module spy_buffer #(
  parameter int W     = 22,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     link_valid,
  input  logic                     link_ready,
  input  logic [W-1:0]             link_data,
  input  logic                     freeze,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data,
  output logic [$clog2(DEPTH)-1:0] wr_ptr,
  output logic                     wrapped,
  output logic                     frozen
);
  logic [W-1:0] mem [DEPTH];
  wire  wr = link_valid && link_ready && !freeze;

  always_ff @(posedge clk) begin
    if (wr) mem[wr_ptr] <= link_data;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      wrapped <= 1'b0;
      frozen  <= 1'b0;
    end else begin
      frozen <= freeze;
      if (wr) begin
        wr_ptr <= wr_ptr + 1'b1;
        if (&wr_ptr) wrapped <= 1'b1;
      end
    end
  end
endmodule
