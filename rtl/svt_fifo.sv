// svt_fifo: synchronous first-in first-out buffer used wherever a board
// queues link words (input FIFOs of every board, the combination FIFO of the
// Track Fitter). Valid/ready on both sides: a word is written when
// in_valid && in_ready and read when out_valid && out_ready. in_ready is low
// only when the FIFO is full; 'full' is brought out so a board can flag the
// FIFO-full error condition. Output is registered-free (first-word
// fall-through), so a word written in cycle n is visible in cycle n+1.
// Depth and width are parameters; the buffering scheme is this design's
// choice, the document only names FIFOs.
module svt_fifo #(
  parameter int W     = 22,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         full
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   count;

  wire do_wr = in_valid && in_ready;
  wire do_rd = out_valid && out_ready;

  assign full      = (count == (AW+1)'(DEPTH));
  assign in_ready  = !full;
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
