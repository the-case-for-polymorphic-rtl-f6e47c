// prf_stream_reg: PRF register customised for a streaming variable, as
// generated for the weighted-average example kernel (a 64 x 64 image, three
// vertically adjacent pixels per output).
//
// The register keeps the last SIZE = 2*ROW + 1 = 129 stream elements; each
// accepted element shifts the window by one. Its parallel read port returns
// the three accessed elements at once, packed into one 3*W = 96-bit word:
//   taps = { in[pos-ROW], in[pos], in[pos+ROW] }   (pos = centre element)
// so the kernel unpacks them with bit selects (>> 2W, >> W, low W bits).
// full rises once SIZE elements have arrived, i.e. when the taps are valid.
// Timing: in_valid samples in_data at the rising edge; taps and full show the
// new window right after that edge. rst_n (synchronous, active low) empties
// the window. The window size, tap offsets, packing order and 32-bit width
// follow the document's example; using a shift register rather than a
// circular buffer, and the full flag, are this design's choices.
module prf_stream_reg #(
  parameter int unsigned W   = 32,   // element width (C int)
  parameter int unsigned ROW = 64,   // image row length = tap distance
  localparam int unsigned SIZE = 2 * ROW + 1,
  localparam int unsigned CW   = $clog2(SIZE + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [W-1:0]   in_data,
  output logic [3*W-1:0] taps,
  output logic           full
);

  logic [W-1:0] win [SIZE];            // win[0] newest, win[SIZE-1] oldest
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      win[0] <= in_data;
      for (int unsigned k = 1; k < SIZE; k++) win[k] <= win[k-1];
    end
    if (!rst_n)
      count <= '0;
    else if (in_valid && count != CW'(SIZE))
      count <= count + 1'b1;
  end

  assign full = (count == CW'(SIZE));
  assign taps = {win[SIZE-1], win[ROW], win[0]};

endmodule
