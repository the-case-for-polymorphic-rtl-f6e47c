// prf_wavg_accel: the PRF-augmented accelerator of the weighted-average
// example, a streaming kernel over a 64 x 64 image of 32-bit pixels.
//
// Pixels arrive one per cycle (pix_valid) in raster order. They shift into a
// 129-element stream register (two rows plus one pixel); the coefficient
// array K lives in a 3-element static register. For every pixel accepted
// once the window is full, the kernel reads both registers in parallel and
// produces the weighted sum of the pixel one row above, the centre pixel and
// the pixel one row below, for the centre pixel: the n-th output belongs to
// pixel n + ROW of the stream (raster index), so the first output is for
// row 1, column 0. Outputs follow one cycle after the pixel that completes
// their window. The coefficient write port allows run-time updates of K.
// The register sizes, tap offsets, 96-bit interfaces and the coefficient
// values follow the document's example; the stream handshake and the lack of
// special treatment at the image borders are this design's choices.
module prf_wavg_accel #(
  parameter int unsigned W   = 32,
  parameter int unsigned ROW = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pix_valid,
  input  logic [W-1:0] pix,
  input  logic         k_we,
  input  logic [1:0]   k_waddr,
  input  logic [W-1:0] k_wdata,
  output logic [W-1:0] out,
  output logic         out_valid
);

  logic [3*W-1:0] in_prf, k_prf;
  logic           full, pix_q;

  prf_stream_reg #(.W(W), .ROW(ROW)) u_in (
    .clk(clk), .rst_n(rst_n), .in_valid(pix_valid), .in_data(pix),
    .taps(in_prf), .full(full)
  );

  prf_static_reg #(.W(W), .DEPTH(3), .INIT({W'(3), W'(-1), W'(3)})) u_k (
    .clk(clk), .rst_n(rst_n), .we(k_we), .waddr(k_waddr), .wdata(k_wdata), .coef(k_prf)
  );

  // the window is new in the cycle after a pixel was accepted
  always_ff @(posedge clk) begin
    if (!rst_n) pix_q <= 1'b0;
    else        pix_q <= pix_valid;
  end

  prf_wavg_kernel #(.W(W)) u_kernel (
    .clk(clk), .rst_n(rst_n), .go(pix_q && full), .in_prf(in_prf), .k_prf(k_prf),
    .out(out), .out_valid(out_valid)
  );

endmodule
