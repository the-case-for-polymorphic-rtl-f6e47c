// prf_static_reg: PRF register customised for a static (local) variable: a
// small coefficient array that is read as a whole in one access.
//
// Holds DEPTH elements of W bits, initialised at reset with the values given
// by the INIT parameter (the weighted-average example uses K = {3, -1, 3}).
// The read port always shows all elements packed into one word, element 0 in
// the most significant position, so K[0] = coef >> 2W, K[1] = coef >> W,
// K[2] = low W bits. A write port lets the host update one element at run
// time, since coefficients kept in memory may change.
// Timing: reset (synchronous, active low) loads INIT; a write with we stores
// wdata at index waddr on the rising edge. The reset loading, packing order
// and width follow the document's example; the write port is this design's
// choice.
module prf_static_reg #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 3,
  parameter logic [DEPTH*W-1:0] INIT = {32'sd3, -32'sd1, 32'sd3},
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [W-1:0]       wdata,
  output logic [DEPTH*W-1:0] coef
);

  logic [W-1:0] k [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < DEPTH; n++)
        k[n] <= INIT[(DEPTH-1-n)*W +: W];
    end else if (we && 32'(waddr) < DEPTH) begin
      k[waddr] <= wdata;
    end
  end

  always_comb
    for (int unsigned n = 0; n < DEPTH; n++)
      coef[(DEPTH-1-n)*W +: W] = k[n];

endmodule
