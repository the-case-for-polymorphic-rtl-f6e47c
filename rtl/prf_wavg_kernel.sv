// prf_wavg_kernel: the weighted-average example kernel after PRF
// integration. Instead of six sequential loads per output it performs two
// parallel PRF reads: the 96-bit tap word of the stream register and the
// 96-bit coefficient word of the static register, unpacks each into three
// 32-bit values with bit selects, and computes
//   out = k0*in0 + k1*in1 + k2*in2
// for the centre pixel (in0 = pixel above, in1 = centre, in2 = pixel below).
// Timing: one output per accepted input once the stream register is full;
// out / out_valid are registered (one cycle after the PRF read). Arithmetic
// is signed 32-bit, wrapping like C int. The document elides whatever
// follows the weighted sum in the example's expression, so no normalisation
// is applied; reset of out_valid is this design's choice.
module prf_wavg_kernel #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           go,          // new window available this cycle
  input  logic [3*W-1:0] in_prf,      // {in[pos-ROW], in[pos], in[pos+ROW]}
  input  logic [3*W-1:0] k_prf,       // {K[0], K[1], K[2]}
  output logic [W-1:0]   out,
  output logic           out_valid
);

  logic signed [W-1:0] in0, in1, in2, k0, k1, k2;
  logic signed [W-1:0] sum;

  always_comb begin
    in0 = W'(in_prf >> (2 * W));
    in1 = W'(in_prf >> W);
    in2 = W'(in_prf);
    k0  = W'(k_prf >> (2 * W));
    k1  = W'(k_prf >> W);
    k2  = W'(k_prf);
    sum = W'(k0 * in0 + k1 * in1 + k2 * in2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= go;
    if (go) out <= sum;
  end

endmodule
