// prf_shuffle: read / write / address shuffle of the PRF parallel memory.
//
// A full crossbar between the p*q vector lanes and the p*q memory modules,
// steered by the module selects that the MAF computes for each lane
// (sel[n] = select_v * q + select_h of lane n).
// * GATHER (read data shuffle): lane n takes the word of module sel[n].
//   hit is always 1.
// * SCATTER (write data shuffle, address shuffle): module m takes the word of
//   the lane whose select equals m; hit[m] tells whether any lane selected
//   module m (the lowest such lane wins; for a conflict-free access each
//   module is selected exactly once).
// The full-crossbar implementation follows the document's prototypes; the
// lowest-lane priority is this design's choice. Combinational.
module prf_shuffle #(
  parameter int unsigned LANES = 8,
  parameter int unsigned W     = 64,
  parameter bit          SCATTER = 1'b0,
  localparam int unsigned SW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic [W-1:0]  shuffle_in  [LANES],
  input  logic [SW-1:0] sel         [LANES],
  output logic [W-1:0]  shuffle_out [LANES],
  output logic          hit         [LANES]
);

  always_comb begin
    for (int unsigned o = 0; o < LANES; o++) begin
      shuffle_out[o] = '0;
      hit[o]         = 1'b0;
      if (!SCATTER) begin
        shuffle_out[o] = shuffle_in[sel[o]];
        hit[o]         = 1'b1;
      end else begin
        for (int n = int'(LANES) - 1; n >= 0; n--) begin
          if (32'(sel[n]) == o) begin
            shuffle_out[o] = shuffle_in[n];
            hit[o]         = 1'b1;
          end
        end
      end
    end
  end

endmodule
