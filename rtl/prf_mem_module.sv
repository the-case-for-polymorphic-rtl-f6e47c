// prf_mem_module: one of the p x q memory modules of the PRF.
//
// Holds DEPTH words of W bits, built from prf_sram macros of MACRO_DEPTH
// words: the high address bits pick the macro (capacity aggregation), the low
// bits address inside it. To give NRD read ports with dual-port macros, the
// whole bank of macros is replicated NRD times and every write goes to all
// copies, so copy r serves read port r alone. Both measures follow the
// document's prototypes (256 x 64-bit dual-port macros, two coupled copies
// for two read ports).
// Timing: writes take effect at the rising edge; a read issued with re[r]
// returns rdata[r] one cycle later and is held while re[r] is low.
module prf_mem_module #(
  parameter int unsigned DEPTH       = 2048,
  parameter int unsigned W           = 64,
  parameter int unsigned NRD         = 2,
  parameter int unsigned MACRO_DEPTH = 256,
  localparam int unsigned AW  = $clog2(DEPTH),
  localparam int unsigned NB  = (DEPTH + MACRO_DEPTH - 1) / MACRO_DEPTH,
  localparam int unsigned MD  = (DEPTH < MACRO_DEPTH) ? DEPTH : MACRO_DEPTH,
  localparam int unsigned MAW = $clog2(MD),
  localparam int unsigned BW  = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re    [NRD],
  input  logic [AW-1:0] raddr [NRD],
  output logic [W-1:0]  rdata [NRD]
);

  for (genvar r = 0; r < NRD; r++) begin : g_copy
    logic [W-1:0]  bank_q [NB];
    logic [BW-1:0] bsel_q;

    for (genvar b = 0; b < NB; b++) begin : g_bank
      logic hit_w, hit_r;
      if (NB > 1) begin : g_dec
        assign hit_w = (waddr[AW-1:MAW] == (AW-MAW)'(b));
        assign hit_r = (raddr[r][AW-1:MAW] == (AW-MAW)'(b));
      end else begin : g_one
        assign hit_w = 1'b1;
        assign hit_r = 1'b1;
      end
      prf_sram #(.DEPTH(MD), .W(W)) u_sram (
        .clk  (clk),
        .we   (we && hit_w),
        .waddr(waddr[MAW-1:0]),
        .wdata(wdata),
        .re   (re[r] && hit_r),
        .raddr(raddr[r][MAW-1:0]),
        .rdata(bank_q[b])
      );
    end

    // remember which macro answers the read issued this cycle
    always_ff @(posedge clk) begin
      if (re[r]) bsel_q <= (NB > 1) ? BW'(raddr[r] >> MAW) : '0;
    end

    assign rdata[r] = bank_q[bsel_q];
  end

endmodule
