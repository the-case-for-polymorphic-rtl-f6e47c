// prf_system: the two PRF designs side by side.
//
// * u_prf: the general Polymorphic Register File parallel memory (prf_top),
//   128 x 128 64-bit elements in 2 x 4 modules, two read ports and one write
//   port, run-time selectable memory scheme; its ports are brought out
//   unchanged with a prf_ prefix. The kernel that uses it, the local store
//   that feeds it and the host are outside this design.
// * u_wavg: the small accelerator generated for the weighted-average
//   example (prf_wavg_accel), a stream register and a coefficient register
//   with 96-bit parallel interfaces feeding a three-tap kernel; its ports are
//   brought out with a wavg_ prefix.
// The two share only the clock and reset. Timing is that of the two blocks.
module prf_system
  import prf_pkg::*;
#(
  parameter int unsigned N  = 128,
  parameter int unsigned M  = 128,
  parameter int unsigned P  = 2,
  parameter int unsigned Q  = 4,
  parameter int unsigned W  = 64,
  parameter int unsigned NRD = 2,
  parameter int unsigned WAVG_W   = 32,
  parameter int unsigned WAVG_ROW = 64,
  localparam int unsigned L  = P * Q,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned JW = $clog2(M)
) (
  input  logic              clk,
  input  logic              rst_n,
  // general PRF
  input  scheme_e           prf_memory_scheme,
  input  logic              prf_wr_en,
  input  logic [IW-1:0]     prf_wr_i,
  input  logic [JW-1:0]     prf_wr_j,
  input  access_e           prf_wr_access,
  input  logic [W-1:0]      prf_data_in  [L],
  input  logic              prf_rd_en    [NRD],
  input  logic [IW-1:0]     prf_rd_i     [NRD],
  input  logic [JW-1:0]     prf_rd_j     [NRD],
  input  access_e           prf_rd_access[NRD],
  output logic [W-1:0]      prf_data_out [NRD][L],
  output logic              prf_rd_valid [NRD],
  // weighted-average example accelerator
  input  logic              wavg_pix_valid,
  input  logic [WAVG_W-1:0] wavg_pix,
  input  logic              wavg_k_we,
  input  logic [1:0]        wavg_k_waddr,
  input  logic [WAVG_W-1:0] wavg_k_wdata,
  output logic [WAVG_W-1:0] wavg_out,
  output logic              wavg_out_valid
);

  prf_top #(.N(N), .M(M), .P(P), .Q(Q), .W(W), .NRD(NRD)) u_prf (
    .clk          (clk),
    .rst_n        (rst_n),
    .memory_scheme(prf_memory_scheme),
    .wr_en        (prf_wr_en),
    .wr_i         (prf_wr_i),
    .wr_j         (prf_wr_j),
    .wr_access    (prf_wr_access),
    .prf_data_in  (prf_data_in),
    .rd_en        (prf_rd_en),
    .rd_i         (prf_rd_i),
    .rd_j         (prf_rd_j),
    .rd_access    (prf_rd_access),
    .prf_data_out (prf_data_out),
    .rd_valid     (prf_rd_valid)
  );

  prf_wavg_accel #(.W(WAVG_W), .ROW(WAVG_ROW)) u_wavg (
    .clk      (clk),
    .rst_n    (rst_n),
    .pix_valid(wavg_pix_valid),
    .pix      (wavg_pix),
    .k_we     (wavg_k_we),
    .k_waddr  (wavg_k_waddr),
    .k_wdata  (wavg_k_wdata),
    .out      (wavg_out),
    .out_valid(wavg_out_valid)
  );

endmodule
