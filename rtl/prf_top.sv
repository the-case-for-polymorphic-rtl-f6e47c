// prf_top: Polymorphic Register File parallel memory.
//
// An N x M matrix of W-bit elements (128 x 128 x 64 bit = 128 KB by default)
// spread over p x q memory modules (2 x 4 = 8 by default) so that each port
// moves p*q elements, one per vector lane, in one clock cycle. A block is
// addressed by its upper-left element (i, j) and its shape: p x q rectangle,
// row, column, main or secondary diagonal, or q x p transposed rectangle.
// Which shapes are conflict-free depends on the parallel memory scheme
// (ReO, ReRo, ReCo, RoCo, ReTr), chosen by the scheme input (the document's
// prototypes use RoCo: rows and columns at any position plus aligned
// rectangles, which makes block transposition free).
//
// Ports: NRD read ports (standard addressing path, prf_read_port) and one
// write port (customized addressing path, prf_write_port), sharing the p*q
// prf_mem_module instances; each module keeps one copy of its data per read
// port. Lane n of a port carries the n-th element of the block as ordered by
// prf_agu.
// Timing: a write is stored at the rising edge that samples wr_en. A read
// sampled at edge t delivers rd_data/rd_valid after edge t+1. A read of
// data written in the same cycle returns the old contents. Reset (rst_n,
// active low, synchronous) clears only the valid flags; the storage is not
// initialised. Data written under one scheme must be read under the same
// scheme.
// Follows the document: geometry, default sizes, 2 read + 1 write ports,
// schemes, access types, module structure, full-crossbar shuffles, standard
// read / customized write addressing. This design's choices: lane order,
// coordinate wrap-around at the edges, handshake, reset and the enum codes.
// The special-purpose registers that define logical registers are not part
// of this block.
module prf_top
  import prf_pkg::*;
#(
  parameter int unsigned N           = 128,  // rows
  parameter int unsigned M           = 128,  // columns
  parameter int unsigned P           = 2,    // module rows
  parameter int unsigned Q           = 4,    // module columns
  parameter int unsigned W           = 64,   // sram_width, bits per element
  parameter int unsigned NRD         = 2,    // read ports
  parameter int unsigned MACRO_DEPTH = 256,  // words per SRAM macro
  localparam int unsigned L  = P * Q,        // n_lanes
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned JW = $clog2(M),
  localparam int unsigned AW = $clog2(N * M / L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  scheme_e       memory_scheme,
  // write port
  input  logic          wr_en,
  input  logic [IW-1:0] wr_i,
  input  logic [JW-1:0] wr_j,
  input  access_e       wr_access,
  input  logic [W-1:0]  prf_data_in  [L],
  // read ports
  input  logic          rd_en        [NRD],
  input  logic [IW-1:0] rd_i         [NRD],
  input  logic [JW-1:0] rd_j         [NRD],
  input  access_e       rd_access    [NRD],
  output logic [W-1:0]  prf_data_out [NRD][L],
  output logic          rd_valid     [NRD]
);

  // module side of the write port
  logic          m_we    [L];
  logic [AW-1:0] m_waddr [L];
  logic [W-1:0]  m_wdata [L];
  // module side of the read ports, [port][module]
  logic          m_re    [NRD][L];
  logic [AW-1:0] m_raddr [NRD][L];
  logic [W-1:0]  m_rdata [NRD][L];

  prf_write_port #(.N(N), .M(M), .P(P), .Q(Q), .W(W)) u_wr (
    .clk      (clk),
    .rst_n    (rst_n),
    .scheme   (memory_scheme),
    .we       (wr_en),
    .i        (wr_i),
    .j        (wr_j),
    .acc      (wr_access),
    .wdata    (prf_data_in),
    .mem_we   (m_we),
    .mem_waddr(m_waddr),
    .mem_wdata(m_wdata)
  );

  for (genvar r = 0; r < NRD; r++) begin : g_rd
    prf_read_port #(.N(N), .M(M), .P(P), .Q(Q), .W(W)) u_rd (
      .clk      (clk),
      .rst_n    (rst_n),
      .scheme   (memory_scheme),
      .re       (rd_en[r]),
      .i        (rd_i[r]),
      .j        (rd_j[r]),
      .acc      (rd_access[r]),
      .mem_re   (m_re[r]),
      .mem_raddr(m_raddr[r]),
      .mem_rdata(m_rdata[r]),
      .rdata    (prf_data_out[r]),
      .rvalid   (rd_valid[r])
    );
  end

  for (genvar m = 0; m < L; m++) begin : g_mod
    logic          re_m    [NRD];
    logic [AW-1:0] raddr_m [NRD];
    logic [W-1:0]  rdata_m [NRD];
    for (genvar r = 0; r < NRD; r++) begin : g_port
      assign re_m[r]       = m_re[r][m];
      assign raddr_m[r]    = m_raddr[r][m];
      assign m_rdata[r][m] = rdata_m[r];
    end
    prf_mem_module #(
      .DEPTH(N * M / L), .W(W), .NRD(NRD), .MACRO_DEPTH(MACRO_DEPTH)
    ) u_mem (
      .clk  (clk),
      .we   (m_we[m]),
      .waddr(m_waddr[m]),
      .wdata(m_wdata[m]),
      .re   (re_m),
      .raddr(raddr_m),
      .rdata(rdata_m)
    );
  end

endmodule
