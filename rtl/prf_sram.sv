// prf_sram: atomic storage element of the PRF, a dual-port register-file SRAM
// with one write port and one read port (256 words of 64 bits by default,
// the size of the macro the document's ASIC prototype uses).
//
// Write: when we is high the word wdata is stored at waddr on the rising
// clock edge. Read: when re is high, the word at raddr appears on rdata after
// the rising edge (one cycle latency) and is held while re is low. A read of
// the address written in the same cycle returns the old word. The contents
// are not reset. Port timing and read-during-write behaviour are this
// design's choices.
module prf_sram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
