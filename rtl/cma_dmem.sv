// cma_dmem: data memory of CMA-SOTB, built from registers.
//
// WORDS words of W bits (256 x 24 by default: the chip used flip-flops
// instead of an SRAM macro, which limited it to 256 words).  One synchronous
// write port and two combinational read ports: port A serves the
// controller's fetches, port B the host.  A read of the address being written
// returns the old word.  Contents are not reset.
module cma_dmem #(
  parameter int WORDS = cma_pkg::DMEM_DEPTH,
  parameter int W     = cma_pkg::DW,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [W-1:0]  rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [W-1:0]  rdata_b
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
