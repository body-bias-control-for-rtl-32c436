// cma_cfg_regs: configuration and constant registers of the PE array.
//
// Holds one pe_cfg_t word per PE and one 24-bit constant per PE row.  The
// dataflow graph is mapped onto the array statically: these registers are
// written from outside before a job (the published chip places them in a
// clock region that runs only at initialisation) and then only read.  Here
// they sit on the common clock with a write enable, which behaves the same
// when no write happens during a job.
//
// Interface: one write per cycle, we/is_const/addr/wdata.  With is_const=0,
// addr = row*COLS + col selects a PE and wdata[21:0] is its configuration;
// with is_const=1, addr selects a row constant.  Writes to addresses beyond
// the array are ignored.  cfg and cnst are the register outputs, valid the
// cycle after a write.  Reset clears everything, which makes every PE pass
// zero.
module cma_cfg_regs
  import cma_pkg::*;
#(
  parameter int ROWS = cma_pkg::N_ROWS,
  parameter int COLS = cma_pkg::N_COLS,
  parameter int W    = cma_pkg::DW,
  parameter int ADDRW = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic              is_const,
  input  logic [ADDRW-1:0]  addr,
  input  logic [W-1:0]      wdata,
  output pe_cfg_t           cfg  [ROWS*COLS],
  output logic [W-1:0]      cnst [ROWS]
);

  localparam int RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int PW = (ROWS*COLS > 1) ? $clog2(ROWS*COLS) : 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ROWS*COLS; i++) cfg[i] <= '0;
      for (int i = 0; i < ROWS; i++)      cnst[i] <= '0;
    end else if (we) begin
      if (is_const) begin
        if (int'(addr) < ROWS) cnst[RW'(addr)] <= wdata;
      end else begin
        if (int'(addr) < ROWS*COLS) cfg[PW'(addr)] <= pe_cfg_t'(wdata[CFGW-1:0]);
      end
    end
  end

endmodule
