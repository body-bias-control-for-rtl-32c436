// cma_sotb_top: the CMA-SOTB coarse-grained reconfigurable accelerator.
//
// Two cores sit side by side.  The PE array core is an 8x8 array of purely
// combinational processing elements (cma_pe_array) with its configuration and
// constant registers (cma_cfg_regs); it holds no data registers, so its
// energy goes into computing rather than clocking.  The controller core holds
// the 256-word register data memory (cma_dmem), the fetch/launch/gather
// registers around the array (cma_data_regs) and the data-management
// controller (cma_uctrl) that streams vectors from memory through the array
// and back.  On the chip the two cores have separate body-bias wells, so the
// speed and leakage of each can be traded independently; the cores are kept
// as separate instances here for the same reason, and the bias itself is
// analog and not part of the RTL.
//
// Host port (single cycle, active-high strobes):
//   host_we, host_space, host_addr, host_wdata:
//     space 0 DMEM word (ignored while busy), space 1 PE configuration
//     (addr = row*8 + col, wdata[21:0] = pe_cfg_t), space 2 row constant,
//     space 3 controller register (map in cma_pkg, ignored while busy).
//   host_raddr -> host_rdata: combinational DMEM read.
//   start: begins the programmed job; busy stays high until it ends and done
//   pulses for one cycle.
// Timing of a job is given in cma_uctrl.  All sizes follow the published chip
// (8x8 PEs, 24-bit words, 256 words of memory); the host port is this
// design's own.
module cma_sotb_top
  import cma_pkg::*;
#(
  parameter int ROWS       = cma_pkg::N_ROWS,
  parameter int COLS       = cma_pkg::N_COLS,
  parameter int W          = cma_pkg::DW,
  parameter int DMEM_WORDS = cma_pkg::DMEM_DEPTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          host_we,
  input  space_e        host_space,
  input  logic [7:0]    host_addr,
  input  logic [W-1:0]  host_wdata,
  input  logic [7:0]    host_raddr,
  output logic [W-1:0]  host_rdata,
  input  logic          start,
  output logic          busy,
  output logic          done
);

  localparam int NIOL = 2 * COLS;
  localparam int IW   = $clog2(NIOL);
  localparam int AWL  = $clog2(DMEM_WORDS);

  // ---------------- PE array core ----------------
  pe_cfg_t                  cfg  [ROWS*COLS];
  logic [W-1:0]             cnst [ROWS];
  logic [NIOL-1:0][W-1:0]   lr_q, arr_out;

  cma_cfg_regs #(.ROWS(ROWS), .COLS(COLS), .W(W), .ADDRW(8)) u_cfg (
    .clk, .rst_n,
    .we      (host_we && (host_space == SP_CFG || host_space == SP_CONST)),
    .is_const(host_space == SP_CONST),
    .addr    (host_addr),
    .wdata   (host_wdata),
    .cfg, .cnst
  );

  cma_pe_array #(.ROWS(ROWS), .COLS(COLS), .W(W)) u_array (
    .cfg, .cnst, .lr_data(lr_q), .gr_data(arr_out)
  );

  // ---------------- controller core ----------------
  logic [AWL-1:0] c_raddr, c_waddr;
  logic [W-1:0]   c_rdata, gr_rdata;
  logic           c_we, fr_we, launch, gather;
  logic [IW-1:0]  fr_idx, gr_idx;
  logic [NIOL-1:0] fb_mask;
  logic           m_we;
  logic [AWL-1:0] m_waddr;
  logic [W-1:0]   m_wdata;

  cma_uctrl #(.N(NIOL), .AW(AWL), .W(W)) u_ctrl (
    .clk, .rst_n,
    .reg_we   (host_we && host_space == SP_CTRL),
    .reg_addr (host_addr[5:0]),
    .reg_wdata(host_wdata),
    .start, .busy, .done,
    .dmem_raddr(c_raddr),
    .dmem_we   (c_we),
    .dmem_waddr(c_waddr),
    .fr_we, .fr_idx, .launch, .fb_mask, .gather, .gr_idx
  );

  cma_data_regs #(.N(NIOL), .W(W)) u_regs (
    .clk, .rst_n,
    .fr_we, .fr_idx, .fr_wdata(c_rdata),
    .launch, .fb_mask,
    .gather, .arr_out,
    .lr_q,
    .gr_idx, .gr_rdata
  );

  // memory write port: controller while busy, host otherwise
  always_comb begin
    if (busy) begin
      m_we    = c_we;
      m_waddr = c_waddr;
      m_wdata = gr_rdata;
    end else begin
      m_we    = host_we && host_space == SP_DMEM;
      m_waddr = AWL'(host_addr);
      m_wdata = host_wdata;
    end
  end

  cma_dmem #(.WORDS(DMEM_WORDS), .W(W), .AW(AWL)) u_dmem (
    .clk,
    .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .raddr_a(c_raddr), .rdata_a(c_rdata),
    .raddr_b(AWL'(host_raddr)), .rdata_b(host_rdata)
  );

endmodule
