// cma_se: switching element for one interconnect channel of a PE.
//
// Each PE has two of these (SE_A and SE_B), one per channel of the
// island-style network.  A switching element takes the channel arriving from
// the south, west and east neighbours plus the PE's own ALU result and drives
// the channel towards the north, east and west, each output choosing its
// source from the static configuration.  The north output may take any of the
// four; the east output may not take the east input and the west output may
// not take the west input (no U-turns), which keeps every configuration free
// of combinational loops.  The east/west outputs can be idled at zero.
// Purely combinational.  The set of inputs follows the published description;
// the route encoding (cma_pkg::se_cfg_t) is this design's own.
module cma_se
  import cma_pkg::*;
#(
  parameter int W = cma_pkg::DW
) (
  input  se_cfg_t      cfg,
  input  logic [W-1:0] s_in,
  input  logic [W-1:0] w_in,
  input  logic [W-1:0] e_in,
  input  logic [W-1:0] alu,
  output logic [W-1:0] n_out,
  output logic [W-1:0] e_out,
  output logic [W-1:0] w_out
);

  always_comb begin
    unique case (cfg.n_sel)
      N_S:     n_out = s_in;
      N_W:     n_out = w_in;
      N_E:     n_out = e_in;
      default: n_out = alu;
    endcase
    unique case (cfg.e_sel)
      E_ZERO:  e_out = '0;
      E_S:     e_out = s_in;
      E_W:     e_out = w_in;
      default: e_out = alu;
    endcase
    unique case (cfg.w_sel)
      W_ZERO:  w_out = '0;
      W_S:     w_out = s_in;
      W_E:     w_out = e_in;
      default: w_out = alu;
    endcase
  end

endmodule
