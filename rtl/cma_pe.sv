// cma_pe: one processing element of the CMA PE array.
//
// A PE is combinational logic only: two operand selectors (SEL_A, SEL_B)
// choose the ALU operands, the ALU computes, and two switching elements
// (SE_A for channel A, SE_B for channel B) forward the channels arriving from
// the south, west and east, or the ALU result, to the north, east and west
// neighbours.  The ALU result also leaves on the direct links to the east and
// north-east PEs (alu_out).  Everything is set by the static configuration
// word cfg (cma_pkg::pe_cfg_t) and, for SRC_CONST, the constant register of
// the PE's row.
//
// Operand sources are limited to signals arriving from the south or west
// (south channels, eastward-travelling west channels, direct links from the
// west and south-west PEs, the row constant, zero).  Together with the
// no-U-turn rule of the switching elements this means no configuration can
// close a combinational loop.  The PE structure (ALU, SEL_A/B, SE_A/B, direct
// links) follows the published block diagram; the operand-source list is this
// design's choice.
module cma_pe
  import cma_pkg::*;
#(
  parameter int W = cma_pkg::DW
) (
  input  pe_cfg_t                 cfg,
  input  logic [W-1:0]            cnst,
  input  logic [NCH-1:0][W-1:0]   s_in,
  input  logic [NCH-1:0][W-1:0]   w_in,
  input  logic [NCH-1:0][W-1:0]   e_in,
  input  logic [W-1:0]            dl_w,
  input  logic [W-1:0]            dl_sw,
  output logic [NCH-1:0][W-1:0]   n_out,
  output logic [NCH-1:0][W-1:0]   e_out,
  output logic [NCH-1:0][W-1:0]   w_out,
  output logic [W-1:0]            alu_out
);

  logic [W-1:0] opa, opb;

  function automatic logic [W-1:0] pick(src_e sel, logic [NCH-1:0][W-1:0] s,
                                        logic [NCH-1:0][W-1:0] w,
                                        logic [W-1:0] dw, logic [W-1:0] dsw,
                                        logic [W-1:0] c);
    unique case (sel)
      SRC_ZERO:  return '0;
      SRC_S_A:   return s[0];
      SRC_S_B:   return s[1];
      SRC_W_A:   return w[0];
      SRC_W_B:   return w[1];
      SRC_DL_W:  return dw;
      SRC_DL_SW: return dsw;
      default:   return c;
    endcase
  endfunction

  assign opa = pick(cfg.sel_a, s_in, w_in, dl_w, dl_sw, cnst);   // SEL_A
  assign opb = pick(cfg.sel_b, s_in, w_in, dl_w, dl_sw, cnst);   // SEL_B

  cma_alu #(.W(W)) u_alu (.op(cfg.op), .a(opa), .b(opb), .y(alu_out));

  cma_se #(.W(W)) u_se_a (
    .cfg(cfg.se_a), .s_in(s_in[0]), .w_in(w_in[0]), .e_in(e_in[0]), .alu(alu_out),
    .n_out(n_out[0]), .e_out(e_out[0]), .w_out(w_out[0])
  );

  cma_se #(.W(W)) u_se_b (
    .cfg(cfg.se_b), .s_in(s_in[1]), .w_in(w_in[1]), .e_in(e_in[1]), .alu(alu_out),
    .n_out(n_out[1]), .e_out(e_out[1]), .w_out(w_out[1])
  );

endmodule
