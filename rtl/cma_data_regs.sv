// cma_data_regs: fetch (FR), launch (LR) and gather (GR) registers.
//
// These are the only registers on the data path of the PE array.
//  * FR: the controller writes one entry per cycle (fr_we, fr_idx,
//    fr_wdata) while it fetches the next input vector from the data memory.
//  * LR: on launch, every entry loads at once, from FR, or from GR for the
//    entries set in fb_mask (feedback lines).  LR drives the south edge of the
//    PE array, so a launch starts a new computation with all inputs set up
//    together.
//  * GR: on gather, every entry captures the PE array output.  The controller
//    reads one entry at a time through gr_idx/gr_rdata (combinational) to
//    write it back to memory.
// Because FR is separate from LR, fetching vector n+1 overlaps computing
// vector n.  Launch and gather in the same cycle are allowed: the launch then
// feeds back the GR value from before the gather.  LR/FR/GR and the feedback
// lines appear in the published block diagram; the exact load rules are this
// design's choice.  Reset clears all three.
module cma_data_regs
  import cma_pkg::*;
#(
  parameter int N  = cma_pkg::NIO,
  parameter int W  = cma_pkg::DW,
  parameter int IW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fr_we,
  input  logic [IW-1:0]        fr_idx,
  input  logic [W-1:0]         fr_wdata,
  input  logic                 launch,
  input  logic [N-1:0]         fb_mask,
  input  logic                 gather,
  input  logic [N-1:0][W-1:0]  arr_out,
  output logic [N-1:0][W-1:0]  lr_q,
  input  logic [IW-1:0]        gr_idx,
  output logic [W-1:0]         gr_rdata
);

  logic [N-1:0][W-1:0] fr_q, gr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fr_q <= '0;
      lr_q <= '0;
      gr_q <= '0;
    end else begin
      if (fr_we) fr_q[fr_idx] <= fr_wdata;
      if (launch) begin
        for (int j = 0; j < N; j++) lr_q[j] <= fb_mask[j] ? gr_q[j] : fr_q[j];
      end
      if (gather) gr_q <= arr_out;
    end
  end

  assign gr_rdata = gr_q[gr_idx];

endmodule
