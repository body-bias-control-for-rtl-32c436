// cma_pe_array: the 8x8 combinational PE array of CMA-SOTB.
//
// PEs are placed in ROWS rows (PE_0 at the bottom) and COLS columns
// (COL_0 at the west).  Two interconnect channels run through every PE; each
// PE forwards them north, east and west through its switching elements.  In
// addition, every PE's ALU result is wired directly to the PE east of it and
// to the PE north-east of it (direct links).
//
// Edges: the launch register drives the south edge of row 0 (entry 2c is
// channel A and entry 2c+1 channel B of column c).  The north edge of the top
// row drives the gather register with the same numbering.  The west edge of
// column 0 and the east edge of the last column are tied to zero, as are
// direct links entering from outside the array.
//
// There is no clock: outputs settle a combinational delay after the inputs
// change, and the controller waits a programmed number of cycles before
// sampling them.  Each PE's wires live in its own generate scope so that
// every net has a single driver and the acyclic structure stays visible to
// tools.  The 8x8 size, the two channels and the east/north-east direct
// links follow the published design; the edge assignment is this design's
// reading of the block diagram.
module cma_pe_array
  import cma_pkg::*;
#(
  parameter int ROWS = cma_pkg::N_ROWS,
  parameter int COLS = cma_pkg::N_COLS,
  parameter int W    = cma_pkg::DW
) (
  input  pe_cfg_t                      cfg     [ROWS*COLS],
  input  logic [W-1:0]                 cnst    [ROWS],
  input  logic [2*COLS-1:0][W-1:0]     lr_data,
  output logic [2*COLS-1:0][W-1:0]     gr_data
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [NCH-1:0][W-1:0] s_in, w_in, e_in, n_out, e_out, w_out;
      logic [W-1:0]          dl_w, dl_sw, alu_out;

      // south
      if (r == 0) begin : g_s_edge
        assign s_in = {lr_data[2*c+1], lr_data[2*c]};
      end else begin : g_s_int
        assign s_in = g_row[r-1].g_col[c].n_out;
      end

      // west channels and direct links from the west / south-west
      if (c == 0) begin : g_w_edge
        assign w_in  = '0;
        assign dl_w  = '0;
        assign dl_sw = '0;
      end else begin : g_w_int
        assign w_in = g_row[r].g_col[c-1].e_out;
        assign dl_w = g_row[r].g_col[c-1].alu_out;
        if (r == 0) begin : g_sw_edge
          assign dl_sw = '0;
        end else begin : g_sw_int
          assign dl_sw = g_row[r-1].g_col[c-1].alu_out;
        end
      end

      // east channels
      if (c == COLS-1) begin : g_e_edge
        assign e_in = '0;
      end else begin : g_e_int
        assign e_in = g_row[r].g_col[c+1].w_out;
      end

      cma_pe #(.W(W)) u_pe (
        .cfg   (cfg[r*COLS+c]),
        .cnst  (cnst[r]),
        .s_in  (s_in),
        .w_in  (w_in),
        .e_in  (e_in),
        .dl_w  (dl_w),
        .dl_sw (dl_sw),
        .n_out (n_out),
        .e_out (e_out),
        .w_out (w_out),
        .alu_out(alu_out)
      );

      if (r == ROWS-1) begin : g_n_edge
        assign gr_data[2*c]   = n_out[0];
        assign gr_data[2*c+1] = n_out[1];
      end
    end
  end

endmodule
