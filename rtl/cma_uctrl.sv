// cma_uctrl: data-management controller (the "microcontroller" of CMA).
//
// It moves data between the data memory and the PE array: for each of COUNT
// iterations it reads an input vector from memory into the fetch register
// (FR), launches it into the launch register (LR) that feeds the array,
// waits DELAY cycles for the combinational array to settle, captures the
// array outputs in the gather register (GR), and writes the selected GR
// entries back to memory.  The work is pipelined in rounds: round r launches
// vector r, then, at the same time, fetches vector r+1, writes back result
// r-1 and lets the array compute; at the end of the round result r is
// gathered.  A round therefore lasts
//     1 + max(fetch words, store words, DELAY, 1) cycles,
// so a job is limited either by memory traffic or by the array delay,
// whichever is larger.  A prologue of max(fetch words, 1) cycles fetches
// vector 0, and a final round only writes back the last result.
//
// Mapping registers: entry j of FR is loaded (if IN_MASK[j]) from
//     IN_BASE + r*IN_STRIDE + IN_OFF[j]
// and entry j of GR is stored (if OUT_MASK[j]) to
//     OUT_BASE + r*OUT_STRIDE + OUT_OFF[j]   (addresses wrap at 2^AW).
// Entries with FB_MASK[j] set load LR from GR instead of FR (feedback).
// Registers are written through reg_we/reg_addr/reg_wdata (map in cma_pkg)
// and only while idle.  One memory read and one memory write per cycle,
// lowest entry first.  start is taken while idle; busy is high until the
// job ends and done pulses for one cycle the cycle after the last round.
//
// The published controller is a small microcontroller using "mapping
// registers and vector operations"; its instruction set is not published,
// so this design implements only that vector-transfer function as a
// sequencer.  All formats and timings here are this design's own.
module cma_uctrl
  import cma_pkg::*;
#(
  parameter int N  = cma_pkg::NIO,
  parameter int AW = cma_pkg::DMEM_AW,
  parameter int W  = cma_pkg::DW,
  parameter int IW = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  // register programming
  input  logic           reg_we,
  input  logic [5:0]     reg_addr,
  input  logic [W-1:0]   reg_wdata,
  // job control
  input  logic           start,
  output logic           busy,
  output logic           done,
  // data memory
  output logic [AW-1:0]  dmem_raddr,
  output logic           dmem_we,
  output logic [AW-1:0]  dmem_waddr,
  // FR / LR / GR control
  output logic           fr_we,
  output logic [IW-1:0]  fr_idx,
  output logic           launch,
  output logic [N-1:0]   fb_mask,
  output logic           gather,
  output logic [IW-1:0]  gr_idx
);

  typedef enum logic [1:0] {S_IDLE, S_PRO, S_START, S_RUN} state_e;

  // programmable registers
  logic [AW-1:0] in_base, in_stride, out_base, out_stride;
  logic [15:0]   count;
  logic [7:0]    delay;
  logic [N-1:0]  in_mask, out_mask;
  logic [AW-1:0] in_off  [N];
  logic [AW-1:0] out_off [N];

  // sequencing state
  state_e        state;
  logic [15:0]   rnd;
  logic [N-1:0]  pend_in, pend_out;
  logic [7:0]    timer;
  logic [AW-1:0] in_ptr, out_ptr;

  // lowest set bit of a mask
  function automatic logic [IW-1:0] lowest(logic [N-1:0] m);
    lowest = '0;
    for (int i = N-1; i >= 0; i--) if (m[i]) lowest = IW'(i);
  endfunction

  logic          do_fetch, do_store, last_in, last_out, fin;
  logic [IW-1:0] in_j, out_j;
  logic          more_fetch, have_store, have_vec;

  assign in_j      = lowest(pend_in);
  assign out_j     = lowest(pend_out);
  assign do_fetch  = (state == S_PRO || state == S_RUN) && (pend_in != '0);
  assign do_store  = (state == S_RUN) && (pend_out != '0);
  assign last_in   = (pend_in  & (pend_in  - 1'b1)) == '0;
  assign last_out  = (pend_out & (pend_out - 1'b1)) == '0;
  assign fin       = (state == S_RUN) && last_in && last_out && (timer == '0);

  assign have_vec   = rnd < count;             // round launches a vector
  assign more_fetch = (rnd + 16'd1) < count;   // a next vector exists
  assign have_store = rnd != '0;               // a previous result exists

  assign dmem_raddr = in_ptr + in_off[in_j];
  assign fr_we      = do_fetch;
  assign fr_idx     = in_j;
  assign dmem_we    = do_store;
  assign dmem_waddr = out_ptr + out_off[out_j];
  assign gr_idx     = out_j;
  assign launch     = (state == S_START) && have_vec;
  assign gather     = fin && have_vec;
  assign busy       = state != S_IDLE;

  // register writes (idle only)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_base <= '0; in_stride <= '0; out_base <= '0; out_stride <= '0;
      count <= '0; delay <= 8'd1;
      in_mask <= '0; out_mask <= '0; fb_mask <= '0;
      for (int j = 0; j < N; j++) begin
        in_off[j]  <= '0;
        out_off[j] <= '0;
      end
    end else if (reg_we && state == S_IDLE) begin
      unique case (reg_addr)
        R_IN_BASE:    in_base    <= reg_wdata[AW-1:0];
        R_IN_STRIDE:  in_stride  <= reg_wdata[AW-1:0];
        R_OUT_BASE:   out_base   <= reg_wdata[AW-1:0];
        R_OUT_STRIDE: out_stride <= reg_wdata[AW-1:0];
        R_COUNT:      count      <= reg_wdata[15:0];
        R_DELAY:      delay      <= reg_wdata[7:0];
        R_IN_MASK:    in_mask    <= reg_wdata[N-1:0];
        R_OUT_MASK:   out_mask   <= reg_wdata[N-1:0];
        R_FB_MASK:    fb_mask    <= reg_wdata[N-1:0];
        default: begin
          if (reg_addr >= R_IN_OFF0 && reg_addr < R_IN_OFF0 + 6'(N))
            in_off[IW'(reg_addr - R_IN_OFF0)] <= reg_wdata[AW-1:0];
          else if (reg_addr >= R_OUT_OFF0 && reg_addr < R_OUT_OFF0 + 6'(N))
            out_off[IW'(reg_addr - R_OUT_OFF0)] <= reg_wdata[AW-1:0];
        end
      endcase
    end
  end

  // sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      rnd      <= '0;
      pend_in  <= '0;
      pend_out <= '0;
      timer    <= '0;
      in_ptr   <= '0;
      out_ptr  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (do_fetch) pend_in[in_j]   <= 1'b0;
      if (do_store) pend_out[out_j] <= 1'b0;
      if (timer != '0 && state == S_RUN) timer <= timer - 8'd1;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            if (count == '0) begin
              done <= 1'b1;
            end else begin
              state   <= S_PRO;
              rnd     <= '0;
              pend_in <= in_mask;
              in_ptr  <= in_base;
              out_ptr <= out_base;
            end
          end
        end
        S_PRO: begin
          if (last_in) state <= S_START;
        end
        S_START: begin
          pend_in  <= more_fetch ? in_mask : '0;
          if (more_fetch) in_ptr <= in_ptr + in_stride;
          pend_out <= have_store ? out_mask : '0;
          timer    <= (have_vec && delay > 8'd1) ? delay - 8'd1 : 8'd0;
          state    <= S_RUN;
        end
        S_RUN: begin
          if (fin) begin
            if (have_store) out_ptr <= out_ptr + out_stride;
            rnd <= rnd + 16'd1;
            if (rnd == count) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_START;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // FR is never written in a launch cycle, and memory traffic only flows
  // while a job runs.
  a_no_fetch_at_launch: assert property (@(posedge clk) disable iff (!rst_n) !(launch && fr_we));
  a_idle_quiet: assert property (@(posedge clk) disable iff (!rst_n) !busy |-> !(fr_we || dmem_we || launch || gather));

endmodule
