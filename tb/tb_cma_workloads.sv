// tb_cma_workloads: the two image workloads, streamed through the whole
// accelerator at its default size.
//
//  * alpha: 8-bit alpha blend out = (3a + b) >> 2 of two 32x32 images
//    (1024 pixel pairs), 4 PEs per pixel, 4 pixels per vector (16 PEs).
//    The 256-word memory takes 64 pixel pairs and their 64 results per job,
//    so the image is streamed as 16 tiles.
//  * af: the same blend on 24-bit words holding three 8-bit pixels, per byte
//    ((a>>1)&7F7F7F) + ((a>>2)&3F3F3F) + ((b>>2)&3F3F3F), 8 PEs per word,
//    6 words per vector (48 PEs), on two images of 960 words (2880 pixels
//    each), streamed as 16 tiles of 60 words.
// Configuration is written once per workload; each tile is loaded through the
// host port, run, and read back.  Every result is compared with a value
// computed here, every job length with the controller's round formula, and
// the cycles spent in jobs are reported per image.
module tb_cma_workloads;
  import cma_pkg::*;
  localparam int W = 24;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic host_we = 0, start = 0;
  space_e host_space = SP_DMEM;
  logic [7:0] host_addr = 0, host_raddr = 0;
  logic [W-1:0] host_wdata = 0, host_rdata;
  logic busy, done;
  int job_cycles;

  cma_sotb_top dut (.clk, .rst_n, .host_we, .host_space, .host_addr, .host_wdata,
    .host_raddr, .host_rdata, .start, .busy, .done);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && busy) job_cycles++;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic hw(space_e sp, int a, logic [W-1:0] d);
    @(negedge clk); host_we = 1; host_space = sp; host_addr = 8'(a); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic rd(int a, output logic [W-1:0] v);
    host_raddr = 8'(a);
    #1;
    v = host_rdata;
  endtask

  task automatic pe(int r, int c, pe_cfg_t v);
    hw(SP_CFG, r*8 + c, W'(v));
  endtask

  task automatic clear_cfg();
    for (int i = 0; i < 64; i++) hw(SP_CFG, i, '0);
    for (int i = 0; i < 8; i++) hw(SP_CONST, i, '0);
  endtask

  // program the controller once per workload (offsets: in j, out j/2)
  task automatic program_ctrl(int in_stride, int out_base, int out_stride, int count, int delay,
                              logic [15:0] in_mask, logic [15:0] out_mask);
    for (int j = 0; j < 16; j++) begin
      hw(SP_CTRL, int'(R_IN_OFF0) + j, W'(j));
      hw(SP_CTRL, int'(R_OUT_OFF0) + j, W'(j / 2));
    end
    hw(SP_CTRL, R_IN_BASE, 0);             hw(SP_CTRL, R_IN_STRIDE, W'(in_stride));
    hw(SP_CTRL, R_OUT_BASE, W'(out_base)); hw(SP_CTRL, R_OUT_STRIDE, W'(out_stride));
    hw(SP_CTRL, R_COUNT, W'(count));       hw(SP_CTRL, R_DELAY, W'(delay));
    hw(SP_CTRL, R_IN_MASK, W'(in_mask));   hw(SP_CTRL, R_OUT_MASK, W'(out_mask));
    hw(SP_CTRL, R_FB_MASK, 0);
  endtask

  function automatic int job_length(int nin, int nout, int count, int delay);
    int t, f, s, d;
    t = (nin > 1) ? nin : 1;
    for (int r = 0; r <= count; r++) begin
      f = (r + 1 < count) ? nin : 0;
      s = (r >= 1) ? nout : 0;
      d = (r < count) ? delay : 0;
      if (s > f) f = s;
      if (d > f) f = d;
      if (f < 1) f = 1;
      t += 1 + f;
    end
    return t;
  endfunction

  task automatic run_job(int expect_len);
    int c0;
    c0 = job_cycles;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    fork
      begin wait (done); end
      begin repeat (20000) @(negedge clk); end
    join_any
    disable fork;
    @(negedge clk);
    checks++;
    if (job_cycles - c0 != expect_len) fail($sformatf("job took %0d cycles, expected %0d", job_cycles - c0, expect_len));
  endtask

  function automatic logic [W-1:0] af_ref(logic [W-1:0] a, logic [W-1:0] b);
    logic [W-1:0] ex;
    ex = 0;
    for (int k = 0; k < 3; k++) begin
      int ab, bb;
      ab = int'((a >> (8*k)) & 24'hff);
      bb = int'((b >> (8*k)) & 24'hff);
      ex |= W'((ab / 2 + ab / 4 + bb / 4) << (8*k));
    end
    return ex;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b, e;
    int alpha_cycles, af_cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- alpha: two 32x32 8-bit images ----------------
    clear_cfg();
    hw(SP_CONST, 1, 24'd1);
    hw(SP_CONST, 3, 24'd2);
    for (int c = 0; c < 4; c++) begin
      pe(0, c, '{op: OP_ADD, sel_a: SRC_S_A, sel_b: SRC_S_B, se_a: '{N_S, E_ZERO, W_ZERO}, se_b: '{N_ALU, E_ZERO, W_ZERO}});
      pe(1, c, '{op: OP_SLL, sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(2, c, '{op: OP_ADD, sel_a: SRC_S_A, sel_b: SRC_S_B, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(3, c, '{op: OP_SRL, sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
    end
    program_ctrl(8, 128, 4, 16, 2, 16'h00ff, 16'h0055);
    job_cycles = 0;
    for (int tile = 0; tile < 16; tile++) begin
      logic [W-1:0] pa [64], pb [64];
      for (int p = 0; p < 64; p++) begin
        // a smooth gradient image and a random one
        pa[p] = W'(((tile * 64 + p) * 7) % 256);
        pb[p] = W'($urandom % 256);
        hw(SP_DMEM, 2*p, pa[p]); hw(SP_DMEM, 2*p + 1, pb[p]);
      end
      run_job(job_length(8, 4, 16, 2));
      for (int p = 0; p < 64; p++) begin
        checks++;
        rd(128 + p, e);
        if (e !== ((3*pa[p] + pb[p]) >> 2)) fail($sformatf("alpha tile %0d pixel %0d: %h", tile, p, e));
      end
    end
    alpha_cycles = job_cycles;

    // ---------------- af: two images of 960 packed words ----------------
    clear_cfg();
    hw(SP_CONST, 0, 24'd2);
    hw(SP_CONST, 1, 24'h3f3f3f);
    hw(SP_CONST, 2, 24'd1);
    hw(SP_CONST, 3, 24'h7f7f7f);
    hw(SP_CONST, 5, 24'd1);
    hw(SP_CONST, 6, 24'h3f3f3f);
    for (int c = 0; c < 6; c++) begin
      pe(0, c, '{op: OP_SRL, sel_a: SRC_S_B, sel_b: SRC_CONST, se_a: '{N_S, E_ZERO, W_ZERO},   se_b: '{N_ALU, E_ZERO, W_ZERO}});
      pe(1, c, '{op: OP_AND, sel_a: SRC_S_B, sel_b: SRC_CONST, se_a: '{N_S, E_ZERO, W_ZERO},   se_b: '{N_ALU, E_ZERO, W_ZERO}});
      pe(2, c, '{op: OP_SRL, sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(3, c, '{op: OP_AND, sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(4, c, '{op: OP_ADD, sel_a: SRC_S_A, sel_b: SRC_S_B,   se_a: '{N_S, E_ZERO, W_ZERO},   se_b: '{N_ALU, E_ZERO, W_ZERO}});
      pe(5, c, '{op: OP_SRL, sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(6, c, '{op: OP_AND, sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(7, c, '{op: OP_ADD, sel_a: SRC_S_A, sel_b: SRC_S_B,   se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
    end
    program_ctrl(12, 128, 6, 10, 16, 16'h0fff, 16'h0555);
    job_cycles = 0;
    for (int tile = 0; tile < 16; tile++) begin
      logic [W-1:0] wa [60], wb [60];
      for (int p = 0; p < 60; p++) begin
        wa[p] = W'($urandom);
        wb[p] = (tile == 0 && p < 4) ? 24'hffffff : W'($urandom);
        hw(SP_DMEM, 2*p, wa[p]); hw(SP_DMEM, 2*p + 1, wb[p]);
      end
      run_job(job_length(12, 6, 10, 16));
      for (int p = 0; p < 60; p++) begin
        checks++;
        rd(128 + p, e);
        if (e !== af_ref(wa[p], wb[p])) fail($sformatf("af tile %0d word %0d: %h exp %h", tile, p, e, af_ref(wa[p], wb[p])));
      end
    end
    af_cycles = job_cycles;

    $display("alpha: 1024 pixels in %0d job cycles (16 PEs, memory-bound)", alpha_cycles);
    $display("af: 960 words (2880 pixels) in %0d job cycles (48 PEs, array-bound at DELAY=16)", af_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
