// tb_cma_sotb_top: end-to-end test of the whole accelerator at its default
// size (8x8 PEs, 24-bit words, 256-word memory).
//
// Three jobs are loaded through the host port, run, and their results read
// back from the data memory and compared with values computed here:
//  1. Running sum with feedback: LR entry 0 is fed back from GR entry 0, so
//     each vector adds a new input to the previous result.  The sum travels
//     over a south-west direct link, then westward and eastward channels, to
//     two outputs.
//  2. "alpha": 8-bit alpha blend out = (3a + b) >> 2 of four pixel pairs per
//     vector, 4 PEs per pixel (16 PEs).  8 words in and 4 out per vector with
//     a short array delay, so memory traffic limits every round.
//  3. "af": the same blend on 24-bit words holding three 8-bit pixels, per
//     byte as ((a>>1)&7F7F7F) + ((a>>2)&3F3F3F) + ((b>>2)&3F3F3F), 8 PEs per
//     word and six words per vector (48 PEs), with a long array delay, so the
//     array limits every round.
// For each job the cycle count from start to done is checked against the
// controller's round formula.  The testbench counts memory-bound rounds,
// array-bound rounds, fetches overlapped with computation, feedback launches
// and host memory writes refused while busy; each must happen at least once.
module tb_cma_sotb_top;
  import cma_pkg::*;
  localparam int W = 24;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic host_we = 0, start = 0;
  space_e host_space = SP_DMEM;
  logic [7:0] host_addr = 0, host_raddr = 0;
  logic [W-1:0] host_wdata = 0, host_rdata;
  logic busy, done;

  cma_sotb_top dut (.clk, .rst_n, .host_we, .host_space, .host_addr, .host_wdata,
    .host_raddr, .host_rdata, .start, .busy, .done);

  always #5 clk = ~clk;

  int n_mem_bound = 0, n_arr_bound = 0, n_overlap = 0, n_fb_launch = 0, n_refused = 0;
  int cyc, last_launch, cur_delay;
  bit inflight = 0;

  always @(posedge clk) if (rst_n && busy) begin
    cyc++;
    if (dut.launch) begin
      last_launch = cyc;
      if (dut.fb_mask != '0) n_fb_launch++;
    end
    if (dut.gather) begin
      if (cyc - last_launch > cur_delay) n_mem_bound++; else n_arr_bound++;
    end
    if (dut.fr_we && inflight) n_overlap++;
    if (dut.launch) inflight = 1;
    if (dut.gather) inflight = 0;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic hw(space_e sp, int a, logic [W-1:0] d);
    @(negedge clk); host_we = 1; host_space = sp; host_addr = 8'(a); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic pe(int r, int c, pe_cfg_t v);
    hw(SP_CFG, r*8 + c, W'(v));
  endtask

  task automatic clear_cfg();
    for (int i = 0; i < 64; i++) hw(SP_CFG, i, '0);
    for (int i = 0; i < 8; i++) hw(SP_CONST, i, '0);
  endtask

  task automatic rd(int a, output logic [W-1:0] v);
    host_raddr = 8'(a);
    #1;
    v = host_rdata;
  endtask

  // program the controller and run one job; checks its length
  task automatic run(int in_base, int in_stride, int out_base, int out_stride, int count, int delay,
                     logic [15:0] in_mask, logic [15:0] out_mask, logic [15:0] fb_mask,
                     int in_off [16], int out_off [16]);
    int f, s, d, nin, nout, expect_cycles;
    for (int j = 0; j < 16; j++) begin
      hw(SP_CTRL, int'(R_IN_OFF0) + j, W'(in_off[j]));
      hw(SP_CTRL, int'(R_OUT_OFF0) + j, W'(out_off[j]));
    end
    hw(SP_CTRL, R_IN_BASE, W'(in_base));   hw(SP_CTRL, R_IN_STRIDE, W'(in_stride));
    hw(SP_CTRL, R_OUT_BASE, W'(out_base)); hw(SP_CTRL, R_OUT_STRIDE, W'(out_stride));
    hw(SP_CTRL, R_COUNT, W'(count));       hw(SP_CTRL, R_DELAY, W'(delay));
    hw(SP_CTRL, R_IN_MASK, W'(in_mask));   hw(SP_CTRL, R_OUT_MASK, W'(out_mask));
    hw(SP_CTRL, R_FB_MASK, W'(fb_mask));
    nin = $countones(in_mask); nout = $countones(out_mask);
    expect_cycles = (nin > 1) ? nin : 1;
    for (int r = 0; r <= count; r++) begin
      f = (r + 1 < count) ? nin : 0;
      s = (r >= 1) ? nout : 0;
      d = (r < count) ? delay : 0;
      if (s > f) f = s;
      if (d > f) f = d;
      if (f < 1) f = 1;
      expect_cycles += 1 + f;
    end
    cur_delay = delay; cyc = 0; last_launch = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // try to overwrite memory word 255 while the job runs: must be refused
    repeat (3) @(negedge clk);
    if (busy) begin
      hw(SP_DMEM, 255, 24'hdeadbe);
      n_refused++;
    end
    fork
      begin wait (done); end
      begin repeat (20000) @(negedge clk); end
    join_any
    disable fork;
    @(negedge clk);
    checks++;
    if (cyc != expect_cycles) fail($sformatf("job took %0d cycles, expected %0d", cyc, expect_cycles));
    $display("job: %0d vectors in %0d cycles", count, cyc);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int in_off [16], out_off [16];
    logic [W-1:0] x [16];
    logic [W-1:0] a, b, e, acc;
    logic [W-1:0] pix_a [64], pix_b [64], pk_a [10], pk_b [10];
    repeat (3) @(posedge clk);
    rst_n = 1;
    hw(SP_DMEM, 255, 24'h5a5a5a);

    // ---------------- job 1: running sum with feedback ----------------
    clear_cfg();
    // PE(0,0): acc + x
    pe(0, 0, '{op: OP_ADD, sel_a: SRC_S_A, sel_b: SRC_S_B, se_a: '{N_S, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
    // PE(1,1): takes the sum over the south-west direct link, sends it west and east on channel A
    pe(1, 1, '{op: OP_PASSA, sel_a: SRC_DL_SW, sel_b: SRC_ZERO, se_a: '{N_S, E_ALU, W_ALU}, se_b: '{N_S, E_ZERO, W_ZERO}});
    // PE(1,0): channel A from the east goes north (to GR[0])
    pe(1, 0, '{op: OP_PASSA, sel_a: SRC_ZERO, sel_b: SRC_ZERO, se_a: '{N_E, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
    // PE(1,2): channel A from the west goes north (to GR[4])
    pe(1, 2, '{op: OP_PASSA, sel_a: SRC_ZERO, sel_b: SRC_ZERO, se_a: '{N_W, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
    for (int v = 0; v < 16; v++) begin x[v] = W'($urandom % 100000); hw(SP_DMEM, v, x[v]); end
    foreach (in_off[j]) begin in_off[j] = 0; out_off[j] = 0; end
    out_off[4] = 1;
    run(0, 1, 32, 2, 16, 3, 16'h0002, 16'h0011, 16'h0001, in_off, out_off);
    acc = 0;
    for (int v = 0; v < 16; v++) begin
      acc = acc + x[v];
      checks += 2;
      rd(32 + 2*v, e);     if (e !== acc) fail($sformatf("sum[%0d] GR0 %h exp %h", v, e, acc));
      rd(32 + 2*v + 1, e); if (e !== acc) fail($sformatf("sum[%0d] GR4 %h exp %h", v, e, acc));
    end

    // ---------------- job 2: alpha, 8-bit blend ----------------
    clear_cfg();
    hw(SP_CONST, 1, 24'd1);
    hw(SP_CONST, 3, 24'd2);
    for (int c = 0; c < 4; c++) begin
      pe(0, c, '{op: OP_ADD, sel_a: SRC_S_A, sel_b: SRC_S_B, se_a: '{N_S, E_ZERO, W_ZERO}, se_b: '{N_ALU, E_ZERO, W_ZERO}});
      pe(1, c, '{op: OP_SLL, sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(2, c, '{op: OP_ADD, sel_a: SRC_S_A, sel_b: SRC_S_B, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(3, c, '{op: OP_SRL, sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
    end
    for (int p = 0; p < 64; p++) begin
      pix_a[p] = W'($urandom % 256); pix_b[p] = W'($urandom % 256);
      hw(SP_DMEM, 2*p, pix_a[p]); hw(SP_DMEM, 2*p + 1, pix_b[p]);
    end
    foreach (in_off[j]) begin in_off[j] = j; out_off[j] = j / 2; end
    run(0, 8, 128, 4, 16, 2, 16'h00ff, 16'h0055, 16'h0000, in_off, out_off);
    for (int p = 0; p < 64; p++) begin
      checks++;
      rd(128 + p, e);
      if (e !== ((3*pix_a[p] + pix_b[p]) >> 2)) fail($sformatf("alpha[%0d] %h exp %h", p, e, (3*pix_a[p] + pix_b[p]) >> 2));
    end
    checks++;
    rd(255, e);
    if (e !== 24'h5a5a5a) fail("host write accepted while busy");

    // ---------------- job 3: af, packed 24-bit RGB blend ----------------
    clear_cfg();
    hw(SP_CONST, 0, 24'd2);
    hw(SP_CONST, 1, 24'h3f3f3f);
    hw(SP_CONST, 2, 24'd1);
    hw(SP_CONST, 3, 24'h7f7f7f);
    hw(SP_CONST, 5, 24'd1);
    hw(SP_CONST, 6, 24'h3f3f3f);
    for (int c = 0; c < 6; c++) begin
      pe(0, c, '{op: OP_SRL,  sel_a: SRC_S_B, sel_b: SRC_CONST, se_a: '{N_S, E_ZERO, W_ZERO},   se_b: '{N_ALU, E_ZERO, W_ZERO}});
      pe(1, c, '{op: OP_AND,  sel_a: SRC_S_B, sel_b: SRC_CONST, se_a: '{N_S, E_ZERO, W_ZERO},   se_b: '{N_ALU, E_ZERO, W_ZERO}});
      pe(2, c, '{op: OP_SRL,  sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(3, c, '{op: OP_AND,  sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(4, c, '{op: OP_ADD,  sel_a: SRC_S_A, sel_b: SRC_S_B,   se_a: '{N_S, E_ZERO, W_ZERO},   se_b: '{N_ALU, E_ZERO, W_ZERO}});
      pe(5, c, '{op: OP_SRL,  sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(6, c, '{op: OP_AND,  sel_a: SRC_S_A, sel_b: SRC_CONST, se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
      pe(7, c, '{op: OP_ADD,  sel_a: SRC_S_A, sel_b: SRC_S_B,   se_a: '{N_ALU, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}});
    end
    for (int p = 0; p < 60; p++) begin
      a = W'($urandom); b = W'($urandom);
      hw(SP_DMEM, 2*p, a); hw(SP_DMEM, 2*p + 1, b);
      if (p < 10) begin pk_a[p] = a; pk_b[p] = b; end
      pix_a[p] = a; pix_b[p] = b;
    end
    foreach (in_off[j]) begin in_off[j] = j; out_off[j] = j / 2; end
    run(0, 12, 128, 6, 10, 16, 16'h0fff, 16'h0555, 16'h0000, in_off, out_off);
    for (int p = 0; p < 60; p++) begin
      logic [W-1:0] ex;
      ex = 0;
      for (int k = 0; k < 3; k++) begin
        int ab, bb;
        ab = int'((pix_a[p] >> (8*k)) & 24'hff);
        bb = int'((pix_b[p] >> (8*k)) & 24'hff);
        ex |= W'((ab / 2 + ab / 4 + bb / 4) << (8*k));
      end
      checks++;
      rd(128 + p, e);
      if (e !== ex) fail($sformatf("af[%0d] %h exp %h", p, e, ex));
    end

    // ---------------- mechanisms ----------------
    checks += 5;
    if (n_mem_bound == 0) fail("no memory-bound round");
    if (n_arr_bound == 0) fail("no array-bound round");
    if (n_overlap == 0)   fail("fetch never overlapped computation");
    if (n_fb_launch == 0) fail("feedback lines never used");
    if (n_refused == 0)   fail("no host write attempted while busy");
    $display("memory-bound rounds=%0d array-bound rounds=%0d overlapped fetches=%0d feedback launches=%0d refused host writes=%0d",
             n_mem_bound, n_arr_bound, n_overlap, n_fb_launch, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
