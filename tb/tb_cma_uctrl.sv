// tb_cma_uctrl: self-checking test of the data-management controller.
// Random jobs (base, stride, count, delay, masks, offset mappings) are
// programmed and run.  The testbench builds the expected list of fetches
// (FR entry and memory address) and stores (GR entry and memory address)
// from the mapping formulas and compares every memory access against it.  It
// also checks the pipelining rules (vector k is fully fetched before launch
// k; launch k+1 only after gather k; gather k at least DELAY cycles after
// launch k; result k stored only after gather k and before gather k+1), the
// number of launches and gathers, and the job length
//   max(fetch words,1) + sum over rounds of (1 + max(fetch, store, delay, 1)).
// Rounds limited by memory traffic and rounds limited by the array delay are
// counted; both must occur.
module tb_cma_uctrl;
  import cma_pkg::*;
  localparam int N = 16, AW = 8, W = 24;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic reg_we = 0, start = 0;
  logic [5:0] reg_addr = 0;
  logic [W-1:0] reg_wdata = 0;
  logic busy, done, dmem_we, fr_we, launch, gather;
  logic [AW-1:0] dmem_raddr, dmem_waddr;
  logic [3:0] fr_idx, gr_idx;
  logic [N-1:0] fb_mask;

  cma_uctrl #(.N(N), .AW(AW), .W(W)) dut (.clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .start, .busy, .done,
    .dmem_raddr, .dmem_we, .dmem_waddr, .fr_we, .fr_idx, .launch, .fb_mask, .gather, .gr_idx);

  always #5 clk = ~clk;

  // expected access lists: {vector, entry, address}
  typedef struct { int vec; int idx; int addr; } acc_t;
  acc_t exp_fetch [$];
  acc_t exp_store [$];
  int n_launch, n_gather, cyc, last_launch_cyc, mem_bound, cmp_bound;
  int fetched_upto;   // vectors completely fetched
  int stored_upto;    // results completely stored
  int in_cnt, out_cnt, cur_delay, cur_count;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
  endtask

  task automatic wr(logic [5:0] a, int v);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = W'(v);
    @(negedge clk); reg_we = 0;
  endtask

  // per-cycle monitor
  always @(posedge clk) if (rst_n && busy) begin
    cyc++;
    if (fr_we) begin
      acc_t e;
      checks++;
      if (exp_fetch.size() == 0) fail("unexpected fetch");
      else begin
        e = exp_fetch.pop_front();
        if (int'(fr_idx) != e.idx || int'(dmem_raddr) != e.addr)
          fail($sformatf("fetch idx=%0d addr=%0d exp idx=%0d addr=%0d", fr_idx, dmem_raddr, e.idx, e.addr));
        if (e.vec > n_launch + 1) fail("fetch runs more than one vector ahead");
      end
    end
    if (dmem_we) begin
      acc_t e;
      checks++;
      if (exp_store.size() == 0) fail("unexpected store");
      else begin
        e = exp_store.pop_front();
        if (int'(gr_idx) != e.idx || int'(dmem_waddr) != e.addr)
          fail($sformatf("store idx=%0d addr=%0d exp idx=%0d addr=%0d", gr_idx, dmem_waddr, e.idx, e.addr));
        if (e.vec >= n_gather) fail("result stored before it was gathered");
      end
    end
    if (launch) begin
      checks++;
      // every fetch of vector n_launch must be done
      if (exp_fetch.size() != 0 && exp_fetch[0].vec <= n_launch) fail("launch before its vector was fetched");
      if (n_launch != n_gather) fail("launch before previous gather");
      last_launch_cyc = cyc;
      n_launch++;
    end
    if (gather) begin
      checks++;
      if (cyc - last_launch_cyc < cur_delay) fail($sformatf("gather %0d cycles after launch, delay %0d", cyc - last_launch_cyc, cur_delay));
      if (exp_store.size() != 0 && exp_store[0].vec < n_gather) fail("gather before previous result stored");
      if (cyc - last_launch_cyc > cur_delay && cyc - last_launch_cyc > 1) mem_bound++; else cmp_bound++;
      n_gather++;
    end
  end

  task automatic run_job(int in_base, int in_stride, int out_base, int out_stride, int count, int delay,
                         logic [N-1:0] in_mask, logic [N-1:0] out_mask);
    int in_off [N], out_off [N];
    int expect_cycles, f, s, d, t0;
    for (int j = 0; j < N; j++) begin
      in_off[j] = $urandom % 256; out_off[j] = $urandom % 256;
      wr(R_IN_OFF0 + 6'(j), in_off[j]);
      wr(R_OUT_OFF0 + 6'(j), out_off[j]);
    end
    wr(R_IN_BASE, in_base); wr(R_IN_STRIDE, in_stride);
    wr(R_OUT_BASE, out_base); wr(R_OUT_STRIDE, out_stride);
    wr(R_COUNT, count); wr(R_DELAY, delay);
    wr(R_IN_MASK, int'(in_mask)); wr(R_OUT_MASK, int'(out_mask)); wr(R_FB_MASK, 0);
    exp_fetch.delete(); exp_store.delete();
    in_cnt = $countones(in_mask); out_cnt = $countones(out_mask);
    for (int v = 0; v < count; v++)
      for (int j = 0; j < N; j++) begin
        if (in_mask[j])  exp_fetch.push_back('{v, j, (in_base + v*in_stride + in_off[j]) % 256});
        if (out_mask[j]) exp_store.push_back('{v, j, (out_base + v*out_stride + out_off[j]) % 256});
      end
    // expected length
    expect_cycles = (count == 0) ? 0 : ((in_cnt > 1) ? in_cnt : 1);
    for (int r = 0; r <= count && count > 0; r++) begin
      f = (r + 1 < count) ? in_cnt : 0;
      s = (r >= 1) ? out_cnt : 0;
      d = (r < count) ? ((delay > 1) ? delay : 1) : 0;
      expect_cycles += 1 + ((f > s ? f : s) > d ? (f > s ? f : s) : (d > 1 ? d : 1));
    end
    cur_delay = (delay > 1) ? delay : 1; cur_count = count;
    n_launch = 0; n_gather = 0; cyc = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = 0;
    while (!done) begin @(negedge clk); t0++; if (t0 > 100000) break; end
    checks += 5;
    if (busy) fail("busy after done");
    if (cyc != expect_cycles) fail($sformatf("job took %0d cycles, expected %0d", cyc, expect_cycles));
    if (n_launch != count) fail($sformatf("%0d launches, expected %0d", n_launch, count));
    if (n_gather != count) fail($sformatf("%0d gathers, expected %0d", n_gather, count));
    if (exp_fetch.size() != 0 || exp_store.size() != 0) fail("accesses missing");
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // memory-bound job: 6 inputs, 3 outputs, delay 2
    run_job(0, 6, 128, 3, 5, 2, 16'h003f, 16'h0007);
    // array-bound job: 2 inputs, 1 output, delay 9
    run_job(10, 2, 200, 1, 7, 9, 16'h0003, 16'h0001);
    // single vector, no outputs
    run_job(3, 1, 50, 1, 1, 1, 16'h8001, 16'h0000);
    // empty job ends at once
    run_job(0, 1, 0, 1, 0, 4, 16'hffff, 16'hffff);
    for (int n = 0; n < 30; n++)
      run_job($urandom % 256, $urandom % 8, $urandom % 256, $urandom % 8, 1 + $urandom % 12,
              $urandom % 20, N'($urandom), N'($urandom));
    // registers are frozen while a job runs: rewriting COUNT mid-job must not matter
    fork
      run_job(0, 4, 100, 4, 6, 3, 16'h000f, 16'h000f);
      begin wait (busy); repeat (3) @(negedge clk); reg_we = 1; reg_addr = R_COUNT; reg_wdata = 24'd1; @(negedge clk); reg_we = 0; end
    join
    checks += 2;
    if (mem_bound == 0) fail("no memory-bound round");
    if (cmp_bound == 0) fail("no array-bound round");
    $display("memory-bound rounds=%0d array-bound rounds=%0d", mem_bound, cmp_bound);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
