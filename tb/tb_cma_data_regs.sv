// tb_cma_data_regs: self-checking test of the fetch/launch/gather registers.
// Random FR writes, launches with random feedback masks and gathers of random
// array outputs are applied, sometimes in the same cycle; LR and every GR
// entry are compared with a testbench model after each cycle (three GR entries per
// cycle, one of them walking through all entries).
module tb_cma_data_regs;
  localparam int N = 16, W = 24, IW = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic fr_we = 0, launch = 0, gather = 0;
  logic [IW-1:0] fr_idx = 0, gr_idx = 0;
  logic [W-1:0] fr_wdata = 0, gr_rdata;
  logic [N-1:0] fb_mask = 0;
  logic [N-1:0][W-1:0] arr_out = '0, lr_q;
  logic [W-1:0] m_fr [N], m_lr [N], m_gr [N];
  int n_fb = 0;

  cma_data_regs #(.N(N), .W(W)) dut (.clk, .rst_n, .fr_we, .fr_idx, .fr_wdata, .launch, .fb_mask,
    .gather, .arr_out, .lr_q, .gr_idx, .gr_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N; j++) begin m_fr[j] = 0; m_lr[j] = 0; m_gr[j] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      fr_we = 1'($urandom); fr_idx = IW'($urandom); fr_wdata = W'($urandom);
      launch = ($urandom % 4) == 0; fb_mask = N'($urandom);
      gather = ($urandom % 4) == 0;
      for (int j = 0; j < N; j++) arr_out[j] = W'($urandom);
      @(posedge clk); #1;
      if (launch) for (int j = 0; j < N; j++) begin
        m_lr[j] = fb_mask[j] ? m_gr[j] : m_fr[j];
        if (fb_mask[j]) n_fb++;
      end
      if (gather) for (int j = 0; j < N; j++) m_gr[j] = arr_out[j];
      if (fr_we) m_fr[fr_idx] = fr_wdata;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (lr_q[j] !== m_lr[j]) begin failures++; if (failures < 10) $display("FAIL lr[%0d]", j); end
      end
      for (int k = 0; k < 3; k++) begin
        int j;
        j = (k == 0) ? (n % N) : int'($urandom % N);
        gr_idx = IW'(j); #1;
        checks++;
        if (gr_rdata !== m_gr[j]) begin failures++; if (failures < 10) $display("FAIL gr[%0d]", j); end
      end
    end
    checks++;
    if (n_fb == 0) begin failures++; $display("FAIL feedback never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
