// tb_cma_cfg_regs: self-checking test of the configuration/constant registers.
// Checks reset to zero, random writes of PE configurations and row constants
// against a testbench copy, and that out-of-range addresses change nothing.
module tb_cma_cfg_regs;
  import cma_pkg::*;
  localparam int ROWS = 8, COLS = 8, W = 24;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0, is_const = 0;
  logic [5:0] addr = 0;
  logic [W-1:0] wdata = 0;
  pe_cfg_t cfg [ROWS*COLS];
  logic [W-1:0] cnst [ROWS];
  logic [CFGW-1:0] m_cfg [ROWS*COLS];
  logic [W-1:0] m_cnst [ROWS];

  cma_cfg_regs #(.ROWS(ROWS), .COLS(COLS), .W(W), .ADDRW(6)) dut (.clk, .rst_n, .we, .is_const, .addr, .wdata, .cfg, .cnst);

  always #5 clk = ~clk;

  task automatic compare_all();
    for (int i = 0; i < ROWS*COLS; i++) begin
      checks++;
      if (cfg[i] !== m_cfg[i]) begin failures++; $display("FAIL cfg[%0d]=%h exp %h", i, cfg[i], m_cfg[i]); end
    end
    for (int i = 0; i < ROWS; i++) begin
      checks++;
      if (cnst[i] !== m_cnst[i]) begin failures++; $display("FAIL cnst[%0d]=%h exp %h", i, cnst[i], m_cnst[i]); end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_cfg[i]) m_cfg[i] = '0;
    foreach (m_cnst[i]) m_cnst[i] = '0;
    repeat (2) @(posedge clk);
    #1 compare_all();
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = 1'($urandom); is_const = 1'($urandom); addr = 6'($urandom); wdata = W'($urandom);
      @(posedge clk); #1;
      if (we) begin
        if (is_const) begin if (addr < ROWS) m_cnst[addr[2:0]] = wdata; end
        else m_cfg[addr] = wdata[CFGW-1:0];
      end
      if (n % 50 == 0) compare_all();
    end
    compare_all();
    // reset clears
    rst_n = 0; #1 foreach (m_cfg[i]) m_cfg[i] = '0; foreach (m_cnst[i]) m_cnst[i] = '0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
