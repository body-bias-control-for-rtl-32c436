// tb_cma_dmem: self-checking test of the 256 x 24 register data memory.
// Random writes are mirrored in a testbench array; both read ports are
// compared against it every cycle, including read-during-write (old data).
module tb_cma_dmem;
  localparam int WORDS = 256, W = 24, AW = 8;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we;
  logic [AW-1:0] waddr, raddr_a, raddr_b;
  logic [W-1:0] wdata, rdata_a, rdata_b;
  logic [W-1:0] model [WORDS];

  cma_dmem #(.WORDS(WORDS), .W(W), .AW(AW)) dut (.clk, .we, .waddr, .wdata,
    .raddr_a, .rdata_a, .raddr_b, .rdata_b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr_a = 0; raddr_b = 0;
    // fill every word
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = W'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = AW'($urandom); wdata = W'($urandom);
      raddr_a = AW'($urandom); raddr_b = (n % 3 == 0) ? waddr : AW'($urandom);
      #1;
      checks += 2;
      if (rdata_a !== model[raddr_a]) begin failures++; $display("FAIL A @%h", raddr_a); end
      if (rdata_b !== model[raddr_b]) begin failures++; $display("FAIL B @%h", raddr_b); end
      @(posedge clk); if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
