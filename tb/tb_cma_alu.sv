// tb_cma_alu: self-checking test of the PE ALU.
// Every operation code (and the unused codes) is driven with corner values
// and random operands; results are compared with a reference written here
// with plain integer arithmetic.
module tb_cma_alu;
  import cma_pkg::*;
  localparam int W = 24;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [W-1:0] a, b, y;

  cma_alu #(.W(W)) dut (.op, .a, .b, .y);

  function automatic logic [W-1:0] ref_alu(int o, logic [W-1:0] x, logic [W-1:0] z);
    longint ux = x, uz = z;
    int s = z % 32;
    longint sx = (x >= 24'h800000) ? (ux - 64'h1000000) : ux;
    case (o)
      0: return x;
      1: return W'(ux + uz);
      2: return W'(ux - uz + 64'h1000000);
      3: return x & z;
      4: return x | z;
      5: return x ^ z;
      6: return (s >= W) ? '0 : W'(ux << s);
      7: return (s >= W) ? '0 : W'(ux >> s);
      8: return W'(sx >>> s);
      9: return (ux < uz) ? 1 : 0;
      10: return (ux == uz) ? 1 : 0;
      11: return (ux < uz) ? x : z;
      12: return (ux > uz) ? x : z;
      default: return '0;
    endcase
  endfunction

  task automatic check_one(int o, logic [W-1:0] x, logic [W-1:0] z);
    logic [W-1:0] e;
    op = alu_op_e'(o); a = x; b = z;
    #1;
    e = ref_alu(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, x, z, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] corners [6] = '{24'h0, 24'h1, 24'h7fffff, 24'h800000, 24'hffffff, 24'h00ff00};
    for (int o = 0; o < 16; o++) begin
      foreach (corners[i]) foreach (corners[k]) check_one(o, corners[i], corners[k]);
      for (int n = 0; n < 300; n++) check_one(o, W'($urandom), W'($urandom));
      for (int n = 0; n < 50; n++) check_one(o, W'($urandom), W'($urandom % 32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
