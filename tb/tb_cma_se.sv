// tb_cma_se: self-checking test of one switching element.
// All 64 route configurations are tried with distinct random words on the
// four inputs; each output is compared with the input its route names.
module tb_cma_se;
  import cma_pkg::*;
  localparam int W = 24;
  int checks = 0, failures = 0;
  se_cfg_t cfg;
  logic [W-1:0] s_in, w_in, e_in, alu, n_out, e_out, w_out;

  cma_se #(.W(W)) dut (.cfg, .s_in, .w_in, .e_in, .alu, .n_out, .e_out, .w_out);

  task automatic expect_eq(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s cfg=%b got=%h exp=%h", what, cfg, got, exp);
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
    logic [W-1:0] srcs [4];
    for (int rep = 0; rep < 20; rep++) begin
      for (int c = 0; c < 64; c++) begin
        s_in = W'($urandom); w_in = s_in ^ 24'h1; e_in = s_in ^ 24'h2; alu = s_in ^ 24'h4;
        cfg  = se_cfg_t'(c[5:0]);
        #1;
        // north: S, W, E, ALU
        srcs = '{s_in, w_in, e_in, alu};
        expect_eq("north", n_out, srcs[c[5:4]]);
        // east: 0, S, W, ALU
        srcs = '{24'h0, s_in, w_in, alu};
        expect_eq("east", e_out, srcs[c[3:2]]);
        // west: 0, S, E, ALU
        srcs = '{24'h0, s_in, e_in, alu};
        expect_eq("west", w_out, srcs[c[1:0]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
