// tb_cma_pe: self-checking test of one processing element.
// Random configuration words and random inputs are applied; the expected
// operands, ALU result and all six channel outputs are computed by a
// reference model written here from the encoding in cma_pkg.
module tb_cma_pe;
  import cma_pkg::*;
  localparam int W = 24;
  int checks = 0, failures = 0;
  pe_cfg_t cfg;
  logic [W-1:0] cnst, dl_w, dl_sw, alu_out;
  logic [1:0][W-1:0] s_in, w_in, e_in, n_out, e_out, w_out;

  cma_pe #(.W(W)) dut (.cfg, .cnst, .s_in, .w_in, .e_in, .dl_w, .dl_sw, .n_out, .e_out, .w_out, .alu_out);

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

  function automatic logic [W-1:0] ref_src(int sel);
    case (sel)
      0: return '0;
      1: return s_in[0];
      2: return s_in[1];
      3: return w_in[0];
      4: return w_in[1];
      5: return dl_w;
      6: return dl_sw;
      default: return cnst;
    endcase
  endfunction

  task automatic expect_eq(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s cfg=%h got=%h exp=%h", what, cfg, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [21:0] c;
    logic [W-1:0] alu, routes [4];
    int sel_n, sel_e, sel_w;
    for (int n = 0; n < 5000; n++) begin
      c = 22'($urandom);
      cfg = pe_cfg_t'(c);
      cnst = W'($urandom); dl_w = W'($urandom); dl_sw = W'($urandom);
      for (int k = 0; k < 2; k++) begin
        s_in[k] = W'($urandom); w_in[k] = W'($urandom); e_in[k] = W'($urandom);
      end
      if (n % 4 == 0) begin s_in[1] = W'($urandom % 24); w_in[1] = W'($urandom % 24); end
      #1;
      alu = ref_alu(int'(c[21:18]), ref_src(int'(c[17:15])), ref_src(int'(c[14:12])));
      expect_eq("alu", alu_out, alu);
      for (int k = 0; k < 2; k++) begin
        // channel A uses cfg bits [11:6], channel B bits [5:0]
        sel_n = (k == 0) ? int'(c[11:10]) : int'(c[5:4]);
        sel_e = (k == 0) ? int'(c[9:8])   : int'(c[3:2]);
        sel_w = (k == 0) ? int'(c[7:6])   : int'(c[1:0]);
        routes = '{s_in[k], w_in[k], e_in[k], alu};
        expect_eq("north", n_out[k], routes[sel_n]);
        routes = '{24'h0, s_in[k], w_in[k], alu};
        expect_eq("east", e_out[k], routes[sel_e]);
        routes = '{24'h0, s_in[k], e_in[k], alu};
        expect_eq("west", w_out[k], routes[sel_w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
