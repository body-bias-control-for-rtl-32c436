// tb_cma_pe_array: self-checking test of the 8x8 PE array.
// A reference model evaluates the array the way data flows through it: row by
// row from the south; inside a row, west to east for the ALUs and eastward
// channels, then east to west for the westward channels, then the northward
// channels.  First a pass-through configuration (every PE forwards both
// south channels north) must copy LR to GR unchanged; then random
// configurations, constants and inputs are compared on all 16 outputs.  The
// testbench also counts how often a direct link, an eastward and a westward
// channel carried data that reached an output, and fails if any never did.
module tb_cma_pe_array;
  import cma_pkg::*;
  localparam int ROWS = 8, COLS = 8, W = 24;
  int checks = 0, failures = 0;
  pe_cfg_t cfg [ROWS*COLS];
  logic [W-1:0] cnst [ROWS];
  logic [2*COLS-1:0][W-1:0] lr_data, gr_data;

  cma_pe_array #(.ROWS(ROWS), .COLS(COLS), .W(W)) dut (.cfg, .cnst, .lr_data, .gr_data);

  // reference state
  logic [W-1:0] r_n [ROWS][COLS][2];
  logic [W-1:0] r_e [ROWS][COLS][2];
  logic [W-1:0] r_w [ROWS][COLS][2];
  logic [W-1:0] r_alu [ROWS][COLS];
  logic [W-1:0] exp_gr [2*COLS];

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

  function automatic logic [W-1:0] s_of(int r, int c, int k);
    if (r == 0) return lr_data[2*c+k];
    return r_n[r-1][c][k];
  endfunction

  task automatic ref_eval();
    logic [21:0] b;
    logic [W-1:0] src [8];
    logic [W-1:0] win, ein, s;
    for (int r = 0; r < ROWS; r++) begin
      // west to east: ALU and eastward channels
      for (int c = 0; c < COLS; c++) begin
        b = cfg[r*COLS+c];
        src[0] = '0;
        src[1] = s_of(r, c, 0);
        src[2] = s_of(r, c, 1);
        src[3] = (c == 0) ? '0 : r_e[r][c-1][0];
        src[4] = (c == 0) ? '0 : r_e[r][c-1][1];
        src[5] = (c == 0) ? '0 : r_alu[r][c-1];
        src[6] = (c == 0 || r == 0) ? '0 : r_alu[r-1][c-1];
        src[7] = cnst[r];
        r_alu[r][c] = ref_alu(int'(b[21:18]), src[b[17:15]], src[b[14:12]]);
        for (int k = 0; k < 2; k++) begin
          int sel;
          sel = (k == 0) ? int'(b[9:8]) : int'(b[3:2]);
          win = (c == 0) ? '0 : r_e[r][c-1][k];
          s = s_of(r, c, k);
          r_e[r][c][k] = (sel == 0) ? '0 : (sel == 1) ? s : (sel == 2) ? win : r_alu[r][c];
        end
      end
      // east to west: westward channels
      for (int c = COLS-1; c >= 0; c--) begin
        b = cfg[r*COLS+c];
        for (int k = 0; k < 2; k++) begin
          int sel;
          sel = (k == 0) ? int'(b[7:6]) : int'(b[1:0]);
          ein = (c == COLS-1) ? '0 : r_w[r][c+1][k];
          s = s_of(r, c, k);
          r_w[r][c][k] = (sel == 0) ? '0 : (sel == 1) ? s : (sel == 2) ? ein : r_alu[r][c];
        end
      end
      // north
      for (int c = 0; c < COLS; c++) begin
        b = cfg[r*COLS+c];
        for (int k = 0; k < 2; k++) begin
          int sel;
          sel = (k == 0) ? int'(b[11:10]) : int'(b[5:4]);
          win = (c == 0) ? '0 : r_e[r][c-1][k];
          ein = (c == COLS-1) ? '0 : r_w[r][c+1][k];
          s = s_of(r, c, k);
          r_n[r][c][k] = (sel == 0) ? s : (sel == 1) ? win : (sel == 2) ? ein : r_alu[r][c];
        end
      end
    end
    for (int c = 0; c < COLS; c++) for (int k = 0; k < 2; k++) exp_gr[2*c+k] = r_n[ROWS-1][c][k];
  endtask

  task automatic compare(string what);
    #1;
    ref_eval();
    for (int j = 0; j < 2*COLS; j++) begin
      checks++;
      if (gr_data[j] !== exp_gr[j]) begin
        failures++;
        if (failures < 10) $display("FAIL %s gr[%0d]=%h exp %h", what, j, gr_data[j], exp_gr[j]);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_dl = 0, n_east = 0, n_west = 0;
    // 1. pass-through: all-zero configuration forwards south to north
    foreach (cfg[i]) cfg[i] = '0;
    foreach (cnst[i]) cnst[i] = '0;
    for (int n = 0; n < 20; n++) begin
      for (int j = 0; j < 2*COLS; j++) lr_data[j] = W'($urandom);
      #1;
      for (int j = 0; j < 2*COLS; j++) begin
        checks++;
        if (gr_data[j] !== lr_data[j]) begin failures++; $display("FAIL pass-through %0d", j); end
      end
    end
    // 2. directed: PE(0,0) adds LR0+LR1; PE(1,1) takes it over the
    // south-west direct link and adds the row-1 constant; PE(1,2) takes
    // PE(1,1) over the west direct link, shifts left by 1 and sends it west
    // on channel B to PE(1,1), which turns it north.  Column 1 then carries it
    // north on channel B to GR[3].
    foreach (cfg[i]) cfg[i] = '0;
    cfg[0]  = '{op: OP_ADD, sel_a: SRC_S_A, sel_b: SRC_S_B, se_a: '{N_S, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}};
    cfg[9]  = '{op: OP_ADD, sel_a: SRC_DL_SW, sel_b: SRC_CONST, se_a: '{N_S, E_ZERO, W_ZERO}, se_b: '{N_E, E_ZERO, W_ZERO}};
    cfg[10] = '{op: OP_SLL, sel_a: SRC_DL_W, sel_b: SRC_CONST, se_a: '{N_S, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ALU}};
    cnst[1] = 24'd1;
    for (int n = 0; n < 20; n++) begin
      for (int j = 0; j < 2*COLS; j++) lr_data[j] = W'($urandom % 1000);
      #1;
      checks++;
      if (gr_data[3] !== W'(((lr_data[0] + lr_data[1]) + 1) << 1)) begin
        failures++; $display("FAIL directed gr[3]=%h", gr_data[3]);
      end else begin n_dl++; n_west++; end
      compare("directed");
    end
    // eastward: PE(2,0) ALU=LR0 path result sent east on channel A, turned north at column 3
    foreach (cfg[i]) cfg[i] = '0;
    cfg[16] = '{op: OP_XOR, sel_a: SRC_S_A, sel_b: SRC_S_B, se_a: '{N_S, E_ALU, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}};
    cfg[17] = '{op: OP_PASSA, sel_a: SRC_ZERO, sel_b: SRC_ZERO, se_a: '{N_S, E_W, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}};
    cfg[18] = '{op: OP_PASSA, sel_a: SRC_ZERO, sel_b: SRC_ZERO, se_a: '{N_S, E_W, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}};
    cfg[19] = '{op: OP_PASSA, sel_a: SRC_ZERO, sel_b: SRC_ZERO, se_a: '{N_W, E_ZERO, W_ZERO}, se_b: '{N_S, E_ZERO, W_ZERO}};
    for (int n = 0; n < 20; n++) begin
      for (int j = 0; j < 2*COLS; j++) lr_data[j] = W'($urandom);
      #1;
      checks++;
      if (gr_data[6] !== (lr_data[0] ^ lr_data[1])) begin
        failures++; $display("FAIL eastward gr[6]=%h", gr_data[6]);
      end else n_east++;
      compare("eastward");
    end
    // 3. random configurations (operations limited to defined codes)
    for (int n = 0; n < 400; n++) begin
      foreach (cfg[i]) begin
        logic [21:0] c;
        c = 22'($urandom);
        c[21:18] = 4'($urandom % 13);
        cfg[i] = pe_cfg_t'(c);
      end
      foreach (cnst[i]) cnst[i] = W'($urandom);
      for (int m = 0; m < 4; m++) begin
        for (int j = 0; j < 2*COLS; j++) lr_data[j] = W'($urandom);
        compare("random");
      end
    end
    checks += 3;
    if (n_dl == 0)   begin failures++; $display("FAIL direct links never exercised"); end
    if (n_east == 0) begin failures++; $display("FAIL eastward channel never exercised"); end
    if (n_west == 0) begin failures++; $display("FAIL westward channel never exercised"); end
    $display("direct-link=%0d eastward=%0d westward=%0d", n_dl, n_east, n_west);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
