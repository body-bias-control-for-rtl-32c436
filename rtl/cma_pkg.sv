// cma_pkg: types and constants shared by the CMA-SOTB accelerator.
//
// The accelerator is an 8x8 array of combinational processing elements (PEs)
// fed by a small data-management controller.  This package fixes the sizes
// that follow the published chip (8x8 array, 24-bit words, 256-word data
// memory) and the configuration encodings, which are this design's own choice:
// the ALU operation codes, the operand-source codes of the two operand
// selectors (SEL_A/SEL_B) and the route codes of the two switching elements
// (SE_A/SE_B, one per interconnect channel).  A PE configuration word is
// 22 bits and fits into one 24-bit host write.
package cma_pkg;

  localparam int DW         = 24;   // datapath and memory word width
  localparam int N_ROWS     = 8;    // PE rows (PE_0 .. PE_7)
  localparam int N_COLS     = 8;    // PE columns (COL_0 .. COL_7)
  localparam int NCH        = 2;    // island-style channels (A, B)
  localparam int NIO        = N_COLS * NCH; // LR/FR/GR entries
  localparam int DMEM_DEPTH = 256;
  localparam int DMEM_AW    = 8;    // DMEM address width

  // ALU operations.  Shifts use b[4:0] as the shift amount.
  typedef enum logic [3:0] {
    OP_PASSA = 4'd0,
    OP_ADD   = 4'd1,
    OP_SUB   = 4'd2,
    OP_AND   = 4'd3,
    OP_OR    = 4'd4,
    OP_XOR   = 4'd5,
    OP_SLL   = 4'd6,
    OP_SRL   = 4'd7,
    OP_SRA   = 4'd8,
    OP_LTU   = 4'd9,
    OP_EQ    = 4'd10,
    OP_MINU  = 4'd11,
    OP_MAXU  = 4'd12
  } alu_op_e;

  // Operand sources of SEL_A / SEL_B.  Only sources that come from the south
  // or the west are offered, so no configuration can close a loop.
  typedef enum logic [2:0] {
    SRC_ZERO  = 3'd0,
    SRC_S_A   = 3'd1,   // channel A from the south
    SRC_S_B   = 3'd2,   // channel B from the south
    SRC_W_A   = 3'd3,   // channel A from the west (eastward traffic)
    SRC_W_B   = 3'd4,   // channel B from the west
    SRC_DL_W  = 3'd5,   // direct link from the west PE's ALU
    SRC_DL_SW = 3'd6,   // direct link from the south-west PE's ALU
    SRC_CONST = 3'd7    // constant register of this row
  } src_e;

  // Switching-element routes for one channel.
  typedef enum logic [1:0] {N_S = 2'd0, N_W = 2'd1, N_E = 2'd2, N_ALU = 2'd3} nsel_e;
  typedef enum logic [1:0] {E_ZERO = 2'd0, E_S = 2'd1, E_W = 2'd2, E_ALU = 2'd3} esel_e;
  typedef enum logic [1:0] {W_ZERO = 2'd0, W_S = 2'd1, W_E = 2'd2, W_ALU = 2'd3} wsel_e;

  typedef struct packed {
    nsel_e n_sel;
    esel_e e_sel;
    wsel_e w_sel;
  } se_cfg_t;                         // 6 bits

  typedef struct packed {
    alu_op_e op;                      // [21:18]
    src_e    sel_a;                   // [17:15]
    src_e    sel_b;                   // [14:12]
    se_cfg_t se_a;                    // [11:6]
    se_cfg_t se_b;                    // [5:0]
  } pe_cfg_t;                         // 22 bits

  localparam int CFGW = $bits(pe_cfg_t);

  // Controller register map (host-visible, word addresses).
  localparam logic [5:0] R_IN_BASE    = 6'd0;
  localparam logic [5:0] R_IN_STRIDE  = 6'd1;
  localparam logic [5:0] R_OUT_BASE   = 6'd2;
  localparam logic [5:0] R_OUT_STRIDE = 6'd3;
  localparam logic [5:0] R_COUNT      = 6'd4;
  localparam logic [5:0] R_DELAY      = 6'd5;
  localparam logic [5:0] R_IN_MASK    = 6'd6;
  localparam logic [5:0] R_OUT_MASK   = 6'd7;
  localparam logic [5:0] R_FB_MASK    = 6'd8;
  localparam logic [5:0] R_IN_OFF0    = 6'd16;  // 16..31: input mapping
  localparam logic [5:0] R_OUT_OFF0   = 6'd32;  // 32..47: output mapping

  // Host address spaces of the top level.
  typedef enum logic [1:0] {
    SP_DMEM  = 2'd0,
    SP_CFG   = 2'd1,
    SP_CONST = 2'd2,
    SP_CTRL  = 2'd3
  } space_e;

endpackage
