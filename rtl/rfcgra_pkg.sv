// Shared types and constants of the RF-CGRA.
//
// The array is built from processing elements (PEs) whose four distributed
// registers R0..R3 can be chained inside the PE (RES -> R0 -> R1 -> R2 -> R3)
// or loaded from neighbouring PEs, so a long data dependence can be delayed
// across many cycles while using few links between PEs. This package holds the
// word type, the operation codes of the function unit, the source encodings of
// the input crossbar (CW1) and output crossbar (CW2), and the per-PE
// configuration context word that selects all of them in one cycle.
//
// The four register lanes, the four mesh directions (order N, S, W, E) and the
// seven CW2 outputs follow the PE structure of the design. The word width, the
// operation list, the immediate field and all encodings are this design's own
// choices.
package rfcgra_pkg;

  localparam int unsigned DATA_W   = 32;  // word width of the datapath
  localparam int unsigned NUM_REGS = 4;   // distributed registers per PE
  localparam int unsigned NUM_DIRS = 4;   // mesh directions
  localparam int unsigned IMM_W    = 16;  // immediate field, sign-extended
  localparam int unsigned NUM_XOUT = 7;   // CW2 outputs

  typedef logic [DATA_W-1:0] data_t;

  // Mesh directions, also the index of din/dout of a PE.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_S = 2'd1,
    DIR_W = 2'd2,
    DIR_E = 2'd3
  } dir_e;

  // CW2 outputs.
  localparam int unsigned XO_N    = 0;
  localparam int unsigned XO_S    = 1;
  localparam int unsigned XO_W    = 2;
  localparam int unsigned XO_E    = 3;
  localparam int unsigned XO_FU_A = 4;
  localparam int unsigned XO_FU_B = 5;
  localparam int unsigned XO_LSU  = 6;

  // Function unit operations. LOAD and STORE compute the address A + imm.
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_PASS  = 4'd1,
    OP_ADD   = 4'd2,
    OP_SUB   = 4'd3,
    OP_MUL   = 4'd4,
    OP_AND   = 4'd5,
    OP_OR    = 4'd6,
    OP_XOR   = 4'd7,
    OP_SHL   = 4'd8,
    OP_SRL   = 4'd9,
    OP_SRA   = 4'd10,
    OP_LT    = 4'd11,
    OP_EQ    = 4'd12,
    OP_ABS   = 4'd13,
    OP_LOAD  = 4'd14,
    OP_STORE = 4'd15
  } op_e;

  // CW1 sources of one register lane.
  typedef enum logic [2:0] {
    IN_N    = 3'd0,
    IN_S    = 3'd1,
    IN_W    = 3'd2,
    IN_E    = 3'd3,
    IN_LSU  = 3'd4,
    IN_ZERO = 3'd5
  } in_src_e;

  // CW2 sources: outputs of M1..M4, the result register, or zero.
  typedef enum logic [2:0] {
    XS_M1   = 3'd0,
    XS_M2   = 3'd1,
    XS_M3   = 3'd2,
    XS_M4   = 3'd3,
    XS_RES  = 3'd4,
    XS_ZERO = 3'd5
  } out_src_e;

  // One configuration context of one PE. The all-zero word is the idle
  // context: NOP, nothing written, every M selects its register.
  typedef struct packed {
    op_e                        op;
    logic                       imm_b;          // operand B is the immediate
    logic [IMM_W-1:0]           imm;
    logic                       res_we;         // write the FU result into RES
    in_src_e  [NUM_REGS-1:0]    cw1_sel;        // lane k source (feeds CW(k+3))
    logic     [NUM_REGS-1:0]    reg_from_lane;  // CW(k+3) -> Rk: 1 lane, 0 chain
    logic     [NUM_REGS-1:0]    byp_from_lane;  // CW(k+3) bypass: 1 lane, 0 chain
    logic     [NUM_REGS-1:0]    reg_we;         // Rk loads this cycle
    logic     [NUM_REGS-1:0]    m_byp;          // M(k+1): 1 bypass, 0 register
    out_src_e [NUM_XOUT-1:0]    cw2_sel;        // source of each CW2 output
  } pe_cfg_t;

  function automatic data_t sext_imm(logic [IMM_W-1:0] imm);
    return data_t'(signed'(imm));
  endfunction

endpackage
