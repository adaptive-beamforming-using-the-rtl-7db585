// Control word of one tile-processor ALU (see montium_alu).
//
// The ALU is organised in three levels: four function units (level 1),
// a multiplier with a following adder (level 2) and a butterfly with two
// output multiplexers (level 3). The selections named here are the ones
// the ALU structure shows: mX chooses A, Z1A or B; mY chooses C, Z1B or D;
// mB chooses B or D; mO1 and mO2 pick the ALU outputs. The binary
// encoding of the fields is this design's own: the document gives the
// structure of the ALU but not its instruction format.
package montium_pkg;

  // Level-1 function unit operations: logic and simple arithmetic.
  typedef enum logic [3:0] {
    FU_ZERO  = 4'd0,
    FU_PASSA = 4'd1,
    FU_PASSB = 4'd2,
    FU_ADD   = 4'd3,
    FU_SUB   = 4'd4,
    FU_NEG   = 4'd5,   // -a
    FU_AND   = 4'd6,
    FU_OR    = 4'd7,
    FU_XOR   = 4'd8,
    FU_NOT   = 4'd9,
    FU_SRA   = 4'd10,  // a >>> b[3:0]
    FU_SLL   = 4'd11,  // a <<  b[3:0]
    FU_ABS   = 4'd12
  } fu_op_e;

  // Status flag of a function unit.
  typedef enum logic [1:0] {
    FLAG_NEG  = 2'd0,
    FLAG_ZERO = 2'd1,
    FLAG_OVF  = 2'd2
  } flag_e;

  typedef struct packed {
    logic ovf;
    logic neg;
    logic zero;
  } flags_t;

  typedef enum logic [1:0] { MX_A = 2'd0, MX_Z1A = 2'd1, MX_B = 2'd2 } mx_sel_e;
  typedef enum logic [1:0] { MY_C = 2'd0, MY_Z1B = 2'd1, MY_D = 2'd2 } my_sel_e;

  // Adder operand sources.
  typedef enum logic [3:0] {
    SRC_ZERO = 4'd0,
    SRC_MUL  = 4'd1,
    SRC_A    = 4'd2,
    SRC_B    = 4'd3,
    SRC_C    = 4'd4,
    SRC_D    = 4'd5,
    SRC_Z1A  = 4'd6,
    SRC_Z1B  = 4'd7,
    SRC_EAST = 4'd8
  } src_e;

  // Right adder operand chosen by the status bit.
  typedef enum logic [1:0] { DYN_B = 2'd0, DYN_D = 2'd1, DYN_Z1A = 2'd2, DYN_Z1B = 2'd3 } dyn_e;

  typedef enum logic { MB_B = 1'b0, MB_D = 1'b1 } mb_sel_e;

  typedef enum logic [2:0] {
    MO_SUM  = 3'd0,   // ZA + mB
    MO_DIFF = 3'd1,   // ZA - mB
    MO_ZA   = 3'd2,
    MO_Z1A  = 3'd3,
    MO_Z1B  = 3'd4
  } mo_sel_e;

  typedef struct packed {
    logic    fixed_point;  // 1: 1.15 arithmetic, 0: 16-bit integer
    logic    saturate;     // saturate sums instead of wrapping
    fu_op_e  fu1;          // operands A, B
    fu_op_e  fu2;          // operands C, D
    fu_op_e  fu3;          // operands FU1, FU2 -> Z1A
    fu_op_e  fu4;          // operands FU1, FU2 -> Z1B
    logic [1:0] sb_unit;   // which function unit drives the status bit
    flag_e   sb_flag;      // which of its flags
    logic    sb_invert;    // invert the selected flag
    mx_sel_e mx;
    my_sel_e my;
    src_e    add_l;        // left adder operand
    src_e    add_r;        // right adder operand when add_dyn = 0
    logic    add_dyn;      // right operand selected by the status bit
    dyn_e    dyn0;         // right operand when SB = 0
    dyn_e    dyn1;         // right operand when SB = 1
    logic    add_sub;      // 1: left - right, 0: left + right
    mb_sel_e mb;
    mo_sel_e mo1;
    mo_sel_e mo2;
  } alu_ctrl_t;

endpackage
