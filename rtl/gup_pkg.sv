// gup_pkg -- shared encodings of the Gator uProcessor.
//
// The processor is a microprogrammed 68HC11-compatible CPU. Every control
// field of the 56-bit microword is given a named enum here so that the
// microcode, the decoder (mapper) and the datapath blocks agree on one set of
// numbers. The numeric values of all selectors, ALU operations, memory
// functions and next-address operations follow the original design; the
// names of the condition-code operations are this design's own spelling of
// the 8-character bit masks (S X H I N Z V C) used by the original.
//
// The package also fixes the microprogram entry points (labels). Their
// addresses follow from laying the microcode routines out one after another
// from address 0, with the trap loop at the last address, 8'hFF.
package gup_pkg;

  // ---------------------------------------------------------------------
  // Register array selectors (addr_sel, data_a_sel, data_b_sel, data_wr_sel)
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    R_ZERO    = 4'h0,  // constant 0 (writes are discarded)
    R_EA      = 4'h1,  // effective-address scratch register
    R_PC      = 4'h2,
    R_SP      = 4'h3,
    R_Y       = 4'h4,
    R_X       = 4'h5,
    R_D       = 4'h6,  // A:B
    R_B       = 4'h7,
    R_A       = 4'h8,
    R_MEM_U16 = 4'h9,  // memory read data, 16 bits
    R_MEM_U8  = 4'hA,  // memory read data, low byte zero-extended
    R_MEM_S8  = 4'hB,  // memory read data, low byte sign-extended
    R_CCR     = 4'hC   // condition code register, zero-extended
  } reg_sel_e;

  // ---------------------------------------------------------------------
  // Address ALU
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    AOP_PRE_INC   = 4'h0,
    AOP_PRE_INC2  = 4'h1,
    AOP_PRE_DEC   = 4'h2,
    AOP_PRE_DEC2  = 4'h3,
    AOP_POST_INC  = 4'h4,
    AOP_POST_INC2 = 4'h5,
    AOP_POST_DEC  = 4'h6,
    AOP_POST_DEC2 = 4'h7,
    AOP_PASS      = 4'h8
  } addr_alu_op_e;

  // ---------------------------------------------------------------------
  // Data ALU
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    DOP_A_PLUS_B     = 3'd0,
    DOP_A_PLUS_NOT_B = 3'd1,
    DOP_A_AND_B      = 3'd2,
    DOP_A_OR_B       = 3'd3,
    DOP_A_XOR_B      = 3'd4,
    DOP_LSHIFT_A     = 3'd5,
    DOP_RSHIFT_A     = 3'd6
  } data_alu_op_e;

  typedef enum logic {
    MODE_8  = 1'b0,
    MODE_16 = 1'b1
  } alu_mode_e;

  // Bit positions inside alu_flags
  localparam int unsigned FLG_C = 0;
  localparam int unsigned FLG_V = 1;
  localparam int unsigned FLG_Z = 2;
  localparam int unsigned FLG_N = 3;
  localparam int unsigned FLG_H = 4;
  localparam int unsigned FLG_ASIGN = 5;

  // Bit positions inside the condition code register (68xx layout)
  localparam int unsigned CCR_BIT_C = 0;
  localparam int unsigned CCR_BIT_V = 1;
  localparam int unsigned CCR_BIT_Z = 2;
  localparam int unsigned CCR_BIT_N = 3;
  localparam int unsigned CCR_BIT_I = 4;
  localparam int unsigned CCR_BIT_H = 5;
  localparam int unsigned CCR_BIT_X = 6;
  localparam int unsigned CCR_BIT_S = 7;

  // ---------------------------------------------------------------------
  // Condition code register
  // ---------------------------------------------------------------------
  // Each operation names the bits it changes: X = from the ALU flags,
  // 0/1 = cleared/set. CCR_LOAD copies the whole register from the data
  // bus, except that the X mask can only be cleared that way.
  typedef enum logic [4:0] {
    CCR_NOP    = 5'h0,  // --------
    CCR_CLR_C  = 5'h1,  // -------0
    CCR_SET_C  = 5'h2,  // -------1
    CCR_C      = 5'h3,  // -------X
    CCR_CLR_V  = 5'h4,  // ------0-
    CCR_SET_V  = 5'h5,  // ------1-
    CCR_Z      = 5'h6,  // -----X--
    CCR_ZVC    = 5'h7,  // -----XXX
    CCR_NZVC   = 5'h8,  // ----XXXX
    CCR_NZV    = 5'h9,  // ----XXX-
    CCR_CLR_I  = 5'hA,  // ---0----
    CCR_SET_I  = 5'hB,  // ---1----
    CCR_HNZVC  = 5'hC,  // --X-XXXX
    CCR_SET_X  = 5'hD,  // -1------
    CCR_LOAD   = 5'hE   // XvXXXXXX (from data bus, X only clears)
  } ccr_op_e;

  typedef enum logic [1:0] {
    AC_ZERO   = 2'd0,
    AC_ONE    = 2'd1,
    AC_CCR_C  = 2'd2,
    AC_ASHIFT = 2'd3   // sign of the A operand (arithmetic shift right)
  } alu_cond_sel_e;

  typedef enum logic [3:0] {
    UC_ZERO = 4'h0,
    UC_ONE  = 4'h1,
    UC_C    = 4'h2,
    UC_V    = 4'h3,
    UC_Z    = 4'h4,
    UC_N    = 4'h5,
    UC_BLE  = 4'h6,   // Z | (N ^ V)
    UC_BLT  = 4'h7,   // N ^ V
    UC_BLS  = 4'h8    // C | Z
  } usq_cond_sel_e;

  // ---------------------------------------------------------------------
  // Memory controller functions
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    MEM_IDLE        = 3'd0,
    MEM_READ_BYTE   = 3'd1,
    MEM_WRITE_BYTE  = 3'd2,
    MEM_READ_WORD   = 3'd3,
    MEM_WRITE_WORD  = 3'd4,
    MEM_READ_OPCODE = 3'd5
  } mem_func_e;

  // ---------------------------------------------------------------------
  // Microsequencer next-address operations
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    UOP_CONTINUE  = 3'd0,
    UOP_JUMP      = 3'd1,
    UOP_JUMP_MAP0 = 3'd2,
    UOP_JUMP_MAP1 = 3'd3,
    UOP_JUMP_MAP2 = 3'd4,
    UOP_JUMP_MAP3 = 3'd5,
    UOP_JUMP_MAP4 = 3'd6,
    UOP_JUMP_MAP5 = 3'd7
  } micro_op_e;

  // ---------------------------------------------------------------------
  // The 56-bit microword, most significant field first
  // ---------------------------------------------------------------------
  typedef struct packed {
    micro_op_e     micro_op;       // [55:53]
    logic          true_false;     // [52]
    logic [7:0]    branch_addr;    // [51:44]
    ccr_op_e       ccr_op;         // [43:39] (values 0..14 used)
    alu_cond_sel_e alu_cond_sel;   // [38:37]
    usq_cond_sel_e usq_cond_sel;   // [36:33]
    reg_sel_e      addr_sel;       // [32:29]
    reg_sel_e      data_a_sel;     // [28:25]
    reg_sel_e      data_b_sel;     // [24:21]
    reg_sel_e      data_wr_sel;    // [20:17]
    addr_alu_op_e  addr_alu_op;    // [16:13]
    data_alu_op_e  data_alu_op;    // [12:10]
    alu_mode_e     data_alu_mode;  // [9]
    mem_func_e     mem_func_sel;   // [8:6]
    logic [5:0]    spare;          // [5:0] always 0
  } uword_t;

  localparam int unsigned UWORD_BITS = 56;

  // ---------------------------------------------------------------------
  // Microprogram entry points
  // ---------------------------------------------------------------------
  typedef logic [7:0] uaddr_t;

  // reset, fetch and decode
  localparam uaddr_t L_RESET      = 8'h00;
  localparam uaddr_t L_FETCH      = 8'h01;
  localparam uaddr_t L_DECODE     = 8'h02;
  // map 0: addressing modes
  localparam uaddr_t L_LOAD_IMM8  = 8'h03;
  localparam uaddr_t L_LOAD_IMM16 = 8'h04;
  localparam uaddr_t L_LOAD_DIR8  = 8'h05;
  localparam uaddr_t L_LOAD_DIR16 = 8'h07;
  localparam uaddr_t L_STORE_DIR  = 8'h09;
  localparam uaddr_t L_LOAD_EXT8  = 8'h0B;
  localparam uaddr_t L_LOAD_EXT16 = 8'h0D;
  localparam uaddr_t L_STORE_EXT  = 8'h0F;
  localparam uaddr_t L_LOAD_IDX8  = 8'h11;
  localparam uaddr_t L_LOAD_IDX16 = 8'h14;
  localparam uaddr_t L_STORE_IDX  = 8'h17;
  localparam uaddr_t L_REL        = 8'h19;
  localparam uaddr_t L_PAGE_2     = 8'h1A;
  localparam uaddr_t L_PAGE_3     = 8'h1B;
  localparam uaddr_t L_PAGE_4     = 8'h1C;
  // map 0: inherent instructions
  localparam uaddr_t L_TEST = 8'h1D, L_NOP  = 8'h1E, L_IDIV = 8'h1F, L_FDIV = 8'h20;
  localparam uaddr_t L_LSRD = 8'h21, L_ASLD = 8'h22, L_TAP  = 8'h23, L_TPA  = 8'h24;
  localparam uaddr_t L_INX  = 8'h25, L_DEX  = 8'h26, L_CLV  = 8'h27, L_SEV  = 8'h28;
  localparam uaddr_t L_CLC  = 8'h29, L_SEC  = 8'h2A, L_CLI  = 8'h2B, L_SEI  = 8'h2C;
  localparam uaddr_t L_SBA  = 8'h2D, L_CBA  = 8'h2E, L_TAB  = 8'h2F, L_TBA  = 8'h30;
  localparam uaddr_t L_DAA  = 8'h31, L_ABA  = 8'h32, L_TSX  = 8'h33, L_INS  = 8'h34;
  localparam uaddr_t L_PULA = 8'h35, L_PULB = 8'h37, L_DES  = 8'h39, L_TXS  = 8'h3A;
  localparam uaddr_t L_PSHA = 8'h3B, L_PSHB = 8'h3C, L_PULX = 8'h3D, L_RTS  = 8'h3F;
  localparam uaddr_t L_ABX  = 8'h41, L_RTI  = 8'h42, L_PSHX = 8'h43, L_MUL  = 8'h45;
  localparam uaddr_t L_WAI  = 8'h46, L_SWI  = 8'h47;
  localparam uaddr_t L_NEGA = 8'h48, L_COMA = 8'h49, L_LSRA = 8'h4B, L_RORA = 8'h4C;
  localparam uaddr_t L_ASRA = 8'h4D, L_ASLA = 8'h4E, L_ROLA = 8'h4F, L_DECA = 8'h50;
  localparam uaddr_t L_INCA = 8'h51, L_TSTA = 8'h52, L_CLRA = 8'h53;
  localparam uaddr_t L_NEGB = 8'h54, L_COMB = 8'h55, L_LSRB = 8'h57, L_RORB = 8'h58;
  localparam uaddr_t L_ASRB = 8'h59, L_ASLB = 8'h5A, L_ROLB = 8'h5B, L_DECB = 8'h5C;
  localparam uaddr_t L_INCB = 8'h5D, L_TSTB = 8'h5E, L_CLRB = 8'h5F;
  localparam uaddr_t L_XGDX = 8'h60, L_STOP = 8'h63;
  // map 1: operations
  localparam uaddr_t L_BRA  = 8'h64;  // 16 branches, two words each, BRA..BLE
  localparam uaddr_t L_BSR  = 8'h84;
  localparam uaddr_t L_BRSET = 8'h85, L_BRCLR = 8'h86, L_BSET = 8'h87, L_BCLR = 8'h88;
  localparam uaddr_t L_NEG  = 8'h89, L_COM  = 8'h8A, L_LSR  = 8'h8C, L_ROR  = 8'h8D;
  localparam uaddr_t L_ASR  = 8'h8E, L_ASL  = 8'h8F, L_ROL  = 8'h90, L_DEC  = 8'h91;
  localparam uaddr_t L_INC  = 8'h92, L_TST  = 8'h93, L_JMP  = 8'h94, L_CLR  = 8'h95;
  localparam uaddr_t L_SUBA = 8'h96, L_CMPA = 8'h97, L_SBCA = 8'h98, L_SUBD = 8'h99;
  localparam uaddr_t L_ANDA = 8'h9A, L_BITA = 8'h9B, L_LDAA = 8'h9C, L_STAA = 8'h9D;
  localparam uaddr_t L_EORA = 8'h9E, L_ADCA = 8'h9F, L_ORAA = 8'hA0, L_ADDA = 8'hA1;
  localparam uaddr_t L_CPX  = 8'hA2, L_JSR  = 8'hA3, L_LDS  = 8'hA5, L_STS  = 8'hA6;
  localparam uaddr_t L_SUBB = 8'hA7, L_CMPB = 8'hA8, L_SBCB = 8'hA9, L_ADDD = 8'hAA;
  localparam uaddr_t L_ANDB = 8'hAB, L_BITB = 8'hAC, L_LDAB = 8'hAD, L_STAB = 8'hAE;
  localparam uaddr_t L_EORB = 8'hAF, L_ADCB = 8'hB0, L_ORAB = 8'hB1, L_ADDB = 8'hB2;
  localparam uaddr_t L_LDD  = 8'hB3, L_STD  = 8'hB4, L_LDX  = 8'hB5, L_STX  = 8'hB6;
  // unimplemented opcodes end here and spin
  localparam uaddr_t L_TRAP = 8'hFF;
  // map vector for an opcode that has no entry in a map
  localparam uaddr_t L_UNMAPPED = 8'hFF;

endpackage
