// mapper -- opcode decoder of the Gator uProcessor.
//
// Combinational. Translates the opcode into microprogram entry addresses:
//   map0_vector  first routine after DECODE: the addressing mode
//                (immediate, direct, extended, indexed, relative, stores)
//                or, for inherent instructions, the whole instruction;
//   map1_vector  the operation routine that an addressing-mode routine
//                jumps to once the operand or effective address is ready;
//   map2..map5   reserved for the prefix pages; no opcode has an entry yet.
// Opcodes without an entry map to 8'hFF, the trap loop. Every entry of the
// table below follows the opcode assignment of the original microcode
// (68HC11 opcodes, page 0 only); the entry addresses come from gup_pkg.
module mapper
  import gup_pkg::*;
(
  input  logic [7:0] opcode,
  output logic [7:0] map0_vector,
  output logic [7:0] map1_vector,
  output logic [7:0] map2_vector,
  output logic [7:0] map3_vector,
  output logic [7:0] map4_vector,
  output logic [7:0] map5_vector
);

  // ---- map 0: addressing mode or inherent instruction ----
  always_comb begin
    unique case (opcode)
      8'h80, 8'h81, 8'h82, 8'h84, 8'h85, 8'h86, 8'h88, 8'h89, 8'h8A, 8'h8B,
      8'hC0, 8'hC1, 8'hC2, 8'hC4, 8'hC5, 8'hC6, 8'hC8, 8'hC9, 8'hCA, 8'hCB:
        map0_vector = L_LOAD_IMM8;
      8'h83, 8'h8C, 8'h8E, 8'hC3, 8'hCC, 8'hCE:
        map0_vector = L_LOAD_IMM16;
      8'h12, 8'h13, 8'h14, 8'h15,
      8'h90, 8'h91, 8'h92, 8'h94, 8'h95, 8'h96, 8'h98, 8'h99, 8'h9A, 8'h9B,
      8'hD0, 8'hD1, 8'hD2, 8'hD4, 8'hD5, 8'hD6, 8'hD8, 8'hD9, 8'hDA, 8'hDB:
        map0_vector = L_LOAD_DIR8;
      8'h93, 8'h9C, 8'h9E, 8'hD3, 8'hDC, 8'hDE:
        map0_vector = L_LOAD_DIR16;
      8'h97, 8'h9D, 8'h9F, 8'hD7, 8'hDD, 8'hDF:
        map0_vector = L_STORE_DIR;
      8'h70, 8'h73, 8'h74, 8'h76, 8'h77, 8'h78, 8'h79, 8'h7A, 8'h7C, 8'h7D,
      8'hB0, 8'hB1, 8'hB2, 8'hB4, 8'hB5, 8'hB6, 8'hB8, 8'hB9, 8'hBA, 8'hBB,
      8'hF0, 8'hF1, 8'hF2, 8'hF4, 8'hF5, 8'hF6, 8'hF8, 8'hF9, 8'hFA, 8'hFB:
        map0_vector = L_LOAD_EXT8;
      8'hB3, 8'hBC, 8'hBE, 8'hF3, 8'hFC, 8'hFE:
        map0_vector = L_LOAD_EXT16;
      8'h7E, 8'h7F, 8'hB7, 8'hBD, 8'hBF, 8'hF7, 8'hFD, 8'hFF:
        map0_vector = L_STORE_EXT;
      8'h1C, 8'h1D, 8'h1E, 8'h1F,
      8'h60, 8'h63, 8'h64, 8'h66, 8'h67, 8'h68, 8'h69, 8'h6A, 8'h6C, 8'h6D,
      8'hA0, 8'hA1, 8'hA2, 8'hA4, 8'hA5, 8'hA6, 8'hA8, 8'hA9, 8'hAA, 8'hAB,
      8'hE0, 8'hE1, 8'hE2, 8'hE4, 8'hE5, 8'hE6, 8'hE8, 8'hE9, 8'hEA, 8'hEB:
        map0_vector = L_LOAD_IDX8;
      8'hA3, 8'hAC, 8'hAE, 8'hE3, 8'hEC, 8'hEE:
        map0_vector = L_LOAD_IDX16;
      8'h6E, 8'h6F, 8'hA7, 8'hAD, 8'hAF, 8'hE7, 8'hED, 8'hEF:
        map0_vector = L_STORE_IDX;
      8'h20, 8'h21, 8'h22, 8'h23, 8'h24, 8'h25, 8'h26, 8'h27,
      8'h28, 8'h29, 8'h2A, 8'h2B, 8'h2C, 8'h2D, 8'h2E, 8'h2F, 8'h8D:
        map0_vector = L_REL;
      8'h18: map0_vector = L_PAGE_2;
      8'h1A: map0_vector = L_PAGE_3;
      8'hCD: map0_vector = L_PAGE_4;
      8'h00: map0_vector = L_TEST;
      8'h01: map0_vector = L_NOP;
      8'h02: map0_vector = L_IDIV;
      8'h03: map0_vector = L_FDIV;
      8'h04: map0_vector = L_LSRD;
      8'h05: map0_vector = L_ASLD;
      8'h06: map0_vector = L_TAP;
      8'h07: map0_vector = L_TPA;
      8'h08: map0_vector = L_INX;
      8'h09: map0_vector = L_DEX;
      8'h0A: map0_vector = L_CLV;
      8'h0B: map0_vector = L_SEV;
      8'h0C: map0_vector = L_CLC;
      8'h0D: map0_vector = L_SEC;
      8'h0E: map0_vector = L_CLI;
      8'h0F: map0_vector = L_SEI;
      8'h10: map0_vector = L_SBA;
      8'h11: map0_vector = L_CBA;
      8'h16: map0_vector = L_TAB;
      8'h17: map0_vector = L_TBA;
      8'h19: map0_vector = L_DAA;
      8'h1B: map0_vector = L_ABA;
      8'h30: map0_vector = L_TSX;
      8'h31: map0_vector = L_INS;
      8'h32: map0_vector = L_PULA;
      8'h33: map0_vector = L_PULB;
      8'h34: map0_vector = L_DES;
      8'h35: map0_vector = L_TXS;
      8'h36: map0_vector = L_PSHA;
      8'h37: map0_vector = L_PSHB;
      8'h38: map0_vector = L_PULX;
      8'h39: map0_vector = L_RTS;
      8'h3A: map0_vector = L_ABX;
      8'h3B: map0_vector = L_RTI;
      8'h3C: map0_vector = L_PSHX;
      8'h3D: map0_vector = L_MUL;
      8'h3E: map0_vector = L_WAI;
      8'h3F: map0_vector = L_SWI;
      8'h40: map0_vector = L_NEGA;
      8'h43: map0_vector = L_COMA;
      8'h44: map0_vector = L_LSRA;
      8'h46: map0_vector = L_RORA;
      8'h47: map0_vector = L_ASRA;
      8'h48: map0_vector = L_ASLA;
      8'h49: map0_vector = L_ROLA;
      8'h4A: map0_vector = L_DECA;
      8'h4C: map0_vector = L_INCA;
      8'h4D: map0_vector = L_TSTA;
      8'h4F: map0_vector = L_CLRA;
      8'h50: map0_vector = L_NEGB;
      8'h53: map0_vector = L_COMB;
      8'h54: map0_vector = L_LSRB;
      8'h56: map0_vector = L_RORB;
      8'h57: map0_vector = L_ASRB;
      8'h58: map0_vector = L_ASLB;
      8'h59: map0_vector = L_ROLB;
      8'h5A: map0_vector = L_DECB;
      8'h5C: map0_vector = L_INCB;
      8'h5D: map0_vector = L_TSTB;
      8'h5F: map0_vector = L_CLRB;
      8'h8F: map0_vector = L_XGDX;
      8'hCF: map0_vector = L_STOP;
      default: map0_vector = L_UNMAPPED;
    endcase
  end

  // ---- map 1: operation, reached after the addressing mode ----
  always_comb begin
    if (opcode[7:4] == 4'h2) begin
      // 16 conditional branches, two microwords each, in opcode order
      map1_vector = L_BRA + {3'b000, opcode[3:0], 1'b0};
    end else begin
      unique case (opcode)
        8'h8D:                      map1_vector = L_BSR;
        8'h12, 8'h1E:               map1_vector = L_BRSET;
        8'h13, 8'h1F:               map1_vector = L_BRCLR;
        8'h14, 8'h1C:               map1_vector = L_BSET;
        8'h15, 8'h1D:               map1_vector = L_BCLR;
        8'h60, 8'h70:               map1_vector = L_NEG;
        8'h63, 8'h73:               map1_vector = L_COM;
        8'h64, 8'h74:               map1_vector = L_LSR;
        8'h66, 8'h76:               map1_vector = L_ROR;
        8'h67, 8'h77:               map1_vector = L_ASR;
        8'h68, 8'h78:               map1_vector = L_ASL;
        8'h69, 8'h79:               map1_vector = L_ROL;
        8'h6A, 8'h7A:               map1_vector = L_DEC;
        8'h6C, 8'h7C:               map1_vector = L_INC;
        8'h6D, 8'h7D:               map1_vector = L_TST;
        8'h6E, 8'h7E:               map1_vector = L_JMP;
        8'h6F, 8'h7F:               map1_vector = L_CLR;
        8'h80, 8'h90, 8'hA0, 8'hB0: map1_vector = L_SUBA;
        8'h81, 8'h91, 8'hA1, 8'hB1: map1_vector = L_CMPA;
        8'h82, 8'h92, 8'hA2, 8'hB2: map1_vector = L_SBCA;
        8'h83, 8'h93, 8'hA3, 8'hB3: map1_vector = L_SUBD;
        8'h84, 8'h94, 8'hA4, 8'hB4: map1_vector = L_ANDA;
        8'h85, 8'h95, 8'hA5, 8'hB5: map1_vector = L_BITA;
        8'h86, 8'h96, 8'hA6, 8'hB6: map1_vector = L_LDAA;
        8'h97, 8'hA7, 8'hB7:        map1_vector = L_STAA;
        8'h88, 8'h98, 8'hA8, 8'hB8: map1_vector = L_EORA;
        8'h89, 8'h99, 8'hA9, 8'hB9: map1_vector = L_ADCA;
        8'h8A, 8'h9A, 8'hAA, 8'hBA: map1_vector = L_ORAA;
        8'h8B, 8'h9B, 8'hAB, 8'hBB: map1_vector = L_ADDA;
        8'h8C, 8'h9C, 8'hAC, 8'hBC: map1_vector = L_CPX;
        8'h9D, 8'hAD, 8'hBD:        map1_vector = L_JSR;
        8'h8E, 8'h9E, 8'hAE, 8'hBE: map1_vector = L_LDS;
        8'h9F, 8'hAF, 8'hBF:        map1_vector = L_STS;
        8'hC0, 8'hD0, 8'hE0, 8'hF0: map1_vector = L_SUBB;
        8'hC1, 8'hD1, 8'hE1, 8'hF1: map1_vector = L_CMPB;
        8'hC2, 8'hD2, 8'hE2, 8'hF2: map1_vector = L_SBCB;
        8'hC3, 8'hD3, 8'hE3, 8'hF3: map1_vector = L_ADDD;
        8'hC4, 8'hD4, 8'hE4, 8'hF4: map1_vector = L_ANDB;
        8'hC5, 8'hD5, 8'hE5, 8'hF5: map1_vector = L_BITB;
        8'hC6, 8'hD6, 8'hE6, 8'hF6: map1_vector = L_LDAB;
        8'hD7, 8'hE7, 8'hF7:        map1_vector = L_STAB;
        8'hC8, 8'hD8, 8'hE8, 8'hF8: map1_vector = L_EORB;
        8'hC9, 8'hD9, 8'hE9, 8'hF9: map1_vector = L_ADCB;
        8'hCA, 8'hDA, 8'hEA, 8'hFA: map1_vector = L_ORAB;
        8'hCB, 8'hDB, 8'hEB, 8'hFB: map1_vector = L_ADDB;
        8'hCC, 8'hDC, 8'hEC, 8'hFC: map1_vector = L_LDD;
        8'hDD, 8'hED, 8'hFD:        map1_vector = L_STD;
        8'hCE, 8'hDE, 8'hEE, 8'hFE: map1_vector = L_LDX;
        8'hDF, 8'hEF, 8'hFF:        map1_vector = L_STX;
        default:                    map1_vector = L_UNMAPPED;
      endcase
    end
  end

  // ---- maps 2..5: prefix pages, not populated ----
  assign map2_vector = L_UNMAPPED;
  assign map3_vector = L_UNMAPPED;
  assign map4_vector = L_UNMAPPED;
  assign map5_vector = L_UNMAPPED;

endmodule
