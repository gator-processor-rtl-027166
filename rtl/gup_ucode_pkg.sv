// gup_ucode_pkg -- microprogram of the Gator uProcessor.
//
// ucode_word(addr) returns the 56-bit microword stored at a microprogram
// address; microprogram_memory turns it into a 256 x 56 ROM. Each word is one
// micro-operation: a data ALU operation (operands, write-back target), an
// address ALU operation on one register, a memory function, a condition code
// update and the next-address rule. A routine runs for every addressing mode
// (entered through map 0 after DECODE) and for every operation (entered
// through map 1 once the operand is in the memory data register or the
// effective address is in EA). Most routines end by fetching the next opcode
// in their last micro-operation and jumping straight to DECODE, so that fetch
// overlaps execution.
//
// The small builder functions below mirror the micro-assembler macros of the
// original design (DATA8_ADD, ADDR_POST_INC, LOAD_DATA8, JUMP_MAP1, ...). The
// routines, their order and their field values follow the original microcode,
// with these deliberate corrections: SUBD and ADDD use the 16-bit operand
// (MEM_U16) their 16-bit addressing modes load; the second word of the memory
// COM keeps the complement on the ALU output so that the complement, not
// zero, is stored; unused fields are 0 (the original leaves the address
// selector of the previous word in place, which has the same effect).
package gup_ucode_pkg;
  import gup_pkg::*;

  localparam uword_t UW_DEFAULT = '{
    micro_op: UOP_CONTINUE, true_false: 1'b0, branch_addr: 8'h00,
    ccr_op: CCR_NOP, alu_cond_sel: AC_ZERO, usq_cond_sel: UC_ZERO,
    addr_sel: R_ZERO, data_a_sel: R_ZERO, data_b_sel: R_ZERO, data_wr_sel: R_ZERO,
    addr_alu_op: AOP_PASS, data_alu_op: DOP_A_PLUS_B, data_alu_mode: MODE_8,
    mem_func_sel: MEM_IDLE, spare: 6'h00};

  // ---------------- data ALU ----------------
  function automatic uword_t dop(uword_t w, alu_mode_e m, alu_cond_sel_e c,
                                 data_alu_op_e op, reg_sel_e a, reg_sel_e b);
    w.data_alu_mode = m;  w.alu_cond_sel = c;  w.data_alu_op = op;
    w.data_a_sel    = a;  w.data_b_sel   = b;
    return w;
  endfunction
  // 8-bit
  function automatic uword_t d8_pass(uword_t w, reg_sel_e a);              return dop(w, MODE_8, AC_ZERO,  DOP_A_PLUS_B,     a, R_ZERO); endfunction
  function automatic uword_t d8_add (uword_t w, reg_sel_e a, reg_sel_e b); return dop(w, MODE_8, AC_ZERO,  DOP_A_PLUS_B,     a, b);      endfunction
  function automatic uword_t d8_addc(uword_t w, reg_sel_e a, reg_sel_e b); return dop(w, MODE_8, AC_CCR_C, DOP_A_PLUS_B,     a, b);      endfunction
  function automatic uword_t d8_sub (uword_t w, reg_sel_e a, reg_sel_e b); return dop(w, MODE_8, AC_ONE,   DOP_A_PLUS_NOT_B, a, b);      endfunction
  function automatic uword_t d8_subc(uword_t w, reg_sel_e a, reg_sel_e b); return dop(w, MODE_8, AC_CCR_C, DOP_A_PLUS_NOT_B, a, b);      endfunction
  function automatic uword_t d8_not (uword_t w, reg_sel_e b);              return dop(w, MODE_8, AC_ZERO,  DOP_A_PLUS_NOT_B, R_ZERO, b); endfunction
  function automatic uword_t d8_and (uword_t w, reg_sel_e a, reg_sel_e b); return dop(w, MODE_8, AC_ZERO,  DOP_A_AND_B,      a, b);      endfunction
  function automatic uword_t d8_or  (uword_t w, reg_sel_e a, reg_sel_e b); return dop(w, MODE_8, AC_ZERO,  DOP_A_OR_B,       a, b);      endfunction
  function automatic uword_t d8_xor (uword_t w, reg_sel_e a, reg_sel_e b); return dop(w, MODE_8, AC_ZERO,  DOP_A_XOR_B,      a, b);      endfunction
  function automatic uword_t d8_lsh (uword_t w, reg_sel_e a, alu_cond_sel_e cin); return dop(w, MODE_8, cin, DOP_LSHIFT_A, a, R_ZERO); endfunction
  function automatic uword_t d8_rsh (uword_t w, alu_cond_sel_e cin, reg_sel_e a); return dop(w, MODE_8, cin, DOP_RSHIFT_A, a, R_ZERO); endfunction
  function automatic uword_t d8_inc (uword_t w, reg_sel_e a);              return dop(w, MODE_8, AC_ONE,   DOP_A_PLUS_B,     a, R_ZERO); endfunction
  function automatic uword_t d8_dec (uword_t w, reg_sel_e a);              return dop(w, MODE_8, AC_ZERO,  DOP_A_PLUS_NOT_B, a, R_ZERO); endfunction
  // 16-bit
  function automatic uword_t d16_pass(uword_t w, reg_sel_e a);              return dop(w, MODE_16, AC_ZERO, DOP_A_PLUS_B,     a, R_ZERO); endfunction
  function automatic uword_t d16_add (uword_t w, reg_sel_e a, reg_sel_e b); return dop(w, MODE_16, AC_ZERO, DOP_A_PLUS_B,     a, b);      endfunction
  function automatic uword_t d16_sub (uword_t w, reg_sel_e a, reg_sel_e b); return dop(w, MODE_16, AC_ONE,  DOP_A_PLUS_NOT_B, a, b);      endfunction
  function automatic uword_t d16_lsh (uword_t w, reg_sel_e a, alu_cond_sel_e cin); return dop(w, MODE_16, cin, DOP_LSHIFT_A, a, R_ZERO); endfunction
  function automatic uword_t d16_rsh (uword_t w, alu_cond_sel_e cin, reg_sel_e a); return dop(w, MODE_16, cin, DOP_RSHIFT_A, a, R_ZERO); endfunction
  function automatic uword_t d16_inc (uword_t w, reg_sel_e a);              return dop(w, MODE_16, AC_ONE,  DOP_A_PLUS_B,     a, R_ZERO); endfunction
  function automatic uword_t d16_dec (uword_t w, reg_sel_e a);              return dop(w, MODE_16, AC_ZERO, DOP_A_PLUS_NOT_B, a, R_ZERO); endfunction

  function automatic uword_t wr(uword_t w, reg_sel_e r);
    w.data_wr_sel = r;  return w;
  endfunction

  // ---------------- address ALU ----------------
  function automatic uword_t ad(uword_t w, addr_alu_op_e op, reg_sel_e r);
    w.addr_alu_op = op;  w.addr_sel = r;  return w;
  endfunction

  // ---------------- memory, CCR, sequencing ----------------
  function automatic uword_t mem(uword_t w, mem_func_e f);
    w.mem_func_sel = f;  return w;
  endfunction
  function automatic uword_t cc(uword_t w, ccr_op_e op);
    w.ccr_op = op;  return w;
  endfunction
  function automatic uword_t jump(uword_t w, uaddr_t target);
    w.micro_op = UOP_JUMP;  w.branch_addr = target;  return w;
  endfunction
  function automatic uword_t jmap(uword_t w, micro_op_e m);
    w.micro_op = m;  return w;
  endfunction
  // take the next-address rule only when the condition equals tf
  function automatic uword_t when(uword_t w, usq_cond_sel_e c, logic tf);
    w.usq_cond_sel = c;  w.true_false = tf;  return w;
  endfunction
  // fetch the next opcode and decode it (ends most instructions)
  function automatic uword_t fetch_next(uword_t w);
    return jump(mem(ad(w, AOP_POST_INC, R_PC), MEM_READ_OPCODE), L_DECODE);
  endfunction
  // read-modify-write tail: store the ALU byte at EA, then fetch
  function automatic uword_t store8_at_ea(uword_t w);
    return jump(mem(ad(w, AOP_PASS, R_EA), MEM_WRITE_BYTE), L_FETCH);
  endfunction

  // Branch condition of opcode 8'h2n: select and polarity of the test that
  // makes the branch be taken (BRA, BRN, BHI, BLS, BCC, BCS, BNE, BEQ,
  // BVC, BVS, BPL, BMI, BGE, BLT, BGT, BLE).
  function automatic uword_t branch_cond(uword_t w, logic [3:0] n);
    unique case (n)
      4'h0: return when(w, UC_ZERO, 1'b0);
      4'h1: return when(w, UC_ZERO, 1'b1);
      4'h2: return when(w, UC_BLS,  1'b0);
      4'h3: return when(w, UC_BLS,  1'b1);
      4'h4: return when(w, UC_C,    1'b0);
      4'h5: return when(w, UC_C,    1'b1);
      4'h6: return when(w, UC_Z,    1'b0);
      4'h7: return when(w, UC_Z,    1'b1);
      4'h8: return when(w, UC_V,    1'b0);
      4'h9: return when(w, UC_V,    1'b1);
      4'hA: return when(w, UC_N,    1'b0);
      4'hB: return when(w, UC_N,    1'b1);
      4'hC: return when(w, UC_BLT,  1'b0);
      4'hD: return when(w, UC_BLT,  1'b1);
      4'hE: return when(w, UC_BLE,  1'b0);
      default: return when(w, UC_BLE, 1'b1);
    endcase
  endfunction

  // Position of an accumulator routine inside the NEGx..CLRx group (COM takes
  // two words) -> low opcode nibble of the 68HC11 instruction (4x / 5x)
  function automatic logic [3:0] inh_nibble(logic [3:0] pos);
    unique case (pos)
      4'd0: return 4'h0;  4'd1: return 4'h3;  4'd3: return 4'h4;  4'd4: return 4'h6;
      4'd5: return 4'h7;  4'd6: return 4'h8;  4'd7: return 4'h9;  4'd8: return 4'hA;
      4'd9: return 4'hC;  4'd10: return 4'hD; default: return 4'hF;
    endcase
  endfunction

  // One accumulator-inherent instruction on accumulator r (A or B)
  function automatic uword_t acc_op(uword_t w, logic [3:0] lo, reg_sel_e r);
    w = wr(w, r);
    unique case (lo)
      4'h0: w = cc(d8_sub(w, R_ZERO, r), CCR_NZVC);          // NEG
      4'h3: w = cc(d8_not(w, r), CCR_NZVC);                  // COM (word 1)
      4'h4: w = cc(d8_rsh(w, AC_ZERO, r), CCR_NZVC);         // LSR
      4'h6: w = cc(d8_rsh(w, AC_CCR_C, r), CCR_NZVC);        // ROR
      4'h7: w = cc(d8_rsh(w, AC_ASHIFT, r), CCR_NZVC);       // ASR
      4'h8: w = cc(d8_lsh(w, r, AC_ZERO), CCR_NZVC);         // ASL
      4'h9: w = cc(d8_lsh(w, r, AC_CCR_C), CCR_NZVC);        // ROL
      4'hA: w = cc(d8_dec(w, r), CCR_NZV);                   // DEC
      4'hC: w = cc(d8_inc(w, r), CCR_NZV);                   // INC
      4'hD: w = cc(d8_sub(w, r, R_ZERO), CCR_NZVC);          // TST
      default: w = cc(d8_pass(w, R_ZERO), CCR_NZVC);         // CLR
    endcase
    return w;
  endfunction

  // Same operations on the memory byte at EA (read-modify-write)
  function automatic uword_t mem_op(uword_t w, logic [3:0] lo);
    unique case (lo)
      4'h0: w = cc(d8_sub(w, R_ZERO, R_MEM_U8), CCR_NZVC);
      4'h3: w = cc(d8_not(w, R_MEM_U8), CCR_NZVC);
      4'h4: w = cc(d8_rsh(w, AC_ZERO, R_MEM_U8), CCR_NZVC);
      4'h6: w = cc(d8_rsh(w, AC_CCR_C, R_MEM_U8), CCR_NZVC);
      4'h7: w = cc(d8_rsh(w, AC_ASHIFT, R_MEM_U8), CCR_NZVC);
      4'h8: w = cc(d8_lsh(w, R_MEM_U8, AC_ZERO), CCR_NZVC);
      4'h9: w = cc(d8_lsh(w, R_MEM_U8, AC_CCR_C), CCR_NZVC);
      4'hA: w = cc(d8_dec(w, R_MEM_U8), CCR_NZV);
      4'hC: w = cc(d8_inc(w, R_MEM_U8), CCR_NZV);
      4'hD: w = cc(d8_sub(w, R_MEM_U8, R_ZERO), CCR_NZVC);
      default: w = cc(d8_pass(w, R_ZERO), CCR_NZVC);
    endcase
    return store8_at_ea(w);
  endfunction

  // Accumulator-memory operation (low opcode nibble lo) on accumulator r;
  // the operand is in the memory data register, the address in EA.
  function automatic uword_t acc_mem_op(uword_t w, logic [3:0] lo, reg_sel_e r);
    unique case (lo)
      4'h0: w = fetch_next(cc(wr(d8_sub (w, r, R_MEM_U8), r), CCR_NZVC));  // SUB
      4'h1: w = fetch_next(cc(   d8_sub (w, r, R_MEM_U8),     CCR_NZVC));  // CMP
      4'h2: w = fetch_next(cc(wr(d8_subc(w, r, R_MEM_U8), r), CCR_NZVC));  // SBC
      4'h4: w = fetch_next(cc(wr(d8_and (w, r, R_MEM_U8), r), CCR_NZV));   // AND
      4'h5: w = fetch_next(cc(   d8_and (w, r, R_MEM_U8),     CCR_NZV));   // BIT
      4'h6: w = fetch_next(cc(wr(d8_pass(w, R_MEM_U8), r),    CCR_NZV));   // LDA
      4'h7: w = store8_at_ea(cc(d8_pass(w, r), CCR_NZV));                 // STA
      4'h8: w = fetch_next(cc(wr(d8_xor (w, r, R_MEM_U8), r), CCR_NZV));   // EOR
      4'h9: w = fetch_next(cc(wr(d8_addc(w, r, R_MEM_U8), r), CCR_NZVC));  // ADC
      4'hA: w = fetch_next(cc(wr(d8_or  (w, r, R_MEM_U8), r), CCR_NZV));   // ORA
      default: w = fetch_next(cc(wr(d8_add(w, r, R_MEM_U8), r), CCR_NZVC)); // ADD
    endcase
    return w;
  endfunction

  // 16-bit load (to r) and store (from r) of D, X, SP
  function automatic uword_t ld16(uword_t w, reg_sel_e r);
    return fetch_next(cc(wr(d16_pass(w, R_MEM_U16), r), CCR_NZV));
  endfunction
  function automatic uword_t st16(uword_t w, reg_sel_e r);
    return jump(mem(ad(cc(d16_pass(w, r), CCR_NZV), AOP_PASS, R_EA), MEM_WRITE_WORD), L_FETCH);
  endfunction

  // ====================================================================
  // The microprogram
  // ====================================================================
  function automatic uword_t ucode_word(uaddr_t a);
    uword_t w;
    w = UW_DEFAULT;
    if (a >= L_BRA && a < L_BSR) begin
      // conditional branches: EA = PC + offset, jump to JMP when taken,
      // otherwise fetch the next opcode
      if (a[0] == L_BRA[0]) w = jump(branch_cond(wr(d16_add(w, R_PC, R_MEM_S8), R_EA), 4'((a - L_BRA) >> 1)), L_JMP);
      else                  w = fetch_next(w);
      return w;
    end
    unique case (a)
      // ---- reset, fetch, decode ----
      L_RESET:        w = cc(wr(d16_pass(w, R_ZERO), R_PC), CCR_SET_X);
      L_FETCH:        w = mem(ad(w, AOP_POST_INC, R_PC), MEM_READ_OPCODE);
      L_DECODE:       w = jmap(w, UOP_JUMP_MAP0);
      // ---- addressing modes (map 0) ----
      L_LOAD_IMM8:    w = jmap(mem(ad(wr(d16_pass(w, R_PC), R_EA), AOP_POST_INC,  R_PC), MEM_READ_BYTE), UOP_JUMP_MAP1);
      L_LOAD_IMM16:   w = jmap(mem(ad(wr(d16_pass(w, R_PC), R_EA), AOP_POST_INC2, R_PC), MEM_READ_WORD), UOP_JUMP_MAP1);
      L_LOAD_DIR8,
      L_LOAD_DIR16,
      L_STORE_DIR,
      L_LOAD_IDX8,
      L_LOAD_IDX16,
      L_STORE_IDX:    w = mem(ad(w, AOP_POST_INC, R_PC), MEM_READ_BYTE);          // fetch 8-bit address/offset
      L_LOAD_DIR8+1:  w = jmap(mem(ad(wr(d16_pass(w, R_MEM_U8), R_EA), AOP_PASS, R_MEM_U8), MEM_READ_BYTE), UOP_JUMP_MAP1);
      L_LOAD_DIR16+1: w = jmap(mem(ad(wr(d16_pass(w, R_MEM_U8), R_EA), AOP_PASS, R_MEM_U8), MEM_READ_WORD), UOP_JUMP_MAP1);
      L_STORE_DIR+1:  w = jmap(wr(d16_pass(w, R_MEM_U8), R_EA), UOP_JUMP_MAP1);
      L_LOAD_EXT8,
      L_LOAD_EXT16,
      L_STORE_EXT:    w = mem(ad(w, AOP_POST_INC2, R_PC), MEM_READ_WORD);         // fetch 16-bit address
      L_LOAD_EXT8+1:  w = jmap(mem(ad(wr(d16_pass(w, R_MEM_U16), R_EA), AOP_PASS, R_MEM_U16), MEM_READ_BYTE), UOP_JUMP_MAP1);
      L_LOAD_EXT16+1: w = jmap(mem(ad(wr(d16_pass(w, R_MEM_U16), R_EA), AOP_PASS, R_MEM_U16), MEM_READ_WORD), UOP_JUMP_MAP1);
      L_STORE_EXT+1:  w = jmap(wr(d16_pass(w, R_MEM_U16), R_EA), UOP_JUMP_MAP1);
      L_LOAD_IDX8+1,
      L_LOAD_IDX16+1: w = wr(d16_add(w, R_MEM_U8, R_X), R_EA);                    // EA = X + offset
      L_LOAD_IDX8+2:  w = jmap(mem(ad(w, AOP_PASS, R_EA), MEM_READ_BYTE), UOP_JUMP_MAP1);
      L_LOAD_IDX16+2: w = jmap(mem(ad(w, AOP_PASS, R_EA), MEM_READ_WORD), UOP_JUMP_MAP1);
      L_STORE_IDX+1:  w = jmap(wr(d16_add(w, R_MEM_U8, R_X), R_EA), UOP_JUMP_MAP1);
      L_REL:          w = jmap(mem(ad(w, AOP_POST_INC, R_PC), MEM_READ_BYTE), UOP_JUMP_MAP1);
      L_PAGE_2:       w = jmap(mem(ad(w, AOP_POST_INC, R_PC), MEM_READ_OPCODE), UOP_JUMP_MAP2);
      // ---- inherent instructions (map 0) ----
      L_NOP:          w = fetch_next(w);
      L_LSRD:         w = fetch_next(cc(wr(d16_rsh(w, AC_ZERO, R_D), R_D), CCR_NZVC));
      L_ASLD:         w = fetch_next(cc(wr(d16_lsh(w, R_D, AC_ZERO), R_D), CCR_NZVC));
      L_TAP:          w = fetch_next(cc(d8_pass(w, R_A), CCR_LOAD));
      L_TPA:          w = fetch_next(wr(d8_pass(w, R_CCR), R_A));
      L_INX:          w = fetch_next(cc(wr(d16_inc(w, R_X), R_X), CCR_Z));
      L_DEX:          w = fetch_next(cc(wr(d16_dec(w, R_X), R_X), CCR_Z));
      L_CLV:          w = fetch_next(cc(w, CCR_CLR_V));
      L_SEV:          w = fetch_next(cc(w, CCR_SET_V));
      L_CLC:          w = fetch_next(cc(w, CCR_CLR_C));
      L_SEC:          w = fetch_next(cc(w, CCR_SET_C));
      L_CLI:          w = fetch_next(cc(w, CCR_CLR_I));
      L_SEI:          w = fetch_next(cc(w, CCR_SET_I));
      L_SBA:          w = fetch_next(cc(wr(d8_sub(w, R_A, R_B), R_A), CCR_NZVC));
      L_CBA:          w = fetch_next(cc(d8_sub(w, R_A, R_B), CCR_NZVC));
      L_TAB:          w = fetch_next(cc(wr(d8_pass(w, R_A), R_B), CCR_NZV));
      L_TBA:          w = fetch_next(cc(wr(d8_pass(w, R_B), R_A), CCR_NZV));
      L_ABA:          w = fetch_next(cc(wr(d8_add(w, R_A, R_B), R_A), CCR_HNZVC));
      L_TSX:          w = fetch_next(wr(d16_inc(w, R_SP), R_X));
      L_INS:          w = fetch_next(wr(d16_inc(w, R_SP), R_SP));
      L_PULA, L_PULB: w = mem(ad(w, AOP_PRE_INC, R_SP), MEM_READ_BYTE);
      L_PULA+1:       w = fetch_next(wr(d8_pass(w, R_MEM_U8), R_A));
      L_PULB+1:       w = fetch_next(wr(d8_pass(w, R_MEM_U8), R_B));
      L_DES:          w = fetch_next(wr(d16_dec(w, R_SP), R_SP));
      L_TXS:          w = fetch_next(wr(d16_dec(w, R_X), R_SP));
      L_PSHA:         w = jump(mem(ad(d8_pass(w, R_A), AOP_POST_DEC, R_SP), MEM_WRITE_BYTE), L_FETCH);
      L_PSHB:         w = jump(mem(ad(d8_pass(w, R_B), AOP_POST_DEC, R_SP), MEM_WRITE_BYTE), L_FETCH);
      L_PULX, L_RTS:  w = mem(ad(w, AOP_PRE_INC, R_SP), MEM_READ_WORD);
      L_PULX+1:       w = jump(ad(wr(d16_pass(w, R_MEM_U16), R_X),  AOP_PRE_INC, R_SP), L_FETCH);
      L_RTS+1:        w = jump(ad(wr(d16_pass(w, R_MEM_U16), R_PC), AOP_PRE_INC, R_SP), L_FETCH);
      L_ABX:          w = fetch_next(wr(d16_add(w, R_X, R_B), R_X));
      L_PSHX:         w = mem(ad(d16_pass(w, R_X), AOP_PRE_DEC, R_SP), MEM_WRITE_WORD);
      L_PSHX+1:       w = jump(ad(w, AOP_PRE_DEC, R_SP), L_FETCH);
      L_NEGA, L_COMA, L_LSRA, L_RORA, L_ASRA, L_ASLA, L_ROLA, L_DECA, L_INCA, L_TSTA, L_CLRA:
                      w = fetch_next(acc_op(w, inh_nibble(4'(a - L_NEGA)), R_A));
      L_NEGB, L_COMB, L_LSRB, L_RORB, L_ASRB, L_ASLB, L_ROLB, L_DECB, L_INCB, L_TSTB, L_CLRB:
                      w = fetch_next(acc_op(w, inh_nibble(4'(a - L_NEGB)), R_B));
      L_XGDX:         w = wr(d16_pass(w, R_X), R_EA);
      L_XGDX+1:       w = wr(d16_pass(w, R_D), R_X);
      L_XGDX+2:       w = fetch_next(wr(d16_pass(w, R_EA), R_D));
      // ---- operations (map 1) ----
      L_BSR:          w = jump(wr(d16_add(w, R_PC, R_MEM_S8), R_EA), L_JSR);
      L_NEG:          w = mem_op(w, 4'h0);
      L_COM:          w = cc(d8_not(w, R_MEM_U8), CCR_NZVC);
      L_LSR:          w = mem_op(w, 4'h4);
      L_ROR:          w = mem_op(w, 4'h6);
      L_ASR:          w = mem_op(w, 4'h7);
      L_ASL:          w = mem_op(w, 4'h8);
      L_ROL:          w = mem_op(w, 4'h9);
      L_DEC:          w = mem_op(w, 4'hA);
      L_INC:          w = mem_op(w, 4'hC);
      L_TST:          w = mem_op(w, 4'hD);
      L_CLR:          w = mem_op(w, 4'hF);
      L_JMP:          w = jump(mem(ad(wr(d16_inc(w, R_EA), R_PC), AOP_PASS, R_EA), MEM_READ_OPCODE), L_DECODE);
      L_SUBA, L_CMPA, L_SBCA, L_ANDA, L_BITA, L_LDAA, L_STAA, L_EORA, L_ADCA, L_ORAA, L_ADDA:
                      w = acc_mem_op(w, 4'(a - L_SUBA), R_A);   // slot order = opcode low nibble
      L_SUBB, L_CMPB, L_SBCB, L_ANDB, L_BITB, L_LDAB, L_STAB, L_EORB, L_ADCB, L_ORAB, L_ADDB:
                      w = acc_mem_op(w, 4'(a - L_SUBB), R_B);
      L_SUBD:         w = fetch_next(cc(wr(d16_sub(w, R_D, R_MEM_U16), R_D), CCR_NZVC));
      L_ADDD:         w = fetch_next(cc(wr(d16_add(w, R_D, R_MEM_U16), R_D), CCR_NZVC));
      L_CPX:          w = fetch_next(cc(d16_sub(w, R_X, R_MEM_U16), CCR_NZVC));
      L_JSR:          w = mem(ad(d16_pass(w, R_PC), AOP_PRE_DEC, R_SP), MEM_WRITE_WORD);
      L_JSR+1:        w = jump(ad(wr(d16_pass(w, R_EA), R_PC), AOP_PRE_DEC, R_SP), L_FETCH);
      L_LDS:          w = ld16(w, R_SP);
      L_STS:          w = st16(w, R_SP);
      L_LDD:          w = ld16(w, R_D);
      L_STD:          w = st16(w, R_D);
      L_LDX:          w = ld16(w, R_X);
      L_STX:          w = st16(w, R_X);
      // ---- words after a first word, and the trap loop ----
      default: begin
        if      (a == L_COMA + 8'd1 || a == L_COMB + 8'd1) w = fetch_next(cc(w, CCR_SET_C));
        else if (a == L_COM + 8'd1) w = cc(mem_op(w, 4'h3), CCR_SET_C);
        else                        w = jump(w, L_TRAP);   // unimplemented: spin at TRAP
      end
    endcase
    return w;
  endfunction

endpackage
