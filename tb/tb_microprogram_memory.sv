// tb_microprogram_memory -- checks the microcode ROM.
//
// Timing: the ROM registers its address, so q must change only on a rising
// clock edge and then show the word of the address presented q_prev it.
// Contents: a set of microwords is written out field by field from the
// micro-operations they must perform (reset, fetch, decode, an addressing
// mode, loads, a store, a push, a conditional branch, a subroutine call,
// 16-bit arithmetic, the trap loop) and compared in full with the ROM.
// Every one of the 256 words is also checked for rules the whole microprogram
// obeys: the spare bits are 0, only defined condition code operations, memory
// functions and next-address operations occur (no map 3 to 5), every word
// that reads memory in 8-bit mode or writes a register names a defined
// register, and jumps go only to routine entry points or the trap loop.
module tb_microprogram_memory;
  import gup_pkg::*;

  logic [7:0]  address;
  logic        clock = 1'b0;
  logic [55:0] q;
  int checks = 0, failures = 0;

  always #5 clock = ~clock;

  microprogram_memory dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic uword_t blank();
    uword_t w;
    w = '0;
    w.micro_op = UOP_CONTINUE; w.ccr_op = CCR_NOP; w.alu_cond_sel = AC_ZERO; w.usq_cond_sel = UC_ZERO;
    w.addr_sel = R_ZERO; w.data_a_sel = R_ZERO; w.data_b_sel = R_ZERO; w.data_wr_sel = R_ZERO;
    w.addr_alu_op = AOP_PASS; w.data_alu_op = DOP_A_PLUS_B; w.data_alu_mode = MODE_8;
    w.mem_func_sel = MEM_IDLE;
    return w;
  endfunction

  logic [55:0] image [256];

  task automatic expect_word(input logic [7:0] a, input uword_t w, input string name);
    check(image[a] == 56'(w), $sformatf("%s (%h): %h expected %h", name, a, image[a], 56'(w)));
  endtask

  initial begin
    uword_t w, e;
    // ---- read latency: q follows the address one edge later ----
    address = 8'h01;
    @(posedge clock); #1;
    address = 8'h02;
    begin
      logic [55:0] q_prev;
      q_prev = q;
      #2 check(q == q_prev, "q changed without a clock edge");
      @(posedge clock); #1;
      check(q != q_prev, "q did not follow the new address");
    end
    // ---- read the whole ROM ----
    for (int a = 0; a < 256; a++) begin
      address = a[7:0];
      @(posedge clock); #1;
      image[a] = q;
    end
    // consecutive addresses give distinct neighbouring words
    check(image[8'h01] != image[8'h02], "fetch and decode words differ");

    // ---- words written out from their micro-operations ----
    e = blank(); e.data_wr_sel = R_PC; e.data_alu_mode = MODE_16; e.ccr_op = CCR_SET_X;
    expect_word(L_RESET, e, "RESET: PC = 0, set X");
    e = blank(); e.addr_sel = R_PC; e.addr_alu_op = AOP_POST_INC; e.mem_func_sel = MEM_READ_OPCODE;
    expect_word(L_FETCH, e, "FETCH: read opcode at PC++");
    e = blank(); e.micro_op = UOP_JUMP_MAP0;
    expect_word(L_DECODE, e, "DECODE: dispatch on map 0");
    e = blank(); e.micro_op = UOP_JUMP_MAP1; e.data_a_sel = R_PC; e.data_wr_sel = R_EA; e.data_alu_mode = MODE_16;
    e.addr_sel = R_PC; e.addr_alu_op = AOP_POST_INC; e.mem_func_sel = MEM_READ_BYTE;
    expect_word(L_LOAD_IMM8, e, "immediate 8: EA = PC, read byte at PC++");
    e = blank(); e.micro_op = UOP_JUMP; e.branch_addr = L_DECODE; e.data_a_sel = R_MEM_U8; e.data_wr_sel = R_A;
    e.ccr_op = CCR_NZV; e.addr_sel = R_PC; e.addr_alu_op = AOP_POST_INC; e.mem_func_sel = MEM_READ_OPCODE;
    expect_word(L_LDAA, e, "LDAA: A = M, NZV, fetch next");
    e = blank(); e.micro_op = UOP_JUMP; e.branch_addr = L_FETCH; e.data_a_sel = R_A; e.ccr_op = CCR_NZV;
    e.addr_sel = R_EA; e.mem_func_sel = MEM_WRITE_BYTE;
    expect_word(L_STAA, e, "STAA: write A at EA");
    e = blank(); e.micro_op = UOP_JUMP; e.branch_addr = L_FETCH; e.data_a_sel = R_A;
    e.addr_sel = R_SP; e.addr_alu_op = AOP_POST_DEC; e.mem_func_sel = MEM_WRITE_BYTE;
    expect_word(L_PSHA, e, "PSHA: write A at SP--");
    e = blank(); e.micro_op = UOP_JUMP; e.branch_addr = L_JMP; e.data_a_sel = R_PC; e.data_b_sel = R_MEM_S8;
    e.data_wr_sel = R_EA; e.data_alu_mode = MODE_16; e.usq_cond_sel = UC_Z; e.true_false = 1'b1;
    expect_word(L_BRA + 8'd14, e, "BEQ: EA = PC + offset, to JMP if Z");
    e = blank(); e.addr_sel = R_PC; e.addr_alu_op = AOP_POST_INC; e.mem_func_sel = MEM_READ_OPCODE;
    e.micro_op = UOP_JUMP; e.branch_addr = L_DECODE;
    expect_word(L_BRA + 8'd15, e, "BEQ not taken: fetch next");
    e = blank(); e.data_a_sel = R_PC; e.data_alu_mode = MODE_16; e.addr_sel = R_SP; e.addr_alu_op = AOP_PRE_DEC;
    e.mem_func_sel = MEM_WRITE_WORD;
    expect_word(L_JSR, e, "JSR: push PC");
    e = blank(); e.micro_op = UOP_JUMP; e.branch_addr = L_DECODE; e.data_a_sel = R_D; e.data_b_sel = R_MEM_U16;
    e.data_wr_sel = R_D; e.data_alu_mode = MODE_16; e.data_alu_op = DOP_A_PLUS_NOT_B; e.alu_cond_sel = AC_ONE;
    e.ccr_op = CCR_NZVC; e.addr_sel = R_PC; e.addr_alu_op = AOP_POST_INC; e.mem_func_sel = MEM_READ_OPCODE;
    expect_word(L_SUBD, e, "SUBD: D = D - M16, NZVC");
    e = blank(); e.micro_op = UOP_JUMP; e.branch_addr = L_TRAP;
    expect_word(L_TRAP, e, "TRAP loop");

    // ---- rules for every word ----
    for (int a = 0; a < 256; a++) begin
      w = uword_t'(image[a]);
      check(w.spare == 6'h00, $sformatf("%h: spare bits", a));
      check(5'(w.ccr_op) <= 5'd14, $sformatf("%h: ccr_op %0d", a, w.ccr_op));
      check(3'(w.mem_func_sel) <= 3'd5, $sformatf("%h: mem_func", a));
      check(3'(w.micro_op) <= 3'(UOP_JUMP_MAP2), $sformatf("%h: micro_op", a));
      check(4'(w.data_wr_sel) <= 4'(R_A), $sformatf("%h: write target", a));
      check(4'(w.addr_alu_op) <= 4'(AOP_PASS), $sformatf("%h: addr op", a));
      check(3'(w.data_alu_op) <= 3'(DOP_RSHIFT_A), $sformatf("%h: data op", a));
      if (w.micro_op == UOP_JUMP)
        check(w.branch_addr inside {L_FETCH, L_DECODE, L_JMP, L_JSR, L_TRAP},
              $sformatf("%h: jump target %h", a, w.branch_addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
