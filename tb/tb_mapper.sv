// tb_mapper -- checks the opcode decoder against the reference decode table.
//
// mapper_expected.hex holds one line per opcode 00..FF: the expected map-0
// vector (addressing mode or inherent routine) in the high byte and the
// expected map-1 vector (operation routine) in the low byte, FF meaning "no
// entry, trap". The table is the published decode table of the original
// microcode, with the SUBB direct, indexed and extended opcodes (D0, E0,
// F0) added as the original micro-assembler source assigns them. Every
// opcode is applied and both vectors are compared; maps 2 to 5 must report
// "no entry" for every opcode. A few entries are also checked by name
// against the microprogram labels. The block is combinational: each check
// samples after a 1 ns settle time.
module tb_mapper;
  import gup_pkg::*;

  logic [7:0] opcode;
  logic [7:0] map0_vector, map1_vector, map2_vector, map3_vector, map4_vector, map5_vector;
  logic [15:0] expected [256];
  int checks = 0, failures = 0;

  mapper dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    $readmemh("tb/mapper_expected.hex", expected);
    for (int op = 0; op < 256; op++) begin
      opcode = op[7:0];
      #1;
      check(map0_vector == expected[op][15:8], $sformatf("op %h map0 %h expected %h", opcode, map0_vector, expected[op][15:8]));
      check(map1_vector == expected[op][7:0],  $sformatf("op %h map1 %h expected %h", opcode, map1_vector, expected[op][7:0]));
      check({map2_vector, map3_vector, map4_vector, map5_vector} == {4{8'hFF}}, $sformatf("op %h maps 2..5", opcode));
    end
    // spot checks by routine name
    opcode = 8'h86; #1; check(map0_vector == L_LOAD_IMM8 && map1_vector == L_LDAA, "LDAA #");
    opcode = 8'h8D; #1; check(map0_vector == L_REL && map1_vector == L_BSR, "BSR");
    opcode = 8'h2F; #1; check(map0_vector == L_REL && map1_vector == L_BRA + 8'd30, "BLE");
    opcode = 8'hFE; #1; check(map0_vector == L_LOAD_EXT16 && map1_vector == L_LDX, "LDX ext");
    opcode = 8'h6E; #1; check(map0_vector == L_STORE_IDX && map1_vector == L_JMP, "JMP idx");
    opcode = 8'h3F; #1; check(map0_vector == L_SWI, "SWI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
