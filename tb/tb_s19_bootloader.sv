// tb_s19_bootloader -- workload test: the CPU loads and starts a program
// sent to it as Motorola S-records over a UART.
//
// The CPU runs from a 64 KiB behavioural memory (combinational read while
// rd_en is high, one byte written per rising clock edge with wr_en high) with
// three memory-mapped devices, the board layout this processor was built for:
//   $8000  UART data     read: next received byte, write: send a byte
//   $8001  UART status   bit 0 = a received byte is waiting, bit 1 = busy
//   $FFFF  LEDs          write only
// The UART model receives from a queue filled by the testbench; a byte
// counts as read when a read strobe at $8000 ends. Its transmitter is never
// busy.
//
// The boot program at $0000, assembled here by a small two-pass assembler,
// sets the stack to $0FFF, prints a banner, then reads S-records: every S1
// record's data bytes are stored at its address and its checksum is
// verified; S9 writes the number of loaded bytes to the LEDs and jumps to
// $0100. The records carry a small program for $0100 that adds up an 8-byte
// table (sent as a second record to $0200), writes the sum to the LEDs and
// prints '!'. A third record deliberately carries a wrong checksum; the
// loader counts it in its error counter at ERRS.
//
// Checks: the banner and the final '!' on the UART, every loaded byte in
// memory, the LED values (byte count, then the table sum), the error
// counter, that the input was read up to the S9 record and that the stack
// is balanced. A watchdog ends the run if the CPU hangs.
module tb_s19_bootloader;
  import gup_pkg::*;

  logic        clk = 1'b0;
  logic        nrst;
  logic [7:0]  rd_data_bus;
  logic        wr_data_oe, wr_en, rd_en;
  logic [15:0] addr_bus;
  logic [7:0]  wr_data_bus;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  gator_uprocessor dut (.*);

  localparam logic [15:0] UART_DATA = 16'h8000, UART_STAT = 16'h8001, LEDS = 16'hFFFF;
  localparam logic [15:0] PROG = 16'h0100, TABLE = 16'h0200, VARS = 16'h0E00;
  localparam logic [15:0] CNT = VARS, ADDRH = VARS + 16'd1, SUM = VARS + 16'd3,
                          TOTAL = VARS + 16'd4, ERRS = VARS + 16'd5;
  localparam string BANNER = "\r\nS19 LOADER\r\n";

  // ---------------- memory and devices ----------------
  logic [7:0] mem [65536];
  logic [7:0] rxq [$];
  logic [7:0] txq [$];
  logic [7:0] leds [$];
  logic       rd_en_q = 1'b0;

  always_comb begin
    if (addr_bus == UART_DATA)      rd_data_bus = (rxq.size() != 0) ? rxq[0] : 8'h00;
    else if (addr_bus == UART_STAT) rd_data_bus = {7'd0, rxq.size() != 0};
    else                            rd_data_bus = mem[addr_bus];
  end

  always @(posedge clk) begin
    rd_en_q <= rd_en;
    if (nrst && rd_en_q && !rd_en && addr_bus == UART_DATA && rxq.size() != 0) void'(rxq.pop_front());
    if (nrst && wr_en) begin
      if (addr_bus == UART_DATA) txq.push_back(wr_data_bus);
      else if (addr_bus == LEDS) leds.push_back(wr_data_bus);
      else mem[addr_bus] = wr_data_bus;
    end
  end

  // ---------------- two-pass assembler ----------------
  int unsigned pc_emit;
  int unsigned lbl [string];

  task automatic emit(input logic [7:0] b); mem[pc_emit[15:0]] = b; pc_emit++; endtask
  task automatic e2(input logic [7:0] a, input logic [7:0] b); emit(a); emit(b); endtask
  task automatic e3(input logic [7:0] a, input logic [15:0] w); emit(a); emit(w[15:8]); emit(w[7:0]); endtask
  task automatic label(input string n); lbl[n] = pc_emit; endtask
  function automatic logic [15:0] at(input string n); return lbl.exists(n) ? 16'(lbl[n]) : 16'h0000; endfunction
  task automatic br(input logic [7:0] op, input string n);   // relative branch to a label
    int off;
    off = int'(at(n)) - int'(pc_emit + 2);
    if (lbl.exists(n) && (off < -128 || off > 127)) $fatal(1, "branch to %s out of range", n);
    e2(op, 8'(off));
  endtask
  task automatic jsr(input string n); e3(8'hBD, at(n)); endtask

  // 68HC11 opcodes used below
  localparam logic [7:0] LDS_I = 8'h8E, LDX_I = 8'hCE, LDX_E = 8'hFE, STX_E = 8'hFF, CLR_E = 8'h7F,
    INC_E = 8'h7C, LDAA_I = 8'h86, LDAA_E = 8'hB6, LDAA_X = 8'hA6, STAA_E = 8'hB7, STAA_X = 8'hA7,
    LDAB_I = 8'hC6, CMPA_I = 8'h81, SUBA_I = 8'h80, ANDA_I = 8'h84, ADDA_E = 8'hBB, ADDA_X = 8'hAB,
    ASLA = 8'h48, DECA = 8'h4A, DECB = 8'h5A, TAB = 8'h16, ABA = 8'h1B, INX = 8'h08, PSHA = 8'h36,
    PULA = 8'h32, PSHB = 8'h37, PULB = 8'h33, RTS = 8'h39, JMP_E = 8'h7E,
    BRA = 8'h20, BHS = 8'h24, BNE = 8'h26, BEQ = 8'h27;

  task automatic boot_program();
    pc_emit = 0;
    e3(LDS_I, 16'h0FFF);
    e3(CLR_E, TOTAL); e3(CLR_E, ERRS);
    e3(LDX_I, at("BANNER")); jsr("PUTS");
    label("MAIN");
    jsr("GETC"); e2(CMPA_I, "S"); br(BNE, "MAIN");
    jsr("GETC"); e2(CMPA_I, "1"); br(BEQ, "REC1");
    e2(CMPA_I, "9"); br(BNE, "MAIN");
    e3(LDAA_E, TOTAL); e3(STAA_E, LEDS); e3(JMP_E, PROG);
    label("REC1");                                   // S1: count, address, data, checksum
    jsr("GETBYTE"); e3(STAA_E, SUM); e2(SUBA_I, 8'd3); e3(STAA_E, CNT);
    jsr("GETBYTE"); e3(STAA_E, ADDRH); jsr("SUMA");
    jsr("GETBYTE"); e3(STAA_E, ADDRH + 16'd1); jsr("SUMA");
    label("DATA");
    e3(LDAA_E, CNT); br(BEQ, "CHECK"); emit(DECA); e3(STAA_E, CNT);
    jsr("GETBYTE"); e3(LDX_E, ADDRH); e2(STAA_X, 8'd0); emit(INX); e3(STX_E, ADDRH);
    jsr("SUMA"); e3(INC_E, TOTAL); br(BRA, "DATA");
    label("CHECK");
    jsr("GETBYTE"); jsr("SUMA"); e2(CMPA_I, 8'hFF); br(BEQ, "MAIN");
    e3(INC_E, ERRS); br(BRA, "MAIN");
    label("SUMA");                                   // SUM += A, A = SUM
    e3(ADDA_E, SUM); e3(STAA_E, SUM); emit(RTS);
    label("GETBYTE");                                // two hex digits -> A, B preserved
    emit(PSHB); jsr("GETHEX"); emit(ASLA); emit(ASLA); emit(ASLA); emit(ASLA); emit(TAB);
    jsr("GETHEX"); emit(ABA); emit(PULB); emit(RTS);
    label("GETHEX");                                 // one hex digit '0'-'9' / 'A'-'F' -> A
    jsr("GETC"); e2(CMPA_I, "A"); br(BHS, "LETTER"); e2(SUBA_I, "0"); emit(RTS);
    label("LETTER"); e2(SUBA_I, 8'h37); emit(RTS);
    label("GETC");
    e3(LDAA_E, UART_STAT); e2(ANDA_I, 8'h01); br(BEQ, "GETC"); e3(LDAA_E, UART_DATA); emit(RTS);
    label("PUTC");
    emit(PSHA); label("PUTC_WAIT"); e3(LDAA_E, UART_STAT); e2(ANDA_I, 8'h02); br(BNE, "PUTC_WAIT");
    emit(PULA); e3(STAA_E, UART_DATA); emit(RTS);
    label("PUTS");                                   // print the zero-terminated string at X
    e2(LDAA_X, 8'd0); br(BEQ, "PUTS_END"); jsr("PUTC"); emit(INX); br(BRA, "PUTS");
    label("PUTS_END"); emit(RTS);
    label("BANNER");
    for (int i = 0; i < BANNER.len(); i++) emit(BANNER[i]);
    emit(8'h00);
  endtask

  // the program that is downloaded to $0100 (assembled into an array)
  logic [7:0] user_code [$];
  task automatic user_program();
    int unsigned save;
    save = pc_emit;
    pc_emit = 32'(PROG);
    e2(LDAA_I, 8'h00); e3(LDX_I, TABLE); e2(LDAB_I, 8'd8);
    label("ADD"); e2(ADDA_X, 8'd0); emit(INX); emit(DECB); br(BNE, "ADD");
    e3(STAA_E, LEDS); e2(LDAA_I, "!"); jsr("PUTC");
    label("HALT"); br(BRA, "HALT");
    user_code.delete();
    for (int unsigned a = 32'(PROG); a < pc_emit; a++) begin
      user_code.push_back(mem[a]);
      mem[a] = 8'h00;              // it must arrive through the loader
    end
    pc_emit = save;
  endtask

  // ---------------- S-record generation ----------------
  function automatic logic [7:0] hexc(input logic [3:0] n);
    return (n < 10) ? 8'("0") + 8'(n) : 8'("A") + 8'(n) - 8'd10;
  endfunction
  task automatic send_byte(input logic [7:0] b); rxq.push_back(hexc(b[7:4])); rxq.push_back(hexc(b[3:0])); endtask
  task automatic send_s1(input logic [15:0] addr, input logic [7:0] data [$], input logic bad_sum);
    logic [7:0] sum;
    rxq.push_back("S"); rxq.push_back("1");
    sum = 8'(data.size() + 3) + addr[15:8] + addr[7:0];
    send_byte(8'(data.size() + 3)); send_byte(addr[15:8]); send_byte(addr[7:0]);
    foreach (data[i]) begin send_byte(data[i]); sum += data[i]; end
    send_byte(~sum ^ {7'd0, bad_sum});
    rxq.push_back(8'h0D); rxq.push_back(8'h0A);
  endtask

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  // ---------------- stimulus and checks ----------------
  logic [7:0] table_data [$];
  logic [7:0] junk [$];
  logic [7:0] expect_sum;
  int unsigned total;

  initial begin
    nrst = 1'b0;
    foreach (mem[i]) mem[i] = 8'(i * 37 + 11);   // defined contents everywhere
    boot_program(); boot_program();              // pass 2 resolves forward labels
    user_program(); user_program();

    expect_sum = 8'h00;
    for (int i = 0; i < 8; i++) begin
      table_data.push_back(8'($urandom));
      expect_sum += table_data[i];
    end
    for (int i = 0; i < 3; i++) junk.push_back(8'($urandom));

    rxq.push_back("X");                          // noise before the first record
    send_s1(PROG, user_code, 1'b0);
    send_s1(TABLE, table_data, 1'b0);
    send_s1(16'h0400, junk, 1'b1);               // wrong checksum: counted as an error
    rxq.push_back("S"); rxq.push_back("9");
    send_byte(8'h03); send_byte(8'h00); send_byte(8'h00); send_byte(8'hFC);
    total = user_code.size() + table_data.size() + junk.size();

    repeat (3) @(posedge clk);
    #1 nrst = 1'b1;

    wait (leds.size() == 2 && txq.size() == BANNER.len() + 1);
    repeat (200) @(posedge clk);

    check(txq.size() == BANNER.len() + 1, $sformatf("UART sent %0d bytes", txq.size()));
    for (int i = 0; i < BANNER.len(); i++)
      check(txq[i] == BANNER[i], $sformatf("banner byte %0d = %h", i, txq[i]));
    check(txq[BANNER.len()] == "!", "program output");
    check(leds[0] == 8'(total), $sformatf("LEDs after load %h, expected %h", leds[0], 8'(total)));
    check(leds[1] == expect_sum, $sformatf("LEDs from program %h, expected %h", leds[1], expect_sum));
    check(leds.size() == 2, "two LED writes");
    foreach (user_code[i]) check(mem[PROG + 16'(i)] == user_code[i], $sformatf("code byte %0d", i));
    foreach (table_data[i]) check(mem[TABLE + 16'(i)] == table_data[i], $sformatf("table byte %0d", i));
    foreach (junk[i]) check(mem[16'h0400 + 16'(i)] == junk[i], $sformatf("record 3 byte %0d", i));
    check(mem[ERRS] == 8'd1, $sformatf("checksum errors %0d", mem[ERRS]));
    check(rxq.size() == 8, $sformatf("%0d UART bytes left unread, expected the 8 after S9", rxq.size()));
    check(dut.u_regs.sp_reg == 16'h0FFF, "stack balanced");
    $display("loaded %0d bytes, %0d clocks, %0d UART bytes sent", total, cycle, txq.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: leds %0d, tx %0d, rx left %0d", leds.size(), txq.size(), rxq.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
