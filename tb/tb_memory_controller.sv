// tb_memory_controller -- self-checking test of the bus sequencer.
//
// A 64 KiB memory model sits on the external bus: it returns the addressed
// byte while rd_en is high and stores wr_data_bus on each rising clock edge
// with wr_en high. The test issues 3000 random memory functions with random
// addresses and data, changing the request only just after a rising edge on
// which sync was high, as the microsequencer does. For each it checks:
//   - the clock count until the committing edge (sync high): idle 1, byte
//     write 2, byte or opcode read 3, word write 4, word read 6;
//   - reads: rd_data_out[7:0] (byte), rd_data_out (word, high byte from the
//     address, low byte from address + 1) or opcode_out equals the memory;
//   - writes: exactly one write edge per byte, at the right address with the
//     right data (high byte first for a word), wr_data_oe high throughout;
//   - no write strobe outside writes, no read strobe outside reads.
module tb_memory_controller;
  import gup_pkg::*;

  logic        nrst, clk = 1'b0;
  logic        sync, wr_data_oe, wr_en, rd_en;
  logic [15:0] address_bus;
  logic [7:0]  rd_data_bus, wr_data_bus;
  mem_func_e   func_sel;
  logic [15:0] address_alu_q, data_alu_q;
  logic [15:0] rd_data_out;
  logic [7:0]  opcode_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  memory_controller dut (.*);

  logic [7:0] mem [65536];
  assign rd_data_bus = rd_en ? mem[address_bus] : 8'h00;

  // write monitor
  int unsigned n_wr = 0, n_rd_strobe = 0;
  logic [15:0] wr_addr [2];
  logic [7:0]  wr_data [2];
  always @(posedge clk) begin
    if (nrst && wr_en) begin
      if (n_wr < 2) begin wr_addr[n_wr] = address_bus; wr_data[n_wr] = wr_data_bus; end
      n_wr++;
      mem[address_bus] = wr_data_bus;
      checks++;
      if (!wr_data_oe) begin failures++; $display("FAIL: wr_en without wr_data_oe"); end
    end
    if (nrst && rd_en) n_rd_strobe++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(input mem_func_e f, input logic [15:0] a, input logic [15:0] d);
    int unsigned clocks; logic [15:0] a1;
    func_sel = f; address_alu_q = a; data_alu_q = d;
    n_wr = 0; n_rd_strobe = 0;
    clocks = 0;
    do begin @(posedge clk); clocks++; end while (!sync && clocks < 20);
    #1;
    a1 = a + 16'd1;
    unique case (f)
      MEM_IDLE: begin
        check(clocks == 1, $sformatf("IDLE took %0d clocks", clocks));
        check(n_wr == 0 && n_rd_strobe == 0, "strobe during IDLE");
      end
      MEM_WRITE_BYTE: begin
        check(clocks == 2, $sformatf("WRITE_BYTE took %0d clocks", clocks));
        check(n_wr == 1, $sformatf("WRITE_BYTE made %0d writes", n_wr));
        check(wr_addr[0] == a && wr_data[0] == d[7:0], $sformatf("WRITE_BYTE %h <- %h", wr_addr[0], wr_data[0]));
        check(n_rd_strobe == 0, "read strobe during a write");
      end
      MEM_WRITE_WORD: begin
        check(clocks == 4, $sformatf("WRITE_WORD took %0d clocks", clocks));
        check(n_wr == 2, $sformatf("WRITE_WORD made %0d writes", n_wr));
        check(wr_addr[0] == a && wr_data[0] == d[15:8], "WRITE_WORD high byte");
        check(wr_addr[1] == a1 && wr_data[1] == d[7:0], "WRITE_WORD low byte");
        check(n_rd_strobe == 0, "read strobe during a write");
      end
      MEM_READ_BYTE: begin
        check(clocks == 3, $sformatf("READ_BYTE took %0d clocks", clocks));
        check(rd_data_out[7:0] == mem[a], $sformatf("READ_BYTE %h: %h expected %h", a, rd_data_out[7:0], mem[a]));
        check(n_wr == 0, "write during a read");
      end
      MEM_READ_OPCODE: begin
        check(clocks == 3, $sformatf("READ_OPCODE took %0d clocks", clocks));
        check(opcode_out == mem[a], $sformatf("READ_OPCODE %h: %h expected %h", a, opcode_out, mem[a]));
        check(n_wr == 0, "write during a read");
      end
      default: begin
        check(clocks == 6, $sformatf("READ_WORD took %0d clocks", clocks));
        check(rd_data_out == {mem[a], mem[a1]}, $sformatf("READ_WORD %h: %h expected %h", a, rd_data_out, {mem[a], mem[a1]}));
        check(n_wr == 0, "write during a read");
      end
    endcase
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'(i * 7 + (i >> 8));
    nrst = 1'b0; func_sel = MEM_IDLE; address_alu_q = '0; data_alu_q = '0;
    repeat (3) @(posedge clk);
    #1 nrst = 1'b1;
    @(posedge clk); #1;   // first IDLE commit after reset
    // each function once on a fixed address, then random traffic near it
    run(MEM_WRITE_WORD, 16'h1234, 16'hA55A);
    run(MEM_READ_WORD, 16'h1234, 16'h0);
    check(rd_data_out == 16'hA55A, "word written and read back");
    run(MEM_WRITE_BYTE, 16'hFFFF, 16'h00C3);
    run(MEM_READ_BYTE, 16'hFFFF, 16'h0);
    check(rd_data_out[7:0] == 8'hC3, "byte written and read back");
    run(MEM_READ_OPCODE, 16'h1235, 16'h0);
    check(opcode_out == 8'h5A, "opcode read");
    for (int k = 0; k < 3000; k++)
      run(mem_func_e'($urandom % 6), 16'h4000 + 16'($urandom % 64), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
