// tb_register_array -- self-checking test of the register array.
//
// Drives 3000 random micro-operations: random register selects on the
// address port and both data read ports, a random data-write target, random
// data and address-ALU write-back values, and sync high about two clocks in
// three. A shadow copy of the registers kept here applies the documented
// write rules on every rising edge with sync high: the data-ALU write
// (data_wr_sel) lands in its register, D writes A from bits 15..8 and B from
// bits 7..0, the address-ALU write-back goes to the register on the address
// port unless the data write targets the same register, and nothing changes
// with sync low. Before each edge all three read ports are compared with the
// shadow (memory data 16-bit, low byte zero- and sign-extended, CCR
// zero-extended, ZERO and codes above CCR reading 0). All registers are first
// loaded through the data write port because they have no reset.
module tb_register_array;
  import gup_pkg::*;

  logic        clk = 1'b0, sync;
  logic [15:0] addr_wr_db, mem_data, data_wr_db;
  reg_sel_e    addr_sel, data_a_sel, data_b_sel, data_wr_sel;
  logic [7:0]  ccr_data;
  logic [15:0] addr_db, data_a_db, data_b_db;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  register_array dut (.*);

  logic [15:0] s_ea, s_pc, s_sp, s_y, s_x;
  logic [7:0]  s_a, s_b;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] expect_read(input reg_sel_e s);
    unique case (s)
      R_EA: return s_ea;   R_PC: return s_pc;   R_SP: return s_sp;
      R_Y:  return s_y;    R_X:  return s_x;    R_D:  return {s_a, s_b};
      R_B:  return {8'h00, s_b};                R_A:  return {8'h00, s_a};
      R_MEM_U16: return mem_data;
      R_MEM_U8:  return {8'h00, mem_data[7:0]};
      R_MEM_S8:  return {{8{mem_data[7]}}, mem_data[7:0]};
      R_CCR:     return {8'h00, ccr_data};
      default:   return 16'h0000;
    endcase
  endfunction

  // shadow update for one committed micro-operation
  task automatic commit();
    logic [15:0] dw, aw;
    dw = data_wr_db; aw = addr_wr_db;
    if (data_wr_sel == R_EA) s_ea = dw; else if (addr_sel == R_EA) s_ea = aw;
    if (data_wr_sel == R_PC) s_pc = dw; else if (addr_sel == R_PC) s_pc = aw;
    if (data_wr_sel == R_SP) s_sp = dw; else if (addr_sel == R_SP) s_sp = aw;
    if (data_wr_sel == R_Y)  s_y  = dw; else if (addr_sel == R_Y)  s_y  = aw;
    if (data_wr_sel == R_X)  s_x  = dw; else if (addr_sel == R_X)  s_x  = aw;
    if (data_wr_sel == R_A) s_a = dw[7:0];
    else if (data_wr_sel == R_D) s_a = dw[15:8];
    else if (addr_sel == R_A) s_a = aw[7:0];
    else if (addr_sel == R_D) s_a = aw[15:8];
    if (data_wr_sel == R_B || data_wr_sel == R_D) s_b = dw[7:0];
    else if (addr_sel == R_B || addr_sel == R_D) s_b = aw[7:0];
  endtask

  task automatic cycle_with(input logic sy, input reg_sel_e as, input reg_sel_e ra, input reg_sel_e rbs,
                            input reg_sel_e ws, input logic [15:0] dw, input logic [15:0] aw);
    sync = sy; addr_sel = as; data_a_sel = ra; data_b_sel = rbs; data_wr_sel = ws;
    data_wr_db = dw; addr_wr_db = aw; mem_data = 16'($urandom); ccr_data = 8'($urandom);
    #1;
    begin
      check(addr_db   == expect_read(as),  $sformatf("addr port %s: %h", as.name(), addr_db));
      check(data_a_db == expect_read(ra),  $sformatf("A port %s: %h", ra.name(), data_a_db));
      check(data_b_db == expect_read(rbs), $sformatf("B port %s: %h", rbs.name(), data_b_db));
    end
    @(posedge clk);
    if (sy) commit();
    #1;
  endtask

  initial begin
    sync = 1'b0;
    @(negedge clk);
    // load every register through the data write port
    cycle_with(1'b1, R_ZERO, R_ZERO, R_ZERO, R_EA, 16'h1111, 16'h0);
    cycle_with(1'b1, R_ZERO, R_ZERO, R_ZERO, R_PC, 16'h2222, 16'h0);
    cycle_with(1'b1, R_ZERO, R_ZERO, R_ZERO, R_SP, 16'h3333, 16'h0);
    cycle_with(1'b1, R_ZERO, R_ZERO, R_ZERO, R_Y,  16'h4444, 16'h0);
    cycle_with(1'b1, R_ZERO, R_ZERO, R_ZERO, R_X,  16'h5555, 16'h0);
    cycle_with(1'b1, R_ZERO, R_ZERO, R_ZERO, R_D,  16'h6677, 16'h0);
    // directed: data write beats address write-back on the same register
    cycle_with(1'b1, R_PC, R_PC, R_ZERO, R_PC, 16'hABCD, 16'h2223);
    check(s_pc == 16'hABCD, "shadow priority");
    cycle_with(1'b0, R_ZERO, R_PC, R_ZERO, R_ZERO, 16'h0, 16'h0);
    // directed: sync low holds everything
    cycle_with(1'b0, R_SP, R_ZERO, R_ZERO, R_X, 16'hDEAD, 16'hBEEF);
    cycle_with(1'b0, R_ZERO, R_SP, R_X, R_ZERO, 16'h0, 16'h0);
    for (int k = 0; k < 3000; k++)
      cycle_with(($urandom % 3) != 0, reg_sel_e'($urandom % 14), reg_sel_e'($urandom % 14),
                 reg_sel_e'($urandom % 14), reg_sel_e'($urandom % 14), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
