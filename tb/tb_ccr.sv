// tb_ccr -- self-checking test of the condition code register.
//
// After a reset (all bits 0) the test applies 4000 random operations with
// random ALU flags, data bytes and sync. A shadow register kept here applies
// the documented meaning of each operation code (which bits are set,
// cleared, copied from the flags, or loaded from the data byte with the X
// mask only able to fall) on every rising edge with sync high. The register
// output, both condition multiplexers (carry-in: 0, 1, C, A sign; branch
// condition: 0, 1, C, V, Z, N, LE, LT, LS) and their every select value are
// compared with the shadow before each edge. A reset in the middle of the
// run is checked too.
module tb_ccr;
  import gup_pkg::*;

  logic          clk = 1'b0, sync, nrst;
  ccr_op_e       ccr_op;
  alu_cond_sel_e alu_cond_sel;
  usq_cond_sel_e usq_cond_sel;
  logic [5:0]    alu_flags;
  logic [7:0]    data_wr_db;
  logic          alu_cond, usq_cond;
  logic [7:0]    ccr_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ccr dut (.*);

  logic [7:0] s;   // S X H I N Z V C

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic model();
    logic c, v, z, n, h;
    {h, n, z, v, c} = {alu_flags[4], alu_flags[3], alu_flags[2], alu_flags[1], alu_flags[0]};
    unique case (ccr_op)
      CCR_CLR_C: s[0] = 1'b0;
      CCR_SET_C: s[0] = 1'b1;
      CCR_C:     s[0] = c;
      CCR_CLR_V: s[1] = 1'b0;
      CCR_SET_V: s[1] = 1'b1;
      CCR_Z:     s[2] = z;
      CCR_ZVC:   s[2:0] = {z, v, c};
      CCR_NZVC:  s[3:0] = {n, z, v, c};
      CCR_NZV:   s[3:1] = {n, z, v};
      CCR_CLR_I: s[4] = 1'b0;
      CCR_SET_I: s[4] = 1'b1;
      CCR_HNZVC: begin s[5] = h; s[3:0] = {n, z, v, c}; end
      CCR_SET_X: s[6] = 1'b1;
      CCR_LOAD:  s = {data_wr_db[7], data_wr_db[6] & s[6], data_wr_db[5:0]};
      default: ;
    endcase
  endtask

  task automatic check_outputs();
    logic ac, uc;
    check(ccr_data == s, $sformatf("register %h expected %h", ccr_data, s));
    unique case (alu_cond_sel)
      AC_ZERO: ac = 1'b0;  AC_ONE: ac = 1'b1;  AC_CCR_C: ac = s[0];  default: ac = alu_flags[5];
    endcase
    unique case (usq_cond_sel)
      UC_ZERO: uc = 1'b0;  UC_ONE: uc = 1'b1;  UC_C: uc = s[0];  UC_V: uc = s[1];
      UC_Z: uc = s[2];     UC_N: uc = s[3];
      UC_BLE: uc = s[2] | (s[3] ^ s[1]);
      UC_BLT: uc = s[3] ^ s[1];
      UC_BLS: uc = s[0] | s[2];
      default: uc = 1'b0;
    endcase
    check(alu_cond == ac, $sformatf("alu_cond sel %s", alu_cond_sel.name()));
    check(usq_cond == uc, $sformatf("usq_cond sel %0d with ccr %h", usq_cond_sel, s));
  endtask

  initial begin
    nrst = 1'b0; sync = 1'b0; ccr_op = CCR_NOP; alu_cond_sel = AC_ZERO; usq_cond_sel = UC_ZERO;
    alu_flags = '0; data_wr_db = '0;
    repeat (2) @(posedge clk);
    #1; s = 8'h00; check_outputs();
    nrst = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      ccr_op       = ccr_op_e'($urandom % 16);
      alu_cond_sel = alu_cond_sel_e'($urandom % 4);
      usq_cond_sel = usq_cond_sel_e'($urandom % 10);
      alu_flags    = 6'($urandom);
      data_wr_db   = 8'($urandom);
      sync         = ($urandom % 4) != 0;
      if (k == 2000) nrst = 1'b0;
      #1; check_outputs();
      @(posedge clk);
      if (!nrst) s = 8'h00;
      else if (sync) model();
      #1; nrst = 1'b1; check_outputs();
    end
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
