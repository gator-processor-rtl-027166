// tb_address_alu -- self-checking test of the address ALU.
//
// For every operation (pre/post increment and decrement by one or two, and
// pass) and for corner and random register values, checks the value written
// back to the register (old value plus the step) and the memory address
// (the new value for the pre- forms and pass, the old value for the post-
// forms), using 16-bit wrap-around. The block is combinational.
module tb_address_alu;
  import gup_pkg::*;

  addr_alu_op_e addr_alu_op;
  logic [15:0]  addr_rd_db, addr_wr_db, mem_addr;
  int checks = 0, failures = 0;

  address_alu dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic apply(input addr_alu_op_e op, input logic [15:0] r);
    int step; logic post; logic [15:0] nv;
    addr_alu_op = op; addr_rd_db = r;
    #1;
    unique case (op)
      AOP_PRE_INC:   begin step =  1; post = 0; end
      AOP_PRE_INC2:  begin step =  2; post = 0; end
      AOP_PRE_DEC:   begin step = -1; post = 0; end
      AOP_PRE_DEC2:  begin step = -2; post = 0; end
      AOP_POST_INC:  begin step =  1; post = 1; end
      AOP_POST_INC2: begin step =  2; post = 1; end
      AOP_POST_DEC:  begin step = -1; post = 1; end
      AOP_POST_DEC2: begin step = -2; post = 1; end
      default:       begin step =  0; post = 0; end
    endcase
    nv = 16'(int'(r) + step);
    check(addr_wr_db == nv, $sformatf("%s %h: write-back %h expected %h", op.name(), r, addr_wr_db, nv));
    check(mem_addr == (post ? r : nv), $sformatf("%s %h: address %h", op.name(), r, mem_addr));
  endtask

  initial begin
    for (int op = 0; op <= 8; op++) begin
      apply(addr_alu_op_e'(op), 16'h0000); apply(addr_alu_op_e'(op), 16'h0001);
      apply(addr_alu_op_e'(op), 16'hFFFF); apply(addr_alu_op_e'(op), 16'hFFFE);
      apply(addr_alu_op_e'(op), 16'h7FFF); apply(addr_alu_op_e'(op), 16'h8000);
      for (int k = 0; k < 200; k++) apply(addr_alu_op_e'(op), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
