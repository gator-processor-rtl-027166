// tb_data_alu -- self-checking test of the 16/8-bit data ALU.
//
// Applies every operation in both widths with every carry/shift-in value,
// first on corner operands (0, 1, the sign boundaries, all ones) and then on
// 4000 random operand pairs, and compares the result and all six flags with
// a reference written here from the arithmetic definitions: result = A + B +
// cin or A - B - !cin on the active width, C = carry out (addition) or borrow
// (subtraction), V = signed overflow, H = carry out of bit 3, logic
// operations with C = V = 0, shifts with C = the bit shifted out and V = 0,
// and the A-sign flag = the top bit of A. In 8-bit mode only the low result
// byte is compared except for the right shift, whose full 16-bit value is
// also specified. The ALU is combinational; each check waits 1 ns.
module tb_data_alu;
  import gup_pkg::*;

  data_alu_op_e alu_op;
  alu_mode_e    alu_mode;
  logic         alu_cond;
  logic [15:0]  alu_a, alu_b, alu_q;
  logic [5:0]   alu_flags;
  int checks = 0, failures = 0;

  data_alu dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic apply(input data_alu_op_e op, input alu_mode_e m, input logic cin,
                       input logic [15:0] a, input logic [15:0] b);
    int unsigned w;
    longint unsigned mask, ua, ub, s;
    logic [15:0] q, bn; logic c, v, h, n, z, as;
    alu_op = op; alu_mode = m; alu_cond = cin; alu_a = a; alu_b = b;
    #1;
    w = (m == MODE_8) ? 8 : 16;
    mask = (64'd1 << w) - 1;
    ua = a & mask; ub = b & mask;
    c = 1'b0; v = 1'b0;
    bn = (op == DOP_A_PLUS_NOT_B) ? ~b : b;
    h = ((5'(a[3:0]) + 5'(bn[3:0]) + 5'(cin)) > 5'd15);
    unique case (op)
      DOP_A_PLUS_B: begin
        s = ua + ub + 64'(cin);
        q = 16'(s & mask); c = s[w];
        v = (ua[w-1] == ub[w-1]) && (q[w-1] != ua[w-1]);
      end
      DOP_A_PLUS_NOT_B: begin
        s = ua - ub - 64'(!cin);
        q = 16'(s & mask); c = (ua < ub + 64'(!cin));
        v = (ua[w-1] != ub[w-1]) && (q[w-1] != ua[w-1]);
      end
      DOP_A_AND_B: q = a & b;
      DOP_A_OR_B:  q = a | b;
      DOP_A_XOR_B: q = a ^ b;
      DOP_LSHIFT_A: begin q = {a[14:0], cin}; c = a[w-1]; end
      default: begin
        q = (w == 8) ? {cin, a[15:9], cin, a[7:1]} : {cin, a[15:1]};
        c = a[0];
      end
    endcase
    n = q[w-1]; z = ((q & 16'(mask)) == 0); as = a[w-1];
    if (w == 16 || op == DOP_RSHIFT_A)
      check(alu_q == q, $sformatf("%s w%0d cin%0d %h,%h: q %h expected %h", op.name(), w, cin, a, b, alu_q, q));
    else
      check(alu_q[7:0] == q[7:0], $sformatf("%s w%0d cin%0d %h,%h: q %h expected %h", op.name(), w, cin, a, b, alu_q, q));
    check(alu_flags[FLG_C] == c, $sformatf("%s w%0d %h,%h cin%0d: C", op.name(), w, a, b, cin));
    check(alu_flags[FLG_V] == v, $sformatf("%s w%0d %h,%h cin%0d: V", op.name(), w, a, b, cin));
    check(alu_flags[FLG_Z] == z, $sformatf("%s w%0d %h,%h: Z", op.name(), w, a, b));
    check(alu_flags[FLG_N] == n, $sformatf("%s w%0d %h,%h: N", op.name(), w, a, b));
    check(alu_flags[FLG_ASIGN] == as, $sformatf("%s w%0d %h: A sign", op.name(), w, a));
    if (op == DOP_A_PLUS_B || op == DOP_A_PLUS_NOT_B)
      check(alu_flags[FLG_H] == h, $sformatf("%s %h,%h cin%0d: H", op.name(), a, b, cin));
  endtask

  localparam logic [15:0] corners [10] = '{16'h0000, 16'h0001, 16'h007F, 16'h0080, 16'h00FF,
                                            16'h7FFF, 16'h8000, 16'hFFFF, 16'h0F0F, 16'h1234};

  initial begin
    for (int op = 0; op <= 6; op++)
      for (int m = 0; m < 2; m++)
        for (int cin = 0; cin < 2; cin++) begin
          foreach (corners[i]) foreach (corners[j])
            apply(data_alu_op_e'(op), alu_mode_e'(m), cin[0], corners[i], corners[j]);
          for (int k = 0; k < 150; k++)
            apply(data_alu_op_e'(op), alu_mode_e'(m), cin[0], 16'($urandom), 16'($urandom));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
