// tb_microsequencer -- self-checking test of the next-address logic.
//
// After reset the state must be the reset routine (address 0). Then 4000
// random cycles apply random next-address operations, condition, polarity,
// branch and map vectors and sync. A shadow state register kept here follows
// the documented rule: if the condition equals true_false the operation
// decides (continue = +1, jump = branch vector, map n = map vector n),
// otherwise the sequencer continues; the state advances only on a rising
// edge with sync high. Before each edge micro_prog_addr must show the
// computed next address while sync is high and the current state otherwise.
module tb_microsequencer;
  import gup_pkg::*;

  logic       nrst, clk = 1'b0, sync, condition, true_false;
  micro_op_e  micro_op;
  logic [7:0] branch_vector, map0_vector, map1_vector, map2_vector, map3_vector, map4_vector, map5_vector;
  logic [7:0] micro_prog_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  microsequencer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [7:0] s, nxt;

  initial begin
    nrst = 1'b0; sync = 1'b0; condition = 1'b0; true_false = 1'b0; micro_op = UOP_CONTINUE;
    {branch_vector, map0_vector, map1_vector, map2_vector, map3_vector, map4_vector, map5_vector} = '0;
    repeat (2) @(posedge clk);
    #1 nrst = 1'b1;
    s = 8'h00;
    check(micro_prog_addr == 8'h00, "reset state");
    for (int k = 0; k < 4000; k++) begin
      micro_op = micro_op_e'($urandom % 8);
      condition = 1'($urandom); true_false = 1'($urandom);
      {branch_vector, map0_vector, map1_vector} = 24'($urandom);
      {map2_vector, map3_vector, map4_vector} = 24'($urandom);
      map5_vector = 8'($urandom);
      sync = ($urandom % 3) != 0;
      if (condition != true_false) nxt = s + 8'd1;
      else unique case (micro_op)
        UOP_CONTINUE:  nxt = s + 8'd1;
        UOP_JUMP:      nxt = branch_vector;
        UOP_JUMP_MAP0: nxt = map0_vector;
        UOP_JUMP_MAP1: nxt = map1_vector;
        UOP_JUMP_MAP2: nxt = map2_vector;
        UOP_JUMP_MAP3: nxt = map3_vector;
        UOP_JUMP_MAP4: nxt = map4_vector;
        default:       nxt = map5_vector;
      endcase
      #1;
      check(micro_prog_addr == (sync ? nxt : s),
            $sformatf("op %s cond %b tf %b sync %b: addr %h expected %h", micro_op.name(), condition,
                      true_false, sync, micro_prog_addr, sync ? nxt : s));
      @(posedge clk);
      if (sync) s = nxt;
      #1;
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
