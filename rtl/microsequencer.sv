// microsequencer -- next-address logic of the Gator uProcessor microprogram.
//
// Holds the address of the current microinstruction (state_reg, reset to 0)
// and computes the next one. If the selected condition equals the polarity
// bit true_false, micro_op decides: CONTINUE (address + 1), JUMP
// (branch_vector) or JUMP_MAPn (the mapper's vector n, which decodes the
// opcode). If the condition does not match, the sequencer continues to
// address + 1. The register advances on a rising clock edge with sync high.
//
// micro_prog_addr feeds a microprogram memory with a registered address: it
// shows the next address while sync is high and the current one otherwise,
// so the memory output always holds the word of the current state, also
// through multi-clock micro-operations. All of this follows the original design.
module microsequencer
  import gup_pkg::*;
(
  input  logic       nrst,
  input  logic       clk,
  input  logic       sync,
  input  logic       condition,
  input  logic       true_false,
  input  micro_op_e  micro_op,
  input  logic [7:0] branch_vector,
  input  logic [7:0] map0_vector,
  input  logic [7:0] map1_vector,
  input  logic [7:0] map2_vector,
  input  logic [7:0] map3_vector,
  input  logic [7:0] map4_vector,
  input  logic [7:0] map5_vector,
  output logic [7:0] micro_prog_addr
);

  logic [7:0] state_reg, state_nxt, state_inc;

  assign state_inc = state_reg + 8'd1;

  always_comb begin
    if (condition == true_false) begin
      unique case (micro_op)
        UOP_CONTINUE:  state_nxt = state_inc;
        UOP_JUMP:      state_nxt = branch_vector;
        UOP_JUMP_MAP0: state_nxt = map0_vector;
        UOP_JUMP_MAP1: state_nxt = map1_vector;
        UOP_JUMP_MAP2: state_nxt = map2_vector;
        UOP_JUMP_MAP3: state_nxt = map3_vector;
        UOP_JUMP_MAP4: state_nxt = map4_vector;
        default:       state_nxt = map5_vector;
      endcase
    end else begin
      state_nxt = state_inc;
    end
  end

  always_ff @(posedge clk) begin
    if (!nrst)     state_reg <= L_RESET;
    else if (sync) state_reg <= state_nxt;
  end

  assign micro_prog_addr = sync ? state_nxt : state_reg;

endmodule
