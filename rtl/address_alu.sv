// address_alu -- address ALU of the Gator uProcessor.
//
// Combinational. Adds a small constant (0, +1, +2, -1, -2) chosen by
// addr_alu_op to the register on the address bus. addr_wr_db always carries
// the sum and is written back to the same register when the micro-operation
// commits. mem_addr, the address handed to the memory controller, is the sum
// for the pre-modify and pass operations and the unmodified register for the
// post-modify operations. This gives stack pushes/pulls and operand fetches
// with auto-increment in the same micro-operation as a data ALU operation.
// Operation codes and behaviour follow the original design; codes 9..15 act
// as PASS.
module address_alu
  import gup_pkg::*;
(
  input  addr_alu_op_e addr_alu_op,
  input  logic [15:0]  addr_rd_db,
  output logic [15:0]  addr_wr_db,
  output logic [15:0]  mem_addr
);

  logic [15:0] offset;
  logic        post;

  always_comb begin
    post = 1'b0;
    unique case (addr_alu_op)
      AOP_PRE_INC:   offset = 16'h0001;
      AOP_PRE_INC2:  offset = 16'h0002;
      AOP_PRE_DEC:   offset = 16'hFFFF;
      AOP_PRE_DEC2:  offset = 16'hFFFE;
      AOP_POST_INC:  begin offset = 16'h0001; post = 1'b1; end
      AOP_POST_INC2: begin offset = 16'h0002; post = 1'b1; end
      AOP_POST_DEC:  begin offset = 16'hFFFF; post = 1'b1; end
      AOP_POST_DEC2: begin offset = 16'hFFFE; post = 1'b1; end
      default:       offset = 16'h0000;
    endcase
  end

  assign addr_wr_db = addr_rd_db + offset;
  assign mem_addr   = post ? addr_rd_db : addr_wr_db;

endmodule
