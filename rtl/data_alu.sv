// data_alu -- 16-bit data ALU of the Gator uProcessor.
//
// Purely combinational. One ripple/look-ahead adder serves both A + B + cin
// and A + ~B + cin (subtraction: cin = 1 gives A - B, cin = 0 gives A - B - 1);
// alongside it sit bitwise AND, OR, XOR and one-bit left and right shifts.
// alu_cond is the carry in for the adder and the bit shifted in for the
// shifters. In 8-bit mode (alu_mode = 0) the result byte is bits [7:0] and the
// flags are taken at bit 7; a right shift then feeds alu_cond into bit 7.
//
// alu_flags = {A sign, H, N, Z, V, C}. C is the carry out for addition, the
// inverted carry (borrow) for A + ~B, and the bit shifted out for shifts; V is
// the signed overflow of the adder and 0 for all other operations; H is the
// carry out of bit 3; the A sign (bit 7 or 15 of alu_a) lets the condition
// code logic make an arithmetic right shift.
//
// The operation set, the flag rules and the operation codes follow the
// original design. Note that V = 0 for shifts, unlike the 68xx (N ^ C).
module data_alu
  import gup_pkg::*;
(
  input  data_alu_op_e alu_op,
  input  alu_mode_e    alu_mode,
  input  logic         alu_cond,
  input  logic [15:0]  alu_a,
  input  logic [15:0]  alu_b,
  output logic [15:0]  alu_q,
  output logic [5:0]   alu_flags
);

  logic [15:0] b_eff;       // B or ~B
  logic [15:0] gen, prop;   // generate / propagate
  logic [16:0] carry;       // carry[i] = carry into bit i
  logic [15:0] sum;
  logic [15:0] shl, shr;
  logic        sub;

  assign sub   = (alu_op == DOP_A_PLUS_NOT_B);
  assign b_eff = sub ? ~alu_b : alu_b;
  assign gen   = alu_a & b_eff;
  assign prop  = alu_a | b_eff;

  always_comb begin
    logic c;
    c        = alu_cond;
    carry[0] = c;
    for (int i = 0; i < 16; i++) begin
      c          = gen[i] | (prop[i] & c);
      carry[i+1] = c;
    end
  end

  assign sum = alu_a ^ b_eff ^ carry[15:0];
  assign shl = {alu_a[14:0], alu_cond};
  assign shr = (alu_mode == MODE_8) ? {alu_cond, alu_a[15:9], alu_cond, alu_a[7:1]}
                                    : {alu_cond, alu_a[15:1]};

  always_comb begin
    unique case (alu_op)
      DOP_A_PLUS_B, DOP_A_PLUS_NOT_B: alu_q = sum;
      DOP_A_AND_B:  alu_q = alu_a & b_eff;
      DOP_A_OR_B:   alu_q = alu_a | b_eff;
      DOP_A_XOR_B:  alu_q = alu_a ^ b_eff;
      DOP_LSHIFT_A: alu_q = shl;
      default:      alu_q = shr;
    endcase
  end

  // Flags: pick the bit position of the active width
  logic msb_c, msb_v, c_out, v_out, z_out;
  int unsigned top;
  always_comb begin
    top   = (alu_mode == MODE_8) ? 7 : 15;
    msb_c = carry[top+1];
    msb_v = carry[top+1] ^ carry[top];
    unique case (alu_op)
      DOP_A_PLUS_B:     begin c_out = msb_c;      v_out = msb_v; end
      DOP_A_PLUS_NOT_B: begin c_out = ~msb_c;     v_out = msb_v; end
      DOP_LSHIFT_A:     begin c_out = alu_a[top]; v_out = 1'b0;  end
      DOP_RSHIFT_A:     begin c_out = alu_a[0];   v_out = 1'b0;  end
      default:          begin c_out = 1'b0;       v_out = 1'b0;  end
    endcase
    z_out = (alu_mode == MODE_8) ? (alu_q[7:0] == 8'h00) : (alu_q == 16'h0000);
    alu_flags[FLG_C]     = c_out;
    alu_flags[FLG_V]     = v_out;
    alu_flags[FLG_Z]     = z_out;
    alu_flags[FLG_N]     = alu_q[top];
    alu_flags[FLG_H]     = carry[4];
    alu_flags[FLG_ASIGN] = alu_a[top];
  end

endmodule
