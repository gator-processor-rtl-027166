// ccr -- condition code register of the Gator uProcessor.
//
// Holds the 68xx status bits S X H I N Z V C (bit 7..0). On a rising clock
// edge with sync high, ccr_op chooses which bits change: individual bits are
// set or cleared, groups of bits are copied from the data ALU flags, or the
// whole register is loaded from the low byte of the data ALU result (TAP); in
// that case the X interrupt mask can only be cleared, never set. All
// operation codes and masks follow the original design.
//
// Two combinational outputs are derived from the register:
//   alu_cond  carry / shift-in for the data ALU: 0, 1, C, or the sign of the
//             A operand (arithmetic shift right);
//   usq_cond  branch condition for the microsequencer: 0, 1, C, V, Z, N and the
//             compound signed/unsigned tests LE = Z|(N^V), LT = N^V, LS = C|Z.
//
// Reset (nrst low on a rising edge) clears all eight bits. This design resets
// regardless of sync, so that the register is defined while the memory
// controller holds sync low during reset; the reset microinstruction then sets
// X.
module ccr
  import gup_pkg::*;
(
  input  logic          clk,
  input  logic          sync,
  input  logic          nrst,
  input  ccr_op_e       ccr_op,
  input  alu_cond_sel_e alu_cond_sel,
  input  usq_cond_sel_e usq_cond_sel,
  input  logic [5:0]    alu_flags,
  input  logic [7:0]    data_wr_db,
  output logic          alu_cond,
  output logic          usq_cond,
  output logic [7:0]    ccr_data
);

  logic c_reg, v_reg, z_reg, n_reg, i_reg, h_reg, x_reg, s_reg;
  logic f_c, f_v, f_z, f_n, f_h, f_asign;

  assign f_c     = alu_flags[FLG_C];
  assign f_v     = alu_flags[FLG_V];
  assign f_z     = alu_flags[FLG_Z];
  assign f_n     = alu_flags[FLG_N];
  assign f_h     = alu_flags[FLG_H];
  assign f_asign = alu_flags[FLG_ASIGN];

  always_ff @(posedge clk) begin
    if (!nrst) begin
      {s_reg, x_reg, h_reg, i_reg, n_reg, z_reg, v_reg, c_reg} <= 8'h00;
    end else if (sync) begin
      unique case (ccr_op)
        CCR_CLR_C: c_reg <= 1'b0;
        CCR_SET_C: c_reg <= 1'b1;
        CCR_C:     c_reg <= f_c;
        CCR_CLR_V: v_reg <= 1'b0;
        CCR_SET_V: v_reg <= 1'b1;
        CCR_Z:     z_reg <= f_z;
        CCR_ZVC:   begin z_reg <= f_z; v_reg <= f_v; c_reg <= f_c; end
        CCR_NZVC:  begin n_reg <= f_n; z_reg <= f_z; v_reg <= f_v; c_reg <= f_c; end
        CCR_NZV:   begin n_reg <= f_n; z_reg <= f_z; v_reg <= f_v; end
        CCR_CLR_I: i_reg <= 1'b0;
        CCR_SET_I: i_reg <= 1'b1;
        CCR_HNZVC: begin h_reg <= f_h; n_reg <= f_n; z_reg <= f_z; v_reg <= f_v; c_reg <= f_c; end
        CCR_SET_X: x_reg <= 1'b1;
        CCR_LOAD: begin
          c_reg <= data_wr_db[CCR_BIT_C];
          v_reg <= data_wr_db[CCR_BIT_V];
          z_reg <= data_wr_db[CCR_BIT_Z];
          n_reg <= data_wr_db[CCR_BIT_N];
          i_reg <= data_wr_db[CCR_BIT_I];
          h_reg <= data_wr_db[CCR_BIT_H];
          x_reg <= data_wr_db[CCR_BIT_X] & x_reg;
          s_reg <= data_wr_db[CCR_BIT_S];
        end
        default: ;  // CCR_NOP and unused codes
      endcase
    end
  end

  assign ccr_data = {s_reg, x_reg, h_reg, i_reg, n_reg, z_reg, v_reg, c_reg};

  always_comb begin
    unique case (alu_cond_sel)
      AC_ZERO:   alu_cond = 1'b0;
      AC_ONE:    alu_cond = 1'b1;
      AC_CCR_C:  alu_cond = c_reg;
      default:   alu_cond = f_asign;
    endcase
  end

  always_comb begin
    unique case (usq_cond_sel)
      UC_ZERO: usq_cond = 1'b0;
      UC_ONE:  usq_cond = 1'b1;
      UC_C:    usq_cond = c_reg;
      UC_V:    usq_cond = v_reg;
      UC_Z:    usq_cond = z_reg;
      UC_N:    usq_cond = n_reg;
      UC_BLE:  usq_cond = z_reg | (n_reg ^ v_reg);
      UC_BLT:  usq_cond = n_reg ^ v_reg;
      UC_BLS:  usq_cond = c_reg | z_reg;
      default: usq_cond = 1'b0;
    endcase
  end

endmodule
