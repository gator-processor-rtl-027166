// register_array -- programmer-visible registers of the Gator uProcessor.
//
// Holds the 68xx registers PC, SP, X, Y and the accumulators A and B (D is
// A:B), plus EA, a scratch register for the effective address an addressing
// mode computes. Three combinational read multiplexers drive the address ALU
// (addr_db) and the two data ALU inputs (data_a_db, data_b_db). Besides the
// registers they can select the constant 0, the memory controller's read data
// (16 bits, low byte zero-extended, or low byte sign-extended) and the
// condition code register, which live in other blocks.
//
// Writes happen on a rising clock edge with sync high, i.e. when the current
// micro-operation completes. The data ALU result (data_wr_db, target
// data_wr_sel) has priority; otherwise the address ALU result (addr_wr_db)
// is written back to the register addr_sel names. A and B take the low byte
// of the bus; D loads A from the high byte and B from the low byte. There is
// no reset: the microcode initialises PC and the program the rest, as on a
// 68xx. Selector codes and priorities follow the original design.
module register_array
  import gup_pkg::*;
(
  input  logic        clk,
  input  logic        sync,
  input  logic [15:0] addr_wr_db,
  input  logic [15:0] mem_data,
  input  reg_sel_e    addr_sel,
  input  reg_sel_e    data_a_sel,
  input  reg_sel_e    data_b_sel,
  input  reg_sel_e    data_wr_sel,
  input  logic [15:0] data_wr_db,
  input  logic [7:0]  ccr_data,
  output logic [15:0] addr_db,
  output logic [15:0] data_a_db,
  output logic [15:0] data_b_db
);

  logic [15:0] ea_reg, pc_reg, sp_reg, y_reg, x_reg;
  logic [7:0]  a_reg, b_reg;

  // 16-bit registers: data ALU write wins over address ALU write-back
  always_ff @(posedge clk) begin
    if (sync) begin
      if (data_wr_sel == R_EA) ea_reg <= data_wr_db; else if (addr_sel == R_EA) ea_reg <= addr_wr_db;
      if (data_wr_sel == R_PC) pc_reg <= data_wr_db; else if (addr_sel == R_PC) pc_reg <= addr_wr_db;
      if (data_wr_sel == R_SP) sp_reg <= data_wr_db; else if (addr_sel == R_SP) sp_reg <= addr_wr_db;
      if (data_wr_sel == R_Y)  y_reg  <= data_wr_db; else if (addr_sel == R_Y)  y_reg  <= addr_wr_db;
      if (data_wr_sel == R_X)  x_reg  <= data_wr_db; else if (addr_sel == R_X)  x_reg  <= addr_wr_db;
    end
  end

  // Accumulators: A is the high half of D, B the low half
  always_ff @(posedge clk) begin
    if (sync) begin
      if      (data_wr_sel == R_A) a_reg <= data_wr_db[7:0];
      else if (data_wr_sel == R_D) a_reg <= data_wr_db[15:8];
      else if (addr_sel    == R_A) a_reg <= addr_wr_db[7:0];
      else if (addr_sel    == R_D) a_reg <= addr_wr_db[15:8];

      if      (data_wr_sel == R_B || data_wr_sel == R_D) b_reg <= data_wr_db[7:0];
      else if (addr_sel    == R_B || addr_sel    == R_D) b_reg <= addr_wr_db[7:0];
    end
  end

  function automatic logic [15:0] read_mux(reg_sel_e sel);
    unique case (sel)
      R_EA:      return ea_reg;
      R_PC:      return pc_reg;
      R_SP:      return sp_reg;
      R_Y:       return y_reg;
      R_X:       return x_reg;
      R_D:       return {a_reg, b_reg};
      R_B:       return {8'h00, b_reg};
      R_A:       return {8'h00, a_reg};
      R_MEM_U16: return mem_data;
      R_MEM_U8:  return {8'h00, mem_data[7:0]};
      R_MEM_S8:  return {{8{mem_data[7]}}, mem_data[7:0]};
      R_CCR:     return {8'h00, ccr_data};
      default:   return 16'h0000;   // R_ZERO and unused codes
    endcase
  endfunction

  assign addr_db   = read_mux(addr_sel);
  assign data_a_db = read_mux(data_a_sel);
  assign data_b_db = read_mux(data_b_sel);

endmodule
