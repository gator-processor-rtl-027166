// gator_uprocessor -- top level of the Gator uProcessor CPU.
//
// A microprogrammed processor that runs 68HC11 object code on an 8-bit
// external bus with a 16-bit internal datapath. The blocks are wired as in
// the original block diagram:
//
//   memory_controller   runs each micro-operation's memory function on the
//                       bus and raises sync on the clock that commits it
//   microprogram_memory 256 x 56 microcode ROM, registered address
//   microsequencer      next microprogram address (continue, jump, branch
//                       on a condition, or dispatch through a map)
//   mapper              opcode -> addressing-mode routine (map 0) and
//                       operation routine (map 1)
//   register_array      EA, PC, SP, Y, X, A, B; three read ports, two writes
//   address_alu         pre/post increment/decrement or pass of the register
//                       on the address port; drives the memory address
//   data_alu            16/8-bit add, subtract, logic and shift
//   ccr                 condition codes, carry-in and branch condition
//
// External interface: nrst (active-low reset, sampled on rising clk; hold
// for at least two clocks), clk, and a simple asynchronous-SRAM style bus:
// addr_bus, rd_en (read strobe, the memory drives rd_data_bus while it is
// high), wr_en with wr_data_bus (one write per byte on the rising edge of clk
// while wr_en is high) and wr_data_oe (the CPU drives the data bus). After
// reset the processor starts fetching at address $0000. A micro-operation
// takes 1 (no memory access), 2 (byte write), 3 (byte or opcode read), 4
// (word write) or 6 (word read) clocks.
//
// The block partition, names and wiring follow the original design. The
// original's vector_split block, which only cuts the microword into its
// control fields, is the packed struct uword_t here; its six spare low bits
// are left unconnected (they are always 0), which is the one lint warning
// about unused signal bits.
module gator_uprocessor
  import gup_pkg::*;
(
  input  logic        nrst,
  input  logic        clk,
  input  logic [7:0]  rd_data_bus,
  output logic        wr_data_oe,
  output logic        wr_en,
  output logic        rd_en,
  output logic [15:0] addr_bus,
  output logic [7:0]  wr_data_bus
);
  // control fields
  logic          true_false;
  micro_op_e     micro_op;
  logic [7:0]    branch_addr;
  ccr_op_e       ccr_op;
  alu_cond_sel_e alu_cond_sel;
  usq_cond_sel_e usq_cond_sel;
  reg_sel_e      addr_sel, data_a_sel, data_b_sel, data_wr_sel;
  addr_alu_op_e  addr_alu_op;
  data_alu_op_e  data_alu_op;
  alu_mode_e     data_alu_mode;
  mem_func_e     mem_func_sel;

  logic        sync;
  logic [7:0]  micro_prog_addr;
  logic [55:0] micro_prog_data;
  logic [7:0]  map0_vector, map1_vector, map2_vector, map3_vector, map4_vector, map5_vector;
  logic [7:0]  opcode;
  logic [15:0] rd_data;
  logic [15:0] addr_db, addr_wr_db, mem_addr;
  logic [15:0] data_a_db, data_b_db, alu_q;
  logic [5:0]  alu_flags;
  logic        alu_cond, usq_cond;
  logic [7:0]  ccr_data;

  memory_controller u_mem_ctrl (
    .nrst, .clk, .sync, .wr_data_oe, .wr_en, .rd_en,
    .address_bus  (addr_bus),
    .rd_data_bus,
    .wr_data_bus,
    .func_sel     (mem_func_sel),
    .address_alu_q(mem_addr),
    .data_alu_q   (alu_q),
    .rd_data_out  (rd_data),
    .opcode_out   (opcode)
  );

  microsequencer u_usq (
    .nrst, .clk, .sync,
    .condition    (usq_cond),
    .true_false,
    .micro_op,
    .branch_vector(branch_addr),
    .map0_vector, .map1_vector, .map2_vector, .map3_vector, .map4_vector, .map5_vector,
    .micro_prog_addr
  );

  microprogram_memory u_urom (
    .address(micro_prog_addr),
    .clock  (clk),
    .q      (micro_prog_data)
  );

  // the control fields are the fields of the registered microword
  uword_t uw;
  assign uw            = uword_t'(micro_prog_data);
  assign true_false    = uw.true_false;
  assign micro_op      = uw.micro_op;
  assign branch_addr   = uw.branch_addr;
  assign ccr_op        = uw.ccr_op;
  assign alu_cond_sel  = uw.alu_cond_sel;
  assign usq_cond_sel  = uw.usq_cond_sel;
  assign addr_sel      = uw.addr_sel;
  assign data_a_sel    = uw.data_a_sel;
  assign data_b_sel    = uw.data_b_sel;
  assign data_wr_sel   = uw.data_wr_sel;
  assign addr_alu_op   = uw.addr_alu_op;
  assign data_alu_op   = uw.data_alu_op;
  assign data_alu_mode = uw.data_alu_mode;
  assign mem_func_sel  = uw.mem_func_sel;

  mapper u_mapper (
    .opcode,
    .map0_vector, .map1_vector, .map2_vector, .map3_vector, .map4_vector, .map5_vector
  );

  register_array u_regs (
    .clk, .sync,
    .addr_wr_db,
    .mem_data   (rd_data),
    .addr_sel, .data_a_sel, .data_b_sel, .data_wr_sel,
    .data_wr_db (alu_q),
    .ccr_data,
    .addr_db, .data_a_db, .data_b_db
  );

  address_alu u_addr_alu (
    .addr_alu_op,
    .addr_rd_db(addr_db),
    .addr_wr_db,
    .mem_addr
  );

  data_alu u_data_alu (
    .alu_op   (data_alu_op),
    .alu_mode (data_alu_mode),
    .alu_cond,
    .alu_a    (data_a_db),
    .alu_b    (data_b_db),
    .alu_q,
    .alu_flags
  );

  ccr u_ccr (
    .clk, .sync, .nrst,
    .ccr_op,
    .alu_cond_sel,
    .usq_cond_sel,
    .alu_flags,
    .data_wr_db  (alu_q[7:0]),
    .alu_cond,
    .usq_cond,
    .ccr_data
  );
endmodule
