// memory_controller -- bus sequencer of the Gator uProcessor.
//
// The lowest-level state machine. Each micro-operation names one memory
// function (func_sel); the controller runs it on the 8-bit external bus and
// raises sync for the clock edge on which the whole CPU commits the
// micro-operation (registers, condition codes, microprogram counter).
// A micro-operation therefore lasts as many clocks as its memory function:
//
//   function      clocks  bus activity
//   IDLE          1       none
//   WRITE_BYTE    2       address, data, one write strobe
//   READ_BYTE     3       address, read strobe, data into rd_data_out[7:0]
//   READ_OPCODE   3       as READ_BYTE, byte into opcode_out
//   WRITE_WORD    4       high byte at the address, low byte at address + 1
//   READ_WORD     6       high byte from the address, low byte from address + 1
//
// Timing (states C0..C5, C0 is the first clock of every micro-operation):
// the address register loads from address_alu_q at the end of C0 and holds
// until the next load; the write data register loads the (high) byte of
// data_alu_q at the end of C0 and the low byte at the end of C2 of a word
// write. sync, rd_en and wr_en are registered on the falling clock edge, so
// each is high from the middle of the clock that requests it to the middle
// of the next; read data is sampled on the rising edge at the end of C2 (and
// C5 for the low byte of a word). A memory that drives rd_data_bus from
// address_bus while rd_en is high, and writes on a rising edge with wr_en
// high, sees exactly one write edge per byte. wr_data_oe is a rising-edge
// register high from C1 of a write until the end of the following clock.
//
// State sequence, strobe timing and function codes follow the original design.
// This design also resets the address, data and opcode registers (the
// original leaves them unreset) so that simulation starts from known values.
module memory_controller
  import gup_pkg::*;
(
  input  logic        nrst,
  input  logic        clk,
  output logic        sync,
  output logic        wr_data_oe,
  output logic        wr_en,
  output logic        rd_en,
  output logic [15:0] address_bus,
  input  logic [7:0]  rd_data_bus,
  output logic [7:0]  wr_data_bus,
  input  mem_func_e   func_sel,
  input  logic [15:0] address_alu_q,
  input  logic [15:0] data_alu_q,
  output logic [15:0] rd_data_out,
  output logic [7:0]  opcode_out
);

  typedef enum logic [2:0] {MC0, MC1, MC2, MC3, MC4, MC5} mc_state_e;

  mc_state_e state_reg, state_nxt;
  logic sync_nxt, wr_en_nxt, rd_en_nxt, wr_data_oe_nxt;
  logic address_load, address_inc;
  logic wr_data_hi_load, wr_data_lo_load;
  logic rd_data_hi_load, rd_data_lo_load, opcode_load;

  always_comb begin
    address_load    = 1'b0;
    address_inc     = 1'b0;
    wr_en_nxt       = 1'b0;
    wr_data_oe_nxt  = 1'b0;
    wr_data_hi_load = 1'b0;
    wr_data_lo_load = 1'b0;
    rd_en_nxt       = 1'b0;
    rd_data_hi_load = 1'b0;
    rd_data_lo_load = 1'b0;
    opcode_load     = 1'b0;
    sync_nxt        = 1'b0;
    state_nxt       = MC0;

    unique case (state_reg)
      MC0: begin
        unique case (func_sel)
          MEM_READ_OPCODE, MEM_READ_BYTE, MEM_READ_WORD: begin
            address_load = 1'b1;
            state_nxt    = MC1;
          end
          MEM_WRITE_BYTE: begin
            address_load    = 1'b1;
            wr_data_lo_load = 1'b1;
            wr_data_oe_nxt  = 1'b1;
            state_nxt       = MC1;
          end
          MEM_WRITE_WORD: begin
            address_load    = 1'b1;
            wr_data_hi_load = 1'b1;
            wr_data_oe_nxt  = 1'b1;
            state_nxt       = MC1;
          end
          default: sync_nxt = 1'b1;   // IDLE: one clock
        endcase
      end
      MC1: begin
        unique case (func_sel)
          MEM_READ_OPCODE, MEM_READ_BYTE, MEM_READ_WORD: begin
            rd_en_nxt = 1'b1;
            state_nxt = MC2;
          end
          MEM_WRITE_BYTE: begin
            wr_data_oe_nxt = 1'b1;
            wr_en_nxt      = 1'b1;
            sync_nxt       = 1'b1;
          end
          MEM_WRITE_WORD: begin
            wr_data_oe_nxt = 1'b1;
            wr_en_nxt      = 1'b1;
            state_nxt      = MC2;
          end
          default: sync_nxt = 1'b1;
        endcase
      end
      MC2: begin
        unique case (func_sel)
          MEM_READ_OPCODE: begin
            rd_en_nxt   = 1'b1;
            opcode_load = 1'b1;
            sync_nxt    = 1'b1;
          end
          MEM_READ_BYTE: begin
            rd_en_nxt       = 1'b1;
            rd_data_lo_load = 1'b1;
            sync_nxt        = 1'b1;
          end
          MEM_READ_WORD: begin
            rd_en_nxt       = 1'b1;
            rd_data_hi_load = 1'b1;
            state_nxt       = MC3;
          end
          MEM_WRITE_WORD: begin
            address_inc     = 1'b1;
            wr_data_lo_load = 1'b1;
            wr_data_oe_nxt  = 1'b1;
            state_nxt       = MC3;
          end
          default: sync_nxt = 1'b1;
        endcase
      end
      MC3: begin
        unique case (func_sel)
          MEM_READ_WORD: begin
            address_inc = 1'b1;
            state_nxt   = MC4;
          end
          MEM_WRITE_WORD: begin
            wr_data_oe_nxt = 1'b1;
            wr_en_nxt      = 1'b1;
            sync_nxt       = 1'b1;
          end
          default: sync_nxt = 1'b1;
        endcase
      end
      MC4: begin
        if (func_sel == MEM_READ_WORD) begin
          rd_en_nxt = 1'b1;
          state_nxt = MC5;
        end else begin
          sync_nxt = 1'b1;
        end
      end
      default: begin  // MC5
        if (func_sel == MEM_READ_WORD) begin
          rd_en_nxt       = 1'b1;
          rd_data_lo_load = 1'b1;
        end
        sync_nxt = 1'b1;
      end
    endcase
  end

  // Rising-edge registers
  always_ff @(posedge clk) begin
    if (!nrst) begin
      state_reg   <= MC0;
      wr_data_oe  <= 1'b0;
      address_bus <= '0;
      wr_data_bus <= '0;
      rd_data_out <= '0;
      opcode_out  <= '0;
    end else begin
      state_reg  <= state_nxt;
      wr_data_oe <= wr_data_oe_nxt;
      if (address_load)     address_bus <= address_alu_q;
      else if (address_inc) address_bus <= address_bus + 16'd1;
      if (wr_data_hi_load)      wr_data_bus <= data_alu_q[15:8];
      else if (wr_data_lo_load) wr_data_bus <= data_alu_q[7:0];
      if (rd_data_hi_load) rd_data_out[15:8] <= rd_data_bus;
      if (rd_data_lo_load) rd_data_out[7:0]  <= rd_data_bus;
      if (opcode_load)     opcode_out        <= rd_data_bus;
    end
  end

  // Falling-edge strobes
  always_ff @(negedge clk) begin
    if (!nrst) begin
      sync  <= 1'b0;
      wr_en <= 1'b0;
      rd_en <= 1'b0;
    end else begin
      sync  <= sync_nxt;
      wr_en <= wr_en_nxt;
      rd_en <= rd_en_nxt;
    end
  end

endmodule
