// tb_gator_uprocessor -- end-to-end test of the Gator uProcessor CPU.
//
// The CPU runs from a 64 KiB behavioural memory attached to its bus
// (combinational read while rd_en is high, one byte written per rising clock
// edge with wr_en high). The test program is built in the initial block: it
// walks through every implemented instruction and addressing mode, both
// outcomes of all sixteen conditional branches under nine different flag
// settings, subroutine calls and returns, the stack and jumps, and finally
// a page-2 prefix that has no microcode, which must leave the CPU in the trap
// loop.
//
// Checking is done against an instruction-level reference model of the
// instruction set written here (68HC11 semantics with this CPU's documented
// differences: V = 0 after shifts, SBC computes A - M - 1 + C, ADD/ADC leave
// H alone, TST stores its operand back, reset sets only X). Every time the
// CPU enters its DECODE micro-operation the previous instruction has retired:
// the testbench compares A, B, X, SP, CCR, PC and the fetched opcode with the
// model and then lets the model execute that opcode. Each bus write is
// compared with the model's next expected write, and memory is compared in
// full at the end.
//
// Timing checks: every micro-operation must last exactly as many clocks as
// its memory function takes (idle 1, byte write 2, byte/opcode read 3, word
// write 4, word read 6), and two instruction-level totals derived from that
// table are checked (NOP = 4 clocks, LDAA immediate = 7).
//
// Mechanism counters (each must be non-zero): opcode fetch, byte read, word
// read, byte write, word write, idle micro-operation, map-0 dispatch, map-1
// dispatch, conditional micro-branch taken and not taken, CCR load (TAP),
// trap.
module tb_gator_uprocessor;
  import gup_pkg::*;

  logic        clk = 1'b0;
  logic        nrst;
  logic [7:0]  rd_data_bus;
  logic        wr_data_oe, wr_en, rd_en;
  logic [15:0] addr_bus;
  logic [7:0]  wr_data_bus;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  gator_uprocessor dut (.*);

  // ---------------- memory ----------------
  logic [7:0] mem [65536];
  logic [7:0] rmem [65536];     // the reference model's memory

  assign rd_data_bus = mem[addr_bus];
  always @(posedge clk) if (nrst && wr_en) mem[addr_bus] = wr_data_bus;  // bus strobes are undefined before the first clock of reset

  // low opcode nibbles of NEG COM LSR ROR ASR ASL ROL DEC INC TST CLR
  localparam logic [3:0] unary_ops [11] = '{4'h0, 4'h3, 4'h4, 4'h6, 4'h7, 4'h8, 4'h9, 4'hA, 4'hC, 4'hD, 4'hF};

  // ---------------- program builder ----------------
  int unsigned pc_emit;
  task automatic emit(input logic [7:0] b);
    mem[pc_emit[15:0]] = b; rmem[pc_emit[15:0]] = b; pc_emit++;
  endtask
  task automatic e2(input logic [7:0] a, input logic [7:0] b); emit(a); emit(b); endtask
  task automatic e3(input logic [7:0] a, input logic [15:0] w); emit(a); emit(w[15:8]); emit(w[7:0]); endtask

  // ---------------- reference model ----------------
  logic [7:0]  ra, rb, rccr;
  logic [15:0] rx, rsp, rpc;
  logic        model_started = 1'b0;
  logic        model_trapped = 1'b0;
  int unsigned instr_count = 0;
  logic [23:0] wq [$];          // expected writes {addr, data}

  function automatic logic fc(); return rccr[0]; endfunction
  function automatic logic fv(); return rccr[1]; endfunction
  function automatic logic fz(); return rccr[2]; endfunction
  function automatic logic fn(); return rccr[3]; endfunction

  task automatic setf(input logic n, input logic z, input logic v, input logic c);
    rccr[3] = n; rccr[2] = z; rccr[1] = v; rccr[0] = c;
  endtask
  task automatic nzv8(input logic [7:0] r);   // N, Z from r, V cleared
    rccr[3] = r[7]; rccr[2] = (r == 0); rccr[1] = 1'b0;
  endtask
  task automatic nzv16(input logic [15:0] r);
    rccr[3] = r[15]; rccr[2] = (r == 0); rccr[1] = 1'b0;
  endtask

  function automatic logic [7:0] rd8(input logic [15:0] a); return rmem[a]; endfunction
  function automatic logic [15:0] rd16(input logic [15:0] a); return {rmem[a], rmem[a+16'd1]}; endfunction
  task automatic wr8(input logic [15:0] a, input logic [7:0] d);
    rmem[a] = d; wq.push_back({a, d});
  endtask
  task automatic wr16(input logic [15:0] a, input logic [15:0] d);
    wr8(a, d[15:8]); wr8(a + 16'd1, d[7:0]);
  endtask

  // 8-bit arithmetic with 68xx flag rules
  function automatic logic [7:0] add8(input logic [7:0] a, input logic [7:0] m, input logic cin,
                                      output logic c, output logic v, output logic h);
    logic [8:0] s;
    s = {1'b0, a} + {1'b0, m} + 9'(cin);
    c = s[8];
    v = (a[7] == m[7]) && (s[7] != a[7]);
    h = ((a[3:0] + m[3:0] + 5'(cin)) > 5'd15);
    return s[7:0];
  endfunction
  // a - m - bw, C = borrow
  function automatic logic [7:0] sub8(input logic [7:0] a, input logic [7:0] m, input logic bw,
                                      output logic c, output logic v);
    logic [7:0] r;
    r = a - m - 8'(bw);
    c = (9'(a) < 9'(m) + 9'(bw));
    v = (a[7] != m[7]) && (r[7] != a[7]);
    return r;
  endfunction
  function automatic logic [15:0] sub16(input logic [15:0] a, input logic [15:0] m,
                                        output logic c, output logic v);
    logic [15:0] r;
    r = a - m;
    c = (a < m);
    v = (a[15] != m[15]) && (r[15] != a[15]);
    return r;
  endfunction

  // accumulator / memory unary operations (NEG COM LSR ROR ASR ASL ROL DEC INC TST CLR)
  function automatic logic [7:0] unary(input logic [3:0] lo, input logic [7:0] x, inout logic [7:0] cc);
    logic [7:0] r; logic c, v;
    c = cc[0]; v = 1'b0;
    unique case (lo)
      4'h0: begin r = 8'h00 - x; c = (x != 0); v = (x == 8'h80); end
      4'h3: begin r = ~x; c = 1'b1; end
      4'h4: begin r = {1'b0, x[7:1]}; c = x[0]; end
      4'h6: begin r = {cc[0], x[7:1]}; c = x[0]; end
      4'h7: begin r = {x[7], x[7:1]}; c = x[0]; end
      4'h8: begin r = {x[6:0], 1'b0}; c = x[7]; end
      4'h9: begin r = {x[6:0], cc[0]}; c = x[7]; end
      4'hA: begin r = x - 8'd1; v = (x == 8'h80); end
      4'hC: begin r = x + 8'd1; v = (x == 8'h7F); end
      4'hD: begin r = x; c = 1'b0; end
      default: begin r = 8'h00; c = 1'b0; end
    endcase
    cc[3] = r[7]; cc[2] = (r == 0); cc[1] = v; cc[0] = c;
    return r;
  endfunction

  // accumulator-memory operations, low opcode nibble lo; returns 1 if acc changes
  task automatic accop(input logic [3:0] lo, inout logic [7:0] acc, input logic [7:0] m);
    logic c, v, h; logic [7:0] r;
    unique case (lo)
      4'h0: begin r = sub8(acc, m, 1'b0, c, v); setf(r[7], r == 0, v, c); acc = r; end
      4'h1: begin r = sub8(acc, m, 1'b0, c, v); setf(r[7], r == 0, v, c); end
      4'h2: begin r = sub8(acc, m, ~fc(), c, v); setf(r[7], r == 0, v, c); acc = r; end  // A - M - 1 + C
      4'h4: begin acc = acc & m; nzv8(acc); end
      4'h5: begin nzv8(acc & m); end
      4'h6: begin acc = m; nzv8(acc); end
      4'h8: begin acc = acc ^ m; nzv8(acc); end
      4'h9: begin r = add8(acc, m, fc(), c, v, h); setf(r[7], r == 0, v, c); acc = r; end
      4'hA: begin acc = acc | m; nzv8(acc); end
      4'hB: begin r = add8(acc, m, 1'b0, c, v, h); setf(r[7], r == 0, v, c); acc = r; end
      default: ;
    endcase
  endtask

  function automatic logic branch_taken(input logic [3:0] n);
    logic t;
    unique case (n[3:1])
      3'd0: t = 1'b1;                        // BRA / BRN
      3'd1: t = ~(fc() | fz());              // BHI / BLS
      3'd2: t = ~fc();                       // BCC / BCS
      3'd3: t = ~fz();                       // BNE / BEQ
      3'd4: t = ~fv();                       // BVC / BVS
      3'd5: t = ~fn();                       // BPL / BMI
      3'd6: t = ~(fn() ^ fv());              // BGE / BLT
      default: t = ~(fz() | (fn() ^ fv()));  // BGT / BLE
    endcase
    return n[0] ? ~t : t;
  endfunction

  // Execute one instruction at rpc.
  task automatic model_step();
    logic [7:0] op, m8, r8; logic [15:0] ea, m16, r16; logic c, v, h;
    logic [3:0] hi, lo; logic [15:0] d;
    op = rd8(rpc); rpc++;
    hi = op[7:4]; lo = op[3:0];
    d = {ra, rb};
    if (op == 8'h18 || op == 8'h1A || op == 8'hCD) begin model_trapped = 1'b1; return; end
    // effective address for the memory-reference groups
    ea = 16'h0000;
    if (op == 8'h8D || op == 8'h8F) ;       // BSR, XGDX: no addressing mode here
    else if (hi == 4'h6 || hi == 4'hA || hi == 4'hE) begin ea = rx + 16'(rd8(rpc)); rpc++; end
    else if (hi == 4'h7 || hi == 4'hB || hi == 4'hF) begin ea = rd16(rpc); rpc += 2; end
    else if (hi == 4'h9 || hi == 4'hD) begin ea = 16'(rd8(rpc)); rpc++; end
    else if (hi == 4'h8 || hi == 4'hC) begin
      ea = rpc;
      if (lo == 4'h3 || lo == 4'hC || lo == 4'hE) rpc += 2; else rpc++;
    end
    unique case (hi)
      4'h0, 4'h1, 4'h3: begin
        unique case (op)
          8'h01: ;
          8'h04: begin rccr[0] = d[0]; d = {1'b0, d[15:1]}; nzv16(d); {ra, rb} = d; end
          8'h05: begin rccr[0] = d[15]; d = {d[14:0], 1'b0}; nzv16(d); {ra, rb} = d; end
          8'h06: rccr = {ra[7], ra[6] & rccr[6], ra[5:0]};
          8'h07: ra = rccr;
          8'h08: begin rx++; rccr[2] = (rx == 0); end
          8'h09: begin rx--; rccr[2] = (rx == 0); end
          8'h0A: rccr[1] = 1'b0;
          8'h0B: rccr[1] = 1'b1;
          8'h0C: rccr[0] = 1'b0;
          8'h0D: rccr[0] = 1'b1;
          8'h0E: rccr[4] = 1'b0;
          8'h0F: rccr[4] = 1'b1;
          8'h10: begin r8 = sub8(ra, rb, 1'b0, c, v); setf(r8[7], r8 == 0, v, c); ra = r8; end
          8'h11: begin r8 = sub8(ra, rb, 1'b0, c, v); setf(r8[7], r8 == 0, v, c); end
          8'h16: begin rb = ra; nzv8(rb); end
          8'h17: begin ra = rb; nzv8(ra); end
          8'h1B: begin r8 = add8(ra, rb, 1'b0, c, v, h); setf(r8[7], r8 == 0, v, c); rccr[5] = h; ra = r8; end
          8'h30: rx = rsp + 16'd1;
          8'h31: rsp++;
          8'h32: begin rsp++; ra = rd8(rsp); end
          8'h33: begin rsp++; rb = rd8(rsp); end
          8'h34: rsp--;
          8'h35: rsp = rx - 16'd1;
          8'h36: begin wr8(rsp, ra); rsp--; end
          8'h37: begin wr8(rsp, rb); rsp--; end
          8'h38: begin rx = rd16(rsp + 16'd1); rsp += 2; end
          8'h39: begin rpc = rd16(rsp + 16'd1); rsp += 2; end
          8'h3A: rx = rx + 16'(rb);
          8'h3C: begin wr16(rsp - 16'd1, rx); rsp -= 2; end
          default: begin model_trapped = 1'b1; end
        endcase
      end
      4'h2: begin
        m8 = rd8(rpc); rpc++;
        if (branch_taken(lo)) rpc = rpc + {{8{m8[7]}}, m8};
      end
      4'h4: ra = unary(lo, ra, rccr);
      4'h5: rb = unary(lo, rb, rccr);
      4'h6, 4'h7: begin
        if (lo == 4'hE) rpc = ea;
        else wr8(ea, unary(lo, rd8(ea), rccr));
      end
      default: begin
        // accumulator / 16-bit groups 8..F
        if (op == 8'h8D) begin                       // BSR
          m8 = rd8(rpc); rpc++;
          wr16(rsp - 16'd1, rpc); rsp -= 2;
          rpc = rpc + {{8{m8[7]}}, m8};
        end else if (op == 8'h8F) begin              // XGDX
          {ra, rb} = rx; rx = d;
        end else if (hi < 4'hC) begin                // A side, SUBD, CPX, JSR, LDS, STS
          unique case (lo)
            4'h3: begin r16 = sub16(d, rd16(ea), c, v); setf(r16[15], r16 == 0, v, c); {ra, rb} = r16; end
            4'h7: begin wr8(ea, ra); nzv8(ra); end
            4'hC: begin r16 = sub16(rx, rd16(ea), c, v); setf(r16[15], r16 == 0, v, c); end
            4'hD: begin wr16(rsp - 16'd1, rpc); rsp -= 2; rpc = ea; end
            4'hE: begin rsp = rd16(ea); nzv16(rsp); end
            4'hF: begin wr16(ea, rsp); nzv16(rsp); end
            default: accop(lo, ra, rd8(ea));
          endcase
        end else begin                               // B side, ADDD, LDD/STD, LDX/STX
          unique case (lo)
            4'h3: begin
              m16 = rd16(ea); r16 = d + m16;
              setf(r16[15], r16 == 0, (d[15] == m16[15]) && (r16[15] != d[15]), (17'(d) + 17'(m16)) > 17'hFFFF);
              {ra, rb} = r16;
            end
            4'h7: begin wr8(ea, rb); nzv8(rb); end
            4'hC: begin {ra, rb} = rd16(ea); nzv16({ra, rb}); end
            4'hD: begin wr16(ea, d); nzv16(d); end
            4'hE: begin rx = rd16(ea); nzv16(rx); end
            4'hF: begin wr16(ea, rx); nzv16(rx); end
            default: accop(lo, rb, rd8(ea));
          endcase
        end
      end
    endcase
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d (instr %0d, pc %h): %s", cycle, instr_count, rpc, what);
    end
  endtask

  // ---------------- lockstep at every DECODE ----------------
  logic [15:0] decode_pc;
  int unsigned last_decode_cycle;
  int unsigned nop_periods = 0, ldaa_periods = 0;
  logic [7:0]  last_opcode;

  always @(posedge clk) begin
    if (nrst && dut.sync && dut.u_usq.state_reg == L_DECODE) begin
      if (!model_started) begin
        // registers have no reset: adopt them once; the CCR must be the reset value
        model_started = 1'b1;
        ra = dut.u_regs.a_reg; rb = dut.u_regs.b_reg;
        rx = dut.u_regs.x_reg; rsp = dut.u_regs.sp_reg;
        rccr = 8'h00; rccr[6] = 1'b1;
        rpc = 16'h0000;
      end else begin
        // instruction-level timing of two instructions whose length follows from the table
        if (last_opcode == 8'h01) begin
          check(cycle - last_decode_cycle == 4, $sformatf("NOP took %0d clocks", cycle - last_decode_cycle));
          nop_periods++;
        end
        if (last_opcode == 8'h86) begin
          check(cycle - last_decode_cycle == 7, $sformatf("LDAA # took %0d clocks", cycle - last_decode_cycle));
          ldaa_periods++;
        end
      end
      check(dut.u_regs.a_reg == ra, $sformatf("A %h expected %h", dut.u_regs.a_reg, ra));
      check(dut.u_regs.b_reg == rb, $sformatf("B %h expected %h", dut.u_regs.b_reg, rb));
      check(dut.u_regs.x_reg == rx, $sformatf("X %h expected %h", dut.u_regs.x_reg, rx));
      check(dut.u_regs.sp_reg == rsp, $sformatf("SP %h expected %h", dut.u_regs.sp_reg, rsp));
      check(dut.ccr_data == rccr, $sformatf("CCR %h expected %h", dut.ccr_data, rccr));
      check(dut.u_regs.pc_reg == rpc + 16'd1, $sformatf("PC %h expected %h", dut.u_regs.pc_reg, rpc + 16'd1));
      check(dut.opcode == rmem[rpc], $sformatf("opcode %h expected %h", dut.opcode, rmem[rpc]));
      last_opcode = rmem[rpc];
      last_decode_cycle = cycle;
      model_step();
      instr_count++;
    end
  end

  // ---------------- bus write checks ----------------
  int unsigned writes_seen = 0;
  always @(posedge clk) begin
    if (nrst && wr_en) begin
      writes_seen++;
      check(wr_data_oe, "wr_data_oe low during a write");
      if (wq.size() == 0) check(1'b0, $sformatf("unexpected write %h <- %h", addr_bus, wr_data_bus));
      else begin
        logic [23:0] e;
        e = wq.pop_front();
        check({addr_bus, wr_data_bus} == e, $sformatf("write %h <- %h, expected %h <- %h",
              addr_bus, wr_data_bus, e[23:8], e[7:0]));
      end
    end
  end

  // ---------------- micro-operation timing and mechanism counters ----------------
  int unsigned uop_clocks = 0;
  int unsigned n_opfetch = 0, n_rdbyte = 0, n_rdword = 0, n_wrbyte = 0, n_wrword = 0, n_idle = 0;
  int unsigned n_map0 = 0, n_map1 = 0, n_br_taken = 0, n_br_not = 0, n_ccr_load = 0, n_trap = 0;
  int unsigned n_stall = 0;

  function automatic int unsigned clocks_of(mem_func_e f);
    unique case (f)
      MEM_IDLE:        return 1;
      MEM_WRITE_BYTE:  return 2;
      MEM_READ_BYTE:   return 3;
      MEM_READ_OPCODE: return 3;
      MEM_WRITE_WORD:  return 4;
      default:         return 6;
    endcase
  endfunction

  always @(posedge clk) begin
    if (!nrst) uop_clocks <= 0;
    else if (dut.sync) begin
      if (model_started) begin
        check(uop_clocks + 1 == clocks_of(dut.mem_func_sel),
              $sformatf("micro-op %h (%s) took %0d clocks", dut.u_usq.state_reg, dut.mem_func_sel.name(), uop_clocks + 1));
        unique case (dut.mem_func_sel)
          MEM_IDLE:        n_idle++;
          MEM_READ_OPCODE: n_opfetch++;
          MEM_READ_BYTE:   n_rdbyte++;
          MEM_READ_WORD:   n_rdword++;
          MEM_WRITE_BYTE:  n_wrbyte++;
          default:         n_wrword++;
        endcase
        if (uop_clocks > 0) n_stall++;
        if (dut.micro_op == UOP_JUMP_MAP0) n_map0++;
        if (dut.micro_op == UOP_JUMP_MAP1) n_map1++;
        if (dut.micro_op == UOP_JUMP && dut.usq_cond_sel != UC_ZERO) begin
          if (dut.usq_cond == dut.true_false) n_br_taken++; else n_br_not++;
        end
        if (dut.micro_op == UOP_JUMP && dut.usq_cond_sel == UC_ZERO && dut.true_false) n_br_not++;
        if (dut.ccr_op == CCR_LOAD) n_ccr_load++;
      end
      uop_clocks <= 0;
    end else uop_clocks <= uop_clocks + 1;
  end

  // ---------------- program ----------------
  task automatic build_program();
    logic [7:0] setups [9] = '{8'h00, 8'h0F, 8'h04, 8'h08, 8'h02, 8'h01, 8'h0A, 8'h05, 8'hFF};
    int unsigned here;
    for (int i = 0; i < 65536; i++) begin mem[i] = 8'h00; rmem[i] = 8'h00; end
    pc_emit = 0;
    e3(8'h7E, 16'h0300);                  // JMP $0300: keep the direct page free for data
    pc_emit = 32'h0300;
    e3(8'h8E, 16'h0FFF);                  // LDS #$0FFF
    e3(8'hCE, 16'h0200);                  // LDX #$0200
    e2(8'h86, 8'h35); e2(8'hC6, 8'h4C);   // LDAA #$35, LDAB #$4C
    emit(8'h1B);                          // ABA (H, V, N)
    emit(8'h07);                          // TPA
    e2(8'hA7, 8'h00);                     // STAA 0,X
    emit(8'h06);                          // TAP
    e2(8'h86, 8'h7F); emit(8'h4C);        // LDAA #$7F, INCA (overflow)
    e2(8'hA7, 8'h01); emit(8'h4A);        // STAA 1,X, DECA (overflow)
    emit(8'h01); emit(8'h01);             // NOP, NOP
    emit(8'h0A); emit(8'h0B); emit(8'h0C); emit(8'h0D); emit(8'h0E); emit(8'h0F);
    e2(8'h89, 8'h10); e2(8'h82, 8'h05);   // ADCA, SBCA (C = 1)
    emit(8'h0C); e2(8'h82, 8'h05);        // CLC, SBCA (C = 0)
    e2(8'h80, 8'h11); e2(8'h81, 8'h20);   // SUBA, CMPA
    e2(8'h84, 8'hF0); e2(8'h85, 8'h0F);   // ANDA, BITA
    e2(8'h88, 8'hAA); e2(8'h8A, 8'h01);   // EORA, ORAA
    e2(8'h8B, 8'h77);                     // ADDA
    e2(8'h97, 8'hE0); e2(8'hD6, 8'hE0);   // STAA $E0, LDAB $E0
    emit(8'h10); emit(8'h11); emit(8'h16); emit(8'h17);   // SBA CBA TAB TBA
    foreach (unary_ops[i]) emit(8'h40 | 8'(unary_ops[i]));    // NEGA .. CLRA (CLRA last)
    e2(8'h86, 8'h96); e2(8'hC6, 8'h81);
    foreach (unary_ops[i]) emit(8'h50 | 8'(unary_ops[i]));    // NEGB .. CLRB
    e2(8'h86, 8'hC3); e2(8'hC6, 8'h3C);
    emit(8'h36); emit(8'h37); emit(8'h4F); emit(8'h5F); emit(8'h32); emit(8'h33);  // PSHA PSHB CLRA CLRB PULA PULB
    e3(8'hFD, 16'h0210);                  // STD $0210
    e3(8'hCC, 16'h1234); e3(8'hC3, 16'h0F0F); e3(8'h83, 16'h0001);  // LDD, ADDD, SUBD
    emit(8'h05); emit(8'h04);             // ASLD, LSRD
    e3(8'hCC, 16'h8001); emit(8'h05); emit(8'h04);        // carries out of ASLD/LSRD
    emit(8'h8F); emit(8'h3A); emit(8'h08); emit(8'h09);   // XGDX ABX INX DEX
    emit(8'h3C); emit(8'h38); emit(8'h30); emit(8'h35); emit(8'h31); emit(8'h34);  // PSHX PULX TSX TXS INS DES
    e3(8'h8C, 16'h1234);                  // CPX #
    e2(8'hDF, 8'hE2); e2(8'hDE, 8'hE2);   // STX $E2, LDX $E2
    e2(8'h9F, 8'hE4); e2(8'h9E, 8'hE4);   // STS $E4, LDS $E4
    e2(8'hDC, 8'hE2); e2(8'hDD, 8'hE6);   // LDD $E2, STD $E6
    e3(8'hCE, 16'h0200);                  // LDX #$0200
    e2(8'hE6, 8'h00); e2(8'hEB, 8'h01); e2(8'hE7, 8'h02);  // LDAB 0,X  ADDB 1,X  STAB 2,X
    e2(8'hEC, 8'h00); e2(8'hED, 8'h04); e2(8'hEE, 8'h04);  // LDD 0,X  STD 4,X  LDX 4,X
    e3(8'hCE, 16'h0200);
    foreach (unary_ops[i]) e2(8'h60 | 8'(unary_ops[i]), 8'h03);  // NEG 3,X .. CLR 3,X
    e2(8'h86, 8'h5A); e2(8'hA7, 8'h03);
    foreach (unary_ops[i]) if (unary_ops[i] != 4'hF) e2(8'h60 | 8'(unary_ops[i]), 8'h03);
    foreach (unary_ops[i]) e3(8'h70 | 8'(unary_ops[i]), 16'h0207);  // NEG $0207 .. CLR $0207
    e2(8'h86, 8'hA5); e3(8'hB7, 16'h0207);
    foreach (unary_ops[i]) if (unary_ops[i] != 4'hF) e3(8'h70 | 8'(unary_ops[i]), 16'h0207);
    e3(8'hB6, 16'h0207); e3(8'hF6, 16'h0200);   // LDAA $0207, LDAB $0200
    for (int lo = 0; lo < 12; lo++) if (lo != 3 && lo != 7) e3(8'hB0 | lo[7:0], 16'h0201);  // A ops ext
    for (int lo = 0; lo < 12; lo++) if (lo != 3 && lo != 7) e3(8'hF0 | lo[7:0], 16'h0202);  // B ops ext
    for (int lo = 0; lo < 12; lo++) if (lo != 3 && lo != 7) e2(8'h90 | lo[7:0], 8'hE2);     // A ops dir
    for (int lo = 0; lo < 12; lo++) if (lo != 3 && lo != 7) e2(8'hD0 | lo[7:0], 8'hE3);     // B ops dir
    for (int lo = 0; lo < 12; lo++) if (lo != 3 && lo != 7) e2(8'hA0 | lo[7:0], 8'h05);     // A ops idx
    for (int lo = 0; lo < 12; lo++) if (lo != 3 && lo != 7) e2(8'hE0 | lo[7:0], 8'h04);     // B ops idx
    e3(8'hF7, 16'h0208);                        // STAB $0208
    e3(8'hB3, 16'h0200); e3(8'hF3, 16'h0202);   // SUBD $0200, ADDD $0202
    e2(8'h93, 8'hE2); e2(8'hD3, 8'hE4);         // SUBD $E2, ADDD $E4
    e2(8'hA3, 8'h00); e2(8'hE3, 8'h02);         // SUBD 0,X, ADDD 2,X
    e3(8'hBC, 16'h0200); e2(8'h9C, 8'hE2); e2(8'hAC, 8'h00);  // CPX ext, dir, idx
    e3(8'hFC, 16'h0200); e2(8'hCC, 8'h00); emit(8'h00);       // LDD ext, LDD #0
    e3(8'hBF, 16'h0220); e2(8'hAF, 8'h10);      // STS $0220, STS $10,X
    e3(8'hFF, 16'h0222); e2(8'hEF, 8'h12);      // STX $0222, STX $12,X
    e2(8'hED, 8'h14); e3(8'hBE, 16'h0220);      // STD $14,X, LDS $0220
    e2(8'hAE, 8'h10); e3(8'hFE, 16'h0222);      // LDS $10,X, LDX $0222
    e3(8'h8E, 16'h0FFF);                        // LDS #$0FFF
    // subroutine call and return
    e3(8'hBD, 16'h0F00);                        // JSR $0F00
    e2(8'h9D, 8'hF0);                           // JSR $F0 (direct)
    e3(8'hCE, 16'h0F00); e2(8'hAD, 8'h00);      // LDX #$0F00, JSR 0,X
    here = pc_emit;
    e2(8'h8D, 8'h02); e2(8'h20, 8'h03);         // BSR +2, BRA +3
    emit(8'h5C); emit(8'h39); emit(8'h01);      // INCB, RTS, (skipped)
    // counted loop
    e2(8'hC6, 8'h05); emit(8'h5A); e2(8'h26, 8'hFD);   // LDAB #5; L: DECB; BNE L
    // every conditional branch under nine flag settings
    foreach (setups[s]) begin
      e2(8'h86, setups[s]); emit(8'h06);              // LDAA #setup, TAP
      for (int n = 0; n < 16; n++) begin e2(8'h20 | n[7:0], 8'h01); emit(8'h4C); end  // Bcc +1; INCA
    end
    // backward branch and jumps
    e3(8'h7E, 16'(pc_emit + 4)); emit(8'h01);   // JMP ext over one byte
    e3(8'hCE, 16'(pc_emit + 6)); e2(8'h6E, 8'h00); emit(8'h01);  // LDX #t, JMP 0,X over one byte
    emit(8'h01);
    // unimplemented prefix: trap
    e2(8'h18, 8'h08);
    // subroutines
    pc_emit = 32'h0F00; emit(8'h4C); emit(8'h39);       // INCA, RTS
    pc_emit = 32'h00F0; emit(8'h5C); emit(8'h39);       // INCB, RTS (direct page)
    // data
    pc_emit = 32'h0200;
    emit(8'h12); emit(8'h80); emit(8'hFE); emit(8'h01); emit(8'h7F); emit(8'h00); emit(8'hC4); emit(8'h33);
    pc_emit = 32'h00E0; emit(8'h9A); emit(8'h00); emit(8'h81); emit(8'h7E); emit(8'h40); emit(8'h01);
    $display("program: $0300..$%h", here);
  endtask

  // ---------------- run ----------------
  initial begin
    nrst = 1'b0;
    build_program();
    repeat (3) @(posedge clk);
    nrst <= 1'b1;
    // run until the CPU sits in the trap loop
    wait (model_trapped);
    repeat (20) @(posedge clk);
    n_trap = (dut.u_usq.state_reg == L_TRAP) ? 1 : 0;
    check(dut.u_usq.state_reg == L_TRAP, "CPU not in the trap loop after the page-2 prefix");
    check(wq.size() == 0, $sformatf("%0d expected writes never happened", wq.size()));
    begin
      automatic int unsigned diff = 0;
      for (int i = 0; i < 65536; i++)
        if (mem[i] != rmem[i]) begin
          diff++;
          if (diff < 5) $display("memory $%h: %h, model %h", i[15:0], mem[i], rmem[i]);
        end
      check(diff == 0, $sformatf("%0d memory bytes differ from the model", diff));
    end
    $display("instructions %0d  writes %0d  NOP periods %0d  LDAA# periods %0d", instr_count, writes_seen,
             nop_periods, ldaa_periods);
    $display("opfetch %0d rdbyte %0d rdword %0d wrbyte %0d wrword %0d idle %0d stalls %0d",
             n_opfetch, n_rdbyte, n_rdword, n_wrbyte, n_wrword, n_idle, n_stall);
    $display("map0 %0d map1 %0d branch taken %0d not taken %0d ccr load %0d trap %0d",
             n_map0, n_map1, n_br_taken, n_br_not, n_ccr_load, n_trap);
    check(n_opfetch > 0, "no opcode fetch");
    check(n_rdbyte > 0, "no byte read");
    check(n_rdword > 0, "no word read");
    check(n_wrbyte > 0, "no byte write");
    check(n_wrword > 0, "no word write");
    check(n_idle > 0, "no idle micro-operation");
    check(n_stall > 0, "no multi-clock micro-operation");
    check(n_map0 > 0, "no map-0 dispatch");
    check(n_map1 > 0, "no map-1 dispatch");
    check(n_br_taken > 0, "no conditional branch taken");
    check(n_br_not > 0, "no conditional branch not taken");
    check(n_ccr_load > 0, "no CCR load");
    check(n_trap > 0, "no trap");
    check(nop_periods > 0 && ldaa_periods > 0, "instruction timing never measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
