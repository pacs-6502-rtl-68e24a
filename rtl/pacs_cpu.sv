// pacs_cpu: multi-cycle 6502 core (NES 2A03 flavour, no decimal mode).
//
// The core executes the memory-referencing instructions of the 6502, the
// three aaabbbcc groups (see pacs_decode): ORA AND EOR ADC STA LDA CMP SBC in
// all eight addressing modes, the shifts, rotates, INC and DEC on the
// accumulator or memory, LDX STX LDY STY CPX CPY BIT, and JMP absolute and
// indirect. Opcodes outside those tables run as one-byte no-operations.
//
// Bus timing. Every cycle the core drives addr (and d_out/write for a
// store); the memory is synchronous, so the byte read at the address driven
// in one cycle arrives on d_in in the next cycle. With this timing the core
// reproduces the 6502's cycle counts: 2 for immediate and accumulator, 3 zero
// page, 4 zero page indexed and absolute, 4 (+1 on a page crossing) for
// absolute indexed reads, 6 for (zp,X), 5 (+1) for (zp),Y, 5 zero page
// read-modify-write up to 7 for absolute,X read-modify-write, 3 for JMP and 5
// for JMP (abs). As on the 6502, the last cycle of an instruction overlaps
// the fetch of the next one: the operand of a read instruction arrives in the
// next instruction's fetch cycle (sync high) and the register and flags are
// written at the end of it. Read-modify-write instructions write the
// unmodified value back before the result, like the NMOS part, and
// JMP (abs) fetches the high byte of the target from the same page as the
// low byte.
//
// Control. rst (synchronous, active high) clears A, X, Y, sets P to 8'h20
// and starts execution at address 0000, where the host loads the program.
// ready low freezes the whole core; write is forced low while frozen, and the
// byte that arrived in the first frozen cycle is held, so the memory may be
// used by someone else meanwhile and execution resumes exactly where it
// stopped.
//
// The registers follow the datapath of the design: A, X, Y, P, PC, the
// instruction register, the address latches ADL/ADH, the base address latch
// BAL and one shared ALU whose inputs are multiplexed per cycle. The stack
// pointer, interrupts and the single-byte instructions are not part of it.
// sync is high in the cycle that drives the opcode address, the 6502's SYNC
// convention. The state sequences, the cycle-exact overlap and the freeze
// behaviour are this design's; the instruction tables, the registers and
// the shared-ALU datapath follow the original PACS 6502 CPU.
module pacs_cpu
  import pacs_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ready,
  input  logic [7:0]  d_in,
  output logic [15:0] addr,
  output logic [7:0]  d_out,
  output logic        write,
  output logic        sync
);

  typedef enum logic [4:0] {
    S_SYNC,   // opcode fetch, write-back of the previous instruction
    S_DECODE, // opcode arrives; fetch the first operand byte
    S_ZP,     // zero-page address arrives
    S_ZPI,    // zero-page base arrives; add the index
    S_ZPI2,   // indexed zero-page access
    S_ABS1,   // low address byte arrives; add the index
    S_ABS2,   // high address byte arrives
    S_FIX,    // page-crossing fix-up access
    S_INDX1,  // (zp,X): pointer base arrives, add X
    S_INDX2,  // read pointer low
    S_INDX3,  // read pointer high
    S_INDX4,  // pointer high arrives, operand access
    S_INDY1,  // (zp),Y: pointer address arrives
    S_INDY2,  // pointer low arrives, add Y
    S_RMW1,   // value arrives: write it back unmodified, compute
    S_RMW2,   // write the result
    S_JIND1,  // JMP (abs): read target low
    S_JIND2   // read target high
  } state_e;

  state_e      state_q, state_d;
  logic [7:0]  a_q, x_q, y_q, p_q, ir_q;
  logic [7:0]  a_d, x_d, y_d, p_d, ir_d;
  logic [15:0] pc_q, pc_d, ea_q, ea_d;
  logic [7:0]  adl_q, adl_d, adh_q, adh_d, bal_q, bal_d, tmp_q, tmp_d;
  logic        carry_q, carry_d, jmp_q, jmp_d, wb_q, wb_d;
  dec_t        dec_q, dec_d, dec_in;

  // data input, held while the core is frozen
  logic        active_q;
  logic [7:0]  din_hold_q, din;
  assign din = active_q ? d_in : din_hold_q;

  pacs_decode u_decode (.opcode(din), .dec(dec_in));

  // the shared ALU
  logic [7:0] alu_a, alu_b, alu_res;
  alu_op_e    alu_op;
  logic       alu_ci, alu_co, alu_v, alu_z, alu_n;

  pacs_alu u_alu (
    .a(alu_a), .b(alu_b), .op(alu_op), .carry_in(alu_ci),
    .result(alu_res), .carry_out(alu_co), .overflow(alu_v),
    .zero(alu_z), .sign(alu_n)
  );

  function automatic logic [7:0] reg_val(reg_e r, logic [7:0] a, logic [7:0] x,
                                         logic [7:0] y);
    unique case (r)
      R_A: return a;
      R_X: return x;
      R_Y: return y;
      default: return 8'h00;
    endcase
  endfunction

  logic [7:0]  idx, src, opnd;
  logic        exec, do_access, write_c;
  logic [15:0] acc_addr, fetch;

  always_comb begin
    idx = (dec_q.am inside {AM_ZPX, AM_ABSX, AM_INDX}) ? x_q : y_q;
    src = reg_val(dec_q.rsrc, a_q, x_q, y_q);
  end

  // ALU operand selection: address arithmetic in the addressing cycles,
  // the instruction's operation in the write-back and modify cycles.
  always_comb begin
    alu_a = 8'h00; alu_b = din; alu_op = ALU_ADD; alu_ci = 1'b0;
    exec = 1'b0; opnd = din;
    unique case (state_q)
      S_SYNC: begin
        exec = wb_q;
        opnd = (dec_q.am == AM_ACC) ? a_q : din;
      end
      S_ZPI:   alu_a = idx;
      S_ABS1:  alu_a = (dec_q.am inside {AM_ABSX, AM_ABSY}) ? idx : 8'h00;
      S_ABS2:  begin alu_a = din; alu_b = 8'h00; alu_ci = carry_q; end
      S_INDX1: alu_a = x_q;
      S_INDX2: begin alu_a = bal_q; alu_b = 8'h00; alu_ci = 1'b1; end
      S_INDY1: begin alu_a = din; alu_b = 8'h00; alu_ci = 1'b1; end
      S_INDY2: alu_a = y_q;
      S_RMW1:  exec = 1'b1;
      S_JIND2: begin alu_a = ea_q[7:0]; alu_b = 8'h00; alu_ci = 1'b1; end
      default: ;
    endcase
    if (exec) begin
      unique case (dec_q.op)
        OP_ORA: begin alu_op = ALU_OR;  alu_a = a_q; alu_b = opnd; end
        OP_AND: begin alu_op = ALU_AND; alu_a = a_q; alu_b = opnd; end
        OP_EOR: begin alu_op = ALU_EOR; alu_a = a_q; alu_b = opnd; end
        OP_ADC: begin alu_op = ALU_ADD; alu_a = a_q; alu_b = opnd; alu_ci = p_q[P_C]; end
        OP_SBC: begin alu_op = ALU_SUB; alu_a = a_q; alu_b = opnd; alu_ci = p_q[P_C]; end
        OP_CMP, OP_CPX, OP_CPY: begin
          alu_op = ALU_SUB; alu_a = src; alu_b = opnd; alu_ci = 1'b1;
        end
        OP_BIT: begin alu_op = ALU_AND; alu_a = a_q; alu_b = opnd; end
        OP_ASL: begin alu_op = ALU_ADD; alu_a = opnd; alu_b = opnd; alu_ci = 1'b0; end
        OP_ROL: begin alu_op = ALU_ADD; alu_a = opnd; alu_b = opnd; alu_ci = p_q[P_C]; end
        OP_LSR: begin alu_op = ALU_SR;  alu_a = opnd; alu_ci = 1'b0; end
        OP_ROR: begin alu_op = ALU_SR;  alu_a = opnd; alu_ci = p_q[P_C]; end
        OP_INC: begin alu_op = ALU_ADD; alu_a = opnd; alu_b = 8'h00; alu_ci = 1'b1; end
        OP_DEC: begin alu_op = ALU_SUB; alu_a = opnd; alu_b = 8'h00; alu_ci = 1'b0; end
        default: begin alu_op = ALU_OR; alu_a = 8'h00; alu_b = opnd; end // loads
      endcase
    end
  end

  always_comb begin
    state_d = state_q;
    a_d = a_q; x_d = x_q; y_d = y_q; p_d = p_q; ir_d = ir_q; pc_d = pc_q;
    adl_d = adl_q; adh_d = adh_q; bal_d = bal_q; ea_d = ea_q; tmp_d = tmp_q;
    carry_d = carry_q; jmp_d = jmp_q; wb_d = wb_q; dec_d = dec_q;
    addr = pc_q; d_out = 8'h00; write_c = 1'b0;
    do_access = 1'b0; acc_addr = 16'h0000;
    fetch = jmp_q ? {din, adl_q} : pc_q;

    unique case (state_q)
      S_SYNC: begin
        addr    = fetch;
        pc_d    = fetch + 16'd1;
        jmp_d   = 1'b0;
        wb_d    = 1'b0;
        state_d = S_DECODE;
      end
      S_DECODE: begin
        ir_d  = din;
        dec_d = dec_in;
        addr  = pc_q;
        unique case (dec_in.am)
          AM_IMP: state_d = S_SYNC;
          AM_ACC: begin state_d = S_SYNC; wb_d = 1'b1; end
          AM_IMM: begin state_d = S_SYNC; wb_d = 1'b1; pc_d = pc_q + 16'd1; end
          AM_ZP:  begin state_d = S_ZP;    pc_d = pc_q + 16'd1; end
          AM_ZPX, AM_ZPY: begin state_d = S_ZPI; pc_d = pc_q + 16'd1; end
          AM_ABS, AM_ABSX, AM_ABSY: begin state_d = S_ABS1; pc_d = pc_q + 16'd1; end
          AM_INDX: begin state_d = S_INDX1; pc_d = pc_q + 16'd1; end
          default: begin state_d = S_INDY1; pc_d = pc_q + 16'd1; end
        endcase
      end
      S_ZP: begin
        do_access = 1'b1;
        acc_addr  = {8'h00, din};
      end
      S_ZPI: begin
        addr  = {8'h00, din};          // dummy read of the base
        bal_d = alu_res;
        state_d = S_ZPI2;
      end
      S_ZPI2: begin
        do_access = 1'b1;
        acc_addr  = {8'h00, bal_q};
      end
      S_ABS1: begin
        addr    = pc_q;
        pc_d    = pc_q + 16'd1;
        adl_d   = alu_res;
        carry_d = alu_co;
        if (dec_q.op == OP_JMP) begin
          state_d = S_SYNC;
          jmp_d   = 1'b1;
        end else if (dec_q.op == OP_JMPI) begin
          state_d = S_JIND1;
        end else begin
          state_d = S_ABS2;
        end
      end
      S_ABS2: begin
        // high byte arrives (absolute, absolute indexed, or (zp),Y pointer)
        if (dec_q.am == AM_ABS || (!carry_q && dec_q.kind == K_READ)) begin
          do_access = 1'b1;
          acc_addr  = {din, adl_q};
        end else begin
          addr    = {din, adl_q};      // dummy read, high byte not yet fixed
          adh_d   = alu_res;
          state_d = S_FIX;
        end
      end
      S_FIX: begin
        do_access = 1'b1;
        acc_addr  = {adh_q, adl_q};
      end
      S_INDX1: begin
        addr  = {8'h00, din};
        bal_d = alu_res;
        state_d = S_INDX2;
      end
      S_INDX2: begin
        addr   = {8'h00, bal_q};
        bal_d  = alu_res;
        state_d = S_INDX3;
      end
      S_INDX3: begin
        adl_d = din;
        addr  = {8'h00, bal_q};
        state_d = S_INDX4;
      end
      S_INDX4: begin
        do_access = 1'b1;
        acc_addr  = {din, adl_q};
      end
      S_INDY1: begin
        addr   = {8'h00, din};
        bal_d  = alu_res;
        state_d = S_INDY2;
      end
      S_INDY2: begin
        addr    = {8'h00, bal_q};
        adl_d   = alu_res;
        carry_d = alu_co;
        state_d = S_ABS2;
      end
      S_RMW1: begin
        addr    = ea_q;
        write_c = 1'b1;
        d_out   = din;                 // unmodified value first
        state_d = S_RMW2;
      end
      S_RMW2: begin
        addr    = ea_q;
        write_c = 1'b1;
        d_out   = tmp_q;
        state_d = S_SYNC;
      end
      S_JIND1: begin
        addr    = {din, adl_q};
        ea_d    = {din, adl_q};
        state_d = S_JIND2;
      end
      S_JIND2: begin
        adl_d   = din;
        addr    = {ea_q[15:8], alu_res};
        jmp_d   = 1'b1;
        state_d = S_SYNC;
      end
      default: state_d = S_SYNC;
    endcase

    // final bus access of an instruction
    if (do_access) begin
      addr = acc_addr;
      ea_d = acc_addr;
      unique case (dec_q.kind)
        K_STORE: begin
          write_c = 1'b1;
          d_out   = src;
          state_d = S_SYNC;
        end
        K_READ: begin
          wb_d    = 1'b1;
          state_d = S_SYNC;
        end
        K_RMW:   state_d = S_RMW1;
        default: state_d = S_SYNC;
      endcase
    end

    // flags and result of the executed operation
    if (exec) begin
      // flags
      if (dec_q.op == OP_BIT) begin
        p_d[P_N] = opnd[7];
        p_d[P_V] = opnd[6];
        p_d[P_Z] = alu_z;
      end else begin
        p_d[P_N] = alu_n;
        p_d[P_Z] = alu_z;
      end
      if (dec_q.op inside {OP_ADC, OP_SBC, OP_CMP, OP_CPX, OP_CPY,
                           OP_ASL, OP_ROL, OP_LSR, OP_ROR})
        p_d[P_C] = alu_co;
      if (dec_q.op inside {OP_ADC, OP_SBC})
        p_d[P_V] = alu_v;

      // result
      if (state_q == S_RMW1) begin
        tmp_d = alu_res;
      end else begin
        unique case (dec_q.rdst)
          R_A: a_d = alu_res;
          R_X: x_d = alu_res;
          R_Y: y_d = alu_res;
          default: ;
        endcase
      end
    end
  end

  assign write = write_c && ready && !rst;
  assign sync  = (state_q == S_SYNC);

  always_ff @(posedge clk) begin
    active_q   <= ready;
    din_hold_q <= din;
    if (rst) begin
      state_q <= S_SYNC;
      pc_q    <= 16'h0000;
      a_q     <= 8'h00;
      x_q     <= 8'h00;
      y_q     <= 8'h00;
      p_q     <= P_RESET;
      ir_q    <= 8'h00;
      dec_q   <= '{op: OP_NOP, am: AM_IMP, kind: K_NOP, rsrc: R_NONE, rdst: R_NONE};
      adl_q   <= 8'h00;
      adh_q   <= 8'h00;
      bal_q   <= 8'h00;
      ea_q    <= 16'h0000;
      tmp_q   <= 8'h00;
      carry_q <= 1'b0;
      jmp_q   <= 1'b0;
      wb_q    <= 1'b0;
    end else if (ready) begin
      state_q <= state_d;
      pc_q    <= pc_d;
      a_q     <= a_d;
      x_q     <= x_d;
      y_q     <= y_d;
      p_q     <= p_d;
      ir_q    <= ir_d;
      dec_q   <= dec_d;
      adl_q   <= adl_d;
      adh_q   <= adh_d;
      bal_q   <= bal_d;
      ea_q    <= ea_d;
      tmp_q   <= tmp_d;
      carry_q <= carry_d;
      jmp_q   <= jmp_d;
      wb_q    <= wb_d;
    end
  end

  // an opcode fetch never writes, and only store and modify cycles do
  always_ff @(posedge clk) begin
    if (!rst && ready)
      assert (!(write && sync)) else $error("write during opcode fetch");
  end

endmodule
