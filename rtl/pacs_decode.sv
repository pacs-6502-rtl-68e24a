// pacs_decode: opcode decoder of the PACS 6502.
//
// Splits an opcode aaabbbcc into its fields. cc picks the group, aaa the
// operation and bbb the addressing mode, following the three opcode tables of
// the 6502:
//   cc=01: ORA AND EOR ADC STA LDA CMP SBC, bbb = (zp,X) zp # abs (zp),Y zp,X
//          abs,Y abs,X
//   cc=10: ASL ROL LSR ROR STX LDX DEC INC, bbb = # zp A abs - zp,X - abs,X
//   cc=00: - BIT JMP JMP(abs) STY LDY CPY CPX, bbb = # zp - abs - zp,X - abs,X
// Only the combinations that exist on the 6502 are decoded (for instance no
// STA #, and BIT only with zp and abs). LDX and STX index with Y where the
// table has "zero page, X" and "absolute, X", as on the 6502 and 2A03. Every
// other opcode (the single-byte instructions, branches, stack operations,
// which are outside the three tables) decodes to OP_NOP with mode AM_IMP and is
// executed as a one-byte, two-cycle no-operation.
//
// Purely combinational; one instance sits in the CPU's decode cycle.
module pacs_decode
  import pacs_pkg::*;
(
  input  logic [7:0] opcode,
  output dec_t       dec
);

  logic [2:0] aaa, bbb;
  logic [1:0] cc;
  assign {aaa, bbb, cc} = opcode;

  amode_e am01, am_shift, am00;
  logic   valid;

  // Addressing mode columns of the three tables.
  always_comb begin
    unique case (bbb)
      3'b000: am01 = AM_INDX;
      3'b001: am01 = AM_ZP;
      3'b010: am01 = AM_IMM;
      3'b011: am01 = AM_ABS;
      3'b100: am01 = AM_INDY;
      3'b101: am01 = AM_ZPX;
      3'b110: am01 = AM_ABSY;
      default: am01 = AM_ABSX;
    endcase
    unique case (bbb)
      3'b000: am_shift = AM_IMM;
      3'b001: am_shift = AM_ZP;
      3'b010: am_shift = AM_ACC;
      3'b011: am_shift = AM_ABS;
      3'b101: am_shift = AM_ZPX;
      3'b111: am_shift = AM_ABSX;
      default: am_shift = AM_IMP;
    endcase
    unique case (bbb)
      3'b000: am00 = AM_IMM;
      3'b001: am00 = AM_ZP;
      3'b011: am00 = AM_ABS;
      3'b101: am00 = AM_ZPX;
      3'b111: am00 = AM_ABSX;
      default: am00 = AM_IMP;
    endcase
  end

  always_comb begin
    dec   = '{op: OP_NOP, am: AM_IMP, kind: K_NOP, rsrc: R_NONE, rdst: R_NONE};
    valid = 1'b0;
    unique case (cc)
      2'b01: begin
        dec.am   = am01;
        dec.rsrc = R_A;
        dec.kind = K_READ;
        valid    = 1'b1;
        unique case (aaa)
          3'b000: begin dec.op = OP_ORA; dec.rdst = R_A; end
          3'b001: begin dec.op = OP_AND; dec.rdst = R_A; end
          3'b010: begin dec.op = OP_EOR; dec.rdst = R_A; end
          3'b011: begin dec.op = OP_ADC; dec.rdst = R_A; end
          3'b100: begin dec.op = OP_STA; dec.kind = K_STORE; valid = (bbb != 3'b010); end
          3'b101: begin dec.op = OP_LDA; dec.rdst = R_A; end
          3'b110: begin dec.op = OP_CMP; end
          default: begin dec.op = OP_SBC; dec.rdst = R_A; end
        endcase
      end
      2'b10: begin
        dec.am = am_shift;
        unique case (aaa)
          3'b000, 3'b001, 3'b010, 3'b011: begin
            unique case (aaa)
              3'b000: dec.op = OP_ASL;
              3'b001: dec.op = OP_ROL;
              3'b010: dec.op = OP_LSR;
              default: dec.op = OP_ROR;
            endcase
            valid = (bbb != 3'b000) && (am_shift != AM_IMP);
            if (am_shift == AM_ACC) begin
              dec.kind = K_READ; dec.rsrc = R_A; dec.rdst = R_A;
            end else begin
              dec.kind = K_RMW;
            end
          end
          3'b100: begin
            dec.op = OP_STX; dec.kind = K_STORE; dec.rsrc = R_X;
            valid = (bbb == 3'b001) || (bbb == 3'b011) || (bbb == 3'b101);
            if (bbb == 3'b101) dec.am = AM_ZPY;
          end
          3'b101: begin
            dec.op = OP_LDX; dec.kind = K_READ; dec.rdst = R_X;
            valid = (am_shift != AM_IMP) && (am_shift != AM_ACC);
            if (bbb == 3'b101) dec.am = AM_ZPY;
            if (bbb == 3'b111) dec.am = AM_ABSY;
          end
          default: begin
            dec.op   = (aaa == 3'b110) ? OP_DEC : OP_INC;
            dec.kind = K_RMW;
            valid = (bbb == 3'b001) || (bbb == 3'b011) || (bbb == 3'b101) || (bbb == 3'b111);
          end
        endcase
      end
      2'b00: begin
        dec.am = am00;
        unique case (aaa)
          3'b001: begin
            dec.op = OP_BIT; dec.kind = K_READ; dec.rsrc = R_A;
            valid = (bbb == 3'b001) || (bbb == 3'b011);
          end
          3'b010: begin
            dec.op = OP_JMP; dec.kind = K_JMP; valid = (bbb == 3'b011);
          end
          3'b011: begin
            dec.op = OP_JMPI; dec.kind = K_JMP; valid = (bbb == 3'b011);
          end
          3'b100: begin
            dec.op = OP_STY; dec.kind = K_STORE; dec.rsrc = R_Y;
            valid = (bbb == 3'b001) || (bbb == 3'b011) || (bbb == 3'b101);
          end
          3'b101: begin
            dec.op = OP_LDY; dec.kind = K_READ; dec.rdst = R_Y;
            valid = (am00 != AM_IMP);
          end
          3'b110: begin
            dec.op = OP_CPY; dec.kind = K_READ; dec.rsrc = R_Y;
            valid = (bbb == 3'b000) || (bbb == 3'b001) || (bbb == 3'b011);
          end
          3'b111: begin
            dec.op = OP_CPX; dec.kind = K_READ; dec.rsrc = R_X;
            valid = (bbb == 3'b000) || (bbb == 3'b001) || (bbb == 3'b011);
          end
          default: valid = 1'b0; // aaa = 000: not in the table
        endcase
      end
      default: valid = 1'b0; // cc = 11: no instructions
    endcase
    if (!valid)
      dec = '{op: OP_NOP, am: AM_IMP, kind: K_NOP, rsrc: R_NONE, rdst: R_NONE};
  end

endmodule
