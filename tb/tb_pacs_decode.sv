// tb_pacs_decode: checks the opcode decoder on all 256 opcodes.
//
// The expected operation and addressing mode of every opcode are taken from
// a table written by opcode value (mnemonic and mode per hex code), not from
// the bit fields the decoder uses; every opcode outside the table must come
// out as a no-operation with no operand. The kind of the final access
// (read, store, read-modify-write, jump) is checked too.
module tb_pacs_decode;
  import pacs_pkg::*;

  logic [7:0] opcode;
  dec_t       dec;
  int checks = 0, failures = 0;

  pacs_decode dut (.*);

  op_e    exp_op [256];
  amode_e exp_am [256];

  task automatic put(op_e o, byte unsigned c, amode_e m);
    exp_op[c] = o;
    exp_am[c] = m;
  endtask

  // the standard column layout of the cc=01 group, by opcode offset
  task automatic group01(op_e o, byte unsigned base);
    put(o, base + 8'h01, AM_INDX); put(o, base + 8'h05, AM_ZP);
    if (o != OP_STA) put(o, base + 8'h09, AM_IMM);
    put(o, base + 8'h0D, AM_ABS);  put(o, base + 8'h11, AM_INDY);
    put(o, base + 8'h15, AM_ZPX);  put(o, base + 8'h19, AM_ABSY);
    put(o, base + 8'h1D, AM_ABSX);
  endtask

  task automatic shift(op_e o, byte unsigned base);
    put(o, base + 8'h06, AM_ZP);  put(o, base + 8'h0A, AM_ACC);
    put(o, base + 8'h0E, AM_ABS); put(o, base + 8'h16, AM_ZPX);
    put(o, base + 8'h1E, AM_ABSX);
  endtask

  function automatic kind_e exp_kind(op_e o, amode_e m);
    if (o == OP_NOP) return K_NOP;
    if (o inside {OP_STA, OP_STX, OP_STY}) return K_STORE;
    if (o inside {OP_JMP, OP_JMPI}) return K_JMP;
    if (o inside {OP_ASL, OP_ROL, OP_LSR, OP_ROR} && m == AM_ACC) return K_READ;
    if (o inside {OP_ASL, OP_ROL, OP_LSR, OP_ROR, OP_INC, OP_DEC}) return K_RMW;
    return K_READ;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin exp_op[i] = OP_NOP; exp_am[i] = AM_IMP; end
    group01(OP_ORA, 8'h00); group01(OP_AND, 8'h20); group01(OP_EOR, 8'h40);
    group01(OP_ADC, 8'h60); group01(OP_STA, 8'h80); group01(OP_LDA, 8'hA0);
    group01(OP_CMP, 8'hC0); group01(OP_SBC, 8'hE0);
    shift(OP_ASL, 8'h00); shift(OP_ROL, 8'h20); shift(OP_LSR, 8'h40); shift(OP_ROR, 8'h60);
    put(OP_STX, 8'h86, AM_ZP); put(OP_STX, 8'h8E, AM_ABS); put(OP_STX, 8'h96, AM_ZPY);
    put(OP_LDX, 8'hA2, AM_IMM); put(OP_LDX, 8'hA6, AM_ZP); put(OP_LDX, 8'hAE, AM_ABS);
    put(OP_LDX, 8'hB6, AM_ZPY); put(OP_LDX, 8'hBE, AM_ABSY);
    put(OP_DEC, 8'hC6, AM_ZP); put(OP_DEC, 8'hCE, AM_ABS); put(OP_DEC, 8'hD6, AM_ZPX);
    put(OP_DEC, 8'hDE, AM_ABSX);
    put(OP_INC, 8'hE6, AM_ZP); put(OP_INC, 8'hEE, AM_ABS); put(OP_INC, 8'hF6, AM_ZPX);
    put(OP_INC, 8'hFE, AM_ABSX);
    put(OP_BIT, 8'h24, AM_ZP); put(OP_BIT, 8'h2C, AM_ABS);
    put(OP_JMP, 8'h4C, AM_ABS); put(OP_JMPI, 8'h6C, AM_ABS);
    put(OP_STY, 8'h84, AM_ZP); put(OP_STY, 8'h8C, AM_ABS); put(OP_STY, 8'h94, AM_ZPX);
    put(OP_LDY, 8'hA0, AM_IMM); put(OP_LDY, 8'hA4, AM_ZP); put(OP_LDY, 8'hAC, AM_ABS);
    put(OP_LDY, 8'hB4, AM_ZPX); put(OP_LDY, 8'hBC, AM_ABSX);
    put(OP_CPY, 8'hC0, AM_IMM); put(OP_CPY, 8'hC4, AM_ZP); put(OP_CPY, 8'hCC, AM_ABS);
    put(OP_CPX, 8'hE0, AM_IMM); put(OP_CPX, 8'hE4, AM_ZP); put(OP_CPX, 8'hEC, AM_ABS);

    for (int i = 0; i < 256; i++) begin
      opcode = 8'(i);
      #1;
      checks++;
      if (dec.op != exp_op[i] || dec.am != exp_am[i] ||
          dec.kind != exp_kind(exp_op[i], exp_am[i])) begin
        failures++;
        $display("FAIL opcode %h: %s %s %s, expected %s %s", i, dec.op.name(),
                 dec.am.name(), dec.kind.name(), exp_op[i].name(), exp_am[i].name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
