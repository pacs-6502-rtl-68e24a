// tb_pacs_alu: exhaustive test of the ALU.
//
// Every operation is applied to every pair of operands and both carry
// inputs, and the result and flags are compared with values computed here
// from integer arithmetic: the sum and carry of a + b + c, a + ~b + c for
// subtraction, signed overflow from the signed sum, the bitwise functions,
// and shift right with the carry entering bit 7.
module tb_pacs_alu;
  import pacs_pkg::*;

  logic [7:0] a, b, result;
  alu_op_e    op;
  logic       carry_in, carry_out, overflow, zero, sign;
  int checks = 0, failures = 0;

  pacs_alu dut (.*);

  initial begin
    int s, sa, sb, exp_r, exp_c, exp_v;
    alu_op_e ops [6] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_EOR, ALU_SR};
    foreach (ops[k]) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          for (int c = 0; c < 2; c++) begin
            op = ops[k]; a = 8'(i); b = 8'(j); carry_in = 1'(c);
            #1;
            exp_v = 0;
            exp_c = c;
            case (ops[k])
              ALU_ADD, ALU_SUB: begin
                sb = (ops[k] == ALU_SUB) ? (255 - j) : j;
                s = i + sb + c;
                exp_r = s % 256;
                exp_c = (s >= 256);
                // signed view
                sa = (i >= 128) ? i - 256 : i;
                if (sb >= 128) sb = sb - 256;
                exp_v = ((sa + sb + c) > 127) || ((sa + sb + c) < -128);
              end
              ALU_AND: exp_r = i & j;
              ALU_OR:  exp_r = i | j;
              ALU_EOR: exp_r = i ^ j;
              default: begin exp_r = (i / 2) + 128 * c; exp_c = i % 2; end
            endcase
            checks++;
            if (result != 8'(exp_r) || carry_out != 1'(exp_c) ||
                (ops[k] inside {ALU_ADD, ALU_SUB} && overflow != 1'(exp_v)) ||
                zero != (exp_r == 0) || sign != (exp_r >= 128)) begin
              failures++;
              if (failures < 10)
                $display("FAIL op=%s a=%h b=%h c=%0d: r=%h c=%b v=%b z=%b n=%b expected r=%h c=%0d v=%0d",
                         ops[k].name(), a, b, c, result, carry_out, overflow, zero, sign,
                         exp_r, exp_c, exp_v);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
