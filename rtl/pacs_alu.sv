// pacs_alu: the 8-bit arithmetic and logic unit of the PACS 6502.
//
// Two 8-bit operands a and b and a carry input feed parallel function units
// (adder, OR, XOR, AND, shift right); the operation code enables one of them
// onto the result, and the carry-out, overflow, zero and sign flags are
// derived alongside. This is the structure of the 6502 ALU: a single adder
// serves addition, and subtraction adds the inverted b operand (the 6502's B
// input inverters), so SBC and CMP are a + ~b + carry_in. Left shifts are done
// by the caller as a + a. Shift right moves carry_in into bit 7 and bit 0 out
// to carry_out (LSR with carry_in = 0, ROR with carry_in = C). There is no
// decimal mode: the NES 2A03 this core follows has it removed.
//
// Purely combinational. The "output register" of the ALU is, in this design,
// the register of the CPU that the result is written into.
module pacs_alu
  import pacs_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  alu_op_e    op,
  input  logic       carry_in,
  output logic [7:0] result,
  output logic       carry_out,
  output logic       overflow,
  output logic       zero,
  output logic       sign
);

  logic [7:0] b_eff;
  logic [8:0] sum;

  always_comb begin
    b_eff = (op == ALU_SUB) ? ~b : b;
    sum   = {1'b0, a} + {1'b0, b_eff} + {8'd0, carry_in};
  end

  always_comb begin
    result    = sum[7:0];
    carry_out = sum[8];
    overflow  = 1'b0;
    unique case (op)
      ALU_ADD, ALU_SUB: begin
        result    = sum[7:0];
        carry_out = sum[8];
        // signed overflow: both addends of one sign, result of the other
        overflow  = (a[7] == b_eff[7]) && (sum[7] != a[7]);
      end
      ALU_AND: begin result = a & b; carry_out = carry_in; end
      ALU_OR:  begin result = a | b; carry_out = carry_in; end
      ALU_EOR: begin result = a ^ b; carry_out = carry_in; end
      ALU_SR:  begin result = {carry_in, a[7:1]}; carry_out = a[0]; end
      default: ;
    endcase
    zero = (result == 8'd0);
    sign = result[7];
  end

endmodule
