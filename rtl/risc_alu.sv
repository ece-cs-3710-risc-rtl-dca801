// risc_alu: 16-bit arithmetic and logic unit.
//
// Computes Rdest op B, where a is Rdest and b is Rsrc or the extended
// immediate. All five flags are produced for every operation; the PSR keeps
// only those the instruction class writes.
//   c  carry out of an add, borrow of a subtract (Rsrc > Rdest unsigned)
//   f  two's complement overflow
//   z  result zero
//   l  borrow of Rdest - Rsrc, i.e. Rsrc > Rdest unsigned (CMP)
//   n  Rsrc > Rdest signed, formed as l ^ sign(Rsrc) ^ sign(Rdest)
// ADDC/SUBC add or subtract the incoming C flag. MUL keeps the low 16 bits,
// LUI places the immediate byte in the upper half with a zero low byte,
// SNXB/ZRXB sign/zero extend the low byte of b. These follow the instruction
// definitions; how the flags are formed internally is this design's.
// Purely combinational.
module risc_alu
  import risc_pkg::*;
(
  input  alu_op_e     op,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] y,
  output flags_t      flags
);
  logic [16:0] sum, diff;
  logic        carry_in;

  always_comb begin
    carry_in = (op == ALU_ADDC || op == ALU_SUBC) ? cin : 1'b0;
    sum  = {1'b0, a} + {1'b0, b} + {16'b0, carry_in};
    diff = {1'b0, a} - {1'b0, b} - {16'b0, carry_in};

    y       = '0;
    flags   = '0;
    unique case (op)
      ALU_ADD, ALU_ADDC: begin
        y       = sum[15:0];
        flags.c = sum[16];
        flags.f = (a[15] == b[15]) && (sum[15] != a[15]);
      end
      ALU_SUB, ALU_SUBC: begin
        y       = diff[15:0];
        flags.c = diff[16];
        flags.f = (a[15] != b[15]) && (diff[15] != a[15]);
      end
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_MOV:  y = b;
      ALU_MUL:  y = 16'(a * b);
      ALU_LUI:  y = {b[7:0], 8'h00};
      ALU_SNXB: y = {{8{b[7]}}, b[7:0]};
      ALU_ZRXB: y = {8'h00, b[7:0]};
      default:  y = '0;
    endcase
    // compare flags (Z, L, N), meaningful for SUB-class operations
    flags.z = (y == 16'h0000);
    flags.l = diff[16];
    flags.n = diff[16] ^ a[15] ^ b[15];
  end
endmodule
