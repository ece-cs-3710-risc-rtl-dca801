// risc_cond: condition-code evaluation for Bcond, Jcond and Scond.
//
// Maps the 4-bit condition field onto the PSR flags exactly as the
// instruction set's condition table defines them (EQ, NE, CS, CC, HI, LS, GT,
// LE, FS, FC, LO, HS, LT, GE, UC and the never-true code 1111). Note that
// after "CMP Rsrc, Rdest" the L and N flags mean Rsrc > Rdest, so for
// example HI is true when Rsrc is higher. Combinational.
module risc_cond
  import risc_pkg::*;
(
  input  logic [3:0]  cond,
  input  logic [15:0] psr,
  output logic        taken
);
  logic c, l, f, z, n;

  always_comb begin
    c = psr[PSR_C];
    l = psr[PSR_L];
    f = psr[PSR_F];
    z = psr[PSR_Z];
    n = psr[PSR_N];
    unique case (cond_e'(cond))
      C_EQ: taken = z;
      C_NE: taken = !z;
      C_CS: taken = c;
      C_CC: taken = !c;
      C_HI: taken = l;
      C_LS: taken = !l;
      C_GT: taken = n;
      C_LE: taken = !n;
      C_FS: taken = f;
      C_FC: taken = !f;
      C_LO: taken = !l && !z;
      C_HS: taken = l || z;
      C_LT: taken = !n && !z;
      C_GE: taken = n || z;
      C_UC: taken = 1'b1;
      default: taken = 1'b0;   // 1111: never
    endcase
  end
endmodule
