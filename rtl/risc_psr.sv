// risc_psr: program status register.
//
// A 16-bit register laid out (MSB first) as r r r r I P E 0 N Z F 0 0 L T C.
// When an instruction retires (en) it updates one group of flags:
//   FL_ARITH  C and F  (ADD, ADDI, ADDC, ADDCI, SUB, SUBI, SUBC, SUBCI)
//   FL_CMP    Z, L, N  (CMP, CMPI)
//   FL_TBIT   F        (TBIT, TBITI: the tested bit)
// LPR loads every implemented bit from a register; reserved and zero bits
// always read 0. EI sets and DI clears E. The layout and the flag groups are
// the instruction set's; the reset value 0 and the DI/EI behaviour (there is
// no interrupt logic to use E) are this design's choices. Updates take
// effect at the rising clock edge.
module risc_psr
  import risc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  flag_upd_e   upd,
  input  flags_t      flags,
  input  logic        tbit,
  input  logic        lpr_we,
  input  logic [15:0] lpr_data,
  input  logic        set_e,
  input  logic        clr_e,
  output logic [15:0] psr
);
  logic [15:0] psr_q, psr_d;

  always_comb begin
    psr_d = psr_q;
    if (en) begin
      if (lpr_we) begin
        psr_d = lpr_data & PSR_MASK;
      end else begin
        unique case (upd)
          FL_ARITH: begin
            psr_d[PSR_C] = flags.c;
            psr_d[PSR_F] = flags.f;
          end
          FL_CMP: begin
            psr_d[PSR_Z] = flags.z;
            psr_d[PSR_L] = flags.l;
            psr_d[PSR_N] = flags.n;
          end
          FL_TBIT: psr_d[PSR_F] = tbit;
          default: ;
        endcase
        if (set_e) psr_d[PSR_E] = 1'b1;
        if (clr_e) psr_d[PSR_E] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) psr_q <= '0;
    else        psr_q <= psr_d;
  end

  assign psr = psr_q;
endmodule
