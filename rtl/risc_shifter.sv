// risc_shifter: bidirectional shifter for LSH, LSHI, ASHU and ASHUI.
//
// The shift count is a 5-bit two's complement number: a positive count
// shifts left, a negative one shifts right by its magnitude. Left shifts
// always fill with zeros. Right shifts fill with zeros (logical, LSH) or with
// the sign bit (arithmetic, ASHU). The count semantics follow the
// instruction set; taking the count from the low five bits of a register is
// this design's reading of the "-15 to +15" range. Combinational.
module risc_shifter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [4:0]       amount,
  input  logic             arith,
  output logic [WIDTH-1:0] y
);
  logic [4:0] mag;

  always_comb begin
    mag = 5'(-amount);   // magnitude of a negative count, 1..16
    if (!amount[4]) begin
      y = a << amount;
    end else begin
      if (arith) y = WIDTH'($signed(a) >>> mag);
      else       y = a >> mag;
    end
  end
endmodule
