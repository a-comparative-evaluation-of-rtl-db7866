// bs_sp_mult: serial-parallel multiplier, bit-serial operand times a parallel
// coefficient, modulo 2^NB.
//
// The serial operand a arrives LSB first with lsb marking bit 0 of each
// NB-bit word; the coefficient d is a parallel NB-bit word held constant. The
// array has NB cells; cell j holds coefficient bit d[j], a sum bit and a
// carry bit. Every cycle cell j adds a & d[j], its own carry and the sum bit
// of cell j+1 (a carry-save shift-add), so the partial product moves one
// position towards the LSB per cycle and cell 0 delivers one product bit.
// At an LSB all sums and carries start from zero, which drops the high part
// of the previous product (two's complement modulo 2^NB).
// Timing: product bit i leaves on p one cycle after operand bit i enters;
// lsb_out is lsb delayed by one cycle.
module bs_sp_mult #(
  parameter int unsigned NB = 20
) (
  input  logic          clk,
  input  logic          lsb,
  input  logic          a,
  input  logic [NB-1:0] d,
  output logic          p,
  output logic          lsb_out
);

  logic [NB-1:0] s;
  logic [NB-1:0] c;

  always_ff @(posedge clk) begin
    lsb_out <= lsb;
    for (int j = 0; j < int'(NB); j++) begin
      logic sin;
      logic cin;
      logic pp;
      sin = (lsb || j == int'(NB) - 1) ? 1'b0 : s[(j == int'(NB) - 1) ? j : j + 1];
      cin = lsb ? 1'b0 : c[j];
      pp  = a & d[j];
      s[j] <= sin ^ cin ^ pp;
      c[j] <= (sin & cin) | (sin & pp) | (cin & pp);
    end
  end

  assign p = s[0];

endmodule
