// bs_addsub_cell: bit-serial adder / subtractor / delay cell with in-place carry.
//
// One cell of the bit-serial RT adder planes. Words arrive LSB first; lsb_in
// marks the first bit of a word. The cell adds (COEF = +1) or subtracts
// (COEF = -1) the passing operand bit a_in into the partial-sum bit s_in,
// keeping the carry in a local flip-flop. Subtraction adds the complement
// with the carry preset to 1 at the LSB. COEF = 0 makes a dummy delay cell
// that only latches s_in. Both inputs are latched: a_out, s_out and lsb_out
// are the registered a_in, sum bit and lsb_in, one cycle later.
// Arithmetic is modulo 2^n for an n-bit word frame: the carry out of the
// last bit is dropped when the next LSB arrives.
module bs_addsub_cell #(
  parameter int COEF = 1   // +1 add, -1 subtract, 0 delay only
) (
  input  logic clk,
  input  logic lsb_in,
  input  logic a_in,
  input  logic s_in,
  output logic a_out,
  output logic s_out,
  output logic lsb_out
);

  logic carry;
  logic cin;
  logic b;

  assign cin = lsb_in ? (COEF < 0) : carry;
  assign b   = (COEF < 0) ? ~a_in : a_in;

  always_ff @(posedge clk) begin
    a_out   <= a_in;
    lsb_out <= lsb_in;
    if (COEF == 0) begin
      s_out <= s_in;
      carry <= 1'b0;
    end else begin
      s_out <= s_in ^ b ^ cin;
      carry <= (s_in & b) | (s_in & cin) | (b & cin);
    end
  end

endmodule
