// csa: W-bit carry-save adder (3:2 compressor).
//
// Takes three numbers x, y, z and returns two, sum and carry, with
// x + y + z = sum + carry (modulo 2^W). Every bit position is an independent
// full adder: sum is the bitwise XOR, carry is the bitwise majority shifted
// up by one place, so the delay is one full adder regardless of W. The
// carry out of the top bit is dropped, which is exact for two's-complement
// operands whose true sum fits in W bits.
//
// Purely combinational. The carry-save adder and its role as the cheap,
// fast adder of the design follow the document; the bit-level form is the
// textbook one.
module csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-2:0] maj;  // majority of the low W-1 bits; the top carry is dropped

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
    carry = {maj, 1'b0};
  end

endmodule
