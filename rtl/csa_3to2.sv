// csa_3to2: one carry-save layer, a column of W full adders.
//
// Three W-bit rows in, two W-bit rows out, with x + y + z = sum + carry
// (mod 2^W). Bit i of sum is the full adder's sum bit of column i; its carry
// bit is placed at column i+1 of carry, and the carry out of the top column
// is dropped (all arithmetic is modulo 2^W). Purely combinational.
module csa_3to2 #(
  parameter int W = 32  // row width
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-2:0] maj;  // majority of columns 0..W-2; column W-1's carry is dropped
  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
    carry = {maj, 1'b0};
  end
endmodule
