// gf_mul: combinational multiplier in GF(2^8), reduction polynomial
// x^8+x^4+x^3+x+1 (0x11B), the field of AES.
//
// The product is formed as the 15-bit carry-less product of a and b, which is
// then reduced bit by bit from the top.  It is the multiplier drawn as a
// circled cross in the field inverter; its internal structure is this
// design's choice (a plain standard-basis multiplier).
//
// Interface: a, b operands, p = a*b.  Purely combinational, no latency.
module gf_mul (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] p
);
  logic [14:0] prod;

  always_comb begin
    prod = '0;
    for (int i = 0; i < 8; i++)
      if (b[i]) prod ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--)
      if (prod[i]) prod[i-:9] = prod[i-:9] ^ 9'h11B;
    p = prod[7:0];
  end
endmodule
