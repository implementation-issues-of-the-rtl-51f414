// xor_plane_d5: combinational XOR plane r = z . D^5.
//
// D^5 is the fifth power of the byte transition matrix D, i.e. row i is
// x^(40+i) mod (x^8+x^2+x+1). Applied to the byte that arrived five byte
// times ago it gives that byte's share of the remainder of the last 40 bits,
// which is what the lower remainder machine of the syndrome unit must
// accumulate. The equations below are the columns of D^5 computed from D;
// this is the plane the syndrome identity R{x^8 I} + R{x^8 M} = R{x^8 H}
// requires. (A plane built from the columns of D^6 would break it.)
// Interface: 8-bit z in, 8-bit r out, no clock.
module xor_plane_d5 (
  input  logic [7:0] z,
  output logic [7:0] r
);

  always_comb begin
    r[0] = z[2] ^ z[3] ^ z[7];
    r[1] = z[0] ^ z[2] ^ z[4] ^ z[7];
    r[2] = z[1] ^ z[2] ^ z[5] ^ z[7];
    r[3] = z[2] ^ z[3] ^ z[6];
    r[4] = z[3] ^ z[4] ^ z[7];
    r[5] = z[0] ^ z[4] ^ z[5];
    r[6] = z[0] ^ z[1] ^ z[5] ^ z[6];
    r[7] = z[1] ^ z[2] ^ z[6] ^ z[7];
  end

endmodule
