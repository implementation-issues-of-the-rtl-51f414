// xor_plane_d: combinational XOR plane r = z . D.
//
// D is the 8x8 state transition matrix of the byte-parallel HEC remainder
// machine: row i of D is x^(8+i) mod (x^8+x^2+x+1), so z . D is the
// remainder of x^8 z(x). Each output bit is the XOR of the inputs selected by
// one column of D; the eight equations are the published ones.
// Interface: 8-bit z in, 8-bit r out, no clock; at most four inputs per
// output bit (three two-input XOR levels).
module xor_plane_d (
  input  logic [7:0] z,
  output logic [7:0] r
);

  always_comb begin
    r[0] = z[0] ^ z[6] ^ z[7];
    r[1] = z[0] ^ z[1] ^ z[6];
    r[2] = z[0] ^ z[1] ^ z[2] ^ z[6];
    r[3] = z[1] ^ z[2] ^ z[3] ^ z[7];
    r[4] = z[2] ^ z[3] ^ z[4];
    r[5] = z[3] ^ z[4] ^ z[5];
    r[6] = z[4] ^ z[5] ^ z[6];
    r[7] = z[5] ^ z[6] ^ z[7];
  end

endmodule
