// remainder_machine: byte-parallel CRC state transition machine.
//
// Implements R(t+8) = (R(t) + Z(t)) . D: the incoming vector is XORed into
// the remainder register and the sum goes through one D XOR plane back into
// the register. After bytes b0..bn (b0 first) the register holds the
// remainder of x^8 * (b0 x^(8n) + ... + bn) modulo x^8+x^2+x+1.
// With load high the old remainder is ignored (R = Z . D), which starts a new
// division without a separate reset cycle. The update rule is the published
// one; the load input and the enable are this design's choices.
// Interface: en advances one byte per clock; r is the registered remainder.
// Asynchronous active-low reset to zero.
module remainder_machine (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       load,
  input  logic [7:0] z,
  output logic [7:0] r
);

  import cdm_pkg::*;

  octet_t sum, nxt;

  assign sum = (load ? 8'h00 : r) ^ z;

  xor_plane_d u_plane (.z(sum), .r(nxt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  r <= '0;
    else if (en) r <= nxt;
  end

endmodule
