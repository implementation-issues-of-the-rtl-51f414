// cdm_pkg: types and constants shared by the ATM cell delineation blocks.
//
// Bytes are handled as row vectors Z = [z0..z7] where z_i is the coefficient
// of x^i; bit 7 is the first bit on the line and bit 0 the last, so the most
// recent bit of the stream carries the lowest power of x. All remainders are
// taken modulo the HEC generator G(x) = x^8 + x^2 + x + 1.
//
// The value a valid header leaves in a remainder machine follows from the
// HEC rule: HEC = R{x^8 P(x)} + C(x), with P the four header bytes and C the
// coset 01010101. The five-byte codeword H = x^8 P + HEC then gives
// R{x^8 H} = R{x^8 C}, which is 8'hAC. The coset is this design's choice
// (the ITU-T value); the delineation algorithm itself only needs a fixed
// "predefined value".
package cdm_pkg;

  typedef logic [7:0] octet_t;

  // Delineation states.
  typedef enum logic [1:0] {
    ST_HUNT    = 2'd0,
    ST_PRESYNC = 2'd1,
    ST_SYNC    = 2'd2
  } cdm_state_e;

  localparam int unsigned HDR_BYTES  = 5;   // header length including HEC
  localparam int unsigned ATM_CELL_BYTES = 53;  // ATM cell length

  // Low byte of the generator x^8 + x^2 + x + 1.
  localparam octet_t GEN_LOW   = 8'h07;
  localparam octet_t HEC_COSET = 8'h55;

  // Remainder of x^k * v(x) modulo G(x), one bit shift at a time. Used only
  // for constants.
  function automatic octet_t gf_mul_xk(octet_t v, int unsigned k);
    octet_t acc;
    acc = v;
    for (int unsigned i = 0; i < k; i++) begin
      acc = acc[7] ? ((acc << 1) ^ GEN_LOW) : (acc << 1);
    end
    return acc;
  endfunction

  // Syndrome R{x^8 H(x)} of a valid header codeword.
  localparam octet_t SYN_VALID = gf_mul_xk(HEC_COSET, 8);

endpackage
