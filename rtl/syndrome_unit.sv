// syndrome_unit: HEC syndrome of the last five bytes, computed without ever
// resetting or stopping the remainder machines.
//
// Two remainder machines run side by side. The upper one accumulates every
// byte, R{x^8 I(x)}. The lower one is fed Z'(t) = Z(t-5).D^5 and so holds
// R{x^8 M(x)}, the remainder of everything except the last 40 bits. Since
// I = M + H, the XOR of the two registers is R{x^8 H(x)}, the syndrome of the
// last five bytes, after every byte. match flags the value a valid header
// gives (cdm_pkg::SYN_VALID).
// PROGRESSIVE selects how Z' is made: 0 = delay buffer then one D^5 plane
// (fewer gates), 1 = five D-plane/register stages (shorter paths).
// Timing: the byte accepted with en at a clock edge is included in syndrome
// and match right after that edge. Only the power-up reset clears the state.
// The two machines, the delay buffer and both Z' forms follow the published
// method; the enable and the valid-syndrome value (HEC coset 0x55) are this
// design's choices.
module syndrome_unit #(
  parameter bit PROGRESSIVE = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] z,
  output logic [7:0] syndrome,
  output logic       match
);

  import cdm_pkg::*;

  octet_t r_all, r_old, zp;

  // R{x^8 I(x)}: all received bytes.
  remainder_machine u_rem_i (
    .clk(clk), .rst_n(rst_n), .en(en), .load(1'b0), .z(z), .r(r_all)
  );

  if (PROGRESSIVE) begin : g_prog
    zprime_progressive u_zp (.clk(clk), .rst_n(rst_n), .en(en), .z(z), .zp(zp));
  end else begin : g_direct
    zprime_direct u_zp (.clk(clk), .rst_n(rst_n), .en(en), .z(z), .zp(zp));
  end

  // R{x^8 M(x)}: all bytes but the last five.
  remainder_machine u_rem_m (
    .clk(clk), .rst_n(rst_n), .en(en), .load(1'b0), .z(zp), .r(r_old)
  );

  assign syndrome = r_all ^ r_old;
  assign match    = (syndrome == SYN_VALID);

endmodule
