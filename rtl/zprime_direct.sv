// zprime_direct: direct generation of Z'(t) = Z(t-5) . D^5.
//
// The incoming byte runs through a five-stage delay buffer unchanged and the
// delayed byte Z(t-5) goes through a single D^5 XOR plane. The plane is
// wider than a D plane (up to four inputs per bit, eight outputs) and sits
// in the path register -> plane -> adder -> D plane -> register of the lower
// remainder machine, so this form has less logic but a longer path than the
// progressive one. Structure as published.
// Interface: byte clock, active-low reset, en = byte accepted, z = Z(t),
// zp = Z(t-5).D^5, combinational from the last delay stage.
module zprime_direct (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] z,
  output logic [7:0] zp
);

  import cdm_pkg::*;

  octet_t z_del;

  delay_buffer #(.DEPTH(HDR_BYTES), .WIDTH(8)) u_delay (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .d     (z),
    .q     (z_del)
  );

  xor_plane_d5 u_plane (
    .z (z_del),
    .r (zp)
  );

endmodule
