// zprime_progressive: progressive generation of Z'(t) = Z(t-5) . D^5.
//
// Five stages in series, each a D XOR plane followed by a byte register.
// A byte is multiplied by D once per stage while it is delayed, so it leaves
// the fifth register as Z(t-5).D^5. The output comes straight from a
// register, which keeps the lower remainder machine's path as short as the
// upper one's: this is the faster of the two forms. Structure as published.
// Interface: byte clock, active-low reset (all stages zero), en = byte
// accepted, z = Z(t), zp = Z(t-5).D^5 registered.
module zprime_progressive (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] z,
  output logic [7:0] zp
);

  import cdm_pkg::*;

  octet_t stage_q [HDR_BYTES];
  octet_t stage_d [HDR_BYTES];

  for (genvar s = 0; s < HDR_BYTES; s++) begin : g_stage
    if (s == 0) begin : g_first
      xor_plane_d u_plane (.z(z), .r(stage_d[s]));
    end else begin : g_next
      xor_plane_d u_plane (.z(stage_q[s-1]), .r(stage_d[s]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HDR_BYTES; i++) stage_q[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < HDR_BYTES; i++) stage_q[i] <= stage_d[i];
    end
  end

  assign zp = stage_q[HDR_BYTES-1];

endmodule
