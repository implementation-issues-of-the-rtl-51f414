// hec_checker: header check for the PRESYNC and SYNC states.
//
// Once the cell boundary is known, each header is checked on its own: the
// remainder machine is restarted (load) on the first header byte and enabled
// for the five header bytes, then its remainder is compared with the value a
// valid header leaves (cdm_pkg::SYN_VALID). A 3-bit down counter tracks the
// header bytes still to come. The reset-then-enable-for-five-bytes scheme is
// the usual one; the counter and the registered done pulse are this design's
// choices.
// Interface: en = byte accepted, start = the byte accepted now is the first
// header byte, z = the byte. done is a one-clock pulse in the clock after the
// fifth header byte was accepted; ok is valid while done is high.
// Bytes with en low are skipped, so the check works across gaps.
module hec_checker (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       start,
  input  logic [7:0] z,
  output logic       done,
  output logic       ok
);

  import cdm_pkg::*;

  logic [2:0] remaining;   // header bytes still to accept after this one
  logic       active;
  octet_t     rem;

  assign active = start || (remaining != 3'd0);

  remainder_machine u_rem (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en && active),
    .load  (start),
    .z     (z),
    .r     (rem)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (en && start) begin
        remaining <= 3'(HDR_BYTES - 1);
      end else if (en && remaining != 3'd0) begin
        remaining <= remaining - 3'd1;
        done      <= (remaining == 3'd1);
      end
    end
  end

  assign ok = (rem == SYN_VALID);

  // A new header must not start while one is still being checked.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    (en && start) |-> (remaining == 3'd0));

endmodule
