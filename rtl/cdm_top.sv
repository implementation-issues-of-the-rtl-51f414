// cdm_top: byte-parallel ATM cell delineator.
//
// Finds the cell boundaries in a byte stream by HEC validation. In HUNT the
// syndrome unit gives the syndrome of the last five bytes after every byte,
// without reset or enable; its first match fixes a candidate boundary. In
// PRESYNC and SYNC the header checker validates one header per cell at the
// position the counter in cdm_fsm predicts. The states and the 53-byte,
// six-header rule follow the ATM standard; the byte_valid strobe, the ALPHA
// rule for leaving SYNC and the outputs are this design's choices.
// Interface: one byte per clock with byte_valid high (gaps allowed), bit 7
// first on the line. cell_start marks, in the same clock, a byte_in that is
// the first byte of a cell (PRESYNC/SYNC only). hdr_done/hdr_ok report each
// header check one clock after its HEC byte; ev_* are state machine events.
// Latency: a header whose HEC is accepted at edge n is found (ev_found) in
// the clock that follows edge n.
module cdm_top
  import cdm_pkg::*;
#(
  parameter bit          PROGRESSIVE = 1'b0,
  parameter int unsigned CELL_BYTES  = cdm_pkg::ATM_CELL_BYTES,
  parameter int unsigned DELTA       = 6,
  parameter int unsigned ALPHA       = 7,
  localparam int unsigned PW         = $clog2(CELL_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          byte_valid,
  input  logic [7:0]    byte_in,
  output cdm_state_e    state,
  output logic          cell_start,
  output logic [PW-1:0] cell_pos,
  output logic [7:0]    syndrome,
  output logic          hdr_done,
  output logic          hdr_ok,
  output logic          ev_found,
  output logic          ev_presync_fail,
  output logic          ev_sync_acq,
  output logic          ev_hdr_miss,
  output logic          ev_sync_lost
);

  logic hunt_match;

  syndrome_unit #(.PROGRESSIVE(PROGRESSIVE)) u_syn (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (byte_valid),
    .z        (byte_in),
    .syndrome (syndrome),
    .match    (hunt_match)
  );

  hec_checker u_chk (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (byte_valid),
    .start (cell_start),
    .z     (byte_in),
    .done  (hdr_done),
    .ok    (hdr_ok)
  );

  cdm_fsm #(
    .CELL_BYTES (CELL_BYTES),
    .DELTA      (DELTA),
    .ALPHA      (ALPHA)
  ) u_fsm (
    .clk             (clk),
    .rst_n           (rst_n),
    .byte_valid      (byte_valid),
    .hunt_match      (hunt_match),
    .chk_done        (hdr_done),
    .chk_ok          (hdr_ok),
    .state           (state),
    .cell_start      (cell_start),
    .cell_pos        (cell_pos),
    .ev_found        (ev_found),
    .ev_presync_fail (ev_presync_fail),
    .ev_sync_acq     (ev_sync_acq),
    .ev_hdr_miss     (ev_hdr_miss),
    .ev_sync_lost    (ev_sync_lost)
  );

endmodule
