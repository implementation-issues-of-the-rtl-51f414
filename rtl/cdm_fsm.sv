// cdm_fsm: cell delineation state machine and cell byte position counter.
//
// HUNT: after every byte the syndrome of the last five bytes is examined
// (hunt_match); the first match means the last byte was a HEC, so the cell
// position of the next byte is 5 and the machine enters PRESYNC.
// PRESYNC: the position counter marks every CELL_BYTES-th byte as a header
// start (cell_start) and the header checker reports each header. A bad header
// returns to HUNT; DELTA consecutive good ones lead to SYNC.
// SYNC: ALPHA consecutive bad headers return to HUNT; a good header clears the
// count. HUNT, PRESYNC, CELL_BYTES and DELTA follow the usual ATM rule; ALPHA
// (how SYNC is left) is this design's choice, the ITU-T value 7.
// Timing: hunt_match and chk_done refer to bytes accepted at earlier clock
// edges. The FSM looks at hunt_match in the clock after each accepted byte
// (upd_q) and at chk_done when it pulses. cell_start is combinational and
// belongs to the byte accepted in the same clock. cell_pos is the position of
// the last accepted byte. ev_* are one-clock event pulses.
module cdm_fsm
  import cdm_pkg::*;
#(
  parameter int unsigned CELL_BYTES = cdm_pkg::ATM_CELL_BYTES,
  parameter int unsigned DELTA      = 6,
  parameter int unsigned ALPHA      = 7,
  localparam int unsigned PW        = $clog2(CELL_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          byte_valid,
  input  logic          hunt_match,
  input  logic          chk_done,
  input  logic          chk_ok,
  output cdm_state_e    state,
  output logic          cell_start,
  output logic [PW-1:0] cell_pos,
  output logic          ev_found,
  output logic          ev_presync_fail,
  output logic          ev_sync_acq,
  output logic          ev_hdr_miss,
  output logic          ev_sync_lost
);

  localparam int unsigned DW = $clog2(DELTA + 1);
  localparam int unsigned AW = $clog2(ALPHA + 1);
  localparam logic [PW-1:0] LAST_POS = PW'(CELL_BYTES - 1);
  localparam logic [PW-1:0] HEC_POS  = PW'(HDR_BYTES - 1);

  cdm_state_e    state_q, state_d;
  logic          upd_q;
  logic [PW-1:0] pos_q, base_pos, cur_pos;
  logic [DW-1:0] good_q, good_d;
  logic [AW-1:0] bad_q, bad_d;

  // Hunt decision on the byte accepted in the previous clock.
  assign ev_found = upd_q && (state_q == ST_HUNT) && hunt_match;

  // Position of the byte accepted now: after a hunt match the previous byte
  // was a HEC (position 4).
  assign base_pos = ev_found ? HEC_POS : pos_q;
  assign cur_pos  = (base_pos == LAST_POS) ? '0 : base_pos + 1'b1;

  assign cell_start = byte_valid && (cur_pos == '0) && (state_q != ST_HUNT);

  always_comb begin
    state_d         = state_q;
    good_d          = good_q;
    bad_d           = bad_q;
    ev_presync_fail = 1'b0;
    ev_sync_acq     = 1'b0;
    ev_hdr_miss     = 1'b0;
    ev_sync_lost    = 1'b0;
    unique case (state_q)
      ST_HUNT: begin
        if (ev_found) begin
          state_d = ST_PRESYNC;
          good_d  = '0;
        end
      end
      ST_PRESYNC: begin
        if (chk_done) begin
          if (!chk_ok) begin
            state_d         = ST_HUNT;
            ev_presync_fail = 1'b1;
          end else if (good_q == DW'(DELTA - 1)) begin
            state_d     = ST_SYNC;
            bad_d       = '0;
            ev_sync_acq = 1'b1;
          end else begin
            good_d = good_q + 1'b1;
          end
        end
      end
      ST_SYNC: begin
        if (chk_done) begin
          if (chk_ok) begin
            bad_d = '0;
          end else begin
            ev_hdr_miss = 1'b1;
            if (bad_q == AW'(ALPHA - 1)) begin
              state_d      = ST_HUNT;
              ev_sync_lost = 1'b1;
            end else begin
              bad_d = bad_q + 1'b1;
            end
          end
        end
      end
      default: state_d = ST_HUNT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_HUNT;
      upd_q   <= 1'b0;
      pos_q   <= '0;
      good_q  <= '0;
      bad_q   <= '0;
    end else begin
      state_q <= state_d;
      upd_q   <= byte_valid;
      pos_q   <= byte_valid ? cur_pos : base_pos;
      good_q  <= good_d;
      bad_q   <= bad_d;
    end
  end

  assign state    = state_q;
  assign cell_pos = pos_q;

  // Header starts are only marked once a boundary is known.
  a_start_synced: assert property (@(posedge clk) disable iff (!rst_n)
    cell_start |-> (state_q != ST_HUNT));
  // The header checker reports only outside HUNT.
  a_done_synced: assert property (@(posedge clk) disable iff (!rst_n)
    chk_done |-> (state_q != ST_HUNT));

endmodule
