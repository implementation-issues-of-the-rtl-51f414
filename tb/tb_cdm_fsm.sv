// tb_cdm_fsm: the delineation state machine on its own.
// The syndrome unit and header checker are replaced by the testbench: a
// random per-byte "syndrome matches" sequence (registered after each byte,
// as the syndrome unit does) and a header checker model that answers five
// bytes after each cell_start with a scripted good/bad result. The scripted
// results come in segments of all-good, all-bad and mixed headers so that
// every transition occurs. cell_start for every byte and the list of event
// pulses (with the byte after which each happened) are compared with the
// byte-level reference model; the number of bytes from a hunt match to
// SYNC must be DELTA cells.
module tb_cdm_fsm;
  import cdm_pkg::*;
  import cdm_tb_pkg::*;

  localparam int N     = 12000;
  localparam int CELL  = 53;
  localparam int DELTA = 6;
  localparam int ALPHA = 7;

  logic       clk = 0, rst_n = 0, byte_valid = 0;
  logic       hunt_match = 0, chk_done = 0, chk_ok = 0;
  cdm_state_e state;
  logic       cell_start;
  logic [5:0] cell_pos;
  logic       ev_found, ev_presync_fail, ev_sync_acq, ev_hdr_miss, ev_sync_lost;

  bit     match[$], hdr_ok[$], exp_start[$];
  event_t exp_ev[$], got_ev[$];
  int     nbytes = 0, checks = 0, failures = 0;
  int     chk_rem = 0, chk_first = 0;
  int     ev_count[NUM_EV];

  cdm_fsm dut (
    .clk(clk), .rst_n(rst_n), .byte_valid(byte_valid), .hunt_match(hunt_match),
    .chk_done(chk_done), .chk_ok(chk_ok), .state(state), .cell_start(cell_start),
    .cell_pos(cell_pos), .ev_found(ev_found), .ev_presync_fail(ev_presync_fail),
    .ev_sync_acq(ev_sync_acq), .ev_hdr_miss(ev_hdr_miss), .ev_sync_lost(ev_sync_lost)
  );

  always #5 clk = ~clk;

  // Stand-ins for the syndrome unit and header checker, plus the monitor.
  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_found)        got_ev.push_back('{EV_FOUND, nbytes - 1});
      if (ev_presync_fail) got_ev.push_back('{EV_PRESYNC_FAIL, nbytes - 1});
      if (ev_sync_acq)     got_ev.push_back('{EV_SYNC_ACQ, nbytes - 1});
      if (ev_hdr_miss)     got_ev.push_back('{EV_HDR_MISS, nbytes - 1});
      if (ev_sync_lost)    got_ev.push_back('{EV_SYNC_LOST, nbytes - 1});
      chk_done <= 1'b0;
      if (byte_valid && nbytes < N) begin
        checks++;
        if (cell_start !== exp_start[nbytes]) begin
          failures++;
          $display("ERROR byte %0d cell_start=%0b expected %0b", nbytes, cell_start,
                   exp_start[nbytes]);
        end
        hunt_match <= match[nbytes];
        if (cell_start) begin
          chk_rem   = 4;
          chk_first = nbytes;
        end else if (chk_rem != 0) begin
          chk_rem--;
          if (chk_rem == 0) begin
            chk_done <= 1'b1;
            chk_ok   <= hdr_ok[chk_first];
          end
        end
        nbytes++;
      end
    end
  end

  initial begin
    int seg;
    // Scripted inputs: per-byte hunt matches and per-start header results.
    for (int k = 0; k < N; k++) begin
      if (k % 600 == 0) seg = int'($urandom % 3);
      match.push_back(($urandom % 60) == 0);
      hdr_ok.push_back(seg == 0 ? 1'b1 : seg == 1 ? 1'b0 : (($urandom % 4) != 0));
    end
    model_run(match, hdr_ok, CELL, DELTA, ALPHA, exp_start, exp_ev);

    repeat (3) @(posedge clk);
    rst_n = 1;
    while (nbytes < N) begin
      @(negedge clk);
      byte_valid = (nbytes < N) && (($urandom % 5) != 0);
    end
    @(negedge clk);
    byte_valid = 0;
    repeat (3) @(posedge clk);

    // Event list against the model.
    checks++;
    if (got_ev.size() != exp_ev.size()) begin
      failures++;
      $display("ERROR %0d events, expected %0d", got_ev.size(), exp_ev.size());
    end
    for (int i = 0; i < got_ev.size() && i < exp_ev.size(); i++) begin
      checks++;
      if (got_ev[i].kind != exp_ev[i].kind || got_ev[i].byte_idx != exp_ev[i].byte_idx) begin
        failures++;
        $display("ERROR event %0d: got %0d@%0d expected %0d@%0d", i, got_ev[i].kind,
                 got_ev[i].byte_idx, exp_ev[i].kind, exp_ev[i].byte_idx);
      end
    end
    // Every mechanism must have happened; hunt to SYNC takes DELTA cells.
    foreach (ev_count[e]) ev_count[e] = 0;
    for (int i = 0; i < got_ev.size(); i++) begin
      ev_count[got_ev[i].kind]++;
      if (got_ev[i].kind == EV_SYNC_ACQ && i > 0 && got_ev[i-1].kind == EV_FOUND) begin
        checks++;
        if (got_ev[i].byte_idx - got_ev[i-1].byte_idx != DELTA * CELL) begin
          failures++;
          $display("ERROR hunt to sync took %0d bytes", got_ev[i].byte_idx - got_ev[i-1].byte_idx);
        end
      end
    end
    for (int e = 0; e < NUM_EV; e++) begin
      checks++;
      $display("event %0d occurred %0d times", e, ev_count[e]);
      if (ev_count[e] == 0) begin
        failures++;
        $display("ERROR event %0d never occurred", e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
