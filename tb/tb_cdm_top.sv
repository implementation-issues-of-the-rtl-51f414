// tb_cdm_top: end-to-end test of the cell delineator at its default
// parameters (53-byte cells, DELTA 6, ALPHA 7, direct Z' generation).
// A byte stream is built from scripted phases: random bytes before the first
// cell, runs of correctly coded cells, isolated and bursts of corrupted HECs,
// byte slips (inserted bytes) and a corrupted HEC during PRESYNC. It is fed
// with random byte_valid gaps. The reference is the byte-level model of
// cdm_tb_pkg, driven by bit-serial syndromes of the same stream. Checked:
// cell_start for every byte, the syndrome after every byte, every event
// pulse and the byte after which it came, the cell position after each cell
// start, and that hunt-to-SYNC takes DELTA cells. Each event kind (hunt
// match, PRESYNC failure, SYNC acquisition, header miss in SYNC, loss of
// SYNC) must occur at least once.
module tb_cdm_top;
  import cdm_pkg::*;
  import cdm_tb_pkg::*;

  localparam int CELL  = 53;
  localparam int DELTA = 6;
  localparam int ALPHA = 7;

  logic       clk = 0, rst_n = 0, byte_valid = 0;
  logic [7:0] byte_in = '0;
  cdm_state_e state;
  logic       cell_start, hdr_done, hdr_ok;
  logic [5:0] cell_pos;
  logic [7:0] syndrome;
  logic       ev_found, ev_presync_fail, ev_sync_acq, ev_hdr_miss, ev_sync_lost;

  logic [7:0] stream[$];
  bit         match[$], hdr_good[$], exp_start[$];
  logic [7:0] exp_syn[$];
  event_t     exp_ev[$], got_ev[$];
  int         nbytes = 0, checks = 0, failures = 0, sync_cycles = 0;
  bit         check_pos = 0;
  int         ev_count[NUM_EV];

  cdm_top dut (
    .clk(clk), .rst_n(rst_n), .byte_valid(byte_valid), .byte_in(byte_in),
    .state(state), .cell_start(cell_start), .cell_pos(cell_pos), .syndrome(syndrome),
    .hdr_done(hdr_done), .hdr_ok(hdr_ok), .ev_found(ev_found),
    .ev_presync_fail(ev_presync_fail), .ev_sync_acq(ev_sync_acq),
    .ev_hdr_miss(ev_hdr_miss), .ev_sync_lost(ev_sync_lost)
  );

  always #5 clk = ~clk;

  // Monitor: events, cell starts, syndromes.
  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_found)        got_ev.push_back('{EV_FOUND, nbytes - 1});
      if (ev_presync_fail) got_ev.push_back('{EV_PRESYNC_FAIL, nbytes - 1});
      if (ev_sync_acq)     got_ev.push_back('{EV_SYNC_ACQ, nbytes - 1});
      if (ev_hdr_miss)     got_ev.push_back('{EV_HDR_MISS, nbytes - 1});
      if (ev_sync_lost)    got_ev.push_back('{EV_SYNC_LOST, nbytes - 1});
      if (state == ST_SYNC) sync_cycles++;
      if (check_pos) begin
        checks++;
        if (cell_pos != 6'd0) begin
          failures++;
          $display("ERROR cell_pos=%0d after a cell start", cell_pos);
        end
        check_pos = 0;
      end
      if (nbytes > 0) begin
        checks++;
        if (syndrome !== exp_syn[nbytes - 1]) begin
          failures++;
          $display("ERROR syndrome after byte %0d: %02h expected %02h", nbytes - 1,
                   syndrome, exp_syn[nbytes - 1]);
        end
      end
      if (byte_valid && nbytes < stream.size()) begin
        checks++;
        if (cell_start !== exp_start[nbytes]) begin
          failures++;
          $display("ERROR byte %0d cell_start=%0b expected %0b", nbytes, cell_start,
                   exp_start[nbytes]);
        end
        check_pos = cell_start;
        nbytes++;
      end
    end
  end

  task automatic cells(input int n, input bit good);
    repeat (n) push_cell(stream, good, CELL);
  endtask

  initial begin
    win_t w = '{default: 8'h00};

    // Phase 1: junk, then clean cells: HUNT -> PRESYNC -> SYNC.
    repeat (37) stream.push_back(8'($urandom));
    cells(12, 1'b1);
    // Phase 2: isolated bad headers in SYNC (misses without loss).
    cells(1, 1'b0); cells(3, 1'b1); cells(ALPHA - 1, 1'b0); cells(4, 1'b1);
    // Phase 3: burst of bad headers: SYNC lost, hunt again, resync.
    cells(ALPHA + 2, 1'b0); cells(12, 1'b1);
    // Phase 4: byte slip: three inserted bytes shift the boundary.
    repeat (3) stream.push_back(8'($urandom));
    cells(ALPHA + 12, 1'b1);
    // Phase 5: PRESYNC failure: slip, a few good cells, a bad one, good ones.
    repeat (11) stream.push_back(8'($urandom));
    cells(ALPHA + 1, 1'b1); cells(3, 1'b1); cells(1, 1'b0); cells(14, 1'b1);
    // Phase 6: random mixture.
    for (int i = 0; i < 40; i++) cells(1, ($urandom % 5) != 0);

    // Reference syndromes, matches and header results (bit-serial).
    foreach (stream[k]) begin
      w = win_push(w, stream[k]);
      exp_syn.push_back(window_syn(w));
      match.push_back(window_syn(w) == ref_syn_valid());
    end
    foreach (stream[k]) hdr_good.push_back((k + 4 < stream.size()) ? match[k + 4] : 1'b0);
    model_run(match, hdr_good, CELL, DELTA, ALPHA, exp_start, exp_ev);

    repeat (3) @(posedge clk);
    rst_n = 1;
    while (nbytes < stream.size()) begin
      @(negedge clk);
      byte_valid = (nbytes < stream.size()) && (($urandom % 6) != 0);
      byte_in    = byte_valid ? stream[nbytes] : 8'($urandom);
    end
    @(negedge clk);
    byte_valid = 0;
    repeat (3) @(posedge clk);

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
    $display("stream %0d bytes, %0d clocks in SYNC", stream.size(), sync_cycles);
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
