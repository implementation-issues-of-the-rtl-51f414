// tb_cdm_workloads: the delineator behind three kinds of link, at default
// parameters.
//   0: STM-1 style gaps: rows of 270 byte slots, the first 10 of which
//      (9 section overhead + 1 path overhead) carry no cell bytes.
//   1: STM-4 style gaps: rows of 1080 slots, the first 40 (36 section
//      overhead, 1 path overhead, 3 fixed stuff) carry no cell bytes.
//   2: 25.6 Mbit/s style: one cell byte every clock, no gaps.
// The overhead layouts are the usual SDH ones, used here only to shape
// byte_valid. Each run resets the design and starts the cell stream at a
// random offset into a cell. Checked: SYNC is reached; the last hunt match
// before SYNC is exactly 6 cells (318 bytes) earlier; once in SYNC every
// cell_start falls on a true first header byte and nowhere else; no header
// is missed on the clean stream; the number of clocks from reset to SYNC is
// at least the number of byte slots the 318 bytes need in that layout.
module tb_cdm_workloads;
  import cdm_pkg::*;
  import cdm_tb_pkg::*;

  localparam int CELL = 53;
  localparam int NCELLS = 60;

  logic       clk = 0, rst_n = 0, byte_valid = 0;
  logic [7:0] byte_in = '0;
  cdm_state_e state;
  logic       cell_start, hdr_done, hdr_ok;
  logic [5:0] cell_pos;
  logic [7:0] syndrome;
  logic       ev_found, ev_presync_fail, ev_sync_acq, ev_hdr_miss, ev_sync_lost;

  int checks = 0, failures = 0;

  cdm_top dut (
    .clk(clk), .rst_n(rst_n), .byte_valid(byte_valid), .byte_in(byte_in),
    .state(state), .cell_start(cell_start), .cell_pos(cell_pos), .syndrome(syndrome),
    .hdr_done(hdr_done), .hdr_ok(hdr_ok), .ev_found(ev_found),
    .ev_presync_fail(ev_presync_fail), .ev_sync_acq(ev_sync_acq),
    .ev_hdr_miss(ev_hdr_miss), .ev_sync_lost(ev_sync_lost)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR %s", what);
    end
  endtask

  task automatic run_link(input int kind, input int row, input int ovh);
    logic [7:0] s[$];
    bit         truth[$];
    int         offset, nb, slot, clocks, clk_sync, found_at, sync_at;
    int         starts_ok, misses;
    bit         in_sync;

    // Stream: cells starting at a random offset into the first one.
    for (int c = 0; c < NCELLS; c++) push_cell(s, 1'b1, CELL);
    offset = int'($urandom % CELL);
    for (int i = 0; i < offset; i++) void'(s.pop_front());
    for (int i = 0; i < s.size(); i++) truth.push_back(((i + offset) % CELL) == 0);

    rst_n = 0;
    byte_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    nb = 0; slot = 0; clocks = 0; clk_sync = -1; found_at = -1; sync_at = -1;
    starts_ok = 0; misses = 0; in_sync = 0;
    while (nb < s.size()) begin
      @(negedge clk);
      byte_valid = (row == 0) ? 1'b1 : ((slot % row) >= ovh);
      byte_in    = byte_valid ? s[nb] : 8'h00;
      @(posedge clk);
      clocks++;
      slot++;
      if (ev_found)    found_at = nb - 1;
      if (ev_sync_acq) begin sync_at = nb - 1; clk_sync = clocks; in_sync = 1; end
      if (ev_hdr_miss) misses++;
      if (byte_valid) begin
        if (in_sync) begin
          checks++;
          if (cell_start !== truth[nb]) begin
            failures++;
            $display("ERROR link %0d byte %0d cell_start=%0b truth=%0b", kind, nb,
                     cell_start, truth[nb]);
          end else if (cell_start) starts_ok++;
        end
        nb++;
      end
    end
    @(negedge clk);
    byte_valid = 0;
    $display("link %0d: offset %0d, found after byte %0d, SYNC after byte %0d at clock %0d, %0d cell starts in SYNC",
             kind, offset, found_at, sync_at, clk_sync, starts_ok);
    check(sync_at >= 0, "SYNC never reached");
    check(sync_at - found_at == 6 * CELL, "hunt-to-SYNC distance is not 6 cells");
    check(misses == 0, "header missed on a clean stream");
    check(starts_ok > 40, "too few cell starts in SYNC");
    // 318 bytes need at least this many slots when only (row-ovh) of each
    // row carry bytes.
    if (row != 0)
      check(clk_sync >= (6 * CELL * row) / (row - ovh), "SYNC reached faster than the byte rate allows");
    check(state == ST_SYNC, "not in SYNC at the end");
  endtask

  initial begin
    run_link(0, 270, 10);
    run_link(1, 1080, 40);
    run_link(2, 0, 0);
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
