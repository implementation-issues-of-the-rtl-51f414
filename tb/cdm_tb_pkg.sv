// cdm_tb_pkg: reference models shared by the cell delineation testbenches.
//
// Everything here is computed independently of the RTL's XOR planes: the
// HEC remainder is taken bit-serially (shift register with feedback
// x^8+x^2+x+1, first bit on the line = bit 7), and the delineation rule is
// modelled byte by byte. The testbenches compare the RTL against these.
package cdm_tb_pkg;

  // Event codes reported by cdm_fsm / cdm_top.
  typedef enum int {
    EV_FOUND        = 0,
    EV_PRESYNC_FAIL = 1,
    EV_SYNC_ACQ     = 2,
    EV_HDR_MISS     = 3,
    EV_SYNC_LOST    = 4
  } ev_e;
  localparam int NUM_EV = 5;

  typedef struct {
    ev_e kind;
    int  byte_idx;   // index of the last byte accepted before the event
  } event_t;

  // Remainder update by one byte, bit-serial: R <- R{x^8 (x^8 R' + b)}.
  function automatic logic [7:0] crc_byte(logic [7:0] crc, logic [7:0] b);
    logic fb;
    for (int i = 7; i >= 0; i--) begin
      fb  = crc[7] ^ b[i];
      crc = {crc[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return crc;
  endfunction

  // x^(8k) * v mod G by feeding v and then k-1 zero bytes.
  function automatic logic [7:0] mul_x8k(logic [7:0] v, int k);
    logic [7:0] c;
    c = crc_byte(8'h00, v);
    for (int i = 1; i < k; i++) c = crc_byte(c, 8'h00);
    return c;
  endfunction

  // Syndrome of a valid header: remainder of x^8 times the coset 0x55.
  function automatic logic [7:0] ref_syn_valid();
    return crc_byte(8'h00, 8'h55);
  endfunction

  // HEC for four header bytes: remainder of x^8 P(x) plus the coset 0x55.
  function automatic logic [7:0] make_hec(logic [7:0] h0, logic [7:0] h1,
                                          logic [7:0] h2, logic [7:0] h3);
    logic [7:0] c;
    c = crc_byte(8'h00, h0);
    c = crc_byte(c, h1);
    c = crc_byte(c, h2);
    c = crc_byte(c, h3);
    return c ^ 8'h55;
  endfunction

  // Syndrome of five bytes, w[0] first on the line.
  typedef logic [7:0] win_t [5];
  function automatic logic [7:0] window_syn(win_t w);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 0; i < 5; i++) c = crc_byte(c, w[i]);
    return c;
  endfunction

  // Shifts a byte into a five-byte window.
  function automatic win_t win_push(win_t w, logic [7:0] b);
    win_t n;
    for (int i = 0; i < 4; i++) n[i] = w[i+1];
    n[4] = b;
    return n;
  endfunction

  // Appends one cell: random header, HEC correct or corrupted, random payload.
  function automatic void push_cell(ref logic [7:0] s[$], input bit good,
                                    input int cell_bytes);
    logic [7:0] h [4];
    logic [7:0] hec;
    for (int i = 0; i < 4; i++) h[i] = 8'($urandom);
    hec = make_hec(h[0], h[1], h[2], h[3]);
    if (!good) hec ^= 8'(1 << ($urandom % 8)) | 8'h01;
    for (int i = 0; i < 4; i++) s.push_back(h[i]);
    s.push_back(hec);
    for (int i = 5; i < cell_bytes; i++) s.push_back(8'($urandom));
  endfunction

  // Byte-level model of the delineation state machine.
  //   match[k]  : syndrome of the window ending at byte k is valid
  //   hdr_ok[k] : result of a header check that starts at byte k
  // Produces cell_start[k] and the event list. A header check started at
  // byte k finishes after byte k+4; the hunt looks at every byte.
  function automatic void model_run(input bit match[$],
                                    input bit hdr_ok[$],
                                    input int cell_bytes, input int delta,
                                    input int alpha,
                                    output bit cell_start[$],
                                    output event_t evs[$]);
    int state;   // 0 hunt, 1 presync, 2 sync
    int pos, cur, good, bad, remaining;
    bit ok;
    state = 0; pos = 0; good = 0; bad = 0; remaining = 0; ok = 0;
    cell_start.delete();
    evs.delete();
    for (int k = 0; k < match.size(); k++) begin
      bit done;
      cur = (pos == cell_bytes - 1) ? 0 : pos + 1;
      cell_start.push_back(state != 0 && cur == 0);
      done = 0;
      if (state != 0 && cur == 0) begin
        remaining = 4;
        ok = hdr_ok[k];
      end else if (remaining != 0) begin
        remaining--;
        done = (remaining == 0);
      end
      pos = cur;
      if (state == 0) begin
        if (match[k]) begin
          evs.push_back('{EV_FOUND, k});
          state = 1; good = 0; pos = 4;
        end
      end else if (done) begin
        if (state == 1) begin
          if (!ok) begin
            evs.push_back('{EV_PRESYNC_FAIL, k});
            state = 0;
          end else if (good == delta - 1) begin
            evs.push_back('{EV_SYNC_ACQ, k});
            state = 2; bad = 0;
          end else good++;
        end else begin
          if (ok) bad = 0;
          else begin
            evs.push_back('{EV_HDR_MISS, k});
            if (bad == alpha - 1) begin
              evs.push_back('{EV_SYNC_LOST, k});
              state = 0;
            end else bad++;
          end
        end
      end
    end
  endfunction

endpackage
