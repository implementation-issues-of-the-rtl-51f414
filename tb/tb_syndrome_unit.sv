// tb_syndrome_unit: both forms of the syndrome unit (direct and progressive
// Z' generation) run on the same stream. After every accepted byte the
// syndrome must equal the bit-serial remainder of the last five bytes, and
// match must be set exactly when that is the valid-header value. The stream
// mixes random bytes with correctly coded headers so that n_match occur;
// the enable has random gaps. The syndrome must be valid in the clock right
// after the byte (no extra latency).
module tb_syndrome_unit;
  import cdm_tb_pkg::*;

  logic       clk = 0, rst_n = 0, en = 0;
  logic [7:0] z = '0;
  logic [7:0] syn_d, syn_p;
  logic       m_d, m_p;
  win_t       w = '{default: 8'h00};
  int checks = 0, failures = 0, n_match = 0;

  syndrome_unit #(.PROGRESSIVE(1'b0)) dut_d (.clk(clk), .rst_n(rst_n), .en(en), .z(z),
                                             .syndrome(syn_d), .match(m_d));
  syndrome_unit #(.PROGRESSIVE(1'b1)) dut_p (.clk(clk), .rst_n(rst_n), .en(en), .z(z),
                                             .syndrome(syn_p), .match(m_p));

  always #5 clk = ~clk;

  initial begin
    logic [7:0] stream[$];
    logic [7:0] exp_syn;
    // Stream: random bytes with a correctly coded cell now and then.
    while (stream.size() < 4000) begin
      if ($urandom % 3 == 0) push_cell(stream, 1'b1, 20 + $urandom % 40);
      else repeat (1 + $urandom % 30) stream.push_back(8'($urandom));
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < stream.size(); ) begin
      @(negedge clk);
      exp_syn = window_syn(w);
      checks += 2;
      if (syn_d !== exp_syn || m_d !== (exp_syn == ref_syn_valid())) begin
        failures++;
        $display("ERROR direct k=%0d syn=%02h exp %02h", k, syn_d, exp_syn);
      end
      if (syn_p !== exp_syn || m_p !== (exp_syn == ref_syn_valid())) begin
        failures++;
        $display("ERROR progressive k=%0d syn=%02h exp %02h", k, syn_p, exp_syn);
      end
      if (m_d) n_match++;
      en = ($urandom % 4) != 0;
      z  = stream[k];
      @(posedge clk);
      if (en) begin
        w = win_push(w, z);
        k++;
      end
    end
    checks++;
    if (n_match < 10) begin
      failures++;
      $display("ERROR too few n_match: %0d", n_match);
    end
    $display("n_match seen: %0d", n_match);
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
