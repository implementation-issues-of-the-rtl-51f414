// tb_delay_buffer: the output must be the word accepted DEPTH enabled clocks
// earlier (zero before that), with random gaps in the enable.
module tb_delay_buffer;
  logic       clk = 0, rst_n = 0, en = 0;
  logic [7:0] d = '0, q;
  logic [7:0] hist[$];
  int checks = 0, failures = 0;

  delay_buffer dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5) hist.push_back(8'h00);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (q !== hist[hist.size() - 5]) begin
        failures++;
        $display("ERROR n=%0d q=%02h expected %02h", n, q, hist[hist.size() - 5]);
      end
      en = ($urandom % 4) != 0;
      d  = 8'($urandom);
      @(posedge clk);
      if (en) hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
