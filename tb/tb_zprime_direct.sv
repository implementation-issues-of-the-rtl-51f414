// tb_zprime_direct: zp must equal Z(t-5).D^5 where Z(t-5) is the byte
// accepted five enabled clocks earlier, computed bit-serially as the
// remainder of x^40 Z(x). Random bytes, random enable gaps.
module tb_zprime_direct;
  import cdm_tb_pkg::*;

  logic       clk = 0, rst_n = 0, en = 0;
  logic [7:0] z = '0, zp;
  logic [7:0] hist[$];
  int checks = 0, failures = 0;

  zprime_direct dut (.clk(clk), .rst_n(rst_n), .en(en), .z(z), .zp(zp));

  always #5 clk = ~clk;

  initial begin
    repeat (5) hist.push_back(8'h00);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (zp !== mul_x8k(hist[hist.size() - 5], 5)) begin
        failures++;
        $display("ERROR n=%0d zp=%02h expected %02h", n, zp,
                 mul_x8k(hist[hist.size() - 5], 5));
      end
      en = ($urandom % 5) != 0;
      z  = 8'($urandom);
      @(posedge clk);
      if (en) hist.push_back(z);
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
