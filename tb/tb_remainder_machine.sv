// tb_remainder_machine: random bytes with random enable gaps and random
// restarts (load). After each enabled byte the register must hold the
// bit-serial CRC remainder of the bytes since the last restart.
module tb_remainder_machine;
  import cdm_tb_pkg::*;

  logic       clk = 0, rst_n = 0, en = 0, load = 0;
  logic [7:0] z = '0, r;
  logic [7:0] ref_r = '0;
  int checks = 0, failures = 0, loads = 0;

  remainder_machine dut (.clk(clk), .rst_n(rst_n), .en(en), .load(load), .z(z), .r(r));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (r !== ref_r) begin
        failures++;
        $display("ERROR n=%0d r=%02h expected %02h", n, r, ref_r);
      end
      en   = ($urandom % 4) != 0;
      load = ($urandom % 10) == 0;
      z    = 8'($urandom);
      @(posedge clk);
      if (en) begin
        ref_r = crc_byte(load ? 8'h00 : ref_r, z);
        if (load) loads++;
      end
    end
    checks++;
    if (loads == 0) failures++;
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
