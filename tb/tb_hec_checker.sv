// tb_hec_checker: headers (good and corrupted) separated by random filler,
// with random enable gaps. done must pulse exactly once, in the clock after
// the fifth header byte is accepted, and ok must then tell whether the
// header's HEC is right (bit-serial reference).
module tb_hec_checker;
  import cdm_tb_pkg::*;

  logic       clk = 0, rst_n = 0, en = 0, start = 0;
  logic [7:0] z = '0;
  logic       done, ok;
  int checks = 0, failures = 0, goods = 0, bads = 0;

  hec_checker dut (.clk(clk), .rst_n(rst_n), .en(en), .start(start), .z(z),
                   .done(done), .ok(ok));

  always #5 clk = ~clk;

  // Presents one byte, possibly after idle clocks; checks done stays low.
  task automatic send(input logic [7:0] b, input bit is_start);
    while ($urandom % 3 == 0) begin
      @(negedge clk);
      en = 0; start = 0;
      @(posedge clk);
      #1;
      checks++;
      if (done) begin failures++; $display("ERROR done during idle"); end
    end
    @(negedge clk);
    en = 1; start = is_start; z = b;
    @(posedge clk);
    #1;
    en = 0; start = 0;
  endtask

  initial begin
    logic [7:0] h[5];
    bit good;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      repeat ($urandom % 4) begin
        send(8'($urandom), 1'b0);
        checks++;
        if (done) begin failures++; $display("ERROR done on filler"); end
      end
      good = ($urandom % 3) != 0;
      for (int i = 0; i < 4; i++) h[i] = 8'($urandom);
      h[4] = make_hec(h[0], h[1], h[2], h[3]);
      if (!good) begin
        int idx;
        idx = int'($urandom % 5);
        h[idx] = h[idx] ^ 8'(1 << ($urandom % 8));
      end
      for (int i = 0; i < 5; i++) begin
        send(h[i], i == 0);
        checks++;
        if (i < 4 && done) begin failures++; $display("ERROR early done n=%0d i=%0d", n, i); end
      end
      // Result must be there in the very next clock.
      @(negedge clk);
      checks += 2;
      if (!done) begin failures++; $display("ERROR no done n=%0d", n); end
      if (ok !== good) begin failures++; $display("ERROR n=%0d ok=%0b expected %0b", n, ok, good); end
      if (good) goods++; else bads++;
    end
    checks++;
    if (goods == 0 || bads == 0) failures++;
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
