// tb_xor_plane_d: exhaustive check of the D XOR plane.
// All 256 input bytes are applied; each output must equal the bit-serial
// remainder of x^8 z(x) modulo x^8+x^2+x+1.
module tb_xor_plane_d;
  import cdm_tb_pkg::*;

  logic [7:0] z, r;
  int checks = 0, failures = 0;

  xor_plane_d dut (.z(z), .r(r));

  initial begin
    for (int v = 0; v < 256; v++) begin
      z = 8'(v);
      #1;
      checks++;
      if (r !== mul_x8k(8'(v), 1)) begin
        failures++;
        $display("ERROR z=%02h r=%02h expected %02h", z, r, mul_x8k(8'(v), 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("ERROR watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
