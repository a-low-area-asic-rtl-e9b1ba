// tb_aes_sbox: checks the pipelined S-box on all 256 inputs against a
// reference found by inverse search, and its one-cycle latency.
module tb_aes_sbox;
  import aegis_ref_pkg::*;
  logic clk = 0;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  aes_sbox dut (.clk(clk), .din(din), .dout(dout));
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // fixed points from the AES standard
    din = 8'h00; @(posedge clk); #1; checks++; if (dout !== 8'h63) failures++;
    din = 8'h53; @(posedge clk); #1; checks++; if (dout !== 8'hed) failures++;
    for (int x = 0; x < 256; x++) begin
      din = 8'(x);
      @(posedge clk); #1;
      checks++;
      if (dout !== sbox(8'(x))) begin
        failures++;
        $display("sbox(%02h) = %02h, expected %02h", x, dout, sbox(8'(x)));
      end
      // latency: the output holds until the next clock edge
      din = ~din; #1; checks++; if (dout !== sbox(8'(x))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
