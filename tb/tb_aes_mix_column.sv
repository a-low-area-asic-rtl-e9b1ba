// tb_aes_mix_column: compares the xtime-based MixColumn with a reference
// built on a generic GF(2^8) multiplier, on the FIPS-197 example columns and
// on random columns.
module tb_aes_mix_column;
  import aegis_ref_pkg::*;
  logic [31:0] ci, co;
  int checks = 0, failures = 0;
  aes_mix_column dut (.col_in(ci), .col_out(co));
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // known column: db 13 53 45 -> 8e 4d a1 bc
    ci = 32'h455313db; #1; checks++; if (co !== 32'hbca14d8e) failures++;
    ci = 32'h5c220af2; #1; checks++; if (co !== 32'h9d58dc9f) failures++;
    for (int i = 0; i < 2000; i++) begin
      ci = $urandom; #1;
      checks++;
      if (co !== mix_col(ci)) begin
        failures++;
        $display("mix(%08h) = %08h, expected %08h", ci, co, mix_col(ci));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
