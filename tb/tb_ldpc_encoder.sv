// tb_ldpc_encoder: checks the (24,16) encoder against the reference model.
// Exhaustive over all 65536 data words: the data bits must pass unchanged, the
// parity bits must equal the reference encoding and the codeword must have a
// zero syndrome under the reference parity-check matrix.
module tb_ldpc_encoder;
  import hsbf_ref_pkg::*;

  logic [15:0] d;
  logic [23:0] c;
  int checks = 0, failures = 0;

  ldpc_encoder dut (.data_i(d), .code_o(c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      d = 16'(i);
      #1;
      checks++;
      if (c !== encode(d) || syndrome(c) != 0) begin
        failures++;
        if (failures < 5) $display("mismatch d=%h c=%h exp=%h", d, c, encode(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
