// tb_hsbf_final: checks the error correction and detection stage with random
// decoded and received words, most of them codewords or near-codewords, against
// the reference syndrome and a bit count of the differences.
module tb_hsbf_final;
  import hsbf_ref_pkg::*;

  logic [23:0] code, rxh;
  logic [15:0] data;
  logic det, unc;
  logic [4:0] nfl;
  int checks = 0, failures = 0;

  hsbf_final dut (.code_i(code), .rx_hard_i(rxh), .data_o(data),
    .err_detected_o(det), .uncorrectable_o(unc), .n_flipped_o(nfl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      code = encode(16'($urandom));
      if (i % 4 == 0) code ^= 24'(1) << $urandom_range(0, 23);
      rxh = code;
      for (int k = $urandom_range(0, 4); k > 0; k--) rxh ^= 24'(1) << $urandom_range(0, 23);
      #1;
      checks++;
      if (data != code[15:0] || det != (syndrome(rxh) != 0) ||
          unc != (syndrome(code) != 0) || int'(nfl) != $countones(code ^ rxh)) begin
        failures++;
        if (failures < 5) $display("FAIL code=%h rx=%h", code, rxh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
