// tb_ecc_enc: exhaustive check of the SEC Hamming encoder over all 65,536 data words.
// For each word the codeword must carry the data bits, in order, at the non-power-of-
// two positions, and every parity-check equation (XOR over positions with bit k set)
// must be zero. The reference is the parity-check matrix, not the encoder's own loop.
module tb_ecc_enc;
  logic [15:0] d;
  logic [20:0] c;
  int checks = 0, failures = 0;

  ecc_enc dut (.data_i(d), .code_o(c));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic [15:0] got;
      logic [4:0]  syn;
      int j;
      d = 16'(v);
      #1;
      j = 0;
      got = '0;
      syn = '0;
      for (int p = 1; p <= 21; p++) begin
        if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16) begin got[j] = c[p-1]; j++; end
        if (c[p-1]) syn ^= 5'(p);
      end
      checks++;
      if (got !== d || syn != 0) begin
        failures++;
        if (failures < 10) $display("FAIL data %h code %h syn %0d", d, c, syn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
