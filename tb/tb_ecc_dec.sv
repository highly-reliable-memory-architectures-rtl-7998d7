// tb_ecc_dec: decoder check against a testbench-side Hamming encoder.
// Random data words are encoded by a reference function, then presented clean, with
// every possible single-bit flip (must be corrected, err set) and with random
// double flips (err must be set since the syndrome of two distinct positions is
// non-zero). Syndromes above 21 must raise uncorr.
module tb_ecc_dec;
  logic [20:0] ci, co;
  logic [15:0] d;
  logic err, unc;
  int checks = 0, failures = 0;

  ecc_dec dut (.code_i(ci), .data_o(d), .code_o(co), .err_o(err), .uncorr_o(unc));

  function automatic logic [20:0] ref_enc(input logic [15:0] x);
    logic [20:0] c;
    int j;
    c = '0; j = 0;
    for (int p = 1; p <= 21; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16) begin c[p-1] = x[j]; j++; end
    for (int k = 0; k < 5; k++) begin
      logic s;
      s = 0;
      for (int p = 1; p <= 21; p++) if (p[k] && p != (1 << k)) s ^= c[p-1];
      c[(1 << k) - 1] = s;
    end
    return c;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [15:0] x;
      logic [20:0] c;
      x = 16'($urandom);
      c = ref_enc(x);
      ci = c; #1;
      check(d == x && !err && !unc && co == c, "clean");
      for (int b = 0; b < 21; b++) begin
        ci = c ^ (21'd1 << b); #1;
        check(d == x && err && !unc && co == c, $sformatf("single flip bit %0d", b));
      end
      begin
        int b1, b2;
        b1 = $urandom_range(0, 20);
        b2 = (b1 + 1 + $urandom_range(0, 19)) % 21;
        ci = c ^ (21'd1 << b1) ^ (21'd1 << b2); #1;
        check(err, "double flip detected as error");
        check(unc == (((b1 + 1) ^ (b2 + 1)) > 21), "uncorr flag for out-of-range syndrome");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
