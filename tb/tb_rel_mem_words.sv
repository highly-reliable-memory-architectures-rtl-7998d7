// tb_rel_mem_words: the memory block with longer words, one self-test and repair
// period each (see tb_size_case for what each case checks): 8K user words and 50
// spares with 32-bit and with 512-bit data words (38- and 522-bit codewords).
// The cases run one after another, each on its own clock that runs only during its
// turn, so that an idle case costs no simulation time.
module tb_rel_mem_words;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 2;
  logic en [NC] = '{default: 1'b0};
  logic ck [NC];
  logic done [NC];
  for (genvar g = 0; g < NC; g++) begin : g_ck
    assign ck[g] = clk & en[g];
  end
  int   chk [NC], fl [NC];

  tb_size_case #(.NU(8192),   .NS(50),  .DW(32),  .N2F(3))  c_w32  (.clk(ck[0]), .go(en[0]), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  tb_size_case #(.NU(8192),   .NS(50),  .DW(512), .N2F(3))  c_w512 (.clk(ck[1]), .go(en[1]), .done(done[1]), .checks(chk[1]), .failures(fl[1]));

  function automatic int total(input int v [NC]);
    int t;
    t = 0;
    foreach (v[i]) t += v[i];
    return t;
  endfunction

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fl) + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < NC; i++) begin
      @(negedge clk);
      en[i] = 1'b1;
      while (!done[i]) @(negedge clk);
      en[i] = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fl));
    $finish;
  end
endmodule
