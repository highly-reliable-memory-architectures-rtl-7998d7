// tb_rel_mem_sizes: the memory block at the sizes it is meant to scale to, one
// self-test and repair period each (see tb_size_case for what each case checks).
//   - 8K and 512K user words with 50 spares: the smallest and largest memories of
//     the size sweep (14 and 20 address bits);
//   - 100,000 user words with 500 spares, repairing 60 uncorrectable words, more
//     than the 50 spares of the default could hold.
// The word lengths are run by tb_rel_mem_words.
// The cases run one after another, each on its own clock that runs only during its
// turn, so that an idle case costs no simulation time.
module tb_rel_mem_sizes;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 3;
  logic en [NC] = '{default: 1'b0};
  logic ck [NC];
  logic done [NC];
  for (genvar g = 0; g < NC; g++) begin : g_ck
    assign ck[g] = clk & en[g];
  end
  int   chk [NC], fl [NC];

  tb_size_case #(.NU(8192),   .NS(50),  .DW(16),  .N2F(3))  c_8k   (.clk(ck[0]), .go(en[0]), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  tb_size_case #(.NU(524288), .NS(50),  .DW(16),  .N2F(3))  c_512k (.clk(ck[1]), .go(en[1]), .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  tb_size_case #(.NU(100000), .NS(500), .DW(16),  .N2F(60)) c_500s (.clk(ck[2]), .go(en[2]), .done(done[2]), .checks(chk[2]), .failures(fl[2]));

  function automatic int total(input int v [NC]);
    int t;
    t = 0;
    foreach (v[i]) t += v[i];
    return t;
  endfunction

  initial begin
    repeat (6000000) @(posedge clk);
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
