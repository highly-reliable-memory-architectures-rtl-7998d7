// tb_sram_sp: write/read-back of the word array with a reference copy; checks the
// one-cycle read latency and that a disabled port or a write leaves rdata unchanged.
module tb_sram_sp;
  localparam int W = 300;
  logic clk = 0, en = 0, we = 0;
  logic [8:0] addr = 0;
  logic [20:0] wdata = 0, rdata;
  logic [20:0] ref_mem [W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sram_sp #(.WORDS(W), .WIDTH(21)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < W; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 9'(a); wdata = 21'($urandom); ref_mem[a] = wdata;
    end
    for (int a = W - 1; a >= 0; a--) begin
      @(negedge clk);
      en = 1; we = 0; addr = 9'(a);
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("FAIL addr %0d %h %h", a, rdata, ref_mem[a]); end
      // a write to another word keeps the last read value on rdata
      en = 1; we = 1; addr = 9'((a + 1) % W); wdata = ref_mem[(a + 1) % W];
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("FAIL hold addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
