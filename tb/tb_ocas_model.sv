// tb_ocas_model: the aging-sensor model returns the aged-cell mask of the sensed
// word one cycle after `sense`, zero for words that are not aged, and zero while
// the sensor is not powered (test_en low).
module tb_ocas_model;
  logic clk = 0, test_en = 0, sense = 0;
  logic [6:0] word_addr = 0;
  logic [20:0] aged_mask;
  logic [20:0] ref_m [100];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ocas_model #(.WORDS(100), .WIDTH(21), .ADDR_W(7), .SLOTS(16)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 100; a++) ref_m[a] = '0;
    for (int k = 0; k < 10; k++) begin
      int a;
      logic [20:0] m;
      a = $urandom_range(0, 99);
      m = 21'(1) << $urandom_range(0, 20);
      dut.mark_aged(7'(a), m);
      ref_m[a] |= m;
    end
    for (int pass = 0; pass < 2; pass++) begin
      test_en = (pass == 1);
      for (int a = 0; a < 100; a++) begin
        @(negedge clk); sense = 1; word_addr = 7'(a);
        @(negedge clk); sense = 0;
        check(aged_mask == (test_en ? ref_m[a] : '0), $sformatf("word %0d en %0d", a, test_en));
      end
    end
    dut.clear_aged();
    @(negedge clk); sense = 1; word_addr = 7'd0;
    @(negedge clk); sense = 0;
    check(aged_mask == '0, "table cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
