// tb_aging_test: the aging-test sequencer with the aging-sensor model.
// Checks that every word gets the inverse-background write followed by the background
// write (2 write cycles per word, nothing else on the port), that `sense` coincides
// with the second write, that exactly the aged words are reported with their masks,
// and the start-to-done latency of 2*WORDS + 2 cycles.
module tb_aging_test;
  localparam int W = 150, AW = 8, WD = 21;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic mem_en, mem_we, test_en, sense, aged_valid;
  logic [AW-1:0] mem_addr, sense_addr, aged_addr;
  logic [WD-1:0] mem_wdata, sensor_mask, aged_mask;
  logic [WD-1:0] ref_m [W], seen [W];
  int nwr [W];
  logic [WD-1:0] last_w [W];
  int checks = 0, failures = 0, bad_seq = 0;

  always #5 clk = ~clk;
  aging_test #(.WORDS(W), .WIDTH(WD), .ADDR_W(AW)) dut (.*);
  ocas_model #(.WORDS(W), .WIDTH(WD), .ADDR_W(AW), .SLOTS(32)) u_ocas (
    .clk, .test_en, .sense, .word_addr(sense_addr), .aged_mask(sensor_mask));

  always @(posedge clk) begin
    if (mem_en) begin
      if (!mem_we) bad_seq++;
      // first write must be all ones, second all zeros
      if (nwr[mem_addr] == 0 && mem_wdata != '1) bad_seq++;
      if (nwr[mem_addr] == 1 && (mem_wdata != '0 || !sense || sense_addr != mem_addr)) bad_seq++;
      nwr[mem_addr]++;
    end else if (sense) bad_seq++;
    if (aged_valid) seen[aged_addr] <= seen[aged_addr] | aged_mask;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int a = 0; a < W; a++) begin ref_m[a] = '0; seen[a] = '0; nwr[a] = 0; end
    for (int k = 0; k < 20; k++) begin
      int a;
      logic [WD-1:0] m;
      a = (k == 0) ? W - 1 : (k == 1) ? 0 : $urandom_range(0, W - 1);
      m = WD'(1) << $urandom_range(0, WD - 1);
      u_ocas.mark_aged(AW'(a), m);
      ref_m[a] |= m;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 2 * W + 20) begin @(negedge clk); cyc++; end
    check(cyc == 2 * W + 2, $sformatf("done after %0d cycles, expected %0d", cyc, 2 * W + 2));
    @(negedge clk);
    check(bad_seq == 0, $sformatf("%0d write-sequence violations", bad_seq));
    for (int a = 0; a < W; a++) begin
      check(nwr[a] == 2, $sformatf("word %0d written %0d times", a, nwr[a]));
      check(seen[a] == ref_m[a], $sformatf("word %0d aged mask %h expected %h", a, seen[a], ref_m[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
