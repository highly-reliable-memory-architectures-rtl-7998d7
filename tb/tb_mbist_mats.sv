// tb_mbist_mats: MATS+ BIST against a testbench memory with stuck-at cells.
// The memory model applies stuck-at-0/1 masks on every read. Expected reports are
// worked out from the fault list: a stuck-at-1 cell mismatches on the r0 element, a
// stuck-at-0 cell on the r1 element, so the OR of all masks per word must equal the
// word's stuck-at mask and fault-free words must never be reported. Also checks the
// operation count (5 per word) and the start-to-done latency (5*WORDS + 1 cycles),
// twice, with different fault sets.
module tb_mbist_mats;
  localparam int W = 200, AW = 8, WD = 21;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic mem_en, mem_we, fail_valid;
  logic [AW-1:0] mem_addr, fail_addr;
  logic [WD-1:0] mem_wdata, mem_rdata, fail_mask;
  logic [WD-1:0] mem [W], sa0 [W], sa1 [W], seen [W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mbist_mats #(.WORDS(W), .WIDTH(WD), .ADDR_W(AW)) dut (.*);

  always @(posedge clk) begin
    if (mem_en) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else mem_rdata <= (mem[mem_addr] | sa1[mem_addr]) & ~sa0[mem_addr];
    end
    if (fail_valid) seen[fail_addr] <= seen[fail_addr] | fail_mask;
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int ops, cyc;
      for (int a = 0; a < W; a++) begin
        mem[a] = WD'($urandom); sa0[a] = '0; sa1[a] = '0; seen[a] = '0;
      end
      for (int f = 0; f < 12; f++) begin
        int a, b;
        a = (run == 0 && f == 0) ? 0 : (run == 0 && f == 1) ? W - 1 : $urandom_range(0, W - 1);
        b = $urandom_range(0, WD - 1);
        if ($urandom_range(0, 1) == 1) sa1[a][b] = 1'b1;
        else sa0[a][b] = 1'b1;
        sa1[a] = sa1[a] & ~sa0[a];
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      ops = 0; cyc = 1;
      while (!done && cyc < 5 * W + 10) begin
        if (mem_en) ops++;
        @(negedge clk); cyc++;
      end
      check(ops == 5 * W, $sformatf("run %0d: %0d memory operations, expected %0d", run, ops, 5 * W));
      check(cyc == 5 * W + 1, $sformatf("run %0d: done after %0d cycles", run, cyc));
      @(negedge clk);
      for (int a = 0; a < W; a++)
        check(seen[a] == (sa0[a] | sa1[a]), $sformatf("run %0d word %0d: reported %h expected %h",
              run, a, seen[a], sa0[a] | sa1[a]));
      for (int a = 0; a < W; a++)
        check(((mem[a] | sa1[a]) & ~sa0[a]) == '0 || sa1[a] != 0, "memory left at background 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
