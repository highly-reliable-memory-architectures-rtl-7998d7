// tb_diag_cam: random fault/aged reports merged against a reference table.
// Checks OR-merging of repeated reports, allocation order, the entry count, the
// overflow flag when more distinct words arrive than there are entries, and clr.
module tb_diag_cam;
  localparam int E = 16;
  logic clk = 0, rst_n = 0, clr = 0, upd_valid = 0, overflow;
  logic [9:0] upd_addr = 0, rd_addr;
  logic [20:0] upd_fault = 0, upd_aged = 0, rd_fault, rd_aged;
  logic [3:0] rd_idx = 0;
  logic [4:0] count;
  logic [9:0]  ra [E];
  logic [20:0] rf [E], rg [E];
  int rn;
  bit rovf;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  diag_cam #(.ENTRIES(E), .ADDR_W(10), .CW(21)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic report(input int a, input logic [20:0] f, input logic [20:0] g);
    int k;
    @(negedge clk);
    upd_valid = 1; upd_addr = 10'(a); upd_fault = f; upd_aged = g;
    k = -1;
    for (int i = 0; i < rn; i++) if (ra[i] == 10'(a)) k = i;
    if (k >= 0) begin rf[k] |= f; rg[k] |= g; end
    else if (rn < E) begin ra[rn] = 10'(a); rf[rn] = f; rg[rn] = g; rn++; end
    else rovf = 1;
    @(negedge clk);
    upd_valid = 0;
  endtask

  task automatic compare_all();
    #1;
    check(int'(count) == rn && overflow == rovf, "count and overflow");
    for (int i = 0; i < rn; i++) begin
      rd_idx = 4'(i); #1;
      check(rd_addr == ra[i] && rd_fault == rf[i] && rd_aged == rg[i], $sformatf("entry %0d", i));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rn = 0; rovf = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare_all();
    for (int round = 0; round < 3; round++) begin
      for (int t = 0; t < 40; t++) begin
        report($urandom_range(0, 11 + round * 4), 21'(1) << $urandom_range(0, 20),
               ($urandom_range(0, 3) == 0) ? 21'(1) << $urandom_range(0, 20) : 21'd0);
        compare_all();
      end
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      rn = 0; rovf = 0;
      compare_all();
    end
    check(checks > 100, "enough checks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
