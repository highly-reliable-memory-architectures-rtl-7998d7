// tb_rel_mem_top: end-to-end test of the self-repairing memory block.
//
// A small instance (64 user words, 5 spare words, 16 diagnosis entries) is taken
// through user traffic and a series of self-test and repair periods. Hard faults are
// stuck-at cells imposed on the SRAM array after every clock edge; aged cells are
// entered into the aging-sensor model. After each period the testbench reloads the
// block (the test is destructive), reads every word back and compares it with what it
// wrote, and checks the remap CAM region sizes expected from the repair priorities.
// The scenario makes each mechanism happen and counts it: user stall by a scrub
// write-back, scrub correction, read served by a spare, remap insert, eviction of a
// lower-priority word, drop of a word with no spare, re-classification, retirement
// of a faulty spare word (a free one, then one holding a word), memory failure, diagnosis CAM overflow, and both aging-aware and
// non-aging test periods. The BIST plus aging-test port traffic is checked against
// 7 operations per physical word (5 for MATS+, 2 for the aging test).
module tb_rel_mem_top;
  import mem_pkg::*;
  localparam int NU = 64, NS = 5, DN = 16, W = NU + NS, AW = 7;

  logic clk = 0, rst_n = 0;
  logic u_req = 0, u_we = 0, u_ready, u_rvalid, u_rerr, u_runcorr, u_rspare;
  logic [AW-1:0] u_addr = 0, obs_orig, obs_spare;
  logic [15:0] u_wdata = 0, u_rdata;
  logic test_start = 0, aging_en = 1, test_busy, test_done, fail, diag_overflow;
  logic [2:0] n_2f, n_1fa, n_1f0, n_a, n_bad;
  logic ev_insert, ev_evict, ev_reclass, ev_drop, ev_spare_fault, ev_scrub_fix, ev_scrub_sweep;
  logic [2:0] obs_idx = 0;
  logic obs_valid;

  always #5 clk = ~clk;

  rel_mem_top #(.N_USER(NU), .N_SPR(NS), .DIAG_N(DN), .SCRUB_INTERVAL(300)) dut (.*);

  int checks = 0, failures = 0;
  int c_stall = 0, c_scrub = 0, c_spare_rd = 0, c_insert = 0, c_evict = 0, c_drop = 0;
  int c_reclass = 0, c_spare_fault = 0, c_tests = 0, c_sweeps = 0, c_ops = 0;
  logic [15:0]   expd [NU];
  logic [20:0]   sa0 [W], sa1 [W];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL @%0t %s", $time, what); end
  endtask

  // stuck-at cells: re-imposed on the array between clock edges
  always @(negedge clk)
    for (int a = 0; a < W; a++)
      if ((sa0[a] | sa1[a]) != 0)
        dut.u_sram.mem[a] = (dut.u_sram.mem[a] | sa1[a]) & ~sa0[a];

  always @(posedge clk) if (rst_n) begin
    if (u_req && !u_ready && !test_busy) c_stall++;
    if (ev_scrub_fix) c_scrub++;
    if (ev_insert) c_insert++;
    if (ev_evict) c_evict++;
    if (ev_drop) c_drop++;
    if (ev_reclass) c_reclass++;
    if (ev_spare_fault) c_spare_fault++;
    if (ev_scrub_sweep) c_sweeps++;
    if (test_done) c_tests++;
    if (test_busy && dut.mem_en) c_ops++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one user access; waits while the block is not ready
  task automatic access(input bit we, input int a, input logic [15:0] d,
                        output logic [15:0] q, output logic err, output logic spare);
    @(negedge clk);
    u_req = 1; u_we = we; u_addr = AW'(a); u_wdata = d;
    #1;
    while (!u_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    u_req = 0;
    q = u_rdata; err = u_rerr; spare = u_rspare;
    if (!we) check(u_rvalid, "read data valid one cycle after the request");
  endtask

  task automatic wr(input int a, input logic [15:0] d);
    logic [15:0] q; logic e, s;
    access(1, a, d, q, e, s);
    expd[a] = d;
  endtask

  task automatic rd_check(input int a, input string what, input bit skip = 0);
    logic [15:0] q; logic e, s;
    access(0, a, 16'h0, q, e, s);
    if (s) c_spare_rd++;
    if (!skip) check(q == expd[a], $sformatf("%s: word %0d read %h expected %h", what, a, q, expd[a]));
  endtask

  task automatic reload_and_verify(input string what, input int skip_a = -1, input int skip_b = -1);
    for (int a = 0; a < NU; a++) wr(a, (a == 60) ? 16'hffff : 16'($urandom));
    for (int a = 0; a < NU; a++) rd_check(a, what, a == skip_a || a == skip_b);
  endtask

  // spare word that holds word a, -1 if none
  task automatic spare_of(input int a, output int sp);
    sp = -1;
    for (int i = 0; i < NS; i++) begin
      obs_idx = 3'(i); #1;
      if (obs_valid && obs_orig == AW'(a)) sp = int'(obs_spare);
    end
  endtask

  // retired spares sit in the bottom slots, invalid; no valid slot uses one
  task automatic check_retired(input int nb, input int sp_a, input int sp_b, input string what);
    check(n_bad == 3'(nb), $sformatf("%s: %0d spares retired (got %0d)", what, nb, n_bad));
    for (int i = 0; i < NS; i++) begin
      obs_idx = 3'(i); #1;
      if (i < nb) check(!obs_valid && (int'(obs_spare) == sp_a || int'(obs_spare) == sp_b),
                        $sformatf("%s: slot %0d holds a retired spare (%0d)", what, i, obs_spare));
      else check(int'(obs_spare) != sp_a && int'(obs_spare) != sp_b,
                 $sformatf("%s: slot %0d does not use a retired spare", what, i));
    end
  endtask

  task automatic run_test(input bit aging);
    int cyc, ops0;
    ops0 = c_ops;
    aging_en = aging;
    @(negedge clk); test_start = 1; @(negedge clk); test_start = 0;
    cyc = 0;
    while (!test_done && cyc < 5000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(cyc < 5000, "test period ends");
    check(c_ops - ops0 == (aging ? 7 : 5) * W,
          $sformatf("test used %0d port operations, expected %0d", c_ops - ops0, (aging ? 7 : 5) * W));
  endtask

  task automatic expect_regions(input int e2f, input int e1fa, input int e1f0, input int ea, input string what);
    check(n_2f == 3'(e2f) && n_1fa == 3'(e1fa) && n_1f0 == 3'(e1f0) && n_a == 3'(ea),
          $sformatf("%s: regions 2F=%0d 1FA=%0d 1F0=%0d A=%0d", what, n_2f, n_1fa, n_1f0, n_a));
  endtask

  task automatic in_cam(input int a, input bit want, input string what);
    bit found;
    found = 0;
    for (int i = 0; i < NS; i++) begin
      obs_idx = 3'(i); #1;
      if (obs_valid && obs_orig == AW'(a)) found = 1;
    end
    check(found == want, $sformatf("%s: word %0d %s the remap CAM", what, a, want ? "in" : "not in"));
  endtask

  initial begin
    for (int a = 0; a < W; a++) begin sa0[a] = '0; sa1[a] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- user mode: write, read back ----
    reload_and_verify("initial");
    // ---- soft errors removed by scrubbing while user traffic runs ----
    for (int k = 0; k < 8; k++) dut.u_sram.mem[k * 7] = dut.u_sram.mem[k * 7] ^ (21'd1 << (k + 2));
    begin
      int s0;
      s0 = c_sweeps;
      while (c_sweeps < s0 + 2) begin
        if ($urandom_range(0, 1) == 1) rd_check($urandom_range(0, NU - 1), "during scrub");
        else @(negedge clk);
      end
    end
    check(c_scrub >= 8, $sformatf("scrub corrected %0d words", c_scrub));
    for (int k = 0; k < 8; k++) begin
      logic [15:0] q; logic e, s;
      access(0, k * 7, 0, q, e, s);
      check(q == expd[k * 7] && !e, $sformatf("word %0d clean after scrubbing", k * 7));
    end
    // ---- period 1: one word of each status type, a faulty spare ----
    sa1[10][3] = 1;                       // 1F0
    sa0[20][0] = 1; sa1[20][12] = 1;      // 2F
    sa1[30][5] = 1;                       // 1FA (with aged cell below)
    dut.u_ocas.mark_aged(AW'(30), 21'(1) << 9);
    dut.u_ocas.mark_aged(AW'(40), 21'(1) << 2);   // A
    sa1[NU + 1][7] = 1;                   // spare word fault
    run_test(1);
    expect_regions(1, 1, 1, 1, "period 1");
    check(c_spare_fault == 1, "faulty spare word retired");
    check_retired(1, NU + 1, NU + 1, "period 1");
    check(c_insert == 4, "four words remapped");
    for (int a = 10; a <= 40; a += 10) in_cam(a, 1, "period 1");
    begin
      int sp0;
      sp0 = c_spare_rd;
      reload_and_verify("after period 1");
      check(c_spare_rd - sp0 == 4, $sformatf("%0d reads served by spares", c_spare_rd - sp0));
    end
    // ---- period 2: new 2F word evicts the A word ----
    sa1[50][1] = 1; sa1[50][2] = 1;
    run_test(1);
    expect_regions(2, 1, 1, 0, "period 2");
    check(c_evict == 1, "A word evicted");
    in_cam(40, 0, "period 2");
    in_cam(50, 1, "period 2");
    reload_and_verify("after period 2");
    // ---- period 3: new 1F0 word finds no lower-priority entry: left to ECC ----
    sa0[60][4] = 1;
    run_test(1);
    expect_regions(2, 1, 1, 0, "period 3");
    check(c_drop >= 1, "1F0 word dropped");
    reload_and_verify("after period 3");
    begin
      logic [15:0] q; logic e, s;
      access(0, 60, 0, q, e, s);
      check(q == 16'hffff && e && !s, "unrepaired 1F0 word corrected by ECC");
    end
    // ---- period 4: a 1F0 word gains a second fault ----
    sa0[10][15] = 1;
    run_test(1);
    expect_regions(3, 1, 0, 0, "period 4");
    check(c_reclass == 1, "1F0 word re-classified as 2F");
    reload_and_verify("after period 4");
    // ---- period 5: no aging test, the 1FA word is seen as 1F0 ----
    run_test(0);
    expect_regions(3, 0, 1, 0, "period 5 (aging test off)");
    check(c_reclass == 2, "1FA word re-classified as 1F0");
    check(!fail, "no failure so far");
    reload_and_verify("after period 5");
    // ---- period 5b: the spare that holds 2F word 20 goes bad; 20 moves and evicts 30 ----
    begin
      int sp;
      spare_of(20, sp);
      check(sp >= NU, "word 20 is on a spare");
      sa1[sp][3] = 1;
      run_test(0);
      expect_regions(3, 0, 0, 0, "period 5b");
      check(c_spare_fault == 2, "spare holding a word retired");
      check_retired(2, NU + 1, sp, "period 5b");
      check(c_evict == 2, "1F0 word evicted to make room for the displaced 2F word");
      in_cam(20, 1, "period 5b");
      in_cam(30, 0, "period 5b");
    end
    reload_and_verify("after period 5b");
    // ---- period 6: two new 2F words; the CAM is full of 2F words: memory failure ----
    sa1[33][0] = 1; sa1[33][1] = 1;
    sa1[44][0] = 1; sa1[44][1] = 1;
    run_test(1);
    expect_regions(3, 0, 0, 0, "period 6");
    check(fail, "memory failure flagged");
    in_cam(33, 0, "period 6");
    in_cam(44, 0, "period 6");
    reload_and_verify("after period 6", 33, 44);
    // ---- period 7: more reports than diagnosis entries ----
    for (int a = 0; a < 20; a++) dut.u_ocas.mark_aged(AW'(a + 1), 21'(1) << 20);
    run_test(1);
    check(diag_overflow, "diagnosis CAM overflow flagged");
    // ---- mechanism coverage ----
    check(c_stall > 0, $sformatf("user stalled by scrub write-back %0d times", c_stall));
    check(c_scrub > 0, "scrub corrections");
    check(c_spare_rd > 0, "reads from spares");
    check(c_insert > 0 && c_evict > 0 && c_drop > 0 && c_reclass > 0, "remap operations");
    check(c_spare_fault > 0, "spare words retired");
    check(c_tests == 8, "mode switches: eight test periods");
    $display("mechanisms: stall=%0d scrub=%0d spare_rd=%0d insert=%0d evict=%0d drop=%0d reclass=%0d spare_retired=%0d tests=%0d",
             c_stall, c_scrub, c_spare_rd, c_insert, c_evict, c_drop, c_reclass, c_spare_fault, c_tests);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
