// tb_rel_mem_full: one complete self-test and repair period of the block at its
// default size (100,000 user words, 50 spare words, 256 diagnosis entries).
//
// The block is loaded, stuck-at faults and aged cells are placed in words spread
// over the whole address range (first and last user word, a spare word), and one
// aging-aware test period is run. Checks: the port traffic of the period equals
// 7 operations per physical word (MATS+ plus aging test), the remap CAM regions hold
// the expected number of 2F, 1FA, 1F0 and A words, every damaged user word is in the
// remap CAM, the faulty spare word is retired and used by no slot, and after
// reloading, every sampled word reads back what was written,
// the repaired ones from their spare words.
module tb_rel_mem_full;
  import mem_pkg::*;
  localparam int NU = N_WORDS, NS = N_SPARE, W = NU + NS, AW = 17;

  logic clk = 0, rst_n = 0;
  logic u_req = 0, u_we = 0, u_ready, u_rvalid, u_rerr, u_runcorr, u_rspare;
  logic [AW-1:0] u_addr = 0, obs_orig, obs_spare;
  logic [15:0] u_wdata = 0, u_rdata;
  logic test_start = 0, aging_en = 1, test_busy, test_done, fail, diag_overflow;
  logic [5:0] n_2f, n_1fa, n_1f0, n_a, n_bad;
  logic ev_insert, ev_evict, ev_reclass, ev_drop, ev_spare_fault, ev_scrub_fix, ev_scrub_sweep;
  logic [5:0] obs_idx = 0;
  logic obs_valid;

  always #5 clk = ~clk;

  rel_mem_top dut (.*);

  int checks = 0, failures = 0, ops = 0, spare_rd = 0;
  int fa [$];                  // words with stuck-at cells
  logic [20:0] sa0 [int], sa1 [int];
  logic [15:0] expd [int];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  always @(negedge clk)
    foreach (fa[i]) dut.u_sram.mem[fa[i]] = (dut.u_sram.mem[fa[i]] | sa1[fa[i]]) & ~sa0[fa[i]];

  always @(posedge clk) if (rst_n && test_busy && dut.mem_en) ops++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit we, input int a, input logic [15:0] d,
                        output logic [15:0] q, output logic spare);
    @(negedge clk);
    u_req = 1; u_we = we; u_addr = AW'(a); u_wdata = d;
    #1;
    while (!u_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    u_req = 0;
    q = u_rdata; spare = u_rspare;
  endtask

  task automatic fault(input int a, input int b, input bit v);
    if (!sa0.exists(a)) begin sa0[a] = '0; sa1[a] = '0; fa.push_back(a); end
    if (v) sa1[a][b] = 1; else sa0[a][b] = 1;
  endtask

  int sample [$];

  initial begin
    int cyc;
    logic [15:0] q;
    logic s;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // damaged words: 2F x3, 1FA x2, 1F0 x3, A x2, and one faulty spare
    fault(0, 0, 1); fault(0, 9, 0);                 // 2F
    fault(NU - 1, 3, 1); fault(NU - 1, 4, 1);       // 2F
    fault(54321, 20, 0); fault(54321, 1, 1);        // 2F
    fault(1234, 6, 1);  dut.u_ocas.mark_aged(AW'(1234), 21'h100);   // 1FA
    fault(77777, 2, 0); dut.u_ocas.mark_aged(AW'(77777), 21'h3);    // 1FA (cell 2 is faulty, cells 0,1 aged)
    fault(4242, 11, 1);                             // 1F0
    fault(65535, 0, 1);                             // 1F0
    fault(99000, 14, 0);                            // 1F0
    dut.u_ocas.mark_aged(AW'(31337), 21'h10);       // A
    dut.u_ocas.mark_aged(AW'(88888), 21'h1000);     // A
    fault(NU + 7, 5, 1);                            // faulty spare word
    foreach (fa[i]) if (fa[i] < NU) sample.push_back(fa[i]);
    sample.push_back(31337); sample.push_back(88888);
    for (int k = 0; k < 500; k++) sample.push_back($urandom_range(0, NU - 1));
    foreach (sample[i]) begin
      expd[sample[i]] = 16'hffff;
      access(1, sample[i], 16'hffff, q, s);
    end
    // one test period with the aging test
    @(negedge clk); test_start = 1; @(negedge clk); test_start = 0;
    cyc = 0;
    while (!test_done && cyc < 2000000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    $display("test period took %0d cycles", cyc);
    check(ops == 7 * W, $sformatf("port operations %0d, expected %0d", ops, 7 * W));
    check(n_2f == 3 && n_1fa == 2 && n_1f0 == 3 && n_a == 2,
          $sformatf("regions 2F=%0d 1FA=%0d 1F0=%0d A=%0d", n_2f, n_1fa, n_1f0, n_a));
    check(!fail && !diag_overflow, "no failure, no overflow");
    check(n_bad == 1, "faulty spare word retired");
    for (int e = 0; e < NS; e++) begin
      obs_idx = 6'(e); #1;
      if (e == 0) check(!obs_valid && obs_spare == AW'(NU + 7), "retired spare in slot 0");
      else check(obs_spare != AW'(NU + 7), $sformatf("slot %0d does not use the faulty spare", e));
    end
    foreach (sample[i]) if (i < 10) begin
      bit found;
      found = 0;
      for (int e = 0; e < NS; e++) begin
        obs_idx = 6'(e); #1;
        if (obs_valid && obs_orig == AW'(sample[i])) found = 1;
      end
      check(found, $sformatf("word %0d remapped", sample[i]));
    end
    // reload (the test overwrote the data) and read back
    foreach (sample[i]) begin
      logic [15:0] d;
      d = 16'($urandom);
      expd[sample[i]] = d;
      access(1, sample[i], d, q, s);
    end
    foreach (sample[i]) begin
      access(0, sample[i], 0, q, s);
      if (s) spare_rd++;
      check(q == expd[sample[i]], $sformatf("word %0d read %h expected %h", sample[i], q, expd[sample[i]]));
    end
    check(spare_rd >= 10, $sformatf("%0d reads served by spare words", spare_rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
