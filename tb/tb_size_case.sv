// tb_size_case: one self-test and repair period of the memory block at a given size,
// used by tb_rel_mem_sizes and tb_rel_mem_words to run the memory sizes, spare counts and word lengths
// the block is meant to scale to.
//
// On `go` the case places stuck-at faults and aged cells in the block: N2F words
// with two faulty cells (2F), two words with one faulty and one aged cell (1FA), two
// with one faulty cell (1F0), two with only an aged cell (A) and one faulty spare
// word. Word addresses are k*7919+3 mod NU, which are distinct for k < NU. One test
// period with the aging test is run. Checks:
//   - port traffic of 7 operations per physical word (5 MATS+, 2 aging test);
//   - the remap CAM region sizes (every damaged word fits: N2F+6 < NS);
//   - the faulty spare retired, no failure, no diagnosis overflow;
//   - after reloading, every damaged word is served by a spare and reads back what
//     was written, and so do random other words.
// Stuck-at cells are forced into the array after every clock edge. `done` rises at
// the end; `checks` and `failures` are the counts of this case.
module tb_size_case
  import mem_pkg::*;
#(
  parameter int NU  = 8192,
  parameter int NS  = 50,
  parameter int DW  = 16,
  parameter int N2F = 3
) (
  input  logic clk,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int CW    = DW + int'(hamming_checks(DW));
  localparam int W     = NU + NS;
  localparam int AW    = $clog2(W);
  localparam int CNT_W = $clog2(NS + 1);
  localparam int IDX_W = $clog2(NS);

  logic rst_n = 0;
  logic u_req = 0, u_we = 0, u_ready, u_rvalid, u_rerr, u_runcorr, u_rspare;
  logic [AW-1:0] u_addr = 0, obs_orig, obs_spare;
  logic [DW-1:0] u_wdata = 0, u_rdata;
  logic test_start = 0, aging_en = 1, test_busy, test_done, fail, diag_overflow;
  logic [CNT_W-1:0] n_2f, n_1fa, n_1f0, n_a, n_bad;
  logic ev_insert, ev_evict, ev_reclass, ev_drop, ev_spare_fault, ev_scrub_fix, ev_scrub_sweep;
  logic [IDX_W-1:0] obs_idx = 0;
  logic obs_valid;

  rel_mem_top #(.N_USER(NU), .N_SPR(NS), .DW(DW)) dut (.*);

  int fa [$];
  logic [CW-1:0] sa0 [int], sa1 [int];
  logic [DW-1:0] expd [int];
  int ops = 0;

  always @(negedge clk)
    foreach (fa[i]) dut.u_sram.mem[fa[i]] = (dut.u_sram.mem[fa[i]] | sa1[fa[i]]) & ~sa0[fa[i]];

  always @(posedge clk) if (rst_n && test_busy && dut.mem_en) ops++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL [NU=%0d NS=%0d DW=%0d] %s", NU, NS, DW, what);
    end
  endtask

  task automatic fault(input int a, input int b, input bit v);
    if (!sa0.exists(a)) begin sa0[a] = '0; sa1[a] = '0; fa.push_back(a); end
    if (v) sa1[a][b] = 1'b1; else sa0[a][b] = 1'b1;
  endtask

  function automatic logic [CW-1:0] bit_at(input int b);
    logic [CW-1:0] m;
    m = '0;
    m[b] = 1'b1;
    return m;
  endfunction

  task automatic access(input bit we, input int a, input logic [DW-1:0] d,
                        output logic [DW-1:0] q, output logic spare);
    @(negedge clk);
    u_req = 1; u_we = we; u_addr = AW'(a); u_wdata = d;
    #1;
    while (!u_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    u_req = 0;
    q = u_rdata; spare = u_rspare;
  endtask

  function automatic int waddr(input int k);
    return int'((longint'(k) * 7919 + 3) % NU);
  endfunction

  function automatic logic [DW-1:0] rand_word();
    logic [DW-1:0] d;
    for (int i = 0; i < DW; i++) d[i] = 1'($urandom_range(0, 1));
    return d;
  endfunction

  initial begin
    int k, cyc;
    int damaged [$], sample [$];
    logic [DW-1:0] q;
    logic s;
    done = 0; checks = 0; failures = 0;
    wait (go);
    repeat (3) @(negedge clk);
    rst_n = 1;
    k = 0;
    for (int i = 0; i < N2F; i++) begin            // 2F
      fault(waddr(k), i % CW, 1); fault(waddr(k), (i + 7) % CW, 0);
      damaged.push_back(waddr(k)); k++;
    end
    for (int i = 0; i < 2; i++) begin              // 1FA
      fault(waddr(k), 3 + i, 1);
      dut.u_ocas.mark_aged(AW'(waddr(k)), bit_at(CW - 1 - i));
      damaged.push_back(waddr(k)); k++;
    end
    for (int i = 0; i < 2; i++) begin              // 1F0
      fault(waddr(k), CW - 2 - i, 0);
      damaged.push_back(waddr(k)); k++;
    end
    for (int i = 0; i < 2; i++) begin              // A
      dut.u_ocas.mark_aged(AW'(waddr(k)), bit_at(i + 1));
      damaged.push_back(waddr(k)); k++;
    end
    fault(NU + NS / 2, 1, 1);                      // faulty spare word
    // one test period
    @(negedge clk); test_start = 1; @(negedge clk); test_start = 0;
    cyc = 0;
    while (!test_done && cyc < 8 * W + 10000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(cyc < 8 * W + 10000, "test period ends");
    check(ops == 7 * W, $sformatf("port operations %0d, expected %0d", ops, 7 * W));
    check(int'(n_2f) == N2F && n_1fa == 2 && n_1f0 == 2 && n_a == 2,
          $sformatf("regions 2F=%0d 1FA=%0d 1F0=%0d A=%0d", n_2f, n_1fa, n_1f0, n_a));
    check(n_bad == 1 && !fail && !diag_overflow, "spare retired, no failure, no overflow");
    // reload and read back
    foreach (damaged[i]) sample.push_back(damaged[i]);
    for (int i = 0; i < 100; i++) begin
      int a;
      a = $urandom_range(0, NU - 1);
      if (!expd.exists(a) && !sa0.exists(a)) begin sample.push_back(a); expd[a] = '0; end
    end
    foreach (sample[i]) begin
      expd[sample[i]] = rand_word();
      access(1, sample[i], expd[sample[i]], q, s);
    end
    foreach (sample[i]) begin
      access(0, sample[i], '0, q, s);
      check(q == expd[sample[i]], $sformatf("word %0d reads back", sample[i]));
      if (i < damaged.size()) check(s, $sformatf("damaged word %0d served by a spare", sample[i]));
    end
    $display("case NU=%0d NS=%0d DW=%0d (codeword %0d bits): test period %0d cycles, %0d words repaired",
             NU, NS, DW, CW, cyc, damaged.size());
    done = 1;
  end
endmodule
