// tb_remap_ctrl: the extended remap controller driving a real remap CAM.
// The diagnosis CAM is modelled by testbench arrays. Part 1 replays the cases of the
// two-class strategy (no aged cells) on a 4-slot CAM with hand-worked expected slot
// contents: insert into free space, overwrite of a correctable entry when full,
// promotion 1F->2F when full, drop of a correctable word, failure on a 2F word when
// the CAM holds only 2F words, and demotion 2F->1F. Part 2 replays the aging-aware
// cases (region shifts on 2F/1F0 insertion, eviction of an A word). Part 1 ends with
// a faulty spare that holds a 2F word on a full CAM: the spare is retired into slot 0
// and the displaced word takes the slot of the correctable word. Part 3 runs random
// test periods on an 8-slot CAM, with spare words going bad now and then, and compares
// every slot with a reference model of the layout kept as four ordered lists (one per
// word class) plus a count of retired spares; the reference learns which slot owns a
// faulty spare from the CAM's spare fields at the start of the period.
module tb_remap_ctrl;
  import mem_pkg::*;
  localparam int S = 4, S2 = 8, N = 200, DN = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- DUT A: 4 slots ----------------
  logic rst_n = 0, start = 0, busy, done, fail, ev_i, ev_e, ev_r, ev_d, ev_s;
  logic [3:0] d_idx; logic [4:0] d_cnt;
  logic [8:0] d_addr, c_addr, cmd_addr, rd_orig, rd_spare;
  logic [20:0] d_fault, d_aged;
  logic c_hit, rd_valid; logic [1:0] c_idx, cmd_a, cmd_b, rd_idx;
  cam_cmd_e cmd;
  logic [2:0] c2f, c1fa, c1f0, ca, cbad;
  logic [1:0] s_idx; logic s_valid; logic [8:0] s_orig;
  logic [8:0]  ta [DN]; logic [20:0] tf [DN], tg [DN];
  assign d_addr = ta[d_idx]; assign d_fault = tf[d_idx]; assign d_aged = tg[d_idx];

  remap_ctrl #(.S(S), .N_USER(N), .ADDR_W(9), .CW(21), .DIAG_N(DN)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .diag_idx(d_idx), .diag_count(d_cnt),
    .diag_addr(d_addr), .diag_fault(d_fault), .diag_aged(d_aged),
    .c_addr, .c_hit, .c_idx, .c_sidx(s_idx), .c_svalid(s_valid), .c_sorig(s_orig),
    .cmd, .cmd_a, .cmd_b, .cmd_addr,
    .c2f, .c1fa, .c1f0, .ca, .cbad, .fail, .ev_insert(ev_i), .ev_evict(ev_e), .ev_reclass(ev_r),
    .ev_drop(ev_d), .ev_spare_fault(ev_s));
  remap_cam #(.ENTRIES(S), .ADDR_W(9), .SPARE_BASE(N)) u_cam (
    .clk, .rst_n, .s_addr(9'd0), .s_hit(), .s_phys(), .c_addr, .c_hit, .c_idx,
    .c_sidx(s_idx), .c_svalid(s_valid), .c_sorig(s_orig), .cmd, .cmd_a, .cmd_b, .cmd_addr, .rd_idx, .rd_valid, .rd_orig, .rd_spare);

  int n_evict = 0, n_drop = 0, n_reclass = 0, n_spare = 0;
  always @(posedge clk) begin
    if (ev_e) n_evict++;
    if (ev_d) n_drop++;
    if (ev_r) n_reclass++;
    if (ev_s) n_spare++;
  end

  // diagnosis entry helpers: nf faulty bits (bits 0..), na aged bits (bits 10..)
  function automatic logic [20:0] fm(input int nf);
    return 21'((1 << nf) - 1);
  endfunction
  function automatic logic [20:0] am(input int na);
    return 21'(((1 << na) - 1) << 10);
  endfunction

  int nd;
  task automatic add(input int a, input int nf, input int na);
    ta[nd] = 9'(a); tf[nd] = fm(nf); tg[nd] = am(na); nd++;
  endtask

  task automatic run_period();
    int cyc;
    d_cnt = 5'(nd);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(cyc < 1000, "controller finishes");
    nd = 0;
  endtask

  // expected slots: -1 = empty
  task automatic expect_slots(input int e0, input int e1, input int e2, input int e3, input string what);
    int e [4];
    e = '{e0, e1, e2, e3};
    for (int i = 0; i < 4; i++) begin
      rd_idx = 2'(i); #1;
      if (e[i] < 0) check(!rd_valid, $sformatf("%s: slot %0d empty", what, i));
      else check(rd_valid && rd_orig == 9'(e[i]), $sformatf("%s: slot %0d holds %0d (got %0d v%0d)",
                 what, i, e[i], rd_orig, rd_valid));
    end
  endtask

  // ---------------- DUT B: 8 slots, random periods ----------------
  localparam int DN2 = 32, NW = 16;
  logic rst2 = 0, start2 = 0, done2, fail2, busy2;
  logic [4:0] d2_idx; logic [5:0] d2_cnt;
  logic [8:0] c2_addr, cmd2_addr, rd2_orig, rd2_spare, s2_orig;
  logic c2_hit, rd2_valid, s2_valid; logic [2:0] c2_idx, s2_idx, cmd2_a, cmd2_b, rd2_idx;
  cam_cmd_e cmd2;
  logic [3:0] k2f, k1fa, k1f0, ka, kbad;
  logic [8:0]  ua [DN2]; logic [20:0] uf [DN2], ug [DN2];
  remap_ctrl #(.S(S2), .N_USER(N), .ADDR_W(9), .CW(21), .DIAG_N(DN2)) u_ctrl2 (
    .clk, .rst_n(rst2), .start(start2), .busy(busy2), .done(done2), .diag_idx(d2_idx),
    .diag_count(d2_cnt), .diag_addr(ua[d2_idx]), .diag_fault(uf[d2_idx]), .diag_aged(ug[d2_idx]),
    .c_addr(c2_addr), .c_hit(c2_hit), .c_idx(c2_idx), .c_sidx(s2_idx), .c_svalid(s2_valid),
    .c_sorig(s2_orig), .cmd(cmd2), .cmd_a(cmd2_a), .cmd_b(cmd2_b),
    .cmd_addr(cmd2_addr), .c2f(k2f), .c1fa(k1fa), .c1f0(k1f0), .ca(ka), .cbad(kbad), .fail(fail2),
    .ev_insert(), .ev_evict(), .ev_reclass(), .ev_drop(), .ev_spare_fault());
  remap_cam #(.ENTRIES(S2), .ADDR_W(9), .SPARE_BASE(N)) u_cam2 (
    .clk, .rst_n(rst2), .s_addr(9'd0), .s_hit(), .s_phys(), .c_addr(c2_addr), .c_hit(c2_hit),
    .c_idx(c2_idx), .c_sidx(s2_idx), .c_svalid(s2_valid), .c_sorig(s2_orig),
    .cmd(cmd2), .cmd_a(cmd2_a), .cmd_b(cmd2_b), .cmd_addr(cmd2_addr),
    .rd_idx(rd2_idx), .rd_valid(rd2_valid), .rd_orig(rd2_orig), .rd_spare(rd2_spare));

  // Reference model of the CAM layout as four ordered lists, each indexed from the
  // end of the CAM its region is anchored to (2F from the top, 1FA below it, 1F0 from
  // the bottom, A above it).
  int q2 [$], q1a [$], q10 [$], qa [$];
  int nbad;
  int st_nf [N], st_na [N];
  bit bad_sp [S2];          // spare (index from N) has a faulty cell
  bit ret_sp [S2];          // reference: spare already retired

  function automatic void q_remove(ref int q [$], input int j);
    q[j] = q[q.size() - 1];
    void'(q.pop_back());
  endfunction

  function automatic int q_find(ref int q [$], input int a);
    foreach (q[i]) if (q[i] == a) return i;
    return -1;
  endfunction

  function automatic void ref_insert(input wstat_e c, input int a);
    unique case (c)
      ST_2F:  begin if (q1a.size() > 0) q1a.push_back(q1a.pop_front()); q2.push_back(a); end
      ST_1FA: q1a.push_back(a);
      ST_1F0: begin if (qa.size() > 0) qa.push_back(qa.pop_front()); q10.push_back(a); end
      default: qa.push_back(a);
    endcase
  endfunction

  // remove word a from its region; returns its class (ST_H if not present)
  function automatic wstat_e ref_remove(input int a);
    int j;
    if ((j = q_find(q2, a)) >= 0) begin
      q_remove(q2, j); if (q1a.size() > 0) q1a.push_front(q1a.pop_back()); return ST_2F;
    end
    if ((j = q_find(q1a, a)) >= 0) begin q_remove(q1a, j); return ST_1FA; end
    if ((j = q_find(q10, a)) >= 0) begin
      q_remove(q10, j); if (qa.size() > 0) qa.push_front(qa.pop_back()); return ST_1F0;
    end
    if ((j = q_find(qa, a)) >= 0) begin q_remove(qa, j); return ST_A; end
    return ST_H;
  endfunction

  // place a word not in the CAM: insert, evict a lower class, or drop
  function automatic void ref_place(input int a, input wstat_e c);
    bit full;
    full = (nbad + q2.size() + q1a.size() + q10.size() + qa.size()) >= S2;
    if (!full) ref_insert(c, a);
    else if (qa.size() > 0 && c > ST_A)    begin void'(qa.pop_back());  ref_insert(c, a); end
    else if (q10.size() > 0 && c > ST_1F0) begin void'(q10.pop_back()); ref_insert(c, a); end
    else if (q1a.size() > 0 && c > ST_1FA) begin void'(q1a.pop_back()); ref_insert(c, a); end
  endfunction

  // retire a spare whose slot holds word w (-1: free slot)
  function automatic void ref_retire(input int w);
    wstat_e c;
    c = ST_H;
    if (w >= 0) c = ref_remove(w);
    if (qa.size() > 0) qa.push_back(qa.pop_front());
    if (q10.size() > 0) q10.push_back(q10.pop_front());
    nbad++;
    if (w >= 0) ref_place(w, c);
  endfunction

  function automatic void ref_entry(input int a, input wstat_e c);
    int j;
    bit full;
    full = (nbad + q2.size() + q1a.size() + q10.size() + qa.size()) >= S2;
    if ((j = q_find(q2, a)) >= 0) begin
      if (c != ST_2F) begin
        q_remove(q2, j); if (q1a.size() > 0) q1a.push_front(q1a.pop_back()); ref_insert(c, a);
      end
    end else if ((j = q_find(q1a, a)) >= 0) begin
      if (c != ST_1FA) begin q_remove(q1a, j); ref_insert(c, a); end
    end else if ((j = q_find(q10, a)) >= 0) begin
      if (c != ST_1F0) begin
        q_remove(q10, j); if (qa.size() > 0) qa.push_front(qa.pop_back()); ref_insert(c, a);
      end
    end else if ((j = q_find(qa, a)) >= 0) begin
      if (c != ST_A) begin q_remove(qa, j); ref_insert(c, a); end
    end else if (!full) ref_insert(c, a);
    else if (qa.size() > 0 && c > ST_A)    begin void'(qa.pop_back());  ref_insert(c, a); end
    else if (q10.size() > 0 && c > ST_1F0) begin void'(q10.pop_back()); ref_insert(c, a); end
    else if (q1a.size() > 0 && c > ST_1FA) begin void'(q1a.pop_back()); ref_insert(c, a); end
  endfunction

  function automatic int ref_slot(input int s);
    if (s >= S2 - q2.size()) return q2[S2 - 1 - s];
    if (s >= S2 - q2.size() - q1a.size()) return q1a[S2 - 1 - q2.size() - s];
    if (s < nbad) return -1;
    if (s < nbad + q10.size()) return q10[s - nbad];
    if (s < nbad + q10.size() + qa.size()) return qa[s - nbad - q10.size()];
    return -1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nd = 0; d_cnt = 0;
    for (int i = 0; i < DN; i++) begin ta[i] = 0; tf[i] = 0; tg[i] = 0; end
    for (int i = 0; i < DN2; i++) begin ua[i] = 0; uf[i] = 0; ug[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- Part 1: two-class strategy (Table of remap CAM cases) ----
    add(10, 1, 0); add(20, 2, 0); run_period();
    expect_slots(10, -1, -1, 20, "enough: 1F at RC1F, 2F at RC2F");
    add(30, 1, 0); add(40, 1, 0); run_period();
    expect_slots(10, 30, 40, 20, "fill with correctable words");
    add(50, 3, 0); run_period();
    expect_slots(10, 30, 50, 20, "full-1: new 2F overwrites last 1F entry");
    check(n_evict == 1 && c2f == 2 && c1f0 == 2, "full-1 counters");
    add(10, 2, 0); run_period();
    expect_slots(30, 10, 50, 20, "full-1: old 1F becomes 2F, swapped to RC1F");
    check(n_reclass == 1 && c2f == 3 && c1f0 == 1, "promotion counters");
    add(60, 1, 0); add(70, 2, 0); run_period();
    expect_slots(70, 10, 50, 20, "full: new 1F dropped, new 2F replaces last 1F");
    check(n_drop == 1 && !fail && c2f == 4 && c1f0 == 0, "full-2 reached without failure");
    add(80, 2, 0); run_period();
    check(fail && n_drop == 2, "full-2: new 2F word is a memory failure");
    expect_slots(70, 10, 50, 20, "full-2: CAM unchanged on failure");
    add(20, 1, 0); run_period();
    expect_slots(20, 10, 50, 70, "full-2: old 2F becomes 1F, moved to the bottom");
    check(c2f == 3 && c1f0 == 1, "demotion counters");
    add(10, 2, 0); add(20, 1, 0); run_period();
    expect_slots(20, 10, 50, 70, "same class: nothing");
    // faulty spare N+2 on a CAM full of 2F words and one 1F0 word (20): whichever word
    // it held, the result is slot 0 retired and the three 2F words in slots 1..3
    add(N + 2, 2, 0); run_period();
    check(n_spare == 1 && cbad == 1, "faulty spare word retired");
    check(c2f == 3 && c1f0 == 0 && c1fa == 0 && ca == 0, "retirement: 2F words kept, 1F0 word gone");
    rd_idx = 0; #1;
    check(!rd_valid && rd_spare == 9'(N + 2), "retired spare in slot 0, unused");
    begin
      int seen;
      seen = 0;
      for (int i = 1; i < 4; i++) begin
        rd_idx = 2'(i); #1;
        if (rd_valid && (rd_orig == 9'd10 || rd_orig == 9'd50 || rd_orig == 9'd70)) seen++;
        check(rd_spare != 9'(N + 2), "retired spare not used");
      end
      check(seen == 3, "2F words 10, 50, 70 in slots 1..3");
    end
    add(N + 2, 1, 0); run_period();
    check(n_spare == 1 && cbad == 1, "retired spare reported again: nothing");
    // ---- Part 2: aging-aware strategy ----
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    add(100, 0, 1); add(101, 1, 2); add(102, 1, 0); add(103, 2, 0); run_period();
    expect_slots(102, 100, 101, 103, "A, 1FA, 1F0, 2F placed with region shifts");
    check(c2f == 1 && c1fa == 1 && c1f0 == 1 && ca == 1, "four regions");
    n_evict = 0; n_drop = 0;
    add(104, 2, 0); add(105, 0, 3); run_period();
    expect_slots(102, 101, 104, 103, "full: new 2F evicts the A word, new A dropped");
    check(n_evict == 1 && n_drop == 1 && ca == 0 && c2f == 2, "eviction counters");
    add(106, 1, 1); run_period();
    expect_slots(106, 101, 104, 103, "full: new 1FA evicts the 1F0 word");
    add(101, 1, 0); run_period();
    check(c1fa == 1 && c1f0 == 1, "1FA word that lost its aged cells becomes 1F0");
    // ---- Part 3: random periods, 8 slots, all faulty/aged words reported each period ----
    for (int i = 0; i < N; i++) begin st_nf[i] = 0; st_na[i] = 0; end
    for (int i = 0; i < S2; i++) begin bad_sp[i] = 0; ret_sp[i] = 0; end
    nbad = 0;
    rst2 = 1;
    for (int p = 0; p < 120; p++) begin
      int n, cyc, nsp;
      // wear: a few words gain an aged or a faulty cell; rarely an intermittent fault clears
      for (int w = 0; w < 2; w++) begin
        int a, r;
        a = $urandom_range(0, DN - 1);
        r = $urandom_range(0, 5);
        case (r)
          0, 1: st_na[a] = (st_na[a] < 3) ? st_na[a] + 1 : st_na[a];
          2, 3, 4: st_nf[a] = (st_nf[a] < 3) ? st_nf[a] + 1 : st_nf[a];
          default: st_nf[a] = (st_nf[a] > 0) ? st_nf[a] - 1 : 0;
        endcase
      end
      n = 0;
      // now and then a spare word goes bad (at most 4 of 8); it is reported first, so
      // the slot that owns it is the one it had at the end of the last period
      nsp = $urandom_range(0, S2 - 1);
      if ($urandom_range(0, 5) == 0 && nbad < 4 && !bad_sp[nsp]) begin
        bad_sp[nsp] = 1;
        ua[n] = 9'(N + nsp); uf[n] = fm(1); ug[n] = 0; n++;
        for (int s = 0; s < S2; s++) begin
          rd2_idx = 3'(s); #1;
          if (int'(rd2_spare) == N + nsp) ref_retire(ref_slot(s));
        end
        ret_sp[nsp] = 1;
      end else nsp = -1;
      for (int a0 = 0; a0 < NW; a0++) begin
        int a;
        a = (a0 * 7 + p) % NW;   // vary the report order between periods
        if (st_nf[a] != 0 || st_na[a] != 0) begin
          ua[n] = 9'(a); uf[n] = fm(st_nf[a]); ug[n] = am(st_na[a]);
          ref_entry(a, classify(st_nf[a], st_na[a] != 0));
          n++;
        end
      end
      // spares retired earlier keep being reported; nothing happens to them
      for (int k = 0; k < S2; k++)
        if (bad_sp[k] && k != nsp) begin ua[n] = 9'(N + k); uf[n] = fm(2); ug[n] = 0; n++; end
      d2_cnt = 6'(n);
      @(negedge clk); start2 = 1; @(negedge clk); start2 = 0;
      cyc = 0;
      while (!done2 && cyc < 1000) begin @(negedge clk); cyc++; end
      @(negedge clk);
      check(int'(k2f) == q2.size() && int'(k1fa) == q1a.size() && int'(k1f0) == q10.size() &&
            int'(ka) == qa.size() && int'(kbad) == nbad, $sformatf("period %0d: region sizes", p));
      for (int s = 0; s < S2; s++) begin
        int e;
        rd2_idx = 3'(s); #1;
        e = ref_slot(s);
        check(e < 0 ? !rd2_valid : (rd2_valid && rd2_orig == 9'(e)),
              $sformatf("period %0d slot %0d: expected %0d got %0d/%0d", p, s, e, rd2_valid, rd2_orig));
        check((s < nbad) == ret_sp[int'(rd2_spare) - N],
              $sformatf("period %0d slot %0d: retired spares exactly in the bottom slots", p, s));
      end
    end
    check(nbad >= 2, $sformatf("random periods retired %0d spares", nbad));
    $display("random periods: %0d spares retired", nbad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
