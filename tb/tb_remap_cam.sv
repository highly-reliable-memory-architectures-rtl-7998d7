// tb_remap_cam: directed test of the remap CAM commands and search ports.
// Checks the reset spare assignment, WRITE then search hit/miss on both ports,
// SWAP moving both addresses of a slot, INVAL, the search by spare address (slot,
// valid bit and word of the owner of every spare), and that spare addresses stay a
// permutation of the spare words after random swaps (reference: a testbench copy).
module tb_remap_cam;
  import mem_pkg::*;
  localparam int S = 8, BASE = 100;
  logic clk = 0, rst_n = 0;
  logic [8:0] s_addr = 0, s_phys, c_addr = 0, cmd_addr = 0, rd_orig, rd_spare;
  logic s_hit, c_hit, rd_valid;
  logic [8:0] c_sorig;
  logic c_svalid;
  logic [2:0] c_sidx, c_idx, cmd_a = 0, cmd_b = 0, rd_idx = 0;
  cam_cmd_e cmd = CAM_NOP;
  logic       rv [S];
  logic [8:0] ro [S], rs [S];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  remap_cam #(.ENTRIES(S), .ADDR_W(9), .SPARE_BASE(BASE)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_cmd(input cam_cmd_e c, input int a, input int b, input int ad);
    @(negedge clk);
    cmd = c; cmd_a = 3'(a); cmd_b = 3'(b); cmd_addr = 9'(ad);
    unique case (c)
      CAM_WRITE: begin rv[a] = 1; ro[a] = 9'(ad); end
      CAM_SWAP:  begin
        logic v; logic [8:0] o, s;
        v = rv[a]; o = ro[a]; s = rs[a];
        rv[a] = rv[b]; ro[a] = ro[b]; rs[a] = rs[b];
        rv[b] = v; ro[b] = o; rs[b] = s;
      end
      CAM_INVAL: rv[a] = 0;
      default: ;
    endcase
    @(negedge clk);
    cmd = CAM_NOP;
  endtask

  task automatic compare_all();
    for (int i = 0; i < S; i++) begin
      rd_idx = 3'(i); #1;
      check(rd_valid == rv[i] && (!rv[i] || rd_orig == ro[i]) && rd_spare == rs[i],
            $sformatf("slot %0d contents", i));
      if (rv[i]) begin
        s_addr = ro[i]; c_addr = ro[i]; #1;
        check(s_hit && s_phys == rs[i], $sformatf("access search slot %0d", i));
        check(c_hit && c_idx == 3'(i), $sformatf("maintenance search slot %0d", i));
      end
      c_addr = rs[i]; #1;
      check(c_sidx == 3'(i) && c_svalid == rv[i] && (!rv[i] || c_sorig == ro[i]),
            $sformatf("spare search: spare %0d owned by slot %0d", rs[i], i));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < S; i++) begin rv[i] = 0; ro[i] = 0; rs[i] = 9'(BASE + i); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare_all();
    s_addr = 9'd7; #1;
    check(!s_hit && s_phys == 9'd7, "miss passes address through");
    do_cmd(CAM_WRITE, 0, 0, 11);
    do_cmd(CAM_WRITE, 7, 0, 22);
    do_cmd(CAM_WRITE, 3, 0, 33);
    compare_all();
    do_cmd(CAM_SWAP, 0, 7, 0);
    compare_all();
    do_cmd(CAM_INVAL, 3, 0, 0);
    compare_all();
    s_addr = 9'd33; #1;
    check(!s_hit && s_phys == 9'd33, "invalidated slot no longer hits");
    for (int t = 0; t < 200; t++) begin
      int a, b, k;
      a = $urandom_range(0, S - 1); b = $urandom_range(0, S - 1); k = $urandom_range(0, 2);
      if (k == 0) begin
        int ad; bit dup;
        ad = 200 + t; dup = 0;
        do_cmd(CAM_WRITE, a, 0, ad);
      end else if (k == 1) do_cmd(CAM_SWAP, a, b, 0);
      else do_cmd(CAM_INVAL, a, 0, 0);
      compare_all();
    end
    begin
      int seen [S];
      for (int i = 0; i < S; i++) seen[i] = 0;
      for (int i = 0; i < S; i++) seen[rs[i] - BASE]++;
      for (int i = 0; i < S; i++) check(seen[i] == 1, "spare addresses stay a permutation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
