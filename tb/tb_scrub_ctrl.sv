// tb_scrub_ctrl: scrubbing controller with a testbench memory and ECC reference.
// The memory holds codewords built by a testbench Hamming encoder; single-bit soft
// errors are injected in some words. The testbench decodes reads itself and feeds
// the decoder result back. Checks: the sweep starts INTERVAL cycles after reset, reads
// every word once in order, writes back exactly the words with an error and only in
// the cycle right after their read, leaves every word clean, and waits while the
// grant is withheld (user traffic).
module tb_scrub_ctrl;
  localparam int U = 64, AW = 7, WD = 21, IV = 50;
  logic clk = 0, rst_n = 0, enable = 1, rd_req, rd_gnt, wr_req, dec_err, dec_uncorr;
  logic sweeping, ev_corrected, ev_sweep_done;
  logic [AW-1:0] addr;
  logic [WD-1:0] wdata, dec_code, rdata;
  logic [WD-1:0] mem [U], good [U];
  logic rd_q;
  logic [AW-1:0] rd_addr_q;
  int nread [U], nwrite [U];
  int checks = 0, failures = 0, first_rd = -1, cyc = 0, bad_wr = 0, busy_user = 0, c0 = 0;

  always #5 clk = ~clk;
  scrub_ctrl #(.USER(U), .WIDTH(WD), .ADDR_W(AW), .INTERVAL(IV)) dut (.*);

  function automatic logic [20:0] ref_enc(input logic [15:0] x);
    logic [20:0] c;
    int j;
    c = '0; j = 0;
    for (int p = 1; p <= 21; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16) begin c[p-1] = x[j]; j++; end
    for (int k = 0; k < 5; k++) begin
      logic s;
      s = 0;
      for (int p = 1; p <= 21; p++) if (p[k] && p != (1 << k)) s ^= c[p-1];
      c[(1 << k) - 1] = s;
    end
    return c;
  endfunction

  // testbench decoder
  always_comb begin
    logic [4:0] syn;
    syn = '0;
    for (int p = 1; p <= 21; p++) if (rdata[p-1]) syn ^= 5'(p);
    dec_err = (syn != 0);
    dec_uncorr = (syn > 21);
    dec_code = rdata;
    if (syn != 0 && syn <= 21) dec_code[syn-1] = ~dec_code[syn-1];
  end

  // grant withheld in a pseudo-random pattern (user accesses)
  assign rd_gnt = !(cyc % 3 == 0 && cyc > 100);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rd_q <= rd_req && rd_gnt;
    rd_addr_q <= addr;
    if (rst_n && rd_req && !rd_gnt) busy_user++;
    if (!rst_n) ;
    else if (wr_req) begin
      if (!rd_q || addr != rd_addr_q) bad_wr++;
      mem[addr] <= wdata;
      nwrite[addr]++;
    end else if (rd_req && rd_gnt) begin
      rdata <= mem[addr];
      nread[addr]++;
      if (first_rd < 0) first_rd <= cyc;
    end
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
    bit flip [U];
    for (int a = 0; a < U; a++) begin
      good[a] = ref_enc(16'($urandom));
      flip[a] = ($urandom_range(0, 3) == 0) || a == 0 || a == U - 1;
      mem[a] = flip[a] ? good[a] ^ (WD'(1) << $urandom_range(0, WD - 1)) : good[a];
      nread[a] = 0; nwrite[a] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    c0 = cyc;
    while (!ev_sweep_done) @(negedge clk);
    @(negedge clk);
    check(first_rd - c0 == IV, $sformatf("sweep started %0d cycles after reset, expected %0d", first_rd - c0, IV));
    check(bad_wr == 0, "write-back only right after the read of the same word");
    check(busy_user > 0, "sweep waited for withheld grants");
    for (int a = 0; a < U; a++) begin
      check(nread[a] == 1, $sformatf("word %0d read %0d times", a, nread[a]));
      check(nwrite[a] == (flip[a] ? 1 : 0), $sformatf("word %0d written %0d times", a, nwrite[a]));
      check(mem[a] == good[a], $sformatf("word %0d clean after scrub", a));
    end
    check(!sweeping, "sweep ended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
