// rel_mem_top: ECC-based, aging-aware memory block with in-field self-repair.
//
// A block of N_WORDS user words plus N_SPARE spare words, each stored as a 21-bit
// SEC Hamming codeword of 16 data bits. It runs in one of two modes.
//
// User mode. Every access first searches the remap CAM with its address; on a hit the
// access goes to the spare word the CAM names, otherwise to the word itself (search
// and SRAM access happen in the same cycle). Writes are ECC-encoded; reads come back
// one cycle after the request, ECC-corrected, with flags for a corrected error, an
// uncorrectable syndrome and whether a spare served the read. The scrubbing
// controller uses idle cycles to re-read every word periodically and write back
// corrected codewords; its write-back stalls the user (u_ready low) for one cycle.
//
// Test mode. A pulse on test_start (taken in user mode) runs one self-test and repair
// period while the block is otherwise idle: clear the diagnosis CAM; MATS+ BIST over
// all physical words (5 cycles per word); if aging_en, the aging test with the
// on-chip aging sensor (2 write cycles per word); then the remap controller updates
// the remap CAM from the diagnosis CAM by word vulnerability (2F > 1FA > 1F0 > A).
// u_ready is low throughout; test_done pulses when user mode resumes. The test
// overwrites the stored data (the BIST is not transparent), so the owner of the block
// reloads it afterwards. With aging_en low the block behaves as the non-aging
// architecture: only uncorrectable (2F) and correctable (1F0) words exist.
// A spare word the BIST finds faulty is excluded from repair for good (n_bad counts
// them); a word it held is given another spare if one can be had.
// `fail` is sticky: an uncorrectable word was found that no spare could take.
// The block structure follows the document; the arbitration, the mode sequencing and
// the handshake are this design's choices.
module rel_mem_top
  import mem_pkg::*;
#(
  parameter int unsigned N_USER         = N_WORDS,
  parameter int unsigned N_SPR          = N_SPARE,
  parameter int unsigned DIAG_N         = DIAG_ENTRIES,
  parameter int unsigned SCRUB_INTERVAL = 1000000,
  parameter int unsigned DW             = DATA_W,
  parameter int unsigned CW             = DW + hamming_checks(DW),
  parameter int unsigned ADDR_W         = $clog2(N_USER + N_SPR),
  parameter int unsigned IDX_W          = $clog2(N_SPR),
  parameter int unsigned CNT_W          = $clog2(N_SPR + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // user port
  input  logic              u_req,
  input  logic              u_we,
  input  logic [ADDR_W-1:0] u_addr,
  input  logic [DW-1:0]     u_wdata,
  output logic              u_ready,
  output logic              u_rvalid,
  output logic [DW-1:0]     u_rdata,
  output logic              u_rerr,
  output logic              u_runcorr,
  output logic              u_rspare,
  // test control
  input  logic              test_start,
  input  logic              aging_en,
  output logic              test_busy,
  output logic              test_done,
  // status
  output logic              fail,
  output logic              diag_overflow,
  output logic [CNT_W-1:0]  n_2f,
  output logic [CNT_W-1:0]  n_1fa,
  output logic [CNT_W-1:0]  n_1f0,
  output logic [CNT_W-1:0]  n_a,
  output logic [CNT_W-1:0]  n_bad,
  output logic              ev_insert,
  output logic              ev_evict,
  output logic              ev_reclass,
  output logic              ev_drop,
  output logic              ev_spare_fault,
  output logic              ev_scrub_fix,
  output logic              ev_scrub_sweep,
  // remap CAM slot observation
  input  logic [IDX_W-1:0]  obs_idx,
  output logic              obs_valid,
  output logic [ADDR_W-1:0] obs_orig,
  output logic [ADDR_W-1:0] obs_spare
);

  localparam int unsigned WORDS  = N_USER + N_SPR;
  localparam int unsigned DIDX_W = $clog2(DIAG_N);

  typedef enum logic [2:0] {M_USER, M_DRAIN, M_BIST, M_AGING, M_REMAP} mode_e;
  mode_e mode;

  // ---------------- sub-block wires ----------------
  logic              mem_en, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [CW-1:0]     mem_wdata, mem_rdata;

  logic              b_busy, b_done, b_en, b_we, b_fv;
  logic [ADDR_W-1:0] b_addr, b_faddr;
  logic [CW-1:0]     b_wdata, b_fmask;

  logic              a_busy, a_done, a_en, a_we, a_ten, a_sense, a_av;
  logic [ADDR_W-1:0] a_addr, a_saddr, a_aaddr;
  logic [CW-1:0]     a_wdata, a_smask, a_amask;

  logic              s_rd_req, s_rd_gnt, s_wr_req, s_sweeping;
  logic [ADDR_W-1:0] s_addr;
  logic [CW-1:0]     s_wdata;

  logic              r_busy, r_done;
  logic [DIDX_W-1:0] d_idx;
  logic [DIDX_W:0]   d_count;
  logic [ADDR_W-1:0] d_addr, rc_addr, rc_cmd_addr;
  logic [CW-1:0]     d_fault, d_aged;
  logic              rc_hit;
  logic [IDX_W-1:0]  rc_idx, rc_a, rc_b, rc_sidx;
  logic              rc_svalid;
  logic [ADDR_W-1:0] rc_sorig;
  cam_cmd_e          rc_cmd;

  logic [ADDR_W-1:0] acc_addr, acc_phys;
  logic              acc_hit;
  logic [CW-1:0]     u_code, dec_code;
  logic              dec_err, dec_uncorr;
  logic [DW-1:0]     dec_data;

  // ---------------- mode sequencing ----------------
  logic bist_start, aging_start, remap_start;
  assign bist_start  = (mode == M_DRAIN);
  assign aging_start = (mode == M_BIST) && b_done && aging_en;
  assign remap_start = ((mode == M_BIST) && b_done && !aging_en) ||
                       ((mode == M_AGING) && a_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode <= M_USER;
    else unique case (mode)
      M_USER:  if (test_start) mode <= M_DRAIN;
      M_DRAIN: mode <= M_BIST;
      M_BIST:  if (b_done) mode <= aging_en ? M_AGING : M_REMAP;
      M_AGING: if (a_done) mode <= M_REMAP;
      M_REMAP: if (r_done) mode <= M_USER;
      default: mode <= M_USER;
    endcase
  end

  assign test_busy = (mode != M_USER);
  assign test_done = (mode == M_REMAP) && r_done;

  // ---------------- memory port arbitration ----------------
  logic user_go, scrub_rd_go;
  assign user_go     = (mode == M_USER) && u_req && !s_wr_req;
  assign scrub_rd_go = (mode == M_USER) && s_rd_req && !u_req && !s_wr_req;
  assign s_rd_gnt    = scrub_rd_go;
  assign u_ready     = (mode == M_USER) && !s_wr_req;

  assign acc_addr = (s_wr_req || !user_go) ? s_addr : u_addr;

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = acc_phys;
    mem_wdata = u_code;
    unique case (mode)
      M_BIST: begin
        mem_en = b_en; mem_we = b_we; mem_addr = b_addr; mem_wdata = b_wdata;
      end
      M_AGING: begin
        mem_en = a_en; mem_we = a_we; mem_addr = a_addr; mem_wdata = a_wdata;
      end
      default: begin
        if (s_wr_req) begin
          mem_en = 1'b1; mem_we = 1'b1; mem_wdata = s_wdata;
        end else if (user_go) begin
          mem_en = 1'b1; mem_we = u_we;
        end else if (scrub_rd_go) begin
          mem_en = 1'b1;
        end
      end
    endcase
  end

  logic urd_q, spare_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      urd_q   <= 1'b0;
      spare_q <= 1'b0;
    end else begin
      urd_q   <= user_go && !u_we;
      spare_q <= acc_hit;
    end
  end

  assign u_rvalid  = urd_q;
  assign u_rdata   = dec_data;
  assign u_rerr    = urd_q && dec_err;
  assign u_runcorr = urd_q && dec_uncorr;
  assign u_rspare  = urd_q && spare_q;

  // ---------------- blocks ----------------
  sram_sp #(.WORDS(WORDS), .WIDTH(CW), .ADDR_W(ADDR_W)) u_sram (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  ecc_enc #(.DW(DW), .CW(CW)) u_enc (.data_i(u_wdata), .code_o(u_code));

  ecc_dec #(.DW(DW), .CW(CW)) u_dec (
    .code_i(mem_rdata), .data_o(dec_data), .code_o(dec_code), .err_o(dec_err),
    .uncorr_o(dec_uncorr)
  );

  remap_cam #(.ENTRIES(N_SPR), .ADDR_W(ADDR_W), .SPARE_BASE(N_USER), .IDX_W(IDX_W)) u_remap_cam (
    .clk, .rst_n,
    .s_addr(acc_addr), .s_hit(acc_hit), .s_phys(acc_phys),
    .c_addr(rc_addr), .c_hit(rc_hit), .c_idx(rc_idx),
    .c_sidx(rc_sidx), .c_svalid(rc_svalid), .c_sorig(rc_sorig),
    .cmd(rc_cmd), .cmd_a(rc_a), .cmd_b(rc_b), .cmd_addr(rc_cmd_addr),
    .rd_idx(obs_idx), .rd_valid(obs_valid), .rd_orig(obs_orig), .rd_spare(obs_spare)
  );

  diag_cam #(.ENTRIES(DIAG_N), .ADDR_W(ADDR_W), .CW(CW), .IDX_W(DIDX_W)) u_diag_cam (
    .clk, .rst_n, .clr(mode == M_DRAIN),
    .upd_valid((mode == M_BIST) ? b_fv : (mode == M_AGING) && a_av),
    .upd_addr((mode == M_BIST) ? b_faddr : a_aaddr),
    .upd_fault((mode == M_BIST) ? b_fmask : '0),
    .upd_aged((mode == M_AGING) ? a_amask : '0),
    .rd_idx(d_idx), .rd_addr(d_addr), .rd_fault(d_fault), .rd_aged(d_aged),
    .count(d_count), .overflow(diag_overflow)
  );

  mbist_mats #(.WORDS(WORDS), .WIDTH(CW), .ADDR_W(ADDR_W)) u_bist (
    .clk, .rst_n, .start(bist_start), .busy(b_busy), .done(b_done),
    .mem_en(b_en), .mem_we(b_we), .mem_addr(b_addr), .mem_wdata(b_wdata), .mem_rdata(mem_rdata),
    .fail_valid(b_fv), .fail_addr(b_faddr), .fail_mask(b_fmask)
  );

  aging_test #(.WORDS(WORDS), .WIDTH(CW), .ADDR_W(ADDR_W)) u_aging (
    .clk, .rst_n, .start(aging_start), .busy(a_busy), .done(a_done),
    .mem_en(a_en), .mem_we(a_we), .mem_addr(a_addr), .mem_wdata(a_wdata),
    .test_en(a_ten), .sense(a_sense), .sense_addr(a_saddr), .sensor_mask(a_smask),
    .aged_valid(a_av), .aged_addr(a_aaddr), .aged_mask(a_amask)
  );

  ocas_model #(.WORDS(WORDS), .WIDTH(CW), .ADDR_W(ADDR_W)) u_ocas (
    .clk, .test_en(a_ten), .sense(a_sense), .word_addr(a_saddr), .aged_mask(a_smask)
  );

  remap_ctrl #(.S(N_SPR), .N_USER(N_USER), .ADDR_W(ADDR_W), .CW(CW), .DIAG_N(DIAG_N),
               .IDX_W(IDX_W), .DIDX_W(DIDX_W), .CNT_W(CNT_W)) u_remap_ctrl (
    .clk, .rst_n, .start(remap_start), .busy(r_busy), .done(r_done),
    .diag_idx(d_idx), .diag_count(d_count), .diag_addr(d_addr), .diag_fault(d_fault),
    .diag_aged(d_aged),
    .c_addr(rc_addr), .c_hit(rc_hit), .c_idx(rc_idx),
    .c_sidx(rc_sidx), .c_svalid(rc_svalid), .c_sorig(rc_sorig),
    .cmd(rc_cmd), .cmd_a(rc_a), .cmd_b(rc_b), .cmd_addr(rc_cmd_addr),
    .c2f(n_2f), .c1fa(n_1fa), .c1f0(n_1f0), .ca(n_a), .cbad(n_bad), .fail,
    .ev_insert, .ev_evict, .ev_reclass, .ev_drop, .ev_spare_fault
  );

  scrub_ctrl #(.USER(N_USER), .WIDTH(CW), .ADDR_W(ADDR_W), .INTERVAL(SCRUB_INTERVAL)) u_scrub (
    .clk, .rst_n, .enable(mode == M_USER),
    .rd_req(s_rd_req), .rd_gnt(s_rd_gnt), .wr_req(s_wr_req), .addr(s_addr), .wdata(s_wdata),
    .dec_err, .dec_uncorr, .dec_code,
    .sweeping(s_sweeping), .ev_corrected(ev_scrub_fix), .ev_sweep_done(ev_scrub_sweep)
  );

  // user addresses stay inside the user memory
  a_user_addr: assert property (@(posedge clk) disable iff (!rst_n)
    user_go |-> 32'(u_addr) < N_USER)
    else $error("rel_mem_top: user address %0d outside the user memory", u_addr);

endmodule
