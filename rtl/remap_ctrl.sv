// remap_ctrl: extended remap controller, the in-field repair strategy engine.
//
// After the BIST and the aging test have filled the diagnosis CAM, this controller
// walks its entries once and updates the remap CAM so that the spare words always
// hold the most vulnerable words. Words are ranked 2F > 1FA > 1F0 > A.
//
// Remap CAM layout (slot S-1 is the "top"): 2F words occupy the top slots, 1FA words
// sit just below them; slots 0..cbad-1 hold retired (faulty) spare words, 1F0 words
// occupy the slots above them and A words sit just above the 1F0 words; the free
// slots are in the middle. Counters give the region sizes; the next-slot pointers of
// the document follow from them:
//   RC2F = S-1-c2f, RC1FA = S-1-c2f-c1fa, RC1F0 = cbad+c1f0, RCA = cbad+c1f0+ca.
// Per diagnosis entry (1 cycle to fetch, classify and search, then 0..4 CAM commands):
//   - new word, free slot: insert it in its region. Inserting a 2F word moves the top
//     1FA word to the bottom of the 1FA region; inserting a 1F0 word moves the bottom A
//     word to the top of the A region (one SWAP, then a WRITE).
//   - new word, CAM full: evict the entry of the lowest class that is below the new
//     word's class (A, then 1F0, then 1FA), then insert. If there is none the word is
//     dropped and left to ECC; a dropped 2F word sets `fail` (memory failure).
//   - known word whose class changed: remove it from its region (hole moved to the
//     free area by one or two SWAPs, then INVAL), then insert it with its new class.
//   - known word with the same class: nothing.
//   - spare word with a faulty cell: the spare is excluded from repair for good. If it
//     holds a word, that word is removed as above; the now free slot is rotated down
//     into the retired zone (three SWAPs), cbad grows by one, and the word is placed
//     again with its class (insert, evict or drop, as for a new word). Spare words
//     with only aged cells stay in use.
// With no aged cells reported only 2F and 1F0 occur and this reduces exactly to the
// two-pointer scheme of the non-aging architecture (uncorrectable words from the top
// with RC2F, correctable words from the bottom with RC1F, correctable entries
// overwritten when the CAM is full of both). `ev_spare_fault` pulses once per spare
// retired. The strategy, the layout and the exclusion of faulty spares follow the
// document; the command sequencing and the retired zone at the bottom are this
// design's own choices.
module remap_ctrl
  import mem_pkg::*;
#(
  parameter int unsigned S       = N_SPARE,
  parameter int unsigned N_USER  = N_WORDS,
  parameter int unsigned ADDR_W  = 17,
  parameter int unsigned CW      = CODE_W,
  parameter int unsigned DIAG_N  = DIAG_ENTRIES,
  parameter int unsigned IDX_W   = $clog2(S),
  parameter int unsigned DIDX_W  = $clog2(DIAG_N),
  parameter int unsigned CNT_W   = $clog2(S + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // diagnosis CAM read port
  output logic [DIDX_W-1:0] diag_idx,
  input  logic [DIDX_W:0]   diag_count,
  input  logic [ADDR_W-1:0] diag_addr,
  input  logic [CW-1:0]     diag_fault,
  input  logic [CW-1:0]     diag_aged,
  // remap CAM maintenance ports
  output logic [ADDR_W-1:0] c_addr,
  input  logic              c_hit,
  input  logic [IDX_W-1:0]  c_idx,
  input  logic [IDX_W-1:0]  c_sidx,     // slot owning spare address c_addr
  input  logic              c_svalid,
  input  logic [ADDR_W-1:0] c_sorig,    // word held by that slot
  output cam_cmd_e          cmd,
  output logic [IDX_W-1:0]  cmd_a,
  output logic [IDX_W-1:0]  cmd_b,
  output logic [ADDR_W-1:0] cmd_addr,
  // status
  output logic [CNT_W-1:0]  c2f,
  output logic [CNT_W-1:0]  c1fa,
  output logic [CNT_W-1:0]  c1f0,
  output logic [CNT_W-1:0]  ca,
  output logic [CNT_W-1:0]  cbad,       // retired spare words
  output logic              fail,
  output logic              ev_insert,
  output logic              ev_evict,
  output logic              ev_reclass,
  output logic              ev_drop,
  output logic              ev_spare_fault
);

  typedef enum logic [3:0] {
    IDLE, FETCH, REM1, REM2, REM_INV, EVICT, INS_SWAP, INS_WR, RET1, RET2, RET3, PLACE, FIN
  } state_e;

  state_e            state, state_n;
  logic [DIDX_W:0]   i_q;
  logic [ADDR_W-1:0] addr_q;
  wstat_e            new_q, old_q, victim_q;
  logic [IDX_W-1:0]  hit_q;
  logic [IDX_W-1:0]  hole_q;
  logic              ret_q;    // removal is part of a spare retirement
  logic              reins_q;  // a word must be placed again after the retirement

  // classification of the entry being fetched
  wstat_e      f_cls, f_old;
  int unsigned f_nf;
  always_comb begin
    f_nf = 0;
    for (int b = 0; b < CW; b++) f_nf += 32'(diag_fault[b]);
    f_cls = classify(f_nf, |(diag_aged & ~diag_fault));
  end

  // class of a slot, from the region sizes
  function automatic wstat_e slot_class(input int idx);
    if (idx >= int'(S) - int'(c2f))                       return ST_2F;
    else if (idx >= int'(S) - int'(c2f) - int'(c1fa))     return ST_1FA;
    else if (idx < int'(cbad))                            return ST_H;
    else if (idx < int'(cbad) + int'(c1f0))               return ST_1F0;
    else if (idx < int'(cbad) + int'(c1f0) + int'(ca))    return ST_A;
    else                                                  return ST_H;
  endfunction

  // a lower-class entry that a word of class c may take the slot of
  function automatic logic has_victim(input wstat_e c);
    return (ca != 0 && c > ST_A) || (c1f0 != 0 && c > ST_1F0) || (c1fa != 0 && c > ST_1FA);
  endfunction
  function automatic wstat_e victim_of(input wstat_e c);
    if (ca != 0 && c > ST_A)          return ST_A;
    else if (c1f0 != 0 && c > ST_1F0) return ST_1F0;
    else                              return ST_1FA;
  endfunction

  logic   full, f_spare, f_retire;
  wstat_e f_scls;
  assign full     = (int'(cbad) + int'(c2f) + int'(c1fa) + int'(c1f0) + int'(ca)) >= int'(S);
  assign f_old    = slot_class(int'(c_idx));
  assign f_scls   = slot_class(int'(c_sidx));
  assign f_spare  = 32'(diag_addr) >= N_USER;
  // a faulty spare word not yet retired
  assign f_retire = f_spare && 32'(diag_addr) < N_USER + S && f_nf != 0 && c_sidx >= IDX_W'(cbad);

  assign diag_idx = i_q[DIDX_W-1:0];
  assign c_addr   = diag_addr;
  assign busy     = (state != IDLE);

  // region boundaries (current counts)
  int top2f, hi_free, lo_free, lo_1f0;
  always_comb begin
    top2f   = int'(S) - 1 - int'(c2f);               // RC2F
    hi_free = int'(S) - 1 - int'(c2f) - int'(c1fa);  // RC1FA
    lo_1f0  = int'(cbad) + int'(c1f0);               // RC1F0
    lo_free = int'(cbad) + int'(c1f0) + int'(ca);    // RCA
  end

  // command outputs and next state
  always_comb begin
    state_n  = state;
    cmd      = CAM_NOP;
    cmd_a    = '0;
    cmd_b    = '0;
    cmd_addr = addr_q;
    unique case (state)
      IDLE:  if (start) state_n = FETCH;
      FETCH: begin
        if (i_q >= diag_count) state_n = FIN;
        else if (f_retire) state_n = c_svalid ? REM1 : RET1;
        else if (f_spare || f_cls == ST_H) state_n = FETCH;
        else if (c_hit) state_n = (f_old == f_cls) ? FETCH : REM1;
        else if (!full) state_n = INS_SWAP;
        else if (has_victim(f_cls)) state_n = EVICT;
        else state_n = FETCH;
      end
      PLACE: begin
        if (!full) state_n = INS_SWAP;
        else if (has_victim(new_q)) state_n = EVICT;
        else state_n = FETCH;
      end
      REM1: begin
        cmd   = CAM_SWAP;
        cmd_a = hit_q;
        unique case (old_q)
          ST_2F:   cmd_b = IDX_W'(int'(S) - int'(c2f));
          ST_1FA:  cmd_b = IDX_W'(int'(S) - int'(c2f) - int'(c1fa));
          ST_1F0:  cmd_b = IDX_W'(lo_1f0 - 1);
          default: cmd_b = IDX_W'(lo_free - 1);
        endcase
        if ((old_q == ST_2F && c1fa != 0) || (old_q == ST_1F0 && ca != 0)) state_n = REM2;
        else state_n = REM_INV;
      end
      REM2: begin
        // hole_q is at the inner edge of the shrunk region; move it past the next region
        cmd   = CAM_SWAP;
        cmd_a = hole_q;
        cmd_b = (old_q == ST_2F) ? IDX_W'(int'(hole_q) - int'(c1fa))
                                 : IDX_W'(int'(hole_q) + int'(ca));
        state_n = REM_INV;
      end
      REM_INV: begin
        cmd     = CAM_INVAL;
        cmd_a   = hole_q;
        state_n = ret_q ? RET1 : INS_SWAP;
      end
      // retirement: free slot hole_q -> first free slot -> bottom of A -> bottom of 1F0
      RET1: begin
        cmd = CAM_SWAP; cmd_a = hole_q; cmd_b = IDX_W'(lo_free);
        state_n = RET2;
      end
      RET2: begin
        cmd = CAM_SWAP; cmd_a = IDX_W'(lo_free); cmd_b = IDX_W'(lo_1f0);
        state_n = RET3;
      end
      RET3: begin
        cmd = CAM_SWAP; cmd_a = IDX_W'(lo_1f0); cmd_b = IDX_W'(cbad);
        state_n = reins_q ? PLACE : FETCH;
      end
      EVICT: begin
        cmd   = CAM_INVAL;
        unique case (victim_q)
          ST_A:    cmd_a = IDX_W'(lo_free - 1);
          ST_1F0:  cmd_a = IDX_W'(lo_1f0 - 1);
          default: cmd_a = IDX_W'(int'(S) - int'(c2f) - int'(c1fa));
        endcase
        state_n = INS_SWAP;
      end
      INS_SWAP: begin
        state_n = INS_WR;
        if (new_q == ST_2F && c1fa != 0) begin
          cmd = CAM_SWAP; cmd_a = IDX_W'(top2f); cmd_b = IDX_W'(hi_free);
        end else if (new_q == ST_1F0 && ca != 0) begin
          cmd = CAM_SWAP; cmd_a = IDX_W'(lo_1f0); cmd_b = IDX_W'(lo_free);
        end
      end
      INS_WR: begin
        cmd = CAM_WRITE;
        unique case (new_q)
          ST_2F:   cmd_a = IDX_W'(top2f);
          ST_1FA:  cmd_a = IDX_W'(hi_free);
          ST_1F0:  cmd_a = IDX_W'(lo_1f0);
          default: cmd_a = IDX_W'(lo_free);
        endcase
        state_n = FETCH;
      end
      FIN:     state_n = IDLE;
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      i_q      <= '0;
      addr_q   <= '0;
      new_q    <= ST_H;
      old_q    <= ST_H;
      victim_q <= ST_H;
      hit_q    <= '0;
      hole_q   <= '0;
      ret_q    <= 1'b0;
      reins_q  <= 1'b0;
      cbad     <= '0;
      c2f      <= '0;
      c1fa     <= '0;
      c1f0     <= '0;
      ca       <= '0;
      fail     <= 1'b0;
    end else begin
      state <= state_n;
      unique case (state)
        IDLE: i_q <= '0;
        FETCH: if (i_q < diag_count) begin
          i_q <= i_q + 1'b1;
          if (f_retire) begin
            // the word on the faulty spare keeps its class when placed again
            addr_q  <= c_sorig;
            new_q   <= f_scls;
            old_q   <= f_scls;
            hit_q   <= c_sidx;
            hole_q  <= c_sidx;
            ret_q   <= 1'b1;
            reins_q <= c_svalid;
          end else begin
            addr_q   <= diag_addr;
            new_q    <= f_cls;
            old_q    <= f_old;
            hit_q    <= c_idx;
            ret_q    <= 1'b0;
            victim_q <= victim_of(f_cls);
            if (!f_spare && !c_hit && full && f_cls == ST_2F && state_n == FETCH)
              fail <= 1'b1;
          end
        end
        PLACE: begin
          victim_q <= victim_of(new_q);
          if (full && new_q == ST_2F && state_n == FETCH) fail <= 1'b1;
        end
        RET3: cbad <= cbad + 1'b1;
        REM1: begin
          unique case (old_q)
            ST_2F:   begin c2f  <= c2f - 1'b1;  hole_q <= IDX_W'(int'(S) - int'(c2f)); end
            ST_1FA:  begin c1fa <= c1fa - 1'b1; hole_q <= IDX_W'(int'(S) - int'(c2f) - int'(c1fa)); end
            ST_1F0:  begin c1f0 <= c1f0 - 1'b1; hole_q <= IDX_W'(lo_1f0 - 1); end
            default: begin ca   <= ca - 1'b1;   hole_q <= IDX_W'(lo_free - 1); end
          endcase
        end
        REM2: hole_q <= (old_q == ST_2F) ? IDX_W'(int'(hole_q) - int'(c1fa))
                                         : IDX_W'(int'(hole_q) + int'(ca));
        EVICT: unique case (victim_q)
          ST_A:    ca   <= ca - 1'b1;
          ST_1F0:  c1f0 <= c1f0 - 1'b1;
          default: c1fa <= c1fa - 1'b1;
        endcase
        INS_WR: unique case (new_q)
          ST_2F:   c2f  <= c2f + 1'b1;
          ST_1FA:  c1fa <= c1fa + 1'b1;
          ST_1F0:  c1f0 <= c1f0 + 1'b1;
          default: ca   <= ca + 1'b1;
        endcase
        default: ;
      endcase
    end
  end

  // event strobes
  always_comb begin
    ev_insert      = (state == INS_WR);
    ev_evict       = (state == EVICT);
    ev_reclass     = (state == REM1) && !ret_q;
    ev_spare_fault = (state == RET3);
    ev_drop        = ((state == FETCH) && (i_q < diag_count) && !f_spare &&
                      f_cls != ST_H && !c_hit && full && state_n == FETCH) ||
                     ((state == PLACE) && state_n == FETCH);
  end
  assign done = (state == FIN);

  // region sizes never exceed the CAM
  a_regions_fit: assert property (@(posedge clk) disable iff (!rst_n)
    int'(cbad) + int'(c2f) + int'(c1fa) + int'(c1f0) + int'(ca) <= int'(S))
    else $error("remap_ctrl: regions overflow the remap CAM");

endmodule
