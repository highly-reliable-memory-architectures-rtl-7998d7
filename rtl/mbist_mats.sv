// mbist_mats: word-oriented MATS+ memory BIST that locates faulty bits.
//
// Runs the march  {any(w0); up(r0,w1); down(r1,w0)}  over every physical word,
// user and spare, with all-zero and all-one data backgrounds on the raw codeword
// (ECC bypassed, so every cell is seen). That is 5 operations per word, 5*WORDS
// port cycles in all, plus one cycle to finish. Reads return one cycle after they are
// issued, so the compare of a read happens in the cycle of the following write.
// Every read that differs from the expected value produces a one-cycle report
// {fail_addr, fail_mask}; fail_mask has a 1 for each mismatching bit. The diagnosis
// CAM merges the reports of the two read elements per word.
// Interface: pulse `start`; `busy` is high while the BIST owns the memory port and
// `done` pulses once at the end. The memory contents are left all zero: the test is
// not transparent, so the system reloads the block's data after a test period.
// MATS+ and its 5*(N+Ns) operation count follow the document; the data backgrounds
// and the non-transparent form are this design's choices.
module mbist_mats #(
  parameter int unsigned WORDS  = 100050,
  parameter int unsigned WIDTH  = 21,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // memory port
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WIDTH-1:0]  mem_wdata,
  input  logic [WIDTH-1:0]  mem_rdata,
  // fault reports
  output logic              fail_valid,
  output logic [ADDR_W-1:0] fail_addr,
  output logic [WIDTH-1:0]  fail_mask
);

  typedef enum logic [2:0] {IDLE, M0_W0, M1_R0, M1_W1, M2_R1, M2_W0, FIN} state_e;

  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(WORDS - 1);

  state_e            state;
  logic [ADDR_W-1:0] addr;
  logic              cmp_q;      // a read was issued last cycle
  logic [WIDTH-1:0]  exp_q;
  logic [ADDR_W-1:0] cmp_addr_q;

  assign busy = (state != IDLE);
  assign done = (state == FIN);

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = addr;
    mem_wdata = '0;
    unique case (state)
      M0_W0:   begin mem_en = 1'b1; mem_we = 1'b1; mem_wdata = '0; end
      M1_R0:   begin mem_en = 1'b1; end
      M1_W1:   begin mem_en = 1'b1; mem_we = 1'b1; mem_wdata = '1; end
      M2_R1:   begin mem_en = 1'b1; end
      M2_W0:   begin mem_en = 1'b1; mem_we = 1'b1; mem_wdata = '0; end
      default: ;
    endcase
  end

  // compare the word read in the previous cycle
  assign fail_mask  = cmp_q ? (mem_rdata ^ exp_q) : '0;
  assign fail_valid = cmp_q && (fail_mask != '0);
  assign fail_addr  = cmp_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      addr       <= '0;
      cmp_q      <= 1'b0;
      exp_q      <= '0;
      cmp_addr_q <= '0;
    end else begin
      cmp_q      <= (state == M1_R0) || (state == M2_R1);
      exp_q      <= (state == M2_R1) ? '1 : '0;
      cmp_addr_q <= addr;
      unique case (state)
        IDLE:  if (start) begin state <= M0_W0; addr <= '0; end
        M0_W0: if (addr == LAST) begin state <= M1_R0; addr <= '0; end
               else addr <= addr + 1'b1;
        M1_R0: state <= M1_W1;
        M1_W1: if (addr == LAST) state <= M2_R1;  // M2 runs downwards from LAST
               else begin addr <= addr + 1'b1; state <= M1_R0; end
        M2_R1: state <= M2_W0;
        M2_W0: if (addr == '0) state <= FIN;
               else begin addr <= addr - 1'b1; state <= M2_R1; end
        FIN:   state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
