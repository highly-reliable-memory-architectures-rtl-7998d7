// scrub_ctrl: periodic scrubbing of correctable errors in user mode.
//
// Every INTERVAL clock cycles (counted while idle) it sweeps all USER logical words
// in address order. For each word it issues a read through the normal access path
// (so a remapped word is scrubbed in its spare), and in the next cycle looks at the
// ECC decoder: if the decoder corrected a single-bit error, the corrected codeword
// is written back to the same location. This removes a soft error before a second
// one can hit the same word.
// Port sharing: a scrub read is only a request (`rd_req`); the memory system grants
// it (`rd_gnt`) in a cycle without a user access. The write-back (`wr_req`) must be
// taken in the cycle right after the read, so it is not a request: the memory system
// stalls the user for that one cycle. `enable` low (test mode) holds the sweep where
// it is; a read already granted still gets its write-back.
// Periodic scrubbing with write-back through the ECC follows the document; the sweep
// order, the write-back-only-on-error rule and the arbitration are this design's.
module scrub_ctrl #(
  parameter int unsigned USER     = 100000,
  parameter int unsigned WIDTH    = 21,
  parameter int unsigned ADDR_W   = 17,
  parameter int unsigned INTERVAL = 1000000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  // memory access (logical address)
  output logic              rd_req,
  input  logic              rd_gnt,
  output logic              wr_req,
  output logic [ADDR_W-1:0] addr,
  output logic [WIDTH-1:0]  wdata,
  // decoder result for the word read in the previous cycle
  input  logic              dec_err,
  input  logic              dec_uncorr,
  input  logic [WIDTH-1:0]  dec_code,
  // status
  output logic              sweeping,
  output logic              ev_corrected,  // one-cycle pulse per word written back
  output logic              ev_sweep_done
);

  localparam int unsigned TW = $clog2(INTERVAL + 1);

  logic [TW-1:0]     timer;
  logic [ADDR_W-1:0] ptr;
  logic              chk_q;   // a granted read returns this cycle
  logic [ADDR_W-1:0] chk_addr_q;

  assign rd_req       = sweeping && enable && !chk_q;
  assign wr_req       = chk_q && dec_err && !dec_uncorr;
  assign addr         = wr_req ? chk_addr_q : ptr;
  assign wdata        = dec_code;
  assign ev_corrected = wr_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer         <= '0;
      ptr           <= '0;
      sweeping      <= 1'b0;
      chk_q         <= 1'b0;
      chk_addr_q    <= '0;
      ev_sweep_done <= 1'b0;
    end else begin
      chk_q         <= rd_req && rd_gnt;
      chk_addr_q    <= ptr;
      ev_sweep_done <= 1'b0;
      if (!sweeping) begin
        if (enable) begin
          if (32'(timer) >= INTERVAL - 1) begin
            timer    <= '0;
            sweeping <= 1'b1;
            ptr      <= '0;
          end else begin
            timer <= timer + 1'b1;
          end
        end
      end else if (rd_req && rd_gnt) begin
        if (32'(ptr) == USER - 1) begin
          sweeping      <= 1'b0;
          ev_sweep_done <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

endmodule
