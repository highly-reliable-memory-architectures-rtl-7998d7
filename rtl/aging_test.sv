// aging_test: sequencer of the in-field aging test over all physical words.
//
// For each word, user and spare, it performs the two writes the aging sensor needs,
// the inverse background (all ones) and then the background (all zeros), and asserts
// `sense` during the second write so that the sensor compares the word's cells with
// its reference cell. The sensor answers with an aged-cell mask one cycle later; a
// non-zero mask is reported on {aged_valid, aged_addr, aged_mask} for the diagnosis
// CAM. That is 2 extra write cycles per word (2*WORDS cycles plus 2 to drain).
// `test_en` powers the sensor for the whole run. Pulse `start`; `done` pulses at the end.
// The two-write procedure and its 2-cycle cost follow the document; word-parallel
// sensing (one mask per word rather than one cell at a time) is this design's choice.
module aging_test #(
  parameter int unsigned WORDS  = 100050,
  parameter int unsigned WIDTH  = 21,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // memory port (writes only)
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WIDTH-1:0]  mem_wdata,
  // aging sensor
  output logic              test_en,
  output logic              sense,
  output logic [ADDR_W-1:0] sense_addr,
  input  logic [WIDTH-1:0]  sensor_mask,
  // reports
  output logic              aged_valid,
  output logic [ADDR_W-1:0] aged_addr,
  output logic [WIDTH-1:0]  aged_mask
);

  typedef enum logic [2:0] {IDLE, W_INV, W_ORIG, DRAIN, FIN} state_e;

  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(WORDS - 1);

  state_e            state;
  logic [ADDR_W-1:0] addr;
  logic              sensed_q;
  logic [ADDR_W-1:0] sensed_addr_q;

  assign busy       = (state != IDLE);
  assign done       = (state == FIN);
  assign test_en    = busy;
  assign mem_en     = (state == W_INV) || (state == W_ORIG);
  assign mem_we     = mem_en;
  assign mem_addr   = addr;
  assign mem_wdata  = (state == W_INV) ? '1 : '0;
  assign sense      = (state == W_ORIG);
  assign sense_addr = addr;

  assign aged_valid = sensed_q && (sensor_mask != '0);
  assign aged_addr  = sensed_addr_q;
  assign aged_mask  = sensed_q ? sensor_mask : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= IDLE;
      addr          <= '0;
      sensed_q      <= 1'b0;
      sensed_addr_q <= '0;
    end else begin
      sensed_q      <= sense;
      sensed_addr_q <= addr;
      unique case (state)
        IDLE:   if (start) begin state <= W_INV; addr <= '0; end
        W_INV:  state <= W_ORIG;
        W_ORIG: if (addr == LAST) state <= DRAIN;
                else begin addr <= addr + 1'b1; state <= W_INV; end
        DRAIN:  state <= FIN;
        FIN:    state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
