// diag_cam: extended diagnosis CAM that collects faulty and aged bit locations.
//
// During test mode the BIST and the aging test report words in which they saw a
// faulty or an aged cell, as {address, faulty-bit mask, aged-bit mask}. The address
// is the tag: a report for a word already present is ORed into its masks (the same
// bit found several times, or different bits found by different march elements,
// accumulate in one entry); a report for a new word takes the next free entry. When
// all entries are used a report for a new word is lost and `overflow` is set.
// An entry is ADDR_W + 2*CODE_W bits (17 + 21 + 21 = 59 at the defaults). `clr`
// empties the CAM at the start of each test period. The remap controller reads the
// entries by index after the test (rd_* is combinational). One update per cycle.
// The entry format and sizes follow the document; clearing per test period and the
// fill-in-order allocation are this design's choices.
module diag_cam
  import mem_pkg::*;
#(
  parameter int unsigned ENTRIES = DIAG_ENTRIES,
  parameter int unsigned ADDR_W  = 17,
  parameter int unsigned CW      = CODE_W,
  parameter int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              upd_valid,
  input  logic [ADDR_W-1:0] upd_addr,
  input  logic [CW-1:0]     upd_fault,
  input  logic [CW-1:0]     upd_aged,
  input  logic [IDX_W-1:0]  rd_idx,
  output logic [ADDR_W-1:0] rd_addr,
  output logic [CW-1:0]     rd_fault,
  output logic [CW-1:0]     rd_aged,
  output logic [IDX_W:0]    count,
  output logic              overflow
);

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [CW-1:0]     fault;
    logic [CW-1:0]     aged;
  } entry_t;

  entry_t           ent [ENTRIES];
  logic [ENTRIES-1:0] valid;
  logic             hit;
  logic [IDX_W-1:0] hit_idx;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (valid[i] && ent[i].addr == upd_addr) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      valid    <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else if (upd_valid) begin
      if (hit) begin
        ent[hit_idx].fault <= ent[hit_idx].fault | upd_fault;
        ent[hit_idx].aged  <= ent[hit_idx].aged  | upd_aged;
      end else if (32'(count) < ENTRIES) begin
        ent[count[IDX_W-1:0]] <= '{addr: upd_addr, fault: upd_fault, aged: upd_aged};
        valid[count[IDX_W-1:0]] <= 1'b1;
        count <= count + 1'b1;
      end else begin
        overflow <= 1'b1;
      end
    end
  end

  assign rd_addr  = ent[rd_idx].addr;
  assign rd_fault = ent[rd_idx].fault;
  assign rd_aged  = ent[rd_idx].aged;

endmodule
