// remap_cam: fully associative table that redirects faulty words to spare words.
//
// Each of the ENTRIES slots holds {valid, original address, spare address}, i.e.
// two addresses per entry. At reset slot i owns spare word SPARE_BASE+i and is empty.
// Two search ports compare an address against every valid slot in parallel:
//   - the access port (s_*) is used on every user or scrub access: on a hit the
//     physical address is the slot's spare address, otherwise the address itself;
//   - the maintenance port (c_*) gives the remap controller the index of a hit; the
//     same address is also compared with the spare addresses (c_s*), which tells the
//     controller which slot owns a spare word found faulty and which word it holds.
// The maintenance command port changes the table at the clock edge: WRITE stores a
// new original address in a slot (the slot keeps its spare address), SWAP exchanges
// two whole slots and INVAL drops a slot. Because entries only ever move by swapping,
// every spare word stays owned by exactly one slot. Searches are combinational.
// A slot per spare word and a slot carrying both addresses follow the document; the
// command set and swap-only movement are this design's choices.
module remap_cam
  import mem_pkg::*;
#(
  parameter int unsigned ENTRIES    = N_SPARE,
  parameter int unsigned ADDR_W     = 17,
  parameter int unsigned SPARE_BASE = N_WORDS,
  parameter int unsigned IDX_W      = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // access search port
  input  logic [ADDR_W-1:0] s_addr,
  output logic              s_hit,
  output logic [ADDR_W-1:0] s_phys,
  // maintenance search port
  input  logic [ADDR_W-1:0] c_addr,
  output logic              c_hit,
  output logic [IDX_W-1:0]  c_idx,
  output logic [IDX_W-1:0]  c_sidx,
  output logic              c_svalid,
  output logic [ADDR_W-1:0] c_sorig,
  // maintenance command port
  input  cam_cmd_e          cmd,
  input  logic [IDX_W-1:0]  cmd_a,
  input  logic [IDX_W-1:0]  cmd_b,
  input  logic [ADDR_W-1:0] cmd_addr,
  // slot read-out (observation)
  input  logic [IDX_W-1:0]  rd_idx,
  output logic              rd_valid,
  output logic [ADDR_W-1:0] rd_orig,
  output logic [ADDR_W-1:0] rd_spare
);

  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] orig;
    logic [ADDR_W-1:0] spare;
  } slot_t;

  slot_t slots [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++)
        slots[i] <= '{valid: 1'b0, orig: '0, spare: ADDR_W'(SPARE_BASE + i)};
    end else begin
      unique case (cmd)
        CAM_WRITE: begin
          slots[cmd_a].valid <= 1'b1;
          slots[cmd_a].orig  <= cmd_addr;
        end
        CAM_SWAP: begin
          slots[cmd_a] <= slots[cmd_b];
          slots[cmd_b] <= slots[cmd_a];
        end
        CAM_INVAL: slots[cmd_a].valid <= 1'b0;
        default: ;
      endcase
    end
  end

  always_comb begin
    s_hit  = 1'b0;
    s_phys = s_addr;
    c_hit  = 1'b0;
    c_idx  = '0;
    c_sidx = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (slots[i].valid && slots[i].orig == s_addr) begin
        s_hit  = 1'b1;
        s_phys = slots[i].spare;
      end
      if (slots[i].valid && slots[i].orig == c_addr) begin
        c_hit = 1'b1;
        c_idx = IDX_W'(i);
      end
      if (slots[i].spare == c_addr) c_sidx = IDX_W'(i);
    end
  end

  assign c_svalid = slots[c_sidx].valid;
  assign c_sorig  = slots[c_sidx].orig;

  assign rd_valid = slots[rd_idx].valid;
  assign rd_orig  = slots[rd_idx].orig;
  assign rd_spare = slots[rd_idx].spare;

  // The controller keeps original addresses unique: at most one slot may match.
  always_comb begin
    int n;
    n = 0;
    for (int i = 0; i < ENTRIES; i++) if (slots[i].valid && slots[i].orig == s_addr) n++;
    assert (n <= 1 || !rst_n) else $error("remap_cam: address %0h stored twice", s_addr);
  end

endmodule
