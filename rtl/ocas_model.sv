// ocas_model: behavioural model of the on-chip aging sensor (OCAS) of an SRAM block.
//
// The real sensor is analog: in test mode the cell array is cut from VDD and fed
// through a sensing node VDD'; after two consecutive writes to the cell under test
// (the inverse of its value, then the value itself) the discharge of VDD' is
// compared with that of a reference cell that never ages. A cell whose node is not
// discharged as far as the reference has a degraded static noise margin and is
// reported as aged. This model replaces the circuit by a table of aged cells:
// `sense` samples the entry for word `word_addr` and drives its aged-cell mask on
// `aged_mask` one clock later (all zero when the word is not in the table or
// `test_en` is low). The table stands for the physical wear of the array, so a
// testbench fills it through mark_aged() or clear_aged(); nothing in the design
// writes it. Table size SLOTS is a model choice, not part of the sensor.
module ocas_model #(
  parameter int unsigned WORDS  = 100050,
  parameter int unsigned WIDTH  = 21,
  parameter int unsigned ADDR_W = $clog2(WORDS),
  parameter int unsigned SLOTS  = 64
) (
  input  logic              clk,
  input  logic              test_en,    // sensor powered, array on VDD'
  input  logic              sense,      // compare VDD' of the word under test
  input  logic [ADDR_W-1:0] word_addr,
  output logic [WIDTH-1:0]  aged_mask
);

  logic              tab_v    [SLOTS];
  logic [ADDR_W-1:0] tab_addr [SLOTS];
  logic [WIDTH-1:0]  tab_mask [SLOTS];

  initial begin
    for (int i = 0; i < SLOTS; i++) begin
      tab_v[i]    = 1'b0;
      tab_addr[i] = '0;
      tab_mask[i] = '0;
    end
    aged_mask = '0;
  end

  // Mark cells of a word as aged (ORed into an existing entry).
  function automatic void mark_aged(input logic [ADDR_W-1:0] a, input logic [WIDTH-1:0] m);
    for (int i = 0; i < SLOTS; i++)
      if (tab_v[i] && tab_addr[i] == a) begin
        tab_mask[i] = tab_mask[i] | m;
        return;
      end
    for (int i = 0; i < SLOTS; i++)
      if (!tab_v[i]) begin
        tab_v[i] = 1'b1; tab_addr[i] = a; tab_mask[i] = m;
        return;
      end
    $error("ocas_model: aged-cell table full");
  endfunction

  function automatic void clear_aged();
    for (int i = 0; i < SLOTS; i++) tab_v[i] = 1'b0;
  endfunction

  always @(posedge clk) begin
    logic [WIDTH-1:0] m;
    m = '0;
    if (test_en && sense)
      for (int i = 0; i < SLOTS; i++)
        if (tab_v[i] && tab_addr[i] == word_addr) m = tab_mask[i];
    aged_mask <= m;
  end

endmodule
