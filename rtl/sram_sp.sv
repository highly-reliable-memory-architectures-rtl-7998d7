// sram_sp: the physical word array, user words followed by spare words.
//
// Addresses 0..USER-1 are the user memory and USER..USER+SPARE-1 the spare memory
// that the remap CAM hands out. One synchronous port: a write stores wdata at the
// clock edge; a read returns the addressed word on rdata one cycle later (rdata is
// registered). Keeping user and spare words in one array lets the memory BIST test
// both with the same sequence. Writing it as a plain array stands in for the SRAM
// macro of a real chip; contents are not reset.
module sram_sp #(
  parameter int unsigned WORDS  = 100050,
  parameter int unsigned WIDTH  = 21,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
