// ecc_enc: single-error-correcting Hamming encoder (16 data bits -> 21-bit codeword).
//
// Codeword bit i holds Hamming position i+1. Positions that are powers of two
// (1, 2, 4, 8, 16) carry check bits; the data bits fill the remaining positions in
// ascending order. Check bit 2^k is the XOR of every position whose index has bit k
// set, so a single flipped bit later yields its own position as the syndrome.
// Purely combinational. SEC with 5 check bits for a 16-bit word follows the baseline
// codeword of 21 bits; the bit placement is the classic Hamming layout.
module ecc_enc
  import mem_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned CW = DW + hamming_checks(DW)
) (
  input  logic [DW-1:0] data_i,
  output logic [CW-1:0] code_o
);

  always_comb begin
    int unsigned d;
    logic [CW-1:0] c;
    c = '0;
    d = 0;
    for (int unsigned pos = 1; pos <= CW; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        c[pos-1] = data_i[d];
        d++;
      end
    end
    for (int unsigned k = 0; (1 << k) <= CW; k++) begin
      logic p;
      p = 1'b0;
      for (int unsigned pos = 1; pos <= CW; pos++)
        if (((pos >> k) & 1) == 1 && pos != (1 << k)) p ^= c[pos-1];
      c[(1 << k)-1] = p;
    end
    code_o = c;
  end

endmodule
