// ecc_dec: single-error-correcting Hamming decoder (21-bit codeword -> 16 data bits).
//
// The syndrome is the XOR of the positions (1-based) of all set codeword bits. Zero
// means no error; a value 1..21 names the single flipped bit, which is inverted; any
// larger value cannot come from one flipped bit and is flagged uncorrectable. Two
// flipped bits usually give a wrong in-range syndrome: with SEC only, a 2-bit error
// is not reliably detected, which is why such words must be repaired by remapping.
// Outputs the corrected data and the corrected codeword (the latter feeds scrubbing).
// Purely combinational.
module ecc_dec
  import mem_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned CW = DW + hamming_checks(DW)
) (
  input  logic [CW-1:0] code_i,
  output logic [DW-1:0] data_o,
  output logic [CW-1:0] code_o,   // corrected codeword
  output logic          err_o,    // non-zero syndrome
  output logic          uncorr_o  // syndrome points outside the codeword
);

  localparam int unsigned SW = $clog2(CW + 1);

  always_comb begin
    logic [SW-1:0] syn;
    logic [CW-1:0] c;
    int unsigned d;
    syn = '0;
    for (int unsigned pos = 1; pos <= CW; pos++)
      if (code_i[pos-1]) syn ^= SW'(pos);
    c = code_i;
    uncorr_o = 1'b0;
    if (syn != '0) begin
      if (32'(syn) <= CW) c[syn-1] = ~c[syn-1];
      else uncorr_o = 1'b1;
    end
    err_o  = (syn != '0);
    code_o = c;
    data_o = '0;
    d = 0;
    for (int unsigned pos = 1; pos <= CW; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        data_o[d] = c[pos-1];
        d++;
      end
    end
  end

endmodule
