// mem_pkg: constants and types shared by the ECC-protected, self-repairing memory.
//
// The default sizes are the baseline organisation: 100,000 user words and 50 spare
// words of 21 bits (16 data bits plus 5 Hamming check bits), a remap CAM with one
// entry per spare word and a 256-entry diagnosis CAM. Word status types rank a word
// by how close it is to becoming uncorrectable under single-error correction; their
// numeric encoding is the repair priority (higher value = repaired first). The
// classification rule follows the five-type model (2F, 1FA, 1F0, A, H); the binary
// encoding and the command set of the remap CAM are this design's own choices.
package mem_pkg;

  localparam int unsigned DATA_W       = 16;
  localparam int unsigned N_WORDS      = 100000;
  localparam int unsigned N_SPARE      = 50;
  localparam int unsigned DIAG_ENTRIES = 256;

  // Number of Hamming check bits needed for single-error correction of d data bits.
  function automatic int unsigned hamming_checks(input int unsigned d);
    int unsigned p;
    p = 1;
    while ((1 << p) < d + p + 1) p++;
    return p;
  endfunction

  localparam int unsigned CODE_W = DATA_W + hamming_checks(DATA_W);  // 21

  // Word status types, ordered by repair priority.
  typedef enum logic [2:0] {
    ST_H   = 3'd0,  // all cells healthy
    ST_A   = 3'd1,  // one or more aged cells, no faulty cell
    ST_1F0 = 3'd2,  // one faulty cell, no aged cell
    ST_1FA = 3'd3,  // one faulty cell and one or more aged cells
    ST_2F  = 3'd4   // two or more faulty cells: uncorrectable
  } wstat_e;

  // Commands of the remap CAM maintenance port.
  typedef enum logic [1:0] {
    CAM_NOP   = 2'd0,
    CAM_WRITE = 2'd1,  // store an original address in slot a, mark it valid
    CAM_SWAP  = 2'd2,  // exchange whole slots a and b (both addresses and valid)
    CAM_INVAL = 2'd3   // clear the valid bit of slot a
  } cam_cmd_e;

  // Classify a word from its number of faulty cells and whether a non-faulty cell is aged.
  function automatic wstat_e classify(input int unsigned n_faulty, input logic any_aged);
    if (n_faulty >= 2)      return ST_2F;
    else if (n_faulty == 1) return any_aged ? ST_1FA : ST_1F0;
    else if (any_aged)      return ST_A;
    else                    return ST_H;
  endfunction

endpackage
