// maha_ecc_enc: SECDED check-bit generator for one Flash code word.
//
// NAND Flash protects each 512-byte (4096-bit) unit with a code that corrects
// one bit and detects two; the check bits are stored interleaved with the
// data. This encoder produces them when the write buffer is programmed into
// the array. It is an extended Hamming code: data bit i sits at the i-th
// code-word position that is not a power of two (see maha_pkg::ecc_pos); the
// R check bits are the XOR of the positions of all data bits that are one,
// and `parity_o` makes the parity of the whole code word (data, check bits,
// parity) even. Purely combinational.
//
// Parameters: K data bits (4096 for a data segment, 64 for a function-table
// segment). The code construction is this implementation's choice; the
// source design only states the correction and detection strength.
module maha_ecc_enc
  import maha_pkg::*;
#(
  parameter int unsigned K = 4096,
  localparam int unsigned R = ecc_r(K)
) (
  input  logic [K-1:0] data_i,
  output logic [R-1:0] check_o,
  output logic         parity_o
);

  // Check bit j is the parity of the data bits whose position has bit j set.
  // All R masks are built in one pass over the code-word positions.
  function automatic logic [R-1:0][K-1:0] check_masks();
    logic [R-1:0][K-1:0] m;
    int unsigned idx;
    idx = 0;
    for (int unsigned p = 1; idx < K; p++) begin
      if ((p & (p - 1)) != 0) begin
        for (int unsigned j = 0; j < R; j++) m[j][idx] = p[j];
        idx++;
      end
    end
    return m;
  endfunction

  localparam logic [R-1:0][K-1:0] MASKS = check_masks();

  for (genvar j = 0; j < int'(R); j++) begin : g_check
    assign check_o[j] = ^(data_i & MASKS[j]);
  end

  assign parity_o = ^{data_i, check_o};

endmodule
