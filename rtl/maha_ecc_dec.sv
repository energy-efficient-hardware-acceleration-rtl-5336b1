// maha_ecc_dec: SECDED checker and corrector for one Flash code word.
//
// Applied to every narrow read inside an MLB. It recomputes the check bits of
// the data read (with maha_ecc_enc), XORs them with the stored ones to get the
// syndrome, and checks the overall parity:
//   syndrome 0, parity even      no error
//   parity odd                   one bit flipped: a data bit at the position
//                                the syndrome names is inverted back; a flip
//                                of a check or parity bit leaves the data as is
//   syndrome not 0, parity even  two bits flipped: detected, not correctable
// A syndrome that points past the code word is also reported as
// uncorrectable. `single_o` and `double_o` go to the MLB, which stalls the
// array and reports to the Flash management layer on either. Combinational.
module maha_ecc_dec
  import maha_pkg::*;
#(
  parameter int unsigned K = 4096,
  localparam int unsigned R = ecc_r(K)
) (
  input  logic [K-1:0] data_i,
  input  logic [R-1:0] check_i,
  input  logic         parity_i,
  output logic [K-1:0] data_o,
  output logic         single_o,   // one error seen (corrected if in data)
  output logic         double_o    // uncorrectable error seen
);

  logic [R-1:0] check_calc;
  logic         parity_calc;

  maha_ecc_enc #(.K(K)) u_enc (
    .data_i  (data_i),
    .check_o (check_calc),
    .parity_o(parity_calc)
  );

  logic [R-1:0] syn;
  logic         par_err;

  assign syn     = check_calc ^ check_i;
  // parity_calc covers data and recomputed checks; fold in the stored checks
  // and parity so that only the stored word is judged.
  assign par_err = ^{data_i, check_i, parity_i};

  // one comparator per data bit: does the syndrome name this bit?
  logic [K-1:0] hit;
  // code-word position of every data bit, built in one pass
  function automatic logic [K-1:0][R-1:0] positions();
    logic [K-1:0][R-1:0] pos;
    int unsigned idx;
    idx = 0;
    for (int unsigned p = 1; idx < K; p++) begin
      if ((p & (p - 1)) != 0) begin
        pos[idx] = R'(p);
        idx++;
      end
    end
    return pos;
  endfunction

  localparam logic [K-1:0][R-1:0] POS = positions();

  for (genvar i = 0; i < int'(K); i++) begin : g_hit
    assign hit[i] = (syn == POS[i]);
  end

  logic beyond;
  assign beyond = 32'(syn) > K + R;   // names no position of the code word

  assign single_o = par_err && !beyond;
  assign double_o = (par_err && beyond) || (!par_err && syn != '0);
  assign data_o   = data_i ^ (hit & {K{single_o}});

  // parity_calc is part of the encoder interface; the decoder judges parity
  // over the stored word directly.
  logic unused_parity;
  assign unused_parity = parity_calc;

endmodule
