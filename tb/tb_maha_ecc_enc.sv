// tb_maha_ecc_enc: checks the SECDED encoder at K = 64 and K = 4096.
//
// The reference builds the whole extended-Hamming code word explicitly: data
// bits placed in order at positions that are not powers of two, then check
// bit j = XOR of every code-word bit whose position has bit j set, and the
// parity bit = XOR of all bits. Random and single-hot data are compared.
module tb_maha_ecc_enc;
  import maha_pkg::*;

  localparam int unsigned KS = 64,   RS = ecc_r(KS);
  localparam int unsigned KL = 4096, RL = ecc_r(KL);

  int checks = 0, failures = 0;

  logic [KS-1:0] ds;  logic [RS-1:0] cs;  logic ps;
  logic [KL-1:0] dl;  logic [RL-1:0] cl;  logic pl;

  maha_ecc_enc #(.K(KS)) u_s (.data_i(ds), .check_o(cs), .parity_o(ps));
  maha_ecc_enc #(.K(KL)) u_l (.data_i(dl), .check_o(cl), .parity_o(pl));

  // reference: returns {parity, check}
  function automatic logic [RL:0] ref_code(input logic [KL-1:0] d, input int k, input int r);
    logic cw [8192];
    int   idx;
    logic [RL:0] res;
    idx = 0;
    for (int p = 0; p < 8192; p++) cw[p] = 1'b0;
    for (int p = 1; idx < k; p++)
      if ((p & (p - 1)) != 0) begin
        cw[p] = d[idx];
        idx++;
      end
    res = '0;
    for (int j = 0; j < r; j++)
      for (int p = 1; p <= k + r; p++)
        if (((p >> j) & 1) == 1 && (p & (p - 1)) != 0) res[j] ^= cw[p];
    res[r] = ^d;
    for (int j = 0; j < r; j++) res[r] ^= res[j];
    return res;
  endfunction

  task automatic check_s(input logic [KS-1:0] d);
    logic [RL:0] e;
    ds = d; #1;
    e = ref_code(KL'(d), KS, RS);
    checks++;
    if ({ps, cs} != e[RS:0]) begin
      failures++;
      $display("FAIL K=64 data=%h got %b/%h exp %h", d, ps, cs, e[RS:0]);
    end
  endtask

  task automatic check_l(input logic [KL-1:0] d);
    logic [RL:0] e;
    dl = d; #1;
    e = ref_code(d, KL, RL);
    checks++;
    if ({pl, cl} != e) begin
      failures++;
      $display("FAIL K=4096 got %b/%h exp %h", pl, cl, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KL-1:0] v;
    // code sizes of the source design's ECC unit (512 bytes) and LUT segment
    checks++; if (RL != 13) begin failures++; $display("FAIL R(4096)=%0d", RL); end
    checks++; if (RS != 7)  begin failures++; $display("FAIL R(64)=%0d", RS); end
    check_s('0);
    for (int i = 0; i < KS; i++) check_s(KS'(1) << i);
    for (int t = 0; t < 200; t++) check_s({$urandom, $urandom});
    check_l('0);
    for (int t = 0; t < 20; t++) begin
      for (int w = 0; w < KL / 32; w++) v[w*32 +: 32] = $urandom;
      check_l(v);
    end
    for (int t = 0; t < 20; t++) check_l(KL'(1) << $urandom_range(KL - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
