// tb_maha_ecc_dec: checks the SECDED decoder at K = 64 and K = 4096.
//
// Code words are built with an independent reference encoder (explicit
// Hamming positions); then no bit, one random bit (data, check or parity) or
// two different random bits are flipped. Expected: clean data and no flag;
// the original data and `single_o`; `double_o` and no `single_o`.
module tb_maha_ecc_dec;
  import maha_pkg::*;

  localparam int unsigned KS = 64,   RS = ecc_r(KS);
  localparam int unsigned KL = 4096, RL = ecc_r(KL);

  int checks = 0, failures = 0;

  logic [KS-1:0] ds, os;  logic [RS-1:0] cs;  logic ps, s1s, s2s;
  logic [KL-1:0] dl, ol;  logic [RL-1:0] cl;  logic pl, s1l, s2l;

  maha_ecc_dec #(.K(KS)) u_s (.data_i(ds), .check_i(cs), .parity_i(ps),
                              .data_o(os), .single_o(s1s), .double_o(s2s));
  maha_ecc_dec #(.K(KL)) u_l (.data_i(dl), .check_i(cl), .parity_i(pl),
                              .data_o(ol), .single_o(s1l), .double_o(s2l));

  function automatic logic [RL:0] ref_code(input logic [KL-1:0] d, input int k, input int r);
    int idx;
    logic [RL:0] res;
    res = '0;
    idx = 0;
    for (int p = 1; idx < k; p++)
      if ((p & (p - 1)) != 0) begin
        for (int j = 0; j < r; j++) if (((p >> j) & 1) == 1) res[j] ^= d[idx];
        idx++;
      end
    res[r] = ^d;
    for (int j = 0; j < r; j++) res[r] ^= res[j];
    return res;
  endfunction

  // nflip bits flipped among the K+R+1 stored bits
  task automatic run_s(input int nflip);
    logic [KS-1:0] d; logic [RL:0] e; logic [KS+RS:0] cw; int a, b;
    d = {$urandom, $urandom};
    e = ref_code(KL'(d), KS, RS);
    cw = {e[RS:0], d};
    a = $urandom_range(KS + RS);
    b = a; while (b == a) b = $urandom_range(KS + RS);
    if (nflip >= 1) cw[a] = ~cw[a];
    if (nflip >= 2) cw[b] = ~cw[b];
    {ps, cs, ds} = cw; #1;
    checks++;
    if (nflip < 2 && (os != d || s1s != (nflip == 1) || s2s)) begin
      failures++; $display("FAIL K=64 flips=%0d bit=%0d single=%b double=%b", nflip, a, s1s, s2s);
    end
    if (nflip == 2 && (!s2s || s1s)) begin
      failures++; $display("FAIL K=64 double not flagged bits %0d %0d", a, b);
    end
  endtask

  task automatic run_l(input int nflip);
    logic [KL-1:0] d; logic [RL:0] e; logic [KL+RL:0] cw; int a, b;
    for (int w = 0; w < KL / 32; w++) d[w*32 +: 32] = $urandom;
    e = ref_code(d, KL, RL);
    cw = {e, d};
    a = $urandom_range(KL + RL);
    b = a; while (b == a) b = $urandom_range(KL + RL);
    if (nflip >= 1) cw[a] = ~cw[a];
    if (nflip >= 2) cw[b] = ~cw[b];
    {pl, cl, dl} = cw; #1;
    checks++;
    if (nflip < 2 && (ol != d || s1l != (nflip == 1) || s2l)) begin
      failures++; $display("FAIL K=4096 flips=%0d bit=%0d single=%b double=%b", nflip, a, s1l, s2l);
    end
    if (nflip == 2 && (!s2l || s1l)) begin
      failures++; $display("FAIL K=4096 double not flagged bits %0d %0d", a, b);
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
    for (int t = 0; t < 100; t++) run_s(0);
    for (int t = 0; t < 300; t++) run_s(1);
    for (int t = 0; t < 300; t++) run_s(2);
    for (int t = 0; t < 10; t++) run_l(0);
    for (int t = 0; t < 30; t++) run_l(1);
    for (int t = 0; t < 30; t++) run_l(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
