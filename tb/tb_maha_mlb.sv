// tb_maha_mlb: runs micro-code on one MLB (reduced Flash: 2 blocks x 2
// pages, 16 segments of 4096 bits; 64-entry schedule table; RD_LAT = 3).
//
// The testbench plays the control engine: it configures the MLB (data
// segments through the write buffer, function-table segments, micro-code),
// then raises run whenever the MLB is neither busy nor reporting an ECC
// error, and records every word the MLB sends. The program
//   - narrow-reads a segment and sums its first 8 words in a loop
//     (NRD, LDB, ADD, ADDI, BNE), sends the sum;
//   - multiplies, shifts and subtracts, sends the results;
//   - looks up two function-table words (both halves of a segment);
//   - receives a word from the channel and sends it back incremented;
//   - halts.
// Expected values are computed in the testbench from the data it wrote.
// Checked also: stall lengths (RD_LAT + 1 clocks for NRD, 1 for LUT), the
// number of run cycles, single-bit errors corrected and flagged until
// cleared, and a double-bit error flagged as uncorrectable.
module tb_maha_mlb;
  import maha_pkg::*;

  localparam int unsigned BLOCKS = 2, PAGES = 2, RD_LAT = 3, DEPTH = 64;
  localparam int unsigned SEGS = BLOCKS * PAGES * 4;
  localparam int unsigned CW = 4096 + 13 + 1;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_sel, start, run, err_clr, busy, halted, es, ed;
  cfg_t cfg;
  chan_t ch_in, ch_out;

  maha_mlb #(.SCHED_DEPTH(DEPTH), .BLOCKS(BLOCKS), .PAGES(PAGES), .RD_LAT(RD_LAT)) dut (
    .clk, .rst_n, .cfg_sel_i(cfg_sel), .cfg_i(cfg), .start_i(start), .base_pc_i(6'd0),
    .run_i(run), .err_clr_i(err_clr), .busy_o(busy), .halted_o(halted),
    .ecc_single_o(es), .ecc_double_o(ed), .ch_in_i(ch_in), .ch_out_o(ch_out));

  always #5 clk = ~clk;

  logic [31:0] seg_words [SEGS][128];
  logic [63:0] lut_words [8];
  word_t sent [$];
  int run_cycles, busy_cycles, busy_run, longest_busy, lut_stalls;
  logic running;

  assign run = running && !busy && !es && !ed;

  always @(posedge clk) begin
    if (running && run && ch_out.valid) sent.push_back(ch_out.data);
    if (running && run) run_cycles++;
    if (running && busy) begin
      busy_run++;
      busy_cycles++;
    end else if (busy_run > 0) begin
      if (busy_run > longest_busy) longest_busy = busy_run;
      if (busy_run == 1) lut_stalls++;
      busy_run = 0;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_wr(cfg_target_e tg, int addr, logic [63:0] data);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.target = tg; cfg.addr = 32'(addr); cfg.wdata = data;
    @(posedge clk);
    #1 cfg.we = 0;
  endtask

  function automatic logic [63:0] I(opcode_e op, int rd, int rs1, int rs2, int imm);
    ucode_t u;
    u.op = op; u.rd = RA_W'(rd); u.rs1 = RA_W'(rs1); u.rs2 = RA_W'(rs2); u.imm = IMM_W'(imm);
    return 64'(u);
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_prog(int max_cycles);
    sent.delete();
    run_cycles = 0; busy_cycles = 0; busy_run = 0; longest_busy = 0; lut_stalls = 0;
    @(negedge clk) start = 1;
    @(negedge clk) begin start = 0; running = 1; end
    for (int c = 0; c < max_cycles && !halted; c++) @(negedge clk);
    running = 0;
  endtask

  initial begin
    word_t sum, m, rcv;
    int p;
    cfg = '0; cfg_sel = 1; start = 0; err_clr = 0; ch_in = '0; running = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- data segments
    for (int s = 0; s < int'(SEGS); s++) begin
      for (int w = 0; w < 128; w++) seg_words[s][w] = $urandom;
      for (int w = 0; w < 64; w++) cfg_wr(CFG_WBUF, w, {seg_words[s][2*w+1], seg_words[s][2*w]});
      cfg_wr(CFG_PROG, s, '0);
    end
    // ---- function table
    for (int i = 0; i < 8; i++) begin
      lut_words[i] = {$urandom, $urandom};
      cfg_wr(CFG_LUT, i, lut_words[i]);
    end
    // ---- micro-code
    p = 0;
    cfg_wr(CFG_SCHED, p++, I(OP_MOVI, 1, 0, 0, 5));        // 0 r1 = 5
    cfg_wr(CFG_SCHED, p++, I(OP_NRD,  0, 1, 0, 2));        // 1 buffer = seg 7
    cfg_wr(CFG_SCHED, p++, I(OP_MOVI, 2, 0, 0, 0));        // 2 i = 0
    cfg_wr(CFG_SCHED, p++, I(OP_MOVI, 3, 0, 0, 8));        // 3 n = 8
    cfg_wr(CFG_SCHED, p++, I(OP_MOVI, 4, 0, 0, 0));        // 4 sum = 0
    cfg_wr(CFG_SCHED, p++, I(OP_LDB,  5, 2, 0, 3));        // 5 r5 = word[i+3]
    cfg_wr(CFG_SCHED, p++, I(OP_ADD,  4, 4, 5, 0));        // 6 sum += r5
    cfg_wr(CFG_SCHED, p++, I(OP_ADDI, 2, 2, 0, 1));        // 7 i++
    cfg_wr(CFG_SCHED, p++, I(OP_BNE,  0, 2, 3, 5));        // 8 loop
    cfg_wr(CFG_SCHED, p++, I(OP_SEND, 0, 4, 0, 0));        // 9 send sum
    cfg_wr(CFG_SCHED, p++, I(OP_MUL,  6, 4, 5, 0));        // 10 r6 = sum * last
    cfg_wr(CFG_SCHED, p++, I(OP_SEND, 0, 6, 0, 0));        // 11
    cfg_wr(CFG_SCHED, p++, I(OP_SHL,  7, 4, 1, 0));        // 12 r7 = sum << 5
    cfg_wr(CFG_SCHED, p++, I(OP_SHR,  8, 4, 1, 0));        // 13 r8 = sum >> 5
    cfg_wr(CFG_SCHED, p++, I(OP_SUB,  9, 7, 8, 0));        // 14 r9 = r7 - r8
    cfg_wr(CFG_SCHED, p++, I(OP_SEND, 0, 9, 0, 0));        // 15
    cfg_wr(CFG_SCHED, p++, I(OP_LUT, 10, 1, 0, -2));       // 16 r10 = lut word 3 (seg 1 hi)
    cfg_wr(CFG_SCHED, p++, I(OP_LUT, 11, 1, 0, 7));        // 17 r11 = lut word 12 (seg 6 lo)
    cfg_wr(CFG_SCHED, p++, I(OP_ADD, 12, 10, 11, 0));      // 18
    cfg_wr(CFG_SCHED, p++, I(OP_SEND, 0, 12, 0, 0));       // 19
    cfg_wr(CFG_SCHED, p++, I(OP_RECV, 13, 0, 0, 0));       // 20 r13 = channel
    cfg_wr(CFG_SCHED, p++, I(OP_ADDI, 13, 13, 0, 1));      // 21
    cfg_wr(CFG_SCHED, p++, I(OP_SEND, 0, 13, 0, 0));       // 22
    cfg_wr(CFG_SCHED, p++, I(OP_HALT, 0, 0, 0, 0));        // 23
    // expected results
    sum = '0;
    for (int w = 3; w < 11; w++) sum += seg_words[7][w];
    m = sum * seg_words[7][10];
    rcv = 32'hCAFE_0042;
    // the channel word is present throughout; RECV takes it
    ch_in = '{valid: 1'b1, data: rcv};
    @(negedge clk) cfg_sel = 0;
    check("halted after reset", halted);

    run_prog(2000);
    check("halted at end", halted);
    check($sformatf("sent 5 words (%0d)", sent.size()), sent.size() == 5);
    if (sent.size() == 5) begin
      check($sformatf("sum %h exp %h", sent[0], sum), sent[0] == sum);
      check("product", sent[1] == m);
      check("shift/sub", sent[2] == (sum << 5) - (sum >> 5));
      check("lut", sent[3] == lut_words[1][63:32] + lut_words[6][31:0]);
      check("recv", sent[4] == rcv + 1);
    end
    // 5 words before the loop, 8 passes of 4, 15 after it
    check($sformatf("run cycles %0d", run_cycles), run_cycles == 5 + 8 * 4 + 15);
    check($sformatf("NRD stall %0d", longest_busy), longest_busy == RD_LAT + 1);
    check($sformatf("LUT stalls %0d", lut_stalls), lut_stalls == 2);
    check("no ecc flag", !es && !ed);

    // ---- single-bit error in the stored segment: corrected, flagged, held
    dut.u_flash.mem[7][100] = ~dut.u_flash.mem[7][100];
    @(negedge clk);
    sent.delete();
    start = 1;
    @(negedge clk) begin start = 0; running = 1; end
    while (!es) @(negedge clk);
    check("single flagged", es && !ed);
    repeat (5) @(negedge clk);
    check("stalled while flagged", !halted && !run);
    err_clr = 1;
    @(negedge clk) err_clr = 0;
    for (int c = 0; c < 2000 && !halted; c++) @(negedge clk);
    running = 0;
    check("flag cleared", !es);
    check("corrected sum", sent.size() == 5 && sent[0] == sum);

    // ---- double-bit error: uncorrectable
    dut.u_flash.mem[7][200] = ~dut.u_flash.mem[7][200];
    @(negedge clk);
    start = 1;
    @(negedge clk) begin start = 0; running = 1; end
    for (int c = 0; c < 50 && !ed; c++) @(negedge clk);
    check("double flagged", ed && !es);
    running = 0;
    err_clr = 1;
    @(negedge clk) err_clr = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
