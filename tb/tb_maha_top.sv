// tb_maha_top: end-to-end run of the whole accelerator at its default size
// (16 MLBs in the 8,1,1,2 hierarchy, full 1 GB Flash array).
//
// Workload: a map-reduce kernel. Every MLB narrow-reads one 4096-bit segment
// of its own Flash data, adds three of its words and a function-table word
// (map). The odd MLB of every pair sends its partial result across the
// lowest crossbar to its even neighbour, which adds it (reduce) and sends
// the pair total up through all four crossbar levels to the control engine.
// Eight MLBs share the single channel to the top in eight consecutive time
// slots. Later the odd MLBs send the square of their partial result and the
// even MLBs twice the pair total, 24 results in all, more than the 16-word
// result FIFO holds, so the array stalls until the host drains it.
//
// Also exercised: a single-bit error planted in one MLB's Flash data (the
// array stops, the host sees which MLB, resumes, and the corrected data give
// the right results); a configuration write attempted in compute mode (it
// must be ignored: a second run gives the same results); done and the exact
// number of run cycles (51 for a program whose HALT is at address 50).
// Each mechanism is counted and a failure is counted for one that never
// happened. Expected results are computed here from the data written.
module tb_maha_top;
  import maha_pkg::*;

  localparam int unsigned N = 16, HALT_AT = 50;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic mode, start, resume, pop;
  cfg_t cfg;
  logic out_valid, running, done, err, fatal;
  word_t out_data;
  logic [3:0] err_mlb;
  logic [31:0] cycles, stalls;
  chan_t ext_o;

  maha_top dut (
    .clk, .rst_n, .mode_i(mode), .cfg_i(cfg), .start_i(start), .base_pc_i(8'd0),
    .resume_i(resume), .out_pop_i(pop), .out_valid_o(out_valid), .out_data_o(out_data),
    .running_o(running), .done_o(done), .err_o(err), .err_fatal_o(fatal),
    .err_mlb_o(err_mlb), .cycles_o(cycles), .stalls_o(stalls),
    .ext_ch_i('0), .ext_ch_o(ext_o));

  always #5 clk = ~clk;

  // mechanism counters
  int n_nrd_stall, n_lut_stall, n_ecc_stop, n_resume, n_fifo_full, n_tmux, n_pair_route;
  int n_cfg_blocked, n_done;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cfg_wr(cfg_target_e tg, int unit, int addr, logic [63:0] data);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.target = tg; cfg.unit = 8'(unit);
    cfg.addr = 32'(addr); cfg.wdata = data;
    @(posedge clk);
    #1 cfg.we = 0;
  endtask

  function automatic logic [63:0] I(opcode_e op, int rd, int rs1, int rs2, int imm);
    ucode_t u;
    u.op = op; u.rd = RA_W'(rd); u.rs1 = RA_W'(rs1); u.rs2 = RA_W'(rs2); u.imm = IMM_W'(imm);
    return 64'(u);
  endfunction

  // route helpers: node numbers are root 0, level-1 1..8, level-2 9..16, level-3 17..24
  task automatic xb(int node, int slot, int out, int sel);
    cfg_wr(CFG_XBAR, node, (out << 8) | slot, 64'(sel));
  endtask

  task automatic to_top(int mlb, int slot);
    int k;
    k = mlb / 2;
    xb(17 + k, slot, 2, (mlb % 2) + 1);   // sub-array crossbar: up from this MLB
    xb(9 + k,  slot, 1, 1);               // mat: up from its only child
    xb(1 + k,  slot, 1, 1);               // sub-bank: up
    xb(0,      slot, 8, k + 1);           // bank level (root): up to the engine
  endtask

  word_t data [N][3];
  logic [63:0] lut [N];
  word_t part [N], expect_q [$], got [$];
  int seg_of [N];

  // host: drains the FIFO, slowly and only once it has filled
  logic draining;
  always @(negedge clk) begin
    pop <= 1'b0;
    if (draining && out_valid && !pop) begin
      got.push_back(out_data);
      pop <= 1'b1;
    end
  end

  // mechanism monitor
  logic ecc_seen;
  always @(posedge clk) if (rst_n && running) begin
    if (!dut.run && dut.busy != '0 && dut.g_mlb[0].u_mlb.state_q == 2'd1) n_nrd_stall++;
    if (!dut.run && dut.busy != '0 && dut.g_mlb[0].u_mlb.state_q == 2'd2) n_lut_stall++;
    if (!dut.run && dut.u_ce.fifo_full) n_fifo_full++;
    if (dut.run && dut.top_up.valid) n_tmux++;
    if (dut.run && dut.mlb_in[0].valid) n_pair_route++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  task automatic run_once(int expect_err_mlb);
    got.delete();
    draining = 0;
    ecc_seen = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check("running after start", running);
    for (int c = 0; c < 20000 && !done; c++) begin
      @(negedge clk);
      if (err && !ecc_seen) begin
        ecc_seen = 1;
        n_ecc_stop++;
        check($sformatf("error from MLB %0d", err_mlb), err_mlb == 4'(expect_err_mlb) && !fatal);
        repeat (10) @(negedge clk);
        check("array held during error", running && err && !done);
        resume = 1;
        @(negedge clk) resume = 0;
        n_resume++;
      end
      // start draining only once the FIFO has filled and stalled the array
      if (n_fifo_full > 3) draining = 1;
    end
    draining = 1;
    for (int c = 0; c < 200 && out_valid; c++) @(negedge clk);
    repeat (4) @(negedge clk);
    check("done", done);
    if (done) n_done++;
    check($sformatf("run cycles %0d", cycles), cycles == HALT_AT + 1);
    check($sformatf("24 results (%0d)", got.size()), got.size() == 24);
    for (int i = 0; i < 24 && i < got.size(); i++)
      check($sformatf("result %0d: %h exp %h", i, got[i], expect_q[i]), got[i] == expect_q[i]);
  endtask

  initial begin
    cfg = '0; mode = 0; start = 0; resume = 0; draining = 0;
    n_nrd_stall = 0; n_lut_stall = 0; n_ecc_stop = 0; n_resume = 0; n_fifo_full = 0;
    n_tmux = 0; n_pair_route = 0; n_cfg_blocked = 0; n_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- configuration (storage mode)
    for (int m = 0; m < int'(N); m++) begin
      seg_of[m] = 1000 * m + 7;
      for (int w = 0; w < 64; w++) begin
        logic [63:0] v;
        v = {$urandom, $urandom};
        if (w == 0) begin data[m][0] = v[31:0]; data[m][1] = v[63:32]; end
        if (w == 1) data[m][2] = v[31:0];
        cfg_wr(CFG_WBUF, m, w, v);
      end
      cfg_wr(CFG_PROG, m, seg_of[m], '0);
      lut[m] = {$urandom, $urandom};
      cfg_wr(CFG_LUT, m, 5, lut[m]);
      part[m] = data[m][0] + data[m][1] + data[m][2] + lut[m][63:32];
    end
    for (int m = 0; m < int'(N); m++) begin
      int k;
      k = m / 2;
      for (int a = 0; a <= int'(HALT_AT); a++) begin
        logic [63:0] u;
        u = I(OP_NOP, 0, 0, 0, 0);
        case (a)
          0: u = I(OP_MOVI, 1, 0, 0, seg_of[m]);
          1: u = I(OP_NRD,  0, 1, 0, 0);
          2: u = I(OP_LDB,  2, 0, 0, 0);
          3: u = I(OP_LDB,  3, 0, 0, 1);
          4: u = I(OP_ADD,  4, 2, 3, 0);
          5: u = I(OP_LDB,  3, 0, 0, 2);
          6: u = I(OP_ADD,  4, 4, 3, 0);
          7: u = I(OP_LUT,  5, 0, 0, 11);          // segment 5, upper word
          8: u = I(OP_ADD,  4, 4, 5, 0);
          default: ;
        endcase
        if (m % 2 == 1) begin
          if (a == 9)       u = I(OP_SEND, 0, 4, 0, 0);      // to the even neighbour, slot 10
          if (a == 10)      u = I(OP_MUL,  8, 4, 4, 0);
          if (a == 29 + k)  u = I(OP_SEND, 0, 8, 0, 0);      // to the top, slot 30+k
        end else begin
          if (a == 10)      u = I(OP_RECV, 6, 0, 0, 0);
          if (a == 11)      u = I(OP_ADD,  7, 4, 6, 0);
          if (a == 12 + k)  u = I(OP_SEND, 0, 7, 0, 0);      // to the top, slot 13+k
          if (a == 21)      u = I(OP_MOVI, 10, 0, 0, 1);
          if (a == 22)      u = I(OP_SHL,  9, 7, 10, 0);
          if (a == 40 + k)  u = I(OP_SEND, 0, 9, 0, 0);      // to the top, slot 41+k
        end
        if (a == int'(HALT_AT)) u = I(OP_HALT, 0, 0, 0, 0);
        cfg_wr(CFG_SCHED, m, a, u);
      end
    end
    for (int k = 0; k < 8; k++) begin
      xb(17 + k, 10, 0, 2);     // slot 10: odd MLB up, down to the even one
      to_top(2 * k, 13 + k);
      to_top(2 * k + 1, 30 + k);
      to_top(2 * k, 41 + k);
    end
    for (int k = 0; k < 8; k++) expect_q.push_back(part[2*k] + part[2*k+1]);
    for (int k = 0; k < 8; k++) expect_q.push_back(part[2*k+1] * part[2*k+1]);
    for (int k = 0; k < 8; k++) expect_q.push_back((part[2*k] + part[2*k+1]) << 1);

    // plant a single-bit error in MLB 5's segment
    dut.g_mlb[5].u_mlb.u_flash.mem[seg_of[5]][1234] = ~dut.g_mlb[5].u_mlb.u_flash.mem[seg_of[5]][1234];

    // ---------------- compute mode, first run
    @(negedge clk) mode = 1;
    run_once(5);
    check("stall on narrow read seen", n_nrd_stall > 0);
    check("stall on table lookup seen", n_lut_stall > 0);

    // configuration attempt in compute mode: would turn MLB 0's reduction ADD into a SUB
    cfg_wr(CFG_SCHED, 0, 11, I(OP_SUB, 7, 4, 6, 0));
    if (dut.g_mlb[0].u_mlb.u_sched.table_q[11].op == OP_ADD) n_cfg_blocked++;
    // second run: the stored segment still holds the flipped bit, corrected again
    run_once(5);

    // ---------------- mechanism coverage
    check($sformatf("narrow-read stalls %0d", n_nrd_stall), n_nrd_stall > 0);
    check($sformatf("table-lookup stalls %0d", n_lut_stall), n_lut_stall > 0);
    check($sformatf("ECC stops %0d", n_ecc_stop), n_ecc_stop == 2);
    check($sformatf("resumes %0d", n_resume), n_resume == 2);
    check($sformatf("FIFO-full stalls %0d", n_fifo_full), n_fifo_full > 0);
    check($sformatf("time-multiplexed words to top %0d", n_tmux), n_tmux == 48);
    check($sformatf("pair routes %0d", n_pair_route), n_pair_route == 2);
    check($sformatf("blocked config writes %0d", n_cfg_blocked), n_cfg_blocked == 1);
    check($sformatf("completed runs %0d", n_done), n_done == 2);
    $display("mechanisms: nrd_stall=%0d lut_stall=%0d ecc_stop=%0d resume=%0d fifo_full=%0d tmux=%0d pair=%0d cfg_blocked=%0d done=%0d",
             n_nrd_stall, n_lut_stall, n_ecc_stop, n_resume, n_fifo_full, n_tmux, n_pair_route,
             n_cfg_blocked, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
