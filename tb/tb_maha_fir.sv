// tb_maha_fir: a 4-tap FIR filter on all 16 MLBs of the default-size array.
//
// Each MLB filters its own 16 samples, held in one Flash data segment:
// y[n] = h0*x[n] + h1*x[n+1] + h2*x[n+2] + h3*x[n+3], n = 0..11. The taps
// live in the MLB's function table and are fetched with LUT; the samples are
// brought in with one narrow read and picked from the data buffer with LDB.
// The loop body is 16 micro-code words, so every MLB produces one output per
// 16 run cycles. MLB m starts its loop m cycles later than MLB 0, so the 16
// MLBs take turns on the single channel to the top of the interconnect: every
// one of the 64 time slots carries one MLB's output, and the crossbar tables
// route slot s from MLB (s - first) mod 16. The host drains the result FIFO
// at half the production rate, so the array also stalls on a full FIFO.
//
// Checked: all 192 outputs in the expected interleaved order, values
// computed here from the samples and taps, and the run length of
// 8 + 15 + 16*12 + 1 = 216 run cycles.
module tb_maha_fir;
  import maha_pkg::*;

  localparam int N = 16, TAPS = 4, NOUT = 12, BODY = 16, PRO = 8;

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

  task automatic to_top(int mlb, int slot);
    int k;
    k = mlb / 2;
    cfg_wr(CFG_XBAR, 17 + k, (2 << 8) | slot, 64'((mlb % 2) + 1));
    cfg_wr(CFG_XBAR, 9 + k,  (1 << 8) | slot, 64'd1);
    cfg_wr(CFG_XBAR, 1 + k,  (1 << 8) | slot, 64'd1);
    cfg_wr(CFG_XBAR, 0,      (8 << 8) | slot, 64'(k + 1));
  endtask

  word_t x [N][16];
  word_t h [N][TAPS];
  word_t expect_q [$], got [$];

  always @(negedge clk) begin
    pop <= 1'b0;
    if (out_valid && !pop) begin
      got.push_back(out_data);
      pop <= 1'b1;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int send_pos, fifo_full_stalls;
    cfg = '0; mode = 0; start = 0; resume = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < N; m++) begin
      for (int w = 0; w < 64; w++) begin
        logic [63:0] v;
        v = {$urandom, $urandom};
        if (w < 8) begin x[m][2*w] = v[31:0]; x[m][2*w+1] = v[63:32]; end
        cfg_wr(CFG_WBUF, m, w, v);
      end
      cfg_wr(CFG_PROG, m, 3 + m, '0);
      for (int k = 0; k < TAPS; k++) h[m][k] = $urandom_range(255);
      cfg_wr(CFG_LUT, m, 0, {h[m][1], h[m][0]});
      cfg_wr(CFG_LUT, m, 1, {h[m][3], h[m][2]});
    end
    // micro-code: prologue, m NOPs, loop, HALT
    for (int m = 0; m < N; m++) begin
      int a, loop;
      a = 0;
      for (int k = 0; k < TAPS; k++) cfg_wr(CFG_SCHED, m, a++, I(OP_LUT, 10 + k, 0, 0, k));
      cfg_wr(CFG_SCHED, m, a++, I(OP_MOVI, 1, 0, 0, 3 + m));
      cfg_wr(CFG_SCHED, m, a++, I(OP_NRD,  0, 1, 0, 0));
      cfg_wr(CFG_SCHED, m, a++, I(OP_MOVI, 2, 0, 0, 0));
      cfg_wr(CFG_SCHED, m, a++, I(OP_MOVI, 3, 0, 0, NOUT));
      for (int d = 0; d < m; d++) cfg_wr(CFG_SCHED, m, a++, I(OP_NOP, 0, 0, 0, 0));
      loop = a;
      cfg_wr(CFG_SCHED, m, a++, I(OP_LDB, 5, 2, 0, 0));
      cfg_wr(CFG_SCHED, m, a++, I(OP_MUL, 6, 5, 10, 0));
      for (int k = 1; k < TAPS; k++) begin
        cfg_wr(CFG_SCHED, m, a++, I(OP_LDB, 5, 2, 0, k));
        cfg_wr(CFG_SCHED, m, a++, I(OP_MUL, 7, 5, 10 + k, 0));
        cfg_wr(CFG_SCHED, m, a++, I(OP_ADD, 6, 6, 7, 0));
      end
      send_pos = a - loop;
      cfg_wr(CFG_SCHED, m, a++, I(OP_SEND, 0, 6, 0, 0));
      cfg_wr(CFG_SCHED, m, a++, I(OP_NOP,  0, 0, 0, 0));
      cfg_wr(CFG_SCHED, m, a++, I(OP_NOP,  0, 0, 0, 0));
      cfg_wr(CFG_SCHED, m, a++, I(OP_ADDI, 2, 2, 0, 1));
      cfg_wr(CFG_SCHED, m, a++, I(OP_BNE,  0, 2, 3, loop));
      check("loop body length", a - loop == BODY);
      cfg_wr(CFG_SCHED, m, a++, I(OP_HALT, 0, 0, 0, 0));
    end
    // MLB m sends in run cycle PRO + m + send_pos + 16n, i.e. on slot +1
    for (int m = 0; m < N; m++)
      for (int n = 0; n < 64 / BODY; n++) to_top(m, (PRO + m + send_pos + 1 + BODY * n) % 64);
    for (int n = 0; n < NOUT; n++)
      for (int m = 0; m < N; m++) begin
        word_t y;
        y = '0;
        for (int k = 0; k < TAPS; k++) y += x[m][n+k] * h[m][k];
        expect_q.push_back(y);
      end

    @(negedge clk) mode = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    fifo_full_stalls = 0;
    for (int c = 0; c < 100000 && !done; c++) begin
      @(negedge clk);
      if (dut.u_ce.fifo_full) fifo_full_stalls++;
    end
    repeat (40) @(negedge clk);
    check("done", done && !err);
    check($sformatf("run cycles %0d", cycles), cycles == PRO + (N - 1) + BODY * NOUT + 1);
    check($sformatf("FIFO-full stalls seen (%0d)", fifo_full_stalls), fifo_full_stalls > 0);
    check($sformatf("%0d outputs", got.size()), got.size() == N * NOUT);
    for (int i = 0; i < expect_q.size() && i < got.size(); i++)
      check($sformatf("y[mlb %0d][%0d] = %h exp %h", i % N, i / N, got[i], expect_q[i]),
            got[i] == expect_q[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
