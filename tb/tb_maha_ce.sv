// tb_maha_ce: checks the control engine with 4 MLB status lines, 4 slots and
// a 4-word result FIFO.
//
// Covered: start ignored in storage mode; start pulse and base address in
// compute mode; run low while any MLB is busy or flags an ECC error and while
// the FIFO is full; slot counter advancing on run cycles only and wrapping;
// run and stall counters; results pushed on run cycles only and popped in
// order; error report with the lowest flagging MLB and resume; done when
// all MLBs have halted; abort when compute mode is left.
module tb_maha_ce;
  import maha_pkg::*;

  localparam int unsigned N = 4, SLOTS = 4, DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic mode, start, resume, pop;
  logic cfg_en, running, done, err, fatal, out_valid, mstart, run, eclr;
  logic [1:0] err_mlb, slot;
  logic [7:0] base;
  logic [7:0] mbase;
  word_t out_data;
  logic [31:0] cycles, stalls;
  logic [N-1:0] busy, halted, single, double;
  chan_t up;

  maha_ce #(.N_MLB(N), .PC_W(8), .SLOTS(SLOTS), .FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .mode_i(mode), .start_i(start), .base_pc_i(base), .resume_i(resume),
    .pop_i(pop), .cfg_en_o(cfg_en), .running_o(running), .done_o(done), .err_o(err),
    .err_fatal_o(fatal), .err_mlb_o(err_mlb), .out_valid_o(out_valid), .out_data_o(out_data),
    .cycles_o(cycles), .stalls_o(stalls), .mlb_start_o(mstart), .mlb_base_pc_o(mbase),
    .run_o(run), .err_clr_o(eclr), .slot_o(slot), .busy_i(busy), .halted_i(halted),
    .single_i(single), .double_i(double), .up_i(up));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = 0; start = 0; resume = 0; pop = 0; base = 8'd17;
    busy = '0; halted = '1; single = '0; double = '0; up = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("cfg enabled in storage mode", cfg_en);
    start = 1; #1;
    check("no start in storage mode", !mstart);
    @(negedge clk);
    check("idle", !running && !run);
    start = 0; mode = 1; #1;
    check("cfg disabled in compute mode", !cfg_en);
    start = 1; #1;
    check("start pulse", mstart && mbase == 8'd17);
    @(negedge clk);
    start = 0; halted = '0;
    check("running", running && run && slot == 0);
    // four free run cycles: slot wraps
    repeat (4) @(negedge clk);
    check($sformatf("slot wrapped %0d", slot), slot == 0 && cycles == 4);
    // busy MLB stalls everything
    busy[2] = 1; #1;
    check("stall on busy", !run);
    repeat (3) @(negedge clk);
    check("slot frozen", slot == 0 && cycles == 4 && stalls == 3);
    busy[2] = 0;
    @(negedge clk);
    check("slot moves", slot == 1);
    // ECC errors: lowest flagging MLB reported, stall until resume
    single[3] = 1; double[1] = 1; #1;
    check("err stall", !run && err && fatal && err_mlb == 2'd1);
    @(negedge clk);
    resume = 1; #1;
    check("err clear pulse", eclr);
    single = '0; double = '0;
    @(negedge clk) resume = 0;
    check("resumed", run);
    // results: push only on run cycles, FIFO full stalls
    for (int i = 0; i < 6; i++) begin
      up = '{valid: 1'b1, data: 32'h100 + i};
      if (i == 1) busy[0] = 1;      // a stalled cycle must not push
      @(negedge clk);
      busy[0] = 0;
    end
    up = '0;
    check($sformatf("fifo full stall run=%b", run), !run && out_valid);
    // 0x101 was offered in a stalled cycle and 0x105 when full: neither enters
    for (int i = 0; i < 4; i++) begin
      word_t e;
      e = (i == 0) ? 32'h100 : 32'h101 + i;
      check($sformatf("pop %0d got %h", i, out_data), out_data == e);
      pop = 1;
      @(negedge clk);
    end
    pop = 0;
    check("fifo empty", !out_valid && run);
    // all halted: done
    halted = '1;
    @(negedge clk);
    check("done", done && !running);
    // restart and abort by leaving compute mode
    start = 1;
    @(negedge clk) start = 0;
    halted = '0;
    check("restarted", running && cycles == 0);
    mode = 0;
    @(negedge clk);
    check("aborted", !running && !done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
