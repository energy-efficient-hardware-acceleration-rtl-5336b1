// tb_maha_schedule_table: checks the micro-code store: NOP after reset,
// random configuration writes, and asynchronous read at every address.
module tb_maha_schedule_table;
  import maha_pkg::*;

  localparam int unsigned DEPTH = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we;
  logic [7:0] waddr, pc;
  ucode_t wdata, instr;
  ucode_t model [DEPTH];

  maha_schedule_table #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .we_i(we), .waddr_i(waddr),
    .wdata_i(wdata), .pc_i(pc), .instr_o(instr));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; wdata = '0; pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(DEPTH); i++) begin
      model[i] = '0;
      pc = 8'(i); #1;
      checks++;
      if (instr.op != OP_NOP || instr != '0) begin failures++; $display("FAIL reset entry %0d", i); end
    end
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      we    = 1;
      waddr = 8'($urandom);
      wdata = ucode_t'({$urandom, $urandom});
      @(posedge clk);
      model[waddr] = wdata;
      #1 we = 0;
    end
    for (int i = 0; i < int'(DEPTH); i++) begin
      pc = 8'(i); #1;
      checks++;
      if (instr != model[i]) begin failures++; $display("FAIL entry %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
