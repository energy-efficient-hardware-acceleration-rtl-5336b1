// tb_maha_function_table: checks the LUT block at its full size (one Flash
// block of 128 x 2 KB pages, 32768 segments of 72 stored bits): programs
// random segments, then reads them back and checks the one-cycle read latency.
module tb_maha_function_table;
  import maha_pkg::*;

  localparam int unsigned SEGS = 32768, AW = 15, CW = 72;
  int checks = 0, failures = 0;
  logic clk = 0, prog, rd;
  logic [AW-1:0] paddr, raddr;
  logic [CW-1:0] pdata, rdata;
  logic [CW-1:0] model [int];

  maha_function_table dut (.clk, .prog_i(prog), .prog_addr_i(paddr), .prog_data_i(pdata),
    .rd_i(rd), .rd_addr_i(raddr), .rd_data_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] keys [$];
    prog = 0; rd = 0; paddr = '0; raddr = '0; pdata = '0;
    checks++;
    if (SEGS != 2048 * 8 * 128 / LUT_W) begin failures++; $display("FAIL size"); end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      prog  = 1;
      paddr = (t == 0) ? '0 : (t == 1) ? '1 : AW'($urandom);
      pdata = {8'($urandom), $urandom, $urandom};
      @(posedge clk);
      if (!model.exists(paddr)) keys.push_back(paddr);
      model[paddr] = pdata;
    end
    @(negedge clk) prog = 0;
    foreach (keys[k]) begin
      @(negedge clk);
      rd = 1; raddr = keys[k];
      @(posedge clk); #1;
      rd = 0;
      checks++;
      if (rdata != model[keys[k]]) begin failures++; $display("FAIL seg %0d", keys[k]); end
      // output holds while no read is requested
      @(posedge clk); #1;
      checks++;
      if (rdata != model[keys[k]]) begin failures++; $display("FAIL hold seg %0d", keys[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
