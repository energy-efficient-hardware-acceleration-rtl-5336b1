// tb_maha_flash_array: checks program and narrow read of the MLB data blocks
// on a reduced array (2 blocks x 4 pages of 2 KB, 4096-bit segments): data
// integrity, the RD_LAT-cycle latency from request to rd_valid_o, busy_o
// over the whole read and requests ignored while busy.
module tb_maha_flash_array;
  import maha_pkg::*;

  localparam int unsigned BLOCKS = 2, PAGES = 4, SEG_BITS = 4096, RD_LAT = 5;
  localparam int unsigned SEGS = BLOCKS * PAGES * 4, AW = $clog2(SEGS);
  localparam int unsigned CW = SEG_BITS + ecc_r(SEG_BITS) + 1;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, prog, rd, busy, valid;
  logic [AW-1:0] paddr, raddr;
  logic [CW-1:0] pdata, rdata;
  logic [CW-1:0] model [SEGS];

  maha_flash_array #(.BLOCKS(BLOCKS), .PAGES(PAGES), .SEG_BITS(SEG_BITS), .RD_LAT(RD_LAT)) dut (
    .clk, .rst_n, .prog_i(prog), .prog_addr_i(paddr), .prog_data_i(pdata),
    .rd_i(rd), .rd_addr_i(raddr), .busy_o(busy), .rd_valid_o(valid), .rd_data_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    prog = 0; rd = 0; paddr = '0; raddr = '0; pdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < int'(SEGS); s++) begin
      @(negedge clk);
      prog = 1; paddr = AW'(s);
      for (int w = 0; w < (CW + 31) / 32; w++) pdata[w*32 +: 32] = $urandom;
      model[s] = pdata;
    end
    @(negedge clk) prog = 0;
    for (int t = 0; t < 60; t++) begin
      int s;
      s = $urandom_range(SEGS - 1);
      @(negedge clk);
      rd = 1; raddr = AW'(s);
      @(negedge clk);
      // a second request during the read must be ignored
      raddr = AW'((s + 1) % SEGS);
      rd = (t % 2 == 0);
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low after request"); end
      lat = 0;   // clock edges after the one that took the request
      while (!valid) begin
        @(negedge clk);
        rd = 0;
        lat++;
        if (lat > 50) break;
      end
      checks += 2;
      if (lat != RD_LAT) begin failures++; $display("FAIL latency %0d exp %0d", lat, RD_LAT); end
      if (rdata != model[s]) begin failures++; $display("FAIL data seg %0d", s); end
      @(negedge clk);
      checks++;
      if (busy || valid) begin failures++; $display("FAIL not idle after read"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
