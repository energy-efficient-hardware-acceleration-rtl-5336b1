// tb_maha_regfile: checks the dual-ported asynchronous-read register file.
//
// Random writes are mirrored in a model array; both read ports are compared
// with the model every cycle, including reads of the register being written
// (old value until the edge) and the all-zero state after reset.
module tb_maha_regfile;
  import maha_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [RA_W-1:0] ra1, ra2, wa;
  word_t rd1, rd2, wd;
  logic we;
  word_t model [NREG];

  maha_regfile dut (.clk, .rst_n, .ra1_i(ra1), .rd1_o(rd1), .ra2_i(ra2), .rd2_o(rd2),
                    .we_i(we), .wa_i(wa), .wd_i(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = '0; wd = '0; ra1 = '0; ra2 = '0;
    for (int i = 0; i < int'(NREG); i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we  = $urandom_range(1);
      wa  = RA_W'($urandom);
      wd  = $urandom;
      ra1 = RA_W'($urandom);
      ra2 = (t % 7 == 0) ? wa : RA_W'($urandom);
      #1;
      checks += 2;
      if (rd1 != model[ra1]) begin failures++; $display("FAIL port1 r%0d %h exp %h", ra1, rd1, model[ra1]); end
      if (rd2 != model[ra2]) begin failures++; $display("FAIL port2 r%0d %h exp %h", ra2, rd2, model[ra2]); end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
