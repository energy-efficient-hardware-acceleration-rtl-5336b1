// tb_maha_xbar: checks one crossbar node (FAN = 3 children, 8 slots).
//
// A random select table is written through the configuration port and kept
// in a model; then for every slot and random channel contents each output is
// compared with the model, which applies the select encoding (0 empty,
// k input k-1) and the rule that a channel never goes back where it came from.
module tb_maha_xbar;
  import maha_pkg::*;

  localparam int unsigned FAN = 3, SLOTS = 8, N = FAN + 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we;
  logic [2:0] slot, cslot;
  logic [1:0] cout;
  logic [2:0] csel;
  chan_t up_i [FAN], dn_o [FAN], dn_i, up_o;
  int model [SLOTS][N];

  maha_xbar #(.FAN(FAN), .SLOTS(SLOTS)) dut (.clk, .rst_n, .slot_i(slot), .cfg_we_i(we),
    .cfg_slot_i(cslot), .cfg_out_i(cout), .cfg_sel_i(csel), .up_i, .dn_i, .dn_o, .up_o);

  always #5 clk = ~clk;

  function automatic chan_t expect_out(int o, int s);
    int sel;
    sel = model[s][o];
    if (sel == 0 || sel - 1 == o) return '0;
    if (sel - 1 < int'(FAN)) return up_i[sel-1];
    return dn_i;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; cslot = '0; cout = '0; csel = '0; slot = '0; dn_i = '0;
    for (int c = 0; c < int'(FAN); c++) up_i[c] = '0;
    for (int s = 0; s < int'(SLOTS); s++) for (int o = 0; o < int'(N); o++) model[s][o] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        we = 1; cslot = 3'($urandom); cout = 2'($urandom_range(N - 1)); csel = 3'($urandom_range(N));
        @(posedge clk);
        model[cslot][cout] = csel;
        #1 we = 0;
      end
      for (int t = 0; t < 200; t++) begin
        @(negedge clk);
        slot = 3'($urandom);
        for (int c = 0; c < int'(FAN); c++) up_i[c] = '{valid: 1'($urandom), data: $urandom};
        dn_i = '{valid: 1'($urandom), data: $urandom};
        #1;
        for (int o = 0; o < int'(FAN); o++) begin
          checks++;
          if (dn_o[o] != expect_out(o, slot)) begin
            failures++; $display("FAIL slot %0d down %0d sel %0d", slot, o, model[slot][o]);
          end
        end
        checks++;
        if (up_o != expect_out(FAN, slot)) begin
          failures++; $display("FAIL slot %0d up sel %0d", slot, model[slot][FAN]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
