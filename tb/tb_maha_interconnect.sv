// tb_maha_interconnect: routes words between MLB ports through the full
// 8,1,1,2 tree (25 crossbars, 16 leaves).
//
// For random (source, destination) pairs the testbench computes the path
// itself: up from the source to the lowest common crossbar, across, and down
// to the destination, and programs exactly those selects for one slot. It
// then drives every leaf with a distinct word and checks that the
// destination receives the source's word in that slot, that the route
// is idle in another slot, and that a source routed to the top appears on
// ext_ch_o while ext_ch_i reaches a leaf.
module tb_maha_interconnect;
  import maha_pkg::*;

  localparam int unsigned N = 16, SLOTS = 64;
  localparam int unsigned FAN [4] = '{8, 1, 1, 2};
  localparam int unsigned BASE [4] = '{0, 1, 9, 17};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [5:0] slot;
  cfg_t cfg;
  chan_t mo [N], mi [N], ei, eo;

  maha_interconnect dut (.clk, .rst_n, .slot_i(slot), .cfg_sel_i(1'b1), .cfg_i(cfg),
    .mlb_out_i(mo), .mlb_in_o(mi), .ext_ch_i(ei), .ext_ch_o(eo));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int node, int s, int o, int sel);
    @(negedge clk);
    cfg = '0;
    cfg.we = 1; cfg.target = CFG_XBAR; cfg.unit = 8'(node);
    cfg.addr = 32'((o << 8) | s); cfg.wdata = 64'(sel);
    @(posedge clk);
    #1 cfg.we = 0;
  endtask

  // index of the level-l node above leaf m
  function automatic int node_of(int m, int l);
    int d;
    d = 1;
    for (int k = l; k < 4; k++) d = d * FAN[k];
    return m / d;
  endfunction

  // program a route src -> dst (dst = -1: to the top) in slot s
  task automatic route(int src, int dst, int s);
    int l, top;
    top = 0;
    if (dst >= 0)
      for (l = 3; l >= 0; l--) if (node_of(src, l) == node_of(dst, l)) begin top = l; break; end
    // climb: at each level below top the up output selects the child we come from
    for (l = 3; l > top; l--) begin
      int n, c;
      n = node_of(src, l);
      c = (l == 3) ? src % FAN[3] : node_of(src, l + 1) % FAN[l];
      wr(BASE[l] + n, s, FAN[l], c + 1);
    end
    if (dst < 0) begin
      int c;
      c = node_of(src, 1) % FAN[0];
      wr(0, s, FAN[0], c + 1);
      return;
    end
    // turn at the common node: down to the destination's child from the source's child
    begin
      int n, cs, cd;
      n  = node_of(src, top);
      cs = (top == 3) ? src % FAN[3] : node_of(src, top + 1) % FAN[top];
      cd = (top == 3) ? dst % FAN[3] : node_of(dst, top + 1) % FAN[top];
      wr(BASE[top] + n, s, cd, cs + 1);
    end
    // descend: each lower node passes its parent's channel to the child
    for (l = top + 1; l < 4; l++) begin
      int n, c;
      n = node_of(dst, l);
      c = (l == 3) ? dst % FAN[3] : node_of(dst, l + 1) % FAN[l];
      wr(BASE[l] + n, s, c, FAN[l] + 1);
    end
  endtask

  initial begin
    cfg = '0; slot = '0; ei = '0;
    for (int m = 0; m < int'(N); m++) mo[m] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int src, dst, s;
      src = $urandom_range(N - 1);
      dst = $urandom_range(N - 1);
      while (dst == src) dst = $urandom_range(N - 1);
      s = t;   // one slot per pair
      route(src, dst, s);
      @(negedge clk);
      for (int m = 0; m < int'(N); m++) mo[m] = '{valid: 1'b1, data: 32'hA000_0000 + m * 16 + t};
      slot = 6'(s); #1;
      checks++;
      if (mi[dst] != mo[src]) begin failures++; $display("FAIL %0d->%0d got %h", src, dst, mi[dst]); end
      slot = 6'(63); #1;   // slot never configured: nothing arrives
      checks++;
      if (mi[dst].valid) begin failures++; $display("FAIL %0d->%0d leaks into idle slot", src, dst); end
    end
    // to the top and in from the top
    route(5, -1, 50);
    begin
      int dst;
      dst = 12;
      wr(0, 51, node_of(dst, 1) % 8, 9);
      wr(BASE[1] + node_of(dst, 1), 51, 0, 2);
      wr(BASE[2] + node_of(dst, 2), 51, 0, 2);
      wr(BASE[3] + node_of(dst, 3), 51, dst % 2, 3);
      @(negedge clk);
      ei = '{valid: 1'b1, data: 32'h1234_5678};
      slot = 6'd50; #1;
      checks++;
      if (eo != mo[5]) begin failures++; $display("FAIL 5->top got %h", eo); end
      slot = 6'd51; #1;
      checks++;
      if (mi[dst] != ei) begin failures++; $display("FAIL top->12 got %h", mi[dst]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
