// maha_xbar: programmable crossbar (CB) of one interconnect node.
//
// The MLBs talk over a hierarchy of buses with a crossbar at every level.
// One crossbar node connects FAN child channels and the channel from its
// parent. Each output is a multiplexer over all FAN+1 inputs, as drawn in the
// source design; its select comes from configuration bits. Because the
// interconnect is time-multiplexed and the schedule is fixed at mapping time,
// every output holds one select per time slot: `slot_i` (from the control
// engine) picks the current one, so the same wires carry different signals in
// different cycles.
//
// Ports: up_i[c] comes up from child c, dn_i comes down from the parent,
// dn_o[c] goes down to child c, up_o goes up to the parent. Outputs are
// numbered 0..FAN-1 (children) and FAN (parent), inputs likewise. Select
// value 0 drives an empty channel, k selects input k-1. A channel is never
// sent back where it came from (child c to child c, parent to parent): such a
// select also gives an empty channel, so no configuration can close a
// combinational loop through the tree.
// The select table clears to 0 on reset and is written one entry per cycle
// (cfg_we_i, slot, output, select). The routing is combinational. The slot
// count is an implementation choice.
module maha_xbar
  import maha_pkg::*;
#(
  parameter int unsigned FAN   = 2,
  parameter int unsigned SLOTS = 64,
  localparam int unsigned N    = FAN + 1,
  localparam int unsigned SW   = $clog2(SLOTS),
  localparam int unsigned OW   = $clog2(N),
  localparam int unsigned SELW = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [SW-1:0]   slot_i,
  input  logic            cfg_we_i,
  input  logic [SW-1:0]   cfg_slot_i,
  input  logic [OW-1:0]   cfg_out_i,
  input  logic [SELW-1:0] cfg_sel_i,
  input  chan_t           up_i [FAN],
  input  chan_t           dn_i,
  output chan_t           dn_o [FAN],
  output chan_t           up_o
);

  logic [SELW-1:0] sel_q [SLOTS][N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SLOTS); s++)
        for (int o = 0; o < int'(N); o++) sel_q[s][o] <= '0;
    end else if (cfg_we_i && 32'(cfg_out_i) < N) begin
      sel_q[cfg_slot_i][cfg_out_i] <= cfg_sel_i;
    end
  end

  // towards the parent: any child
  always_comb begin
    up_o = '0;
    for (int i = 0; i < int'(FAN); i++)
      if (32'(sel_q[slot_i][FAN]) == i + 1) up_o = up_i[i];
  end

  // towards child o: any other child, or the parent
  always_comb begin
    for (int o = 0; o < int'(FAN); o++) begin
      dn_o[o] = '0;
      for (int i = 0; i < int'(FAN); i++)
        if (i != o && 32'(sel_q[slot_i][o]) == i + 1) dn_o[o] = up_i[i];
      if (32'(sel_q[slot_i][o]) == FAN + 1) dn_o[o] = dn_i;
    end
  end

endmodule
