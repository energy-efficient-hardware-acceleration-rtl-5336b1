// maha_interconnect: hierarchical, time-multiplexed inter-MLB interconnect.
//
// The source design organises the array like a cache data array, in four
// levels (bank, sub-bank, mat, sub-array) with a crossbar at each level; its
// chosen configuration is 8,1,1,2: eight banks, one sub-bank per bank, one mat
// per sub-bank, two MLBs per mat, 16 MLBs in all. This module builds that
// tree from maha_xbar nodes. A node at level l (level 0 is the root) has
// FANl children. Every tree edge is a pair of channels, one up and one down,
// so a word can climb to the lowest common crossbar and descend to its
// destination within one cycle (all routing is combinational).
//
// Node numbering for configuration: the root is node 0, then the nodes of
// level 1, 2 and 3 in order. A CFG_XBAR command writes the select of one
// output of one node for one slot: cfg.unit = node, cfg.addr[7:0] = slot,
// cfg.addr[15:8] = output, cfg.wdata[7:0] = select (see maha_xbar).
//
// The root's parent side is the link to higher levels of the hierarchy:
// `ext_ch_i` enters there and `ext_ch_o` leaves there (the control engine
// collects it as the array's output to the host). Channel count per edge (one)
// and the slot count are implementation choices.
module maha_interconnect
  import maha_pkg::*;
#(
  parameter int unsigned FAN0  = 8,
  parameter int unsigned FAN1  = 1,
  parameter int unsigned FAN2  = 1,
  parameter int unsigned FAN3  = 2,
  parameter int unsigned SLOTS = 64,
  localparam int unsigned N_MLB = FAN0 * FAN1 * FAN2 * FAN3,
  localparam int unsigned SW    = $clog2(SLOTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] slot_i,
  input  logic          cfg_sel_i,
  input  cfg_t          cfg_i,
  input  chan_t         mlb_out_i [N_MLB],
  output chan_t         mlb_in_o  [N_MLB],
  input  chan_t         ext_ch_i,
  output chan_t         ext_ch_o
);

  localparam int unsigned FAN  [IC_LEVELS] = '{FAN0, FAN1, FAN2, FAN3};
  localparam int unsigned NL   [IC_LEVELS] = '{1, FAN0, FAN0 * FAN1, FAN0 * FAN1 * FAN2};
  localparam int unsigned BASE [IC_LEVELS] = '{0, 1, 1 + FAN0, 1 + FAN0 + FAN0 * FAN1};

  // upL[n]: from node n of level L to its parent; dnL[n]: from the parent to
  // node n of level L. Level 4 is the MLBs themselves. Entries past the node
  // count of a level are unused and tied off.
  chan_t up4 [N_MLB], up3 [N_MLB], up2 [N_MLB], up1 [N_MLB], up0 [N_MLB];
  chan_t dn4 [N_MLB], dn3 [N_MLB], dn2 [N_MLB], dn1 [N_MLB], dn0 [N_MLB];

  assign up4      = mlb_out_i;
  assign mlb_in_o = dn4;
  assign dn0[0]   = ext_ch_i;
  assign ext_ch_o = up0[0];

  for (genvar n = 1; n < int'(N_MLB); n++) begin : g_tie0
    assign dn0[n] = '0;
  end

  // One tree level: node n of level L has children n*F .. n*F+F-1 at level L+1.
  `define MAHA_IC_LEVEL(L, UPC, DNC, UPP, DNP)                                  \
  for (genvar n = 0; n < int'(N_MLB); n++) begin : g_lvl``L                     \
    if (n < int'(NL[L])) begin : g_cb                                           \
      localparam int unsigned F    = FAN[L];                                    \
      localparam int unsigned OW   = $clog2(F + 1);                             \
      localparam int unsigned SELW = $clog2(F + 2);                             \
      chan_t xu [F];                                                            \
      chan_t xd [F];                                                            \
      logic  we;                                                                \
      assign we = cfg_sel_i && cfg_i.we && cfg_i.target == CFG_XBAR &&          \
                  32'(cfg_i.unit) == BASE[L] + n;                               \
      for (genvar c = 0; c < int'(F); c++) begin : g_child                      \
        assign xu[c]        = UPC[n*F + c];                                     \
        assign DNC[n*F + c] = xd[c];                                            \
      end                                                                       \
      maha_xbar #(.FAN(F), .SLOTS(SLOTS)) u_cb (                                \
        .clk       (clk),                                                       \
        .rst_n     (rst_n),                                                     \
        .slot_i    (slot_i),                                                    \
        .cfg_we_i  (we),                                                        \
        .cfg_slot_i(cfg_i.addr[SW-1:0]),                                        \
        .cfg_out_i (cfg_i.addr[8 +: OW]),                                       \
        .cfg_sel_i (cfg_i.wdata[SELW-1:0]),                                     \
        .up_i      (xu),                                                        \
        .dn_i      (DNP[n]),                                                    \
        .dn_o      (xd),                                                        \
        .up_o      (UPP[n])                                                     \
      );                                                                        \
    end else begin : g_none                                                     \
      assign UPP[n] = '0;                                                       \
      if (L > 0) begin : g_nodn                                                 \
        assign DNP[n] = '0;                                                     \
      end                                                                       \
    end                                                                         \
  end

  `MAHA_IC_LEVEL(0, up1, dn1, up0, dn0)
  `MAHA_IC_LEVEL(1, up2, dn2, up1, dn1)
  `MAHA_IC_LEVEL(2, up3, dn3, up2, dn2)
  `MAHA_IC_LEVEL(3, up4, dn4, up3, dn3)

  `undef MAHA_IC_LEVEL

endmodule
