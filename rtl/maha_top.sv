// maha_top: MAHA, a malleable hardware accelerator built inside NAND Flash.
//
// The Flash array is partitioned into Memory Logic Blocks (MLBs). Each MLB
// is a group of 256 Flash blocks with a little logic added beside it, turning
// it into a micro-coded processor that computes on the data stored in its own
// blocks; only the results travel to the host. This top joins
//   - N_MLB = FAN0*FAN1*FAN2*FAN3 MLBs (maha_mlb), 16 by default, arranged in
//     an 8,1,1,2 bank / sub-bank / mat / sub-array hierarchy;
//   - the hierarchical time-multiplexed crossbar interconnect between them
//     (maha_interconnect);
//   - the control engine (maha_ce) that the host talks to: mode bit, start
//     at a base address, synchronous stall of all MLBs, ECC error report and
//     resume, and the FIFO of results leaving the top of the interconnect.
// With the defaults the data blocks hold 16 x 255 x 128 pages x 2 KB of
// data plus 16 function-table blocks: the 4096 blocks of a 1 GB Flash.
//
// Host interface: while mode_i = 0 (storage mode) configuration commands on
// cfg_i are accepted (cfg_t: schedule tables, function tables, data segments
// via each MLB's write buffer, crossbar slot tables; cfg.unit names the MLB or
// crossbar node). With mode_i = 1 a start_i pulse runs all MLBs from
// base_pc_i; done_o rises when every MLB has halted. Results appear on
// out_valid_o / out_data_o and are taken with out_pop_i. err_o stops the
// array on an ECC error (err_fatal_o if it could not be corrected, err_mlb_o
// names the MLB) until resume_i. ext_ch_i / ext_ch_o are the link from the
// top crossbar to further levels of hierarchy; ext_ch_o carries the same
// words that enter the result FIFO.
//
// The analog parts of the Flash (sense amplifiers, charge pumps, decoders)
// and its normal storage-mode datapath (FTL, command and status registers)
// belong to the existing memory and are not part of this RTL.
module maha_top
  import maha_pkg::*;
#(
  parameter int unsigned FAN0        = 8,
  parameter int unsigned FAN1        = 1,
  parameter int unsigned FAN2        = 1,
  parameter int unsigned FAN3        = 2,
  parameter int unsigned SCHED_DEPTH = 256,
  parameter int unsigned BLOCKS      = 255,
  parameter int unsigned PAGES       = 128,
  parameter int unsigned PAGE_BYTES  = 2048,
  parameter int unsigned SEG_BITS    = 4096,
  parameter int unsigned RD_LAT      = 4,
  parameter int unsigned SLOTS       = 64,
  parameter int unsigned FIFO_DEPTH  = 16,
  localparam int unsigned N_MLB      = FAN0 * FAN1 * FAN2 * FAN3,
  localparam int unsigned PC_W       = $clog2(SCHED_DEPTH),
  localparam int unsigned IW         = $clog2(N_MLB)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            mode_i,
  input  cfg_t            cfg_i,
  input  logic            start_i,
  input  logic [PC_W-1:0] base_pc_i,
  input  logic            resume_i,
  input  logic            out_pop_i,
  output logic            out_valid_o,
  output word_t           out_data_o,
  output logic            running_o,
  output logic            done_o,
  output logic            err_o,
  output logic            err_fatal_o,
  output logic [IW-1:0]   err_mlb_o,
  output logic [31:0]     cycles_o,
  output logic [31:0]     stalls_o,
  input  chan_t           ext_ch_i,
  output chan_t           ext_ch_o
);

  localparam int unsigned SW = $clog2(SLOTS);

  logic             cfg_en, mlb_start, run, err_clr;
  logic [PC_W-1:0]  mlb_base_pc;
  logic [SW-1:0]    slot;
  logic [N_MLB-1:0] busy, halted, single, double;
  chan_t            mlb_out [N_MLB];
  chan_t            mlb_in  [N_MLB];
  chan_t            top_up;

  for (genvar i = 0; i < int'(N_MLB); i++) begin : g_mlb
    maha_mlb #(
      .SCHED_DEPTH(SCHED_DEPTH), .BLOCKS(BLOCKS), .PAGES(PAGES),
      .PAGE_BYTES(PAGE_BYTES), .SEG_BITS(SEG_BITS), .RD_LAT(RD_LAT)
    ) u_mlb (
      .clk         (clk),
      .rst_n       (rst_n),
      .cfg_sel_i   (cfg_en && 32'(cfg_i.unit) == i && cfg_i.target != CFG_XBAR),
      .cfg_i       (cfg_i),
      .start_i     (mlb_start),
      .base_pc_i   (mlb_base_pc),
      .run_i       (run),
      .err_clr_i   (err_clr),
      .busy_o      (busy[i]),
      .halted_o    (halted[i]),
      .ecc_single_o(single[i]),
      .ecc_double_o(double[i]),
      .ch_in_i     (mlb_in[i]),
      .ch_out_o    (mlb_out[i])
    );
  end

  maha_interconnect #(
    .FAN0(FAN0), .FAN1(FAN1), .FAN2(FAN2), .FAN3(FAN3), .SLOTS(SLOTS)
  ) u_ic (
    .clk      (clk),
    .rst_n    (rst_n),
    .slot_i   (slot),
    .cfg_sel_i(cfg_en),
    .cfg_i    (cfg_i),
    .mlb_out_i(mlb_out),
    .mlb_in_o (mlb_in),
    .ext_ch_i (ext_ch_i),
    .ext_ch_o (top_up)
  );

  maha_ce #(
    .N_MLB(N_MLB), .PC_W(PC_W), .SLOTS(SLOTS), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_ce (
    .clk          (clk),
    .rst_n        (rst_n),
    .mode_i       (mode_i),
    .start_i      (start_i),
    .base_pc_i    (base_pc_i),
    .resume_i     (resume_i),
    .pop_i        (out_pop_i),
    .cfg_en_o     (cfg_en),
    .running_o    (running_o),
    .done_o       (done_o),
    .err_o        (err_o),
    .err_fatal_o  (err_fatal_o),
    .err_mlb_o    (err_mlb_o),
    .out_valid_o  (out_valid_o),
    .out_data_o   (out_data_o),
    .cycles_o     (cycles_o),
    .stalls_o     (stalls_o),
    .mlb_start_o  (mlb_start),
    .mlb_base_pc_o(mlb_base_pc),
    .run_o        (run),
    .err_clr_o    (err_clr),
    .slot_o       (slot),
    .busy_i       (busy),
    .halted_i     (halted),
    .single_i     (single),
    .double_i     (double),
    .up_i         (top_up)
  );

  assign ext_ch_o = top_up;

endmodule
