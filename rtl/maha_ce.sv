// maha_ce: control engine (CE) of the MAHA array.
//
// A small controller added beside the Flash array to start and synchronise
// the parallel operation of the MLBs. The host selects the mode with the mode
// control bit: 0 is normal storage mode, in which the array may be configured
// (cfg_en_o), 1 is compute mode. In compute mode a start pulse launches every
// MLB at the base address `base_pc_i` of its schedule table.
//
// While running, the CE drives one global `run_o`: it is high in a clock only
// if no MLB is busy (narrow read or table lookup in flight), no MLB has
// reported an ECC error, and the output FIFO has room. All MLBs, the
// interconnect time-slot counter `slot_o` and the cycle counters advance only
// on run cycles, which keeps the static schedule aligned whatever stalls
// occur. An ECC error freezes the array and is reported to the host
// (Flash-management layer) with the number of the first MLB that saw it;
// `resume_i` clears it and lets execution continue. Leaving compute mode
// aborts a run. When every MLB has halted the run is done.
//
// Words leaving the top of the interconnect on run cycles (`up_i`) are the
// array's results; they are queued in a FIFO of FIFO_DEPTH words that the host
// drains with `pop_i` (first-word-fall-through). `cycles_o` counts run cycles
// and `stalls_o` stalled cycles of the current run.
//
// The source design shows the CE, the mode bit and the base address but not
// their logic; this protocol, the FIFO and the counters are implementation
// choices.
module maha_ce
  import maha_pkg::*;
#(
  parameter int unsigned N_MLB      = 16,
  parameter int unsigned PC_W       = 8,
  parameter int unsigned SLOTS      = 64,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned SW  = $clog2(SLOTS),
  localparam int unsigned IW  = $clog2(N_MLB),
  localparam int unsigned FAW = $clog2(FIFO_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host
  input  logic             mode_i,      // 0 storage / configure, 1 compute
  input  logic             start_i,
  input  logic [PC_W-1:0]  base_pc_i,
  input  logic             resume_i,
  input  logic             pop_i,
  output logic             cfg_en_o,
  output logic             running_o,
  output logic             done_o,
  output logic             err_o,
  output logic             err_fatal_o,
  output logic [IW-1:0]    err_mlb_o,
  output logic             out_valid_o,
  output word_t            out_data_o,
  output logic [31:0]      cycles_o,
  output logic [31:0]      stalls_o,
  // MLBs
  output logic             mlb_start_o,
  output logic [PC_W-1:0]  mlb_base_pc_o,
  output logic             run_o,
  output logic             err_clr_o,
  output logic [SW-1:0]    slot_o,
  input  logic [N_MLB-1:0] busy_i,
  input  logic [N_MLB-1:0] halted_i,
  input  logic [N_MLB-1:0] single_i,
  input  logic [N_MLB-1:0] double_i,
  // top of the interconnect
  input  chan_t            up_i
);

  typedef enum logic [1:0] {CE_IDLE, CE_RUN, CE_DONE} ce_state_e;

  ce_state_e         state_q;
  logic [SW-1:0]     slot_q;
  logic [31:0]       cycles_q, stalls_q;

  word_t             fifo_q [FIFO_DEPTH];
  logic [FAW-1:0]    rd_ptr_q, wr_ptr_q;
  logic [FAW:0]      count_q;
  logic              fifo_full, push, pop;

  logic              any_err;

  assign any_err   = |single_i || |double_i;
  assign fifo_full = (32'(count_q) == FIFO_DEPTH);

  assign mlb_start_o   = mode_i && start_i && state_q != CE_RUN;
  assign mlb_base_pc_o = base_pc_i;
  assign run_o         = state_q == CE_RUN && mode_i && !(|busy_i) && !any_err && !fifo_full;
  assign err_clr_o     = resume_i;
  assign slot_o        = slot_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= CE_IDLE;
      slot_q   <= '0;
      cycles_q <= '0;
      stalls_q <= '0;
    end else begin
      unique case (state_q)
        CE_IDLE, CE_DONE: if (mlb_start_o) begin
          state_q  <= CE_RUN;
          slot_q   <= '0;
          cycles_q <= '0;
          stalls_q <= '0;
        end
        CE_RUN: begin
          if (!mode_i) begin
            state_q <= CE_IDLE;
          end else if (&halted_i && !(|busy_i)) begin
            state_q <= CE_DONE;
          end else if (run_o) begin
            slot_q   <= (32'(slot_q) == SLOTS - 1) ? '0 : slot_q + 1'b1;
            cycles_q <= cycles_q + 1;
          end else begin
            stalls_q <= stalls_q + 1;
          end
        end
        default: state_q <= CE_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ output FIFO
  assign push = run_o && up_i.valid;
  assign pop  = pop_i && count_q != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
      count_q  <= '0;
    end else begin
      if (push) wr_ptr_q <= wr_ptr_q + 1'b1;
      if (pop)  rd_ptr_q <= rd_ptr_q + 1'b1;
      count_q <= count_q + (FAW+1)'(push) - (FAW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo_q[wr_ptr_q] <= up_i.data;
  end

  // ------------------------------------------------------------ status
  always_comb begin
    err_mlb_o = '0;
    for (int i = N_MLB - 1; i >= 0; i--)
      if (single_i[i] || double_i[i]) err_mlb_o = IW'(i);
  end

  assign cfg_en_o    = !mode_i;
  assign running_o   = state_q == CE_RUN;
  assign done_o      = state_q == CE_DONE;
  assign err_o       = any_err;
  assign err_fatal_o = |double_i;
  assign out_valid_o = count_q != '0;
  assign out_data_o  = fifo_q[rd_ptr_q];
  assign cycles_o    = cycles_q;
  assign stalls_o    = stalls_q;

  // the FIFO is never written while full and never read while empty
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !fifo_full);

endmodule
