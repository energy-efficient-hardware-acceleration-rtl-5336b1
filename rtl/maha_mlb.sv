// maha_mlb: Memory Logic Block, the processing element of MAHA.
//
// A group of Flash blocks turned into a small processor that uses them as its
// local memory. Following the source design an MLB contains
//   - the function table: the first Flash block, read in 64-bit segments
//     (maha_function_table), for table-lookup operations;
//   - the data blocks (maha_flash_array), read with the narrow read into a
//     4096-bit data buffer;
//   - SECDED checking of every read (maha_ecc_dec); an error stops the
//     whole array and is reported to the control engine;
//   - a dual-ported asynchronous-read register file (maha_regfile);
//   - a custom datapath with adder, multiplier and shifter (maha_datapath);
//   - an address generator (rs1 + immediate) and an operand multiplexer
//     tree that feeds the register file from the datapath, the data buffer,
//     the function table or the interconnect;
//   - the schedule table (maha_schedule_table) holding the micro-code, and
//     the sequencer that steps through it.
//
// Execution is statically scheduled: all MLBs step in lock-step while the
// control engine holds `run_i` high. One micro-code word is executed per run
// cycle. A narrow read (NRD) or a table lookup (LUT) takes longer; the MLB
// then raises `busy_o`, which makes the control engine drop `run_i` for every
// MLB until the data arrive, so the schedule stays aligned across the array.
// SEND places a register value on `ch_out_o` for the next run cycle, where the
// interconnect routes it; RECV takes `ch_in_i` in the run cycle the schedule
// names (an empty channel reads as zero). The channel output only changes
// on run cycles.
//
// Configuration (`cfg_sel_i` high, array in storage mode): schedule-table
// entries, function-table segments, and data segments through a write
// buffer that is then programmed into the Flash with its check bits.
//
// The opcode set, micro-code layout, register count and the timing of the
// stall are implementation choices; the source design names the units but not
// their interfaces.
module maha_mlb
  import maha_pkg::*;
#(
  parameter int unsigned SCHED_DEPTH = 256,
  parameter int unsigned BLOCKS      = 255,
  parameter int unsigned PAGES       = 128,
  parameter int unsigned PAGE_BYTES  = 2048,
  parameter int unsigned SEG_BITS    = 4096,
  parameter int unsigned RD_LAT      = 4,
  localparam int unsigned PC_W       = $clog2(SCHED_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration
  input  logic            cfg_sel_i,
  input  cfg_t            cfg_i,
  // control engine
  input  logic            start_i,
  input  logic [PC_W-1:0] base_pc_i,
  input  logic            run_i,
  input  logic            err_clr_i,
  output logic            busy_o,
  output logic            halted_o,
  output logic            ecc_single_o,
  output logic            ecc_double_o,
  // interconnect
  input  chan_t           ch_in_i,
  output chan_t           ch_out_o
);

  // ------------------------------------------------------------ sizes
  localparam int unsigned DSEGS  = BLOCKS * PAGES * (PAGE_BYTES * 8 / SEG_BITS);
  localparam int unsigned DAW    = $clog2(DSEGS);
  localparam int unsigned DR     = ecc_r(SEG_BITS);
  localparam int unsigned DCW    = SEG_BITS + DR + 1;
  localparam int unsigned LSEGS  = PAGES * PAGE_BYTES * 8 / LUT_W;
  localparam int unsigned LAW    = $clog2(LSEGS);
  localparam int unsigned LR     = ecc_r(LUT_W);
  localparam int unsigned LCW    = LUT_W + LR + 1;
  localparam int unsigned WORDS  = SEG_BITS / DATA_W;      // words in data buffer
  localparam int unsigned WIX_W  = $clog2(WORDS);
  localparam int unsigned WBUF_N = SEG_BITS / CFG_W;       // config words per segment
  localparam int unsigned WBI_W  = $clog2(WBUF_N);

  typedef enum logic [1:0] {S_EXEC, S_NRD, S_LUT} state_e;

  // ------------------------------------------------------------ state
  state_e            state_q;
  logic [PC_W-1:0]   pc_q;
  logic              halted_q;
  logic              err_s_q, err_d_q;
  logic [SEG_BITS-1:0] dbuf_q;       // narrow-read data buffer
  logic [SEG_BITS-1:0] wbuf_q;       // write buffer for programming
  logic [RA_W-1:0]   lut_rd_q;
  logic              lut_half_q;
  chan_t             ch_out_q;

  // ------------------------------------------------------------ schedule table
  ucode_t instr;
  maha_schedule_table #(.DEPTH(SCHED_DEPTH)) u_sched (
    .clk    (clk),
    .rst_n  (rst_n),
    .we_i   (cfg_sel_i && cfg_i.we && cfg_i.target == CFG_SCHED),
    .waddr_i(cfg_i.addr[PC_W-1:0]),
    .wdata_i(ucode_t'(cfg_i.wdata[$bits(ucode_t)-1:0])),
    .pc_i   (pc_q),
    .instr_o(instr)
  );

  // ------------------------------------------------------------ register file
  word_t a_val, b_val, rf_wd;
  logic  rf_we;
  logic [RA_W-1:0] rf_wa;

  maha_regfile u_rf (
    .clk  (clk),
    .rst_n(rst_n),
    .ra1_i(instr.rs1),
    .rd1_o(a_val),
    .ra2_i(instr.rs2),
    .rd2_o(b_val),
    .we_i (rf_we),
    .wa_i (rf_wa),
    .wd_i (rf_wd)
  );

  // ------------------------------------------------------------ datapath
  word_t alu_y;
  maha_datapath u_dp (
    .op_i (instr.op),
    .a_i  (a_val),
    .b_i  (b_val),
    .imm_i(instr.imm),
    .y_o  (alu_y)
  );

  // address generator: base register plus signed offset
  word_t agen;
  assign agen = a_val + word_t'($signed(instr.imm));

  // ------------------------------------------------------------ data blocks
  logic            exec;
  logic            fl_rd, fl_busy, fl_valid;
  logic [DCW-1:0]  fl_rdata;
  logic [DR-1:0]   wbuf_check;
  logic            wbuf_par;

  assign exec  = run_i && !halted_q && state_q == S_EXEC;
  assign fl_rd = exec && instr.op == OP_NRD;

  maha_ecc_enc #(.K(SEG_BITS)) u_denc (
    .data_i  (wbuf_q),
    .check_o (wbuf_check),
    .parity_o(wbuf_par)
  );

  maha_flash_array #(
    .BLOCKS(BLOCKS), .PAGES(PAGES), .PAGE_BYTES(PAGE_BYTES),
    .SEG_BITS(SEG_BITS), .RD_LAT(RD_LAT)
  ) u_flash (
    .clk        (clk),
    .rst_n      (rst_n),
    .prog_i     (cfg_sel_i && cfg_i.we && cfg_i.target == CFG_PROG),
    .prog_addr_i(cfg_i.addr[DAW-1:0]),
    .prog_data_i({wbuf_par, wbuf_check, wbuf_q}),
    .rd_i       (fl_rd),
    .rd_addr_i  (agen[DAW-1:0]),
    .busy_o     (fl_busy),
    .rd_valid_o (fl_valid),
    .rd_data_o  (fl_rdata)
  );

  logic [SEG_BITS-1:0] dcorr;
  logic                d_single, d_double;
  maha_ecc_dec #(.K(SEG_BITS)) u_ddec (
    .data_i  (fl_rdata[SEG_BITS-1:0]),
    .check_i (fl_rdata[SEG_BITS +: DR]),
    .parity_i(fl_rdata[DCW-1]),
    .data_o  (dcorr),
    .single_o(d_single),
    .double_o(d_double)
  );

  // ------------------------------------------------------------ function table
  logic [LR-1:0]  lcfg_check;
  logic           lcfg_par;
  logic [LCW-1:0] lut_rdata;

  maha_ecc_enc #(.K(LUT_W)) u_lenc (
    .data_i  (cfg_i.wdata[LUT_W-1:0]),
    .check_o (lcfg_check),
    .parity_o(lcfg_par)
  );

  maha_function_table #(.PAGES(PAGES), .PAGE_BYTES(PAGE_BYTES)) u_ft (
    .clk        (clk),
    .prog_i     (cfg_sel_i && cfg_i.we && cfg_i.target == CFG_LUT),
    .prog_addr_i(cfg_i.addr[LAW-1:0]),
    .prog_data_i({lcfg_par, lcfg_check, cfg_i.wdata[LUT_W-1:0]}),
    .rd_i       (exec && instr.op == OP_LUT),
    .rd_addr_i  (agen[LAW:1]),
    .rd_data_o  (lut_rdata)
  );

  logic [LUT_W-1:0] lcorr;
  logic             l_single, l_double;
  maha_ecc_dec #(.K(LUT_W)) u_ldec (
    .data_i  (lut_rdata[LUT_W-1:0]),
    .check_i (lut_rdata[LUT_W +: LR]),
    .parity_i(lut_rdata[LCW-1]),
    .data_o  (lcorr),
    .single_o(l_single),
    .double_o(l_double)
  );

  // ------------------------------------------------------------ operand mux tree
  // Selects what is written to the register file.
  always_comb begin
    rf_we = 1'b0;
    rf_wa = instr.rd;
    rf_wd = alu_y;
    if (state_q == S_LUT) begin
      rf_we = 1'b1;
      rf_wa = lut_rd_q;
      rf_wd = lut_half_q ? lcorr[2*DATA_W-1:DATA_W] : lcorr[DATA_W-1:0];
    end else if (exec) begin
      unique case (instr.op)
        OP_MOVI, OP_ADD, OP_ADDI, OP_SUB, OP_MUL, OP_SHL, OP_SHR: rf_we = 1'b1;
        OP_LDB: begin
          rf_we = 1'b1;
          rf_wd = dbuf_q[agen[WIX_W-1:0]*DATA_W +: DATA_W];
        end
        OP_RECV: begin
          rf_we = 1'b1;
          rf_wd = ch_in_i.valid ? ch_in_i.data : '0;
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_EXEC;
      pc_q       <= '0;
      halted_q   <= 1'b1;
      err_s_q    <= 1'b0;
      err_d_q    <= 1'b0;
      dbuf_q     <= '0;
      lut_rd_q   <= '0;
      lut_half_q <= 1'b0;
      ch_out_q   <= '0;
    end else begin
      if (err_clr_i) begin
        err_s_q <= 1'b0;
        err_d_q <= 1'b0;
      end
      if (start_i) begin
        pc_q     <= base_pc_i;
        halted_q <= 1'b0;
        state_q  <= S_EXEC;
        ch_out_q <= '0;
      end else begin
        // channel register changes only on run cycles
        if (run_i) begin
          ch_out_q <= '0;
          if (exec && instr.op == OP_SEND) ch_out_q <= '{valid: 1'b1, data: a_val};
        end
        unique case (state_q)
          S_EXEC: if (exec) begin
            pc_q <= pc_q + 1'b1;
            unique case (instr.op)
              OP_HALT: begin
                halted_q <= 1'b1;
                pc_q     <= pc_q;
              end
              OP_BNE: if (a_val != b_val) pc_q <= instr.imm[PC_W-1:0];
              OP_JMP: pc_q <= instr.imm[PC_W-1:0];
              OP_NRD: state_q <= S_NRD;
              OP_LUT: begin
                state_q    <= S_LUT;
                lut_rd_q   <= instr.rd;
                lut_half_q <= agen[0];
              end
              default: ;
            endcase
          end
          S_NRD: if (fl_valid) begin
            dbuf_q  <= dcorr;
            state_q <= S_EXEC;
            if (d_single) err_s_q <= 1'b1;
            if (d_double) err_d_q <= 1'b1;
          end
          S_LUT: begin
            state_q <= S_EXEC;
            if (l_single) err_s_q <= 1'b1;
            if (l_double) err_d_q <= 1'b1;
          end
          default: state_q <= S_EXEC;
        endcase
      end
    end
  end

  // ------------------------------------------------------------ write buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbuf_q <= '0;
    end else if (cfg_sel_i && cfg_i.we && cfg_i.target == CFG_WBUF) begin
      wbuf_q[cfg_i.addr[WBI_W-1:0]*CFG_W +: CFG_W] <= cfg_i.wdata;
    end
  end

  assign busy_o       = (state_q != S_EXEC) || fl_busy;
  assign halted_o     = halted_q;
  assign ecc_single_o = err_s_q;
  assign ecc_double_o = err_d_q;
  assign ch_out_o     = ch_out_q;

endmodule
