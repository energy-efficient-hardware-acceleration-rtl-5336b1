// maha_schedule_table: micro-code store (schedule table) of one MLB.
//
// Every operation of an MLB is scheduled ahead of time by the mapping
// software and kept as micro-code in this table, which the source design
// builds as a two-dimensional flip-flop array. It is written one entry per
// cycle while the array is being configured and read asynchronously at the
// program counter. Entries clear to NOP (all zeros) on reset. The depth is an
// implementation choice.
module maha_schedule_table
  import maha_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  ucode_t        wdata_i,
  input  logic [AW-1:0] pc_i,
  output ucode_t        instr_o
);

  ucode_t table_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) table_q[i] <= '0;
    end else if (we_i) begin
      table_q[waddr_i] <= wdata_i;
    end
  end

  assign instr_o = table_q[pc_i];

endmodule
