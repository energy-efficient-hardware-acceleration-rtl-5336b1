// maha_regfile: local register file of one MLB.
//
// Holds the temporary operands and intermediate results of the tasks mapped
// to the MLB. As the source design specifies, it is dual ported with
// asynchronous read: two operands are read combinationally in the cycle they
// are used, and one result is written at the clock edge. A write and a read
// of the same register in one cycle return the old value. All registers clear
// to zero on reset; the register count comes from maha_pkg::NREG, an
// implementation choice.
module maha_regfile
  import maha_pkg::*;
#(
  parameter int unsigned N = NREG,
  parameter int unsigned W = DATA_W,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra1_i,
  output logic [W-1:0]  rd1_o,
  input  logic [AW-1:0] ra2_i,
  output logic [W-1:0]  rd2_o,
  input  logic          we_i,
  input  logic [AW-1:0] wa_i,
  input  logic [W-1:0]  wd_i
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we_i) begin
      regs[wa_i] <= wd_i;
    end
  end

  assign rd1_o = regs[ra1_i];
  assign rd2_o = regs[ra2_i];

endmodule
