// maha_function_table: the LUT block (function table) of one MLB.
//
// The first Flash block of each MLB holds lookup tables that implement
// functions (a table per function, indexed by the operand). Unlike the data
// blocks, it is read in 64-bit segments. Each segment is stored as a SECDED
// code word (64 data, 7 check, 1 parity bit), so it is checked like every
// other read.
//
// Interface: one program port used only during configuration (a Flash write)
// and one read port. A read request is answered one clock later with the
// stored code word (synchronous read, an implementation choice; the source
// design gives no read timing). Size: one Flash block of PAGES pages of
// PAGE_BYTES bytes, i.e. 128 x 2 KB = 32768 segments by default.
module maha_function_table
  import maha_pkg::*;
#(
  parameter int unsigned PAGES      = 128,
  parameter int unsigned PAGE_BYTES = 2048,
  localparam int unsigned SEGS = PAGES * PAGE_BYTES * 8 / LUT_W,
  localparam int unsigned AW   = $clog2(SEGS),
  localparam int unsigned CW   = LUT_W + ecc_r(LUT_W) + 1
) (
  input  logic          clk,
  input  logic          prog_i,
  input  logic [AW-1:0] prog_addr_i,
  input  logic [CW-1:0] prog_data_i,
  input  logic          rd_i,
  input  logic [AW-1:0] rd_addr_i,
  output logic [CW-1:0] rd_data_o
);

  logic [CW-1:0] mem [SEGS];

  always_ff @(posedge clk) begin
    if (prog_i) mem[prog_addr_i] <= prog_data_i;
    if (rd_i)   rd_data_o <= mem[rd_addr_i];
  end

endmodule
