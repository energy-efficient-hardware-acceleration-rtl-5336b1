// maha_flash_array: the data blocks of one MLB, with narrow read.
//
// An MLB is a group of Flash blocks; besides the function-table block it owns
// BLOCKS data blocks of PAGES pages of PAGE_BYTES bytes. A normal Flash read
// senses a whole page; the MLB instead uses the narrow read of the source
// design, which senses one SEG_BITS-wide segment of a page (4096 bits, a
// quarter of a 2 KB page) into the data buffer. Each segment is kept with its
// SECDED check bits (the code word of maha_ecc_enc), stored next to the data.
//
// Segment address = (block * PAGES + page) * SEGS_PER_PAGE + segment.
// Program port: writes one code word; used only while configuring, since
// Flash write endurance is limited. Read port: rd_i starts a narrow read;
// RD_LAT clocks later rd_valid_o pulses for one clock with the code word,
// and busy_o is high from the request until then. A request while busy is
// ignored. RD_LAT stands for the sensing time and is an implementation
// choice (the source design gives none).
//
// The array is written as a memory; it models the storage behaviour of the
// Flash cells and page buffer, not their analog circuits.
module maha_flash_array
  import maha_pkg::*;
#(
  parameter int unsigned BLOCKS     = 255,
  parameter int unsigned PAGES      = 128,
  parameter int unsigned PAGE_BYTES = 2048,
  parameter int unsigned SEG_BITS   = 4096,
  parameter int unsigned RD_LAT     = 4,
  localparam int unsigned SEGS = BLOCKS * PAGES * (PAGE_BYTES * 8 / SEG_BITS),
  localparam int unsigned AW   = $clog2(SEGS),
  localparam int unsigned CW   = SEG_BITS + ecc_r(SEG_BITS) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          prog_i,
  input  logic [AW-1:0] prog_addr_i,
  input  logic [CW-1:0] prog_data_i,
  input  logic          rd_i,
  input  logic [AW-1:0] rd_addr_i,
  output logic          busy_o,
  output logic          rd_valid_o,
  output logic [CW-1:0] rd_data_o
);

  localparam int unsigned CNT_W = $clog2(RD_LAT + 1);

  logic [CW-1:0]    mem [SEGS];
  logic [AW-1:0]    addr_q;
  logic [CNT_W-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (prog_i) mem[prog_addr_i] <= prog_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q      <= '0;
      addr_q     <= '0;
      rd_valid_o <= 1'b0;
    end else begin
      rd_valid_o <= 1'b0;
      if (cnt_q != '0) begin
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CNT_W'(1)) rd_valid_o <= 1'b1;
      end else if (rd_i) begin
        cnt_q  <= CNT_W'(RD_LAT);
        addr_q <= rd_addr_i;
      end
    end
  end

  // The sensed segment appears on the output while rd_valid_o is high.
  always_ff @(posedge clk) begin
    if (cnt_q == CNT_W'(1)) rd_data_o <= mem[addr_q];
  end

  assign busy_o = (cnt_q != '0);

endmodule
