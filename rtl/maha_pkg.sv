// maha_pkg: types and constants shared by the MAHA in-Flash accelerator.
//
// MAHA turns the blocks of a NAND Flash array into Memory Logic Blocks (MLBs):
// each MLB is a small processor whose local memory is a group of Flash blocks.
// This package holds what several modules need: the data word, the
// interconnect channel, the micro-code (schedule table) word and opcodes,
// the configuration-bus command, the SECDED helpers and the number of
// interconnect levels.
//
// Sizes that follow the source design: a 2 KB page, 128 pages per Flash
// block, 256 blocks per MLB (one function-table block and 255 data blocks),
// 4096-bit narrow reads protected by one SECDED code word each, 16 MLBs in an
// 8,1,1,2 hierarchy. The word width, register count, opcode set, micro-code
// layout and configuration bus are this implementation's own choices.
package maha_pkg;

  // ---------------------------------------------------------------- data word
  localparam int unsigned DATA_W  = 32;       // datapath word (own choice)
  localparam int unsigned NREG    = 16;       // register-file entries (own choice)
  localparam int unsigned RA_W    = $clog2(NREG);
  localparam int unsigned IMM_W   = 16;
  localparam int unsigned LUT_W   = 64;       // function-table segment width (64b SEG)
  localparam int unsigned CFG_W   = 64;       // configuration data width (own choice)

  typedef logic [DATA_W-1:0] word_t;

  // ------------------------------------------------------- interconnect channel
  typedef struct packed {
    logic  valid;
    word_t data;
  } chan_t;

  // ------------------------------------------------------------ micro-code
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,   // no operation
    OP_HALT = 5'd1,   // task finished, stay here
    OP_MOVI = 5'd2,   // rd = zero-extended imm
    OP_ADD  = 5'd3,   // rd = rs1 + rs2          (adder)
    OP_ADDI = 5'd4,   // rd = rs1 + sext(imm)    (adder)
    OP_SUB  = 5'd5,   // rd = rs1 - rs2          (adder)
    OP_MUL  = 5'd6,   // rd = low word of rs1*rs2 (multiplier)
    OP_SHL  = 5'd7,   // rd = rs1 << rs2[4:0]    (shifter)
    OP_SHR  = 5'd8,   // rd = rs1 >> rs2[4:0]    (shifter)
    OP_NRD  = 5'd9,   // narrow read: data buffer = segment[rs1 + imm]
    OP_LDB  = 5'd10,  // rd = data buffer word[rs1 + imm]
    OP_LUT  = 5'd11,  // rd = function table word[rs1 + imm]
    OP_SEND = 5'd12,  // drive rs1 onto the outgoing channel next cycle
    OP_RECV = 5'd13,  // rd = incoming channel word
    OP_BNE  = 5'd14,  // if rs1 != rs2 then pc = imm
    OP_JMP  = 5'd15   // pc = imm
  } opcode_e;

  typedef struct packed {
    opcode_e           op;
    logic [RA_W-1:0]   rd;
    logic [RA_W-1:0]   rs1;
    logic [RA_W-1:0]   rs2;
    logic [IMM_W-1:0]  imm;
  } ucode_t;


  // ----------------------------------------------------- configuration bus
  // Written by the host through the control engine while the array is in
  // normal (storage) mode; ignored in compute mode.
  typedef enum logic [2:0] {
    CFG_SCHED = 3'd0,  // schedule table entry  (addr = entry, data = ucode)
    CFG_LUT   = 3'd1,  // function-table segment (addr = segment, data = 64 bits)
    CFG_WBUF  = 3'd2,  // write buffer word      (addr = word index)
    CFG_PROG  = 3'd3,  // program write buffer into data segment (addr)
    CFG_XBAR  = 3'd4   // crossbar slot entry (see maha_interconnect)
  } cfg_target_e;

  typedef struct packed {
    logic        we;
    cfg_target_e target;
    logic [7:0]  unit;   // MLB number, or crossbar node for CFG_XBAR
    logic [31:0] addr;
    logic [CFG_W-1:0] wdata;
  } cfg_t;

  // ------------------------------------------------------- interconnect
  // Levels of the interconnect hierarchy: bank, sub-bank, mat, sub-array.
  localparam int unsigned IC_LEVELS = 4;

  // ------------------------------------------------------------- SECDED
  // Hamming code over K data bits: data bits occupy code-word positions
  // 1,2,3,... that are not powers of two, in order. The R check bits are the
  // XOR of the positions of all set data bits; one more bit is the parity of
  // the whole code word.
  function automatic int unsigned ecc_r(input int unsigned k);
    int unsigned r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  // Code-word position (1-based) of data bit i: the i-th position that is
  // not a power of two.
  function automatic int unsigned ecc_pos(input int unsigned i);
    int unsigned p = i + 1;
    for (int unsigned b = 0; (1 << b) <= p; b++) p++;
    return p;
  endfunction

endpackage
