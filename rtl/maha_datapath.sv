// maha_datapath: custom datapath of one MLB.
//
// The source design gives each MLB an adder, a multiplier and a shifter
// (its permutation unit) between the register file and the memory. This
// module is that datapath, combinational, for one micro-code operation:
//   ADD  a + b        ADDI a + sign-extended imm    SUB a - b
//   MUL  low word of a * b
//   SHL  a << b[4:0]  SHR  a >> b[4:0] (logical)
//   MOVI zero-extended imm
// Any other opcode gives zero. The opcode set and the word width are
// implementation choices.
module maha_datapath
  import maha_pkg::*;
(
  input  opcode_e          op_i,
  input  word_t            a_i,
  input  word_t            b_i,
  input  logic [IMM_W-1:0] imm_i,
  output word_t            y_o
);

  localparam int unsigned SH_W = $clog2(DATA_W);

  word_t imm_sext;
  word_t imm_zext;
  assign imm_sext = word_t'($signed(imm_i));
  assign imm_zext = word_t'(imm_i);

  always_comb begin
    unique case (op_i)
      OP_ADD:  y_o = a_i + b_i;
      OP_ADDI: y_o = a_i + imm_sext;
      OP_SUB:  y_o = a_i - b_i;
      OP_MUL:  y_o = a_i * b_i;
      OP_SHL:  y_o = a_i << b_i[SH_W-1:0];
      OP_SHR:  y_o = a_i >> b_i[SH_W-1:0];
      OP_MOVI: y_o = imm_zext;
      default: y_o = '0;
    endcase
  end

endmodule
