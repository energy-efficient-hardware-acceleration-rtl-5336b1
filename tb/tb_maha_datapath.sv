// tb_maha_datapath: checks adder, multiplier and shifter of the MLB datapath
// against SystemVerilog arithmetic on random and corner operands.
module tb_maha_datapath;
  import maha_pkg::*;

  int checks = 0, failures = 0;
  opcode_e op;
  word_t a, b, y, e;
  logic [IMM_W-1:0] imm;

  maha_datapath dut (.op_i(op), .a_i(a), .b_i(b), .imm_i(imm), .y_o(y));

  function automatic word_t model(opcode_e o, word_t x, word_t z, logic [15:0] i);
    longint unsigned p;
    case (o)
      OP_ADD:  return x + z;
      OP_ADDI: return x + {{16{i[15]}}, i};
      OP_SUB:  return x + ~z + 1;
      OP_MUL:  begin p = longint'(x) * longint'(z); return p[31:0]; end
      OP_SHL:  return x << (z % 32);
      OP_SHR:  return x >> (z % 32);
      OP_MOVI: return {16'h0, i};
      default: return '0;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode_e ops [8] = '{OP_ADD, OP_ADDI, OP_SUB, OP_MUL, OP_SHL, OP_SHR, OP_MOVI, OP_LDB};
    for (int t = 0; t < 4000; t++) begin
      op  = ops[t % 8];
      a   = (t % 50 == 0) ? 32'hffff_ffff : $urandom;
      b   = (t % 3 == 0) ? word_t'($urandom_range(40)) : $urandom;
      imm = 16'($urandom);
      #1;
      e = model(op, a, b, imm);
      checks++;
      if (y != e) begin
        failures++;
        $display("FAIL %s a=%h b=%h imm=%h y=%h exp %h", op.name(), a, b, imm, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
