// cpu_asm_pkg: test-side assembler and reference model for the pipelined CPU.
//
// encode() turns one assembly instruction into the control word the CPU
// expects, setting the fields the same way for each opcode as the CPU's
// instruction encoding defines (unit enable, VRselect for immediate forms,
// Destvalue code, Data_in / Value_select / Mem_select, Reg_write).
// cpu_model executes instructions one at a time, in program order, with the
// instruction-set semantics: 16-bit wrap-around ADD, unsigned MIN, MUL of the
// low five bits of each operand as two's-complement numbers with the product
// sign-extended, logical shifts by the low four bits of operand B.
// hazard() tells whether an instruction reads a register written by one of
// the previous three instructions, which the pipeline does not forward.
package cpu_asm_pkg;
  import cpu_pkg::*;

  typedef enum int {
    I_NOP, I_STOREI, I_STORE, I_LOADI, I_LOAD,
    I_AND, I_ANDI, I_OR, I_ORI, I_ADD, I_ADDI,
    I_MUL, I_MULI, I_MIN, I_MINI, I_SFL, I_SFR
  } op_e;

  localparam int NUM_OPS = 17;

  typedef struct packed {
    op_e       op;
    reg_sel_t  rd;
    reg_sel_t  rs1;
    reg_sel_t  rs2;
    word_t     imm;
    mem_addr_t addr;
  } instr_t;

  function automatic instr_t mk(op_e op, int rd = 0, int rs1 = 0, int rs2 = 0,
                                int imm = 0, int addr = 0);
    instr_t i;
    i.op   = op;
    i.rd   = reg_sel_t'(rd);
    i.rs1  = reg_sel_t'(rs1);
    i.rs2  = reg_sel_t'(rs2);
    i.imm  = word_t'(imm);
    i.addr = mem_addr_t'(addr);
    return i;
  endfunction

  function automatic bit writes_reg(instr_t i);
    return !(i.op inside {I_NOP, I_STOREI, I_STORE});
  endfunction

  function automatic bit reads_rs1(instr_t i);
    return !(i.op inside {I_NOP, I_STOREI, I_LOADI, I_LOAD});
  endfunction

  function automatic bit reads_rs2(instr_t i);
    return i.op inside {I_AND, I_OR, I_ADD, I_MUL, I_MIN};
  endfunction

  function automatic bit is_imm(instr_t i);
    return i.op inside {I_ANDI, I_ORI, I_ADDI, I_MULI, I_MINI, I_SFL, I_SFR};
  endfunction

  // true if i reads a register written by any of the (up to 3) earlier ones
  function automatic bit hazard(instr_t i, instr_t prev [3]);
    for (int k = 0; k < 3; k++) begin
      if (writes_reg(prev[k])) begin
        if (reads_rs1(i) && prev[k].rd == i.rs1) return 1'b1;
        if (reads_rs2(i) && prev[k].rd == i.rs2) return 1'b1;
      end
    end
    return 1'b0;
  endfunction

  function automatic ctrl_word_t encode(instr_t i);
    ctrl_word_t c;
    c = CTRL_NOP;
    if (i.op == I_NOP) return c;
    c.value     = i.imm;
    c.addr      = i.addr;
    c.dest_reg  = i.rd;
    c.read_sel1 = i.rs1;
    c.read_sel2 = i.rs2;
    c.vr_select = is_imm(i);
    c.reg_write = writes_reg(i);
    case (i.op)
      I_STOREI:     begin c.data_in = 1'b1; c.write_en = 1'b1; end
      I_STORE:      begin c.write_en = 1'b1; end
      I_LOADI:      begin c.value_select = 1'b1; end
      I_LOAD:       begin c.read_en = 1'b1; c.mem_select = 1'b1; end
      I_AND, I_ANDI: begin c.and_en = 1'b1;   c.dest_value = DEST_AND;   end
      I_OR,  I_ORI:  begin c.or_en = 1'b1;    c.dest_value = DEST_OR;    end
      I_ADD, I_ADDI: begin c.add_en = 1'b1;   c.dest_value = DEST_ADD;   end
      I_MUL, I_MULI: begin c.mul_en = 1'b1;   c.dest_value = DEST_MUL;   end
      I_MIN, I_MINI: begin c.sub_en = 1'b1;   c.dest_value = DEST_MIN;   end
      I_SFL:        begin c.shift_en = 1'b1; c.dest_value = DEST_SHIFT; end
      I_SFR:        begin c.shift_en = 1'b1; c.shift_dir = 1'b1; c.dest_value = DEST_SHIFT; end
      default: ;
    endcase
    return c;
  endfunction

  class cpu_model;
    word_t regs [NUM_REGS];
    word_t mem  [MEM_WORDS];

    function new();
      foreach (regs[k]) regs[k] = '0;
      foreach (mem[k])  mem[k]  = '0;
    endfunction

    static function word_t mul_ref(word_t a, word_t b);
      int sa, sb, p;
      sa = int'(a[4:0]); if (a[4]) sa -= 32;
      sb = int'(b[4:0]); if (b[4]) sb -= 32;
      p  = sa * sb;
      return word_t'(p);
    endfunction

    // executes i; returns the value written to register i.rd (if any)
    function word_t step(instr_t i);
      word_t a, b, r;
      a = regs[i.rs1];
      b = is_imm(i) ? i.imm : regs[i.rs2];
      r = '0;
      case (i.op)
        I_STOREI: mem[i.addr] = i.imm;
        I_STORE:  mem[i.addr] = regs[i.rs1];
        I_LOADI:  r = i.imm;
        I_LOAD:   r = mem[i.addr];
        I_AND, I_ANDI: r = a & b;
        I_OR,  I_ORI:  r = a | b;
        I_ADD, I_ADDI: r = a + b;
        I_MUL, I_MULI: r = mul_ref(a, b);
        I_MIN, I_MINI: r = (a < b) ? a : b;
        I_SFL:    r = a << b[3:0];
        I_SFR:    r = a >> b[3:0];
        default: ;
      endcase
      if (writes_reg(i)) regs[i.rd] = r;
      return r;
    endfunction
  endclass

endpackage
