// cpu_core: 16-bit, four-stage pipelined general-purpose CPU.
//
// The CPU executes one pre-decoded control word per clock (see cpu_pkg for the
// fields). Instruction fetch and decode happen off-chip: an assembler turns
// STOREI/STORE/LOADI/LOAD/AND(I)/OR(I)/ADD(I)/MUL(I)/MIN(I)/SFL/SFR/NOP into
// control words and spaces dependent instructions by three slots (by
// reordering independent ones or by NOPs). The pipeline has no interlock and
// no forwarding.
//
//   ID  : the register file is read (read_sel1, read_sel2).  -> ID/EX
//   EX  : operand B is register read_sel2 or the 16-bit value (VRselect).
//         AND, OR, adder/MIN, shifter and the 5-bit multiplier work side by
//         side, each with its inputs held at zero unless its enable is set;
//         Destvalue selects the result.                      -> EX/MEM
//   MEM : the 32 x 16 SRAM is written (write_en) with register read_sel1 or
//         the value (Data_in), or read (read_en), at addr. The non-memory
//         write-back value is chosen here: the value (Value_select, LOADI)
//         or the unit result.                                -> MEM/WB
//   WB  : write-back data is the memory read data (Mem_select) or the value
//         chosen in MEM; Reg_write writes it into register Dest_reg at the
//         end of the cycle.
//
// Timing: a control word applied in cycle n writes its register at the end of
// cycle n+3; an instruction reading that register must be applied in cycle n+4
// or later. A STORE's memory write happens at the end of cycle n+2.
//
// The stage split, what each stage register carries, the position of each
// multiplexer, the units, the control fields and their codes follow the
// circuit and its test vectors. Two choices are this design's own: the memory
// address and read/write enables travel with the instruction through ID/EX and
// EX/MEM (the circuit's vectors apply them directly at the memory two cycles
// later), and the multiplier takes the low five bits of each operand.
module cpu_core
  import cpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  ctrl_word_t ctrl,               // control word for the ID stage
  output word_t      regs_o [NUM_REGS],  // register file contents
  output logic       wb_we,              // write-back strobe (for observation)
  output reg_sel_t   wb_addr,
  output word_t      wb_data
);

  // ---------------- ID ----------------
  word_t   rd1, rd2;
  id_ex_t  id_ex_d, id_ex_q;

  reg_file u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (wb_we),
    .waddr  (wb_addr),
    .wdata  (wb_data),
    .raddr1 (ctrl.read_sel1),
    .raddr2 (ctrl.read_sel2),
    .rdata1 (rd1),
    .rdata2 (rd2),
    .regs_o (regs_o)
  );

  always_comb begin
    id_ex_d.ctrl  = ctrl;
    id_ex_d.read1 = rd1;
    id_ex_d.read2 = rd2;
  end

  stage_reg #(.T(id_ex_t)) u_id_ex (.clk(clk), .rst_n(rst_n), .d(id_ex_d), .q(id_ex_q));

  // ---------------- EX ----------------
  ctrl_word_t ex_c;
  word_t      and_z, or_z, add_sum, min_z, shift_z, mul_p;
  word_t      op_a, op_b;
  word_t      add_a, add_b, sh_a, sh_b;
  logic [MUL_IN_W-1:0] mul_a, mul_b;
  logic       add_cout, adder_en;
  word_t      ex_result;
  ex_mem_t    ex_mem_d, ex_mem_q;

  assign ex_c     = id_ex_q.ctrl;
  assign adder_en = ex_c.add_en | ex_c.sub_en;
  assign op_a     = id_ex_q.read1;
  assign op_b     = ex_c.vr_select ? ex_c.value : id_ex_q.read2;  // VRselect

  // operand isolation: an idle unit sees zeros and does not switch
  assign add_a = adder_en       ? op_a : '0;
  assign add_b = adder_en       ? op_b : '0;
  assign sh_a  = ex_c.shift_en  ? op_a : '0;
  assign sh_b  = ex_c.shift_en  ? op_b : '0;
  assign mul_a = ex_c.mul_en    ? op_a[MUL_IN_W-1:0] : '0;
  assign mul_b = ex_c.mul_en    ? op_b[MUL_IN_W-1:0] : '0;

  and_unit u_and (.en(ex_c.and_en), .a(op_a), .b(op_b), .z(and_z));
  or_unit  u_or  (.en(ex_c.or_en),  .a(op_a), .b(op_b), .z(or_z));

  adder_min16 u_add (
    .a(add_a), .b(add_b), .sub(ex_c.sub_en),
    .sum(add_sum), .cout(add_cout), .min_out(min_z)
  );

  shifter16 u_shift (
    .din(sh_a), .shamt(sh_b[SHAMT_W-1:0]), .dir(ex_c.shift_dir), .dout(shift_z)
  );

  mul5 #(.IN_W(MUL_IN_W), .OUT_W(DATA_W)) u_mul (.a(mul_a), .b(mul_b), .p(mul_p));

  // Destvalue result multiplexer
  always_comb begin
    unique case (ex_c.dest_value)
      DEST_AND:   ex_result = and_z;
      DEST_ADD:   ex_result = add_sum;
      DEST_MIN:   ex_result = min_z;
      DEST_MUL:   ex_result = mul_p;
      DEST_SHIFT: ex_result = shift_z;
      DEST_OR:    ex_result = or_z;
      default:    ex_result = '0;
    endcase
  end

  always_comb begin
    ex_mem_d.alu          = ex_result;
    ex_mem_d.read1        = id_ex_q.read1;
    ex_mem_d.value        = ex_c.value;
    ex_mem_d.addr         = ex_c.addr;
    ex_mem_d.data_in      = ex_c.data_in;
    ex_mem_d.write_en     = ex_c.write_en;
    ex_mem_d.read_en      = ex_c.read_en;
    ex_mem_d.dest_reg     = ex_c.dest_reg;
    ex_mem_d.value_select = ex_c.value_select;
    ex_mem_d.mem_select   = ex_c.mem_select;
    ex_mem_d.reg_write    = ex_c.reg_write;
  end

  stage_reg #(.T(ex_mem_t)) u_ex_mem (.clk(clk), .rst_n(rst_n), .d(ex_mem_d), .q(ex_mem_q));

  // ---------------- MEM ----------------
  word_t   mem_rdata, store_data;
  mem_wb_t mem_wb_d, mem_wb_q;

  assign store_data = ex_mem_q.data_in ? ex_mem_q.value : ex_mem_q.read1;  // Data_in

  sram512 u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .addr     (ex_mem_q.addr),
    .write_en (ex_mem_q.write_en),
    .read_en  (ex_mem_q.read_en),
    .wdata    (store_data),
    .rdata    (mem_rdata)
  );

  always_comb begin
    mem_wb_d.value        = ex_mem_q.value_select ? ex_mem_q.value : ex_mem_q.alu;
    mem_wb_d.dest_reg     = ex_mem_q.dest_reg;
    mem_wb_d.mem_select   = ex_mem_q.mem_select;
    mem_wb_d.reg_write    = ex_mem_q.reg_write;
  end

  stage_reg #(.T(mem_wb_t)) u_mem_wb (.clk(clk), .rst_n(rst_n), .d(mem_wb_d), .q(mem_wb_q));

  // ---------------- WB ----------------
  assign wb_we   = mem_wb_q.reg_write;
  assign wb_addr = mem_wb_q.dest_reg;
  assign wb_data = mem_wb_q.mem_select ? mem_rdata : mem_wb_q.value;

  // A memory access must not both read and write.
  a_mem_rw_excl: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(ex_mem_q.write_en && ex_mem_q.read_en));

endmodule
