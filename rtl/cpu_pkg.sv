// cpu_pkg: types and constants shared by the 16-bit pipelined CPU.
//
// The CPU has no instruction memory or decoder of its own: every cycle it
// receives one pre-decoded control word (ctrl_word_t), produced off-chip by an
// assembler that also schedules instructions and inserts NOPs for hazards.
// The fields of ctrl_word_t follow the column list of the CPU's test vectors
// (value_in, instr_addr_in, Dest_reg, read_sel1/2, VRselect, the unit enables,
// Shiftdir, Destvalue, Data_in, write_en, read_en, Value_select, Mem_select,
// Reg_write). The numeric codes of dest_sel_e are the Destvalue<2:0> values
// the assembler emits for each instruction. The SRAM precharge column is not a
// field: a synchronous RTL memory has no precharge phase.
package cpu_pkg;

  localparam int unsigned DATA_W    = 16;  // datapath width
  localparam int unsigned NUM_REGS  = 8;   // register file entries
  localparam int unsigned REG_AW    = 3;   // register select width
  localparam int unsigned MEM_WORDS = 32;  // 512-bit data memory / 16-bit words
  localparam int unsigned MEM_AW    = 5;   // data memory address width
  localparam int unsigned MUL_IN_W  = 5;   // multiplier operand width
  localparam int unsigned SHAMT_W   = 4;   // shift amount width

  // Destvalue<2:0>: which execution unit's output is the EX-stage result.
  typedef enum logic [2:0] {
    DEST_AND   = 3'd0,
    DEST_ADD   = 3'd1,
    DEST_MIN   = 3'd2,
    DEST_MUL   = 3'd3,
    DEST_SHIFT = 3'd4,
    DEST_OR    = 3'd5
  } dest_sel_e;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [REG_AW-1:0] reg_sel_t;
  typedef logic [MEM_AW-1:0] mem_addr_t;

  // One pre-decoded instruction, as presented to the ID stage.
  typedef struct packed {
    word_t      value;        // immediate / external value (value_in)
    mem_addr_t  addr;         // data memory address (instr_addr_in)
    reg_sel_t   dest_reg;     // register written back
    reg_sel_t   read_sel1;    // first source register (also STORE data)
    reg_sel_t   read_sel2;    // second source register
    logic       vr_select;    // 1: operand B is value, 0: register read_sel2
    logic       and_en;
    logic       or_en;
    logic       add_en;
    logic       sub_en;       // subtract mode of the adder (used by MIN)
    logic       mul_en;
    logic       shift_en;
    logic       shift_dir;    // 0: left, 1: right
    dest_sel_e  dest_value;   // result select
    logic       data_in;      // 1: store data is value, 0: register read_sel1
    logic       write_en;     // data memory write
    logic       read_en;      // data memory read
    logic       value_select; // write back value (LOADI)
    logic       mem_select;   // write back memory read data (LOAD)
    logic       reg_write;    // write the register file
  } ctrl_word_t;

  // ID/EX stage register: both register reads and the whole control word.
  typedef struct packed {
    ctrl_word_t ctrl;
    word_t      read1;        // register read_sel1
    word_t      read2;        // register read_sel2
  } id_ex_t;

  // EX/MEM stage register: the unit result, the store-data candidates and the
  // controls of the MEM and WB stages.
  typedef struct packed {
    word_t      alu;          // selected execution-unit result
    word_t      read1;        // register read_sel1 (STORE data)
    word_t      value;
    mem_addr_t  addr;
    logic       data_in;
    logic       write_en;
    logic       read_en;
    reg_sel_t   dest_reg;
    logic       value_select;
    logic       mem_select;
    logic       reg_write;
  } ex_mem_t;

  // MEM/WB stage register: the non-memory write-back value (already chosen
  // between the unit result and the immediate value) and the WB controls. The
  // memory read data is registered inside the SRAM and joins it in WB.
  typedef struct packed {
    word_t      value;
    reg_sel_t   dest_reg;
    logic       mem_select;
    logic       reg_write;
  } mem_wb_t;

  // A control word that does nothing (NOP).
  localparam ctrl_word_t CTRL_NOP = '{dest_value: DEST_AND, default: '0};

endpackage
