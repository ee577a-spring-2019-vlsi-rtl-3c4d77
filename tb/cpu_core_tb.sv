// cpu_core_tb: self-checking test of the pipelined CPU.
//
// Instructions are assembled into control words (cpu_asm_pkg) and issued one
// per clock. Before each instruction that reads a register written by one of
// the three previous ones, the test issues NOPs, as the assembler does, since
// the pipeline neither stalls nor forwards. Every instruction is also run on
// the reference model; each register write-back it predicts must appear on the
// write-back port exactly three cycles after the instruction was issued, with
// the predicted register and value, and no other write-back may happen.
//
// Part 1 runs the CPU's reference program (memory set-up with STOREI, LOADs,
// two MULs, SFL, OR, ANDI, ADD, STOREs and LOADs back) and compares the final
// registers with the expected 0000 003c 009a 0058 0198 0058 0198 0000.
// Part 2 runs 3000 random instructions of all seventeen kinds.
`timescale 1ns/1ps
module cpu_core_tb;
  import cpu_pkg::*;
  import cpu_asm_pkg::*;

  logic       clk = 0, rst_n = 0;
  ctrl_word_t ctrl = CTRL_NOP;
  word_t      regs_o [NUM_REGS];
  logic       wb_we;
  reg_sel_t   wb_addr;
  word_t      wb_data;

  cpu_core dut (.*);

  always #2.5 clk = ~clk;   // 5 ns clock

  int checks = 0, failures = 0;
  int cyc = 0;
  int nops_inserted = 0, issued = 0;
  int op_count [NUM_OPS];

  typedef struct { int cycle; reg_sel_t rd; word_t val; } wb_exp_t;
  wb_exp_t  expq [$];
  instr_t   hist [3];
  cpu_model model;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write-back monitor: sampled just before each rising edge
  always @(posedge clk) begin
    wb_exp_t e;
    if (rst_n) begin
      if (wb_we) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL cycle %0d: unexpected write-back r%0d=%h", cyc, wb_addr, wb_data);
        end else begin
          e = expq.pop_front();
          if (e.cycle != cyc || e.rd != wb_addr || e.val != wb_data) begin
            failures++;
            $display("FAIL cycle %0d: write-back r%0d=%h, expected r%0d=%h in cycle %0d",
                     cyc, wb_addr, wb_data, e.rd, e.val, e.cycle);
          end
        end
      end else if (expq.size() != 0 && expq[0].cycle == cyc) begin
        checks++; failures++;
        $display("FAIL cycle %0d: missing write-back r%0d=%h", cyc, expq[0].rd, expq[0].val);
        void'(expq.pop_front());
      end
    end
    cyc <= cyc + 1;
  end

  task automatic push_hist(instr_t i);
    hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = i;
  endtask

  task automatic issue_raw(instr_t i);
    word_t r;
    wb_exp_t e;
    @(negedge clk);
    ctrl = encode(i);
    r = model.step(i);
    if (writes_reg(i)) begin
      e.cycle = cyc + 3; e.rd = i.rd; e.val = r;
      expq.push_back(e);
    end
    push_hist(i);
    op_count[i.op]++;
  endtask

  // issue with the hazard spacing the assembler guarantees
  task automatic issue(instr_t i);
    while (hazard(i, hist)) begin
      issue_raw(mk(I_NOP));
      nops_inserted++;
    end
    issue_raw(i);
    issued++;
  endtask

  task automatic drain();
    repeat (6) issue_raw(mk(I_NOP));
    @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d write-backs never happened", expq.size()); end
    for (int k = 0; k < NUM_REGS; k++) begin
      checks++;
      if (regs_o[k] !== model.regs[k]) begin
        failures++; $display("FAIL r%0d = %h, model %h", k, regs_o[k], model.regs[k]);
      end
    end
  endtask

  initial begin
    word_t expected [NUM_REGS] = '{16'h0000, 16'h003c, 16'h009a, 16'h0058,
                                   16'h0198, 16'h0058, 16'h0198, 16'h0000};
    model = new();
    foreach (hist[k]) hist[k] = mk(I_NOP);
    foreach (op_count[k]) op_count[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- part 1: reference program ----
    issue(mk(I_STOREI, .imm('h002f), .addr('h0A)));
    issue(mk(I_STOREI, .imm('h0004), .addr('h0B)));
    issue(mk(I_STOREI, .imm('h000B), .addr('h10)));   // burst of 2: 10H, 11H
    issue(mk(I_STOREI, .imm('h00EE), .addr('h11)));
    issue(mk(I_LOAD, .rd(1), .addr('h0A)));
    issue(mk(I_LOAD, .rd(2), .addr('h0B)));
    issue(mk(I_LOAD, .rd(3), .addr('h10)));
    issue(mk(I_LOAD, .rd(4), .addr('h11)));
    issue(mk(I_MUL, .rd(5), .rs1(1), .rs2(2)));
    issue(mk(I_MUL, .rd(6), .rs1(3), .rs2(4)));
    issue(mk(I_NOP));
    issue(mk(I_NOP));
    issue(mk(I_STORE, .rs1(5), .addr('h00)));
    issue(mk(I_STORE, .rs1(6), .addr('h01)));
    issue(mk(I_SFL, .rd(5), .rs1(3), .imm('h0003)));
    issue(mk(I_OR, .rd(6), .rs1(5), .rs2(4)));
    issue(mk(I_ANDI, .rd(6), .rs1(6), .imm('h00AA)));
    issue(mk(I_ADD, .rd(6), .rs1(6), .rs2(4)));
    issue(mk(I_STORE, .rs1(5), .addr('h02)));
    issue(mk(I_STORE, .rs1(6), .addr('h03)));
    issue(mk(I_LOAD, .rd(1), .addr('h00)));
    issue(mk(I_LOAD, .rd(2), .addr('h01)));
    issue(mk(I_LOAD, .rd(3), .addr('h02)));
    issue(mk(I_LOAD, .rd(4), .addr('h03)));
    drain();
    for (int k = 0; k < NUM_REGS; k++) begin
      checks++;
      if (regs_o[k] !== expected[k]) begin
        failures++; $display("FAIL reference program r%0d = %h, expected %h", k, regs_o[k], expected[k]);
      end
    end
    $display("reference program: %0d instructions, %0d NOPs inserted", issued, nops_inserted);

    // ---- part 2: random instructions ----
    for (int a = 0; a < MEM_WORDS; a++) issue(mk(I_STOREI, .imm($urandom), .addr(a)));
    for (int n = 0; n < 3000; n++) begin
      op_e op;
      op = op_e'($urandom_range(NUM_OPS - 1, 0));
      issue(mk(op, $urandom_range(7, 0), $urandom_range(7, 0), $urandom_range(7, 0),
               (op inside {I_SFL, I_SFR}) ? $urandom_range(15, 0) : $urandom, $urandom_range(31, 0)));
    end
    drain();

    for (int k = 1; k < NUM_OPS; k++) begin
      checks++;
      if (op_count[k] == 0) begin failures++; $display("FAIL opcode %s never issued", op_e'(k)); end
    end
    $display("issued %0d instructions, %0d hazard NOPs, %0d cycles", issued, nops_inserted, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
