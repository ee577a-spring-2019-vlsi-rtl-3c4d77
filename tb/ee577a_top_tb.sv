// ee577a_top_tb: end-to-end test of the whole design at its default sizes.
//
// CPU side: runs the CPU's reference program and then, from reset, the
// accelerator's workload as CPU code (five products x_i * w_i summed into
// r0), with write-backs checked against the reference model in value and in
// timing (three cycles after issue), the final registers against the
// expected values and the workload's length (26 cycles from the first
// instruction to the last write-back). Accelerator side: runs the same five
// (x, w) pairs through the multiply-accumulate unit, checks the sum 123 and
// its latency (the full sum from cycle N_PAIRS + 2 after the first pair),
// then a case with negative weights.
// It reports the cycles each side needs for the workload.
//
// Each mechanism of the design is counted and must happen at least once:
// every execution unit and both shift directions, immediate operands,
// memory writes from a register and from an immediate, memory reads, the
// LOADI value path, NOPs spacing dependent instructions, accelerator
// accumulation, done, the r_final clear, and a pair arriving after done that
// must be ignored.
`timescale 1ns/1ps
module ee577a_top_tb;
  import cpu_pkg::*;
  import cpu_asm_pkg::*;

  logic        clk = 0;
  logic        cpu_rst_n = 0;
  ctrl_word_t  cpu_ctrl = CTRL_NOP;
  word_t       cpu_regs [NUM_REGS];
  logic        cpu_wb_we;
  reg_sel_t    cpu_wb_addr;
  word_t       cpu_wb_data;
  logic        bnn_r = 1, bnn_r_final = 0, bnn_in_valid = 0;
  logic [4:0]  bnn_x = '0, bnn_w = '0;
  logic [9:0]  bnn_s;
  logic        bnn_done;

  ee577a_top dut (.*);

  always #2.5 clk = ~clk;   // 5 ns clock, as in the CPU / accelerator comparison

  int checks = 0, failures = 0;
  int cyc = 0;
  int last_issue = 0;  // cycle count at the last applied control word
  int nops_inserted = 0;

  typedef enum int {
    M_AND, M_OR, M_ADD, M_MIN, M_MUL, M_SFL, M_SFR, M_IMM, M_STORE_REG,
    M_STORE_IMM, M_LOAD, M_LOADI, M_HAZARD_NOP, M_BNN_ACC, M_BNN_DONE,
    M_BNN_CLEAR, M_BNN_IGNORED, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  typedef struct { int cycle; reg_sel_t rd; word_t val; } wb_exp_t;
  wb_exp_t  expq [$];
  instr_t   hist [3];
  cpu_model model;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // CPU write-back monitor
  always @(posedge clk) begin
    wb_exp_t e;
    if (cpu_rst_n) begin
      if (cpu_wb_we) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL cycle %0d: unexpected write-back", cyc);
        end else begin
          e = expq.pop_front();
          if (e.cycle != cyc || e.rd != cpu_wb_addr || e.val != cpu_wb_data) begin
            failures++;
            $display("FAIL cycle %0d: write-back r%0d=%h, expected r%0d=%h in cycle %0d",
                     cyc, cpu_wb_addr, cpu_wb_data, e.rd, e.val, e.cycle);
          end
        end
      end else if (expq.size() != 0 && expq[0].cycle == cyc) begin
        checks++; failures++;
        $display("FAIL cycle %0d: missing write-back", cyc);
        void'(expq.pop_front());
      end
    end
    cyc <= cyc + 1;
  end

  task automatic count_mech(instr_t i);
    case (i.op)
      I_AND, I_ANDI: mech[M_AND]++;
      I_OR,  I_ORI:  mech[M_OR]++;
      I_ADD, I_ADDI: mech[M_ADD]++;
      I_MIN, I_MINI: mech[M_MIN]++;
      I_MUL, I_MULI: mech[M_MUL]++;
      I_SFL:    mech[M_SFL]++;
      I_SFR:    mech[M_SFR]++;
      I_STORE:  mech[M_STORE_REG]++;
      I_STOREI: mech[M_STORE_IMM]++;
      I_LOAD:   mech[M_LOAD]++;
      I_LOADI:  mech[M_LOADI]++;
      default: ;
    endcase
    if (is_imm(i)) mech[M_IMM]++;
  endtask

  task automatic issue_raw(instr_t i);
    word_t   r;
    wb_exp_t e;
    @(negedge clk);
    cpu_ctrl = encode(i);
    last_issue = cyc;
    r = model.step(i);
    if (writes_reg(i)) begin
      e.cycle = cyc + 3; e.rd = i.rd; e.val = r;
      expq.push_back(e);
    end
    hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = i;
    count_mech(i);
  endtask

  task automatic issue(instr_t i);
    while (hazard(i, hist)) begin
      issue_raw(mk(I_NOP));
      nops_inserted++;
      mech[M_HAZARD_NOP]++;
    end
    issue_raw(i);
  endtask

  task automatic drain();
    repeat (5) issue_raw(mk(I_NOP));
    @(negedge clk);
    check(expq.size(), 0, "all write-backs done");
    for (int k = 0; k < NUM_REGS; k++) check(cpu_regs[k], model.regs[k], $sformatf("r%0d vs model", k));
  endtask

  int wv [5] = '{5, 8, 3, 0, 1};
  // register state after the dot-product program: the sum 123, the partial
  // sum 119, then the products 88, 21, 0 and 4
  word_t bnn_cpu_regs [NUM_REGS] = '{16'h007b, 16'h0077, 16'h0058, 16'h0015,
                                     16'h0000, 16'h0004, 16'h0000, 16'h0000};
  int xv [5] = '{2, 11, 7, 14, 4};

  initial begin
    word_t expected [NUM_REGS] = '{16'h0000, 16'h003c, 16'h009a, 16'h0058,
                                   16'h0198, 16'h0058, 16'h0198, 16'h0000};
    int cpu_start, cpu_cycles, bnn_start, bnn_cycles;
    model = new();
    foreach (hist[k]) hist[k] = mk(I_NOP);
    foreach (mech[k]) mech[k] = 0;
    repeat (3) @(negedge clk);
    cpu_rst_n = 1;
    bnn_r = 0;

    // ---------- CPU: reference program ----------
    issue(mk(I_STOREI, .imm('h002f), .addr('h0A)));
    issue(mk(I_STOREI, .imm('h0004), .addr('h0B)));
    issue(mk(I_STOREI, .imm('h000B), .addr('h10)));
    issue(mk(I_STOREI, .imm('h00EE), .addr('h11)));
    issue(mk(I_LOAD, .rd(1), .addr('h0A)));
    issue(mk(I_LOAD, .rd(2), .addr('h0B)));
    issue(mk(I_LOAD, .rd(3), .addr('h10)));
    issue(mk(I_LOAD, .rd(4), .addr('h11)));
    issue(mk(I_MUL, .rd(5), .rs1(1), .rs2(2)));
    issue(mk(I_MUL, .rd(6), .rs1(3), .rs2(4)));
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
    for (int k = 0; k < NUM_REGS; k++) check(cpu_regs[k], expected[k], $sformatf("reference program r%0d", k));

    // a few more instructions so that MIN and SFR run too
    issue(mk(I_MIN, .rd(7), .rs1(1), .rs2(4)));
    issue(mk(I_MINI, .rd(5), .rs1(4), .imm('h0100)));
    issue(mk(I_SFR, .rd(6), .rs1(4), .imm('h0002)));
    drain();
    check(cpu_regs[7], 16'h003c, "MIN(003c, 0198)");
    check(cpu_regs[5], 16'h0100, "MINI(0198, 0100)");
    check(cpu_regs[6], 16'h0066, "SFR(0198, 2)");

    // ---------- CPU: the accelerator's workload as a program ----------
    // From reset: the five weights go to r1..r5, each is multiplied by its
    // input, and the products are summed in a chain that leaves the total in
    // r0 and the partial sum before the last product in r1.
    @(negedge clk);
    cpu_rst_n = 0;
    @(negedge clk);
    cpu_rst_n = 1;
    foreach (model.regs[k]) model.regs[k] = '0;
    foreach (hist[k]) hist[k] = mk(I_NOP);
    for (int p = 0; p < 5; p++) begin
      issue(mk(I_LOADI, .rd(reg_sel_t'(p + 1)), .imm(word_t'(wv[p]))));
      if (p == 0) cpu_start = last_issue;
    end
    for (int p = 0; p < 5; p++)
      issue(mk(I_MULI, .rd(reg_sel_t'(p + 1)), .rs1(reg_sel_t'(p + 1)), .imm(word_t'(xv[p]))));
    issue(mk(I_ADD, .rd(0), .rs1(1), .rs2(2)));
    issue(mk(I_ADD, .rd(1), .rs1(0), .rs2(3)));
    issue(mk(I_ADD, .rd(1), .rs1(1), .rs2(4)));
    issue(mk(I_ADD, .rd(0), .rs1(1), .rs2(5)));
    // the last write-back lands at the end of its issue cycle + 3
    cpu_cycles = last_issue + 4 - cpu_start;
    drain();
    for (int k = 0; k < NUM_REGS; k++)
      check(cpu_regs[k], bnn_cpu_regs[k], $sformatf("dot-product program r%0d", k));
    check(cpu_cycles, 26, "dot-product program length in cycles");

    // ---------- accelerator: the same workload ----------
    @(negedge clk);
    bnn_r_final = 1; @(negedge clk); bnn_r_final = 0;
    mech[M_BNN_CLEAR]++;
    bnn_start = cyc;
    for (int p = 0; p < 7; p++) begin
      bnn_in_valid = 1;
      bnn_x = 5'(xv[p < 5 ? p : 4]); bnn_w = 5'(wv[p < 5 ? p : 4]);
      @(negedge clk);
      if (bnn_s != 0) mech[M_BNN_ACC]++;
      if (p >= 5) mech[M_BNN_IGNORED]++;
      if (p < 6) check(bnn_done, 0, "done not yet");
    end
    bnn_in_valid = 0;
    check(bnn_done, 1, "done after N_PAIRS + 2 cycles");
    check(bnn_s, 10'd123, "accelerator sum");
    if (bnn_done) mech[M_BNN_DONE]++;
    bnn_cycles = cyc - bnn_start;
    repeat (3) @(negedge clk);
    check(bnn_s, 10'd123, "sum unchanged by pairs after done");

    // a signed case: epsilon-like weights (-6, -6, 5, 3, 14) on inputs (1..5)
    bnn_r_final = 1; @(negedge clk); bnn_r_final = 0;
    check(bnn_s, 0, "r_final clears the sum");
    mech[M_BNN_CLEAR]++;
    begin
      int ev [5] = '{-6, -6, 5, 3, 14};
      int acc = 0;
      logic [9:0] exp_s;
      for (int p = 0; p < 5; p++) begin
        bnn_in_valid = 1; bnn_x = 5'(p + 1); bnn_w = 5'(ev[p]);
        acc += (p + 1) * ev[p];
        @(negedge clk);
      end
      bnn_in_valid = 0;
      repeat (3) @(negedge clk);
      exp_s = 10'(acc);
      check(bnn_s, exp_s, "signed accelerator sum");
    end

    $display("workload x.w over 5 pairs: CPU %0d cycles, accelerator %0d cycles", cpu_cycles, bnn_cycles);
    $display("hazard NOPs inserted: %0d", nops_inserted);
    for (int k = 0; k < M_COUNT; k++) begin
      $display("mechanism %-14s happened %0d times", mech_e'(k), mech[k]);
      checks++;
      if (mech[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(k)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
