// bnn_mac_tb: self-checking test of the BNN multiply-accumulate accelerator.
// First replays the accelerator's reference case, W = (5, 8, 3, 0, 1) and
// X = (2, 11, 7, 14, 4), one pair per clock: the running sum must step through
// 10, 98, 119, 119, 123, each value appearing three cycles after its pair,
// and done must rise in the cycle the fifth product is in (cycle 7 after the
// first pair, counting that pair's cycle as 0). Then random signed pairs,
// random gaps between pairs and r_final clears are checked against a model
// that accumulates the two's-complement products modulo 2^10, and the result
// must not change once done is high even if pairs keep arriving.
`timescale 1ns/1ps
module bnn_mac_tb;
  logic       clk = 0, r = 1, r_final = 0, in_valid = 0;
  logic [4:0] x = '0, w = '0;
  logic [9:0] s;
  logic       done;
  int checks = 0, failures = 0;

  bnn_mac dut (.*);

  always #2.5 clk = ~clk;   // 5 ns clock

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int sval(logic [4:0] v);
    return v[4] ? int'(v) - 32 : int'(v);
  endfunction

  int wv [5] = '{5, 8, 3, 0, 1};
  int xv [5] = '{2, 11, 7, 14, 4};
  int exp_run [8] = '{0, 0, 10, 98, 119, 119, 123, 123};  // sum in cycle c+1

  initial begin
    repeat (2) @(negedge clk);
    r = 0;
    // reference case: pairs in cycles 0..4; checked after each rising edge
    for (int c = 0; c < 8; c++) begin
      if (c < 5) begin in_valid = 1; x = 5'(xv[c]); w = 5'(wv[c]); end
      else begin in_valid = 1; x = 5'd4; w = 5'd1; end   // inputs held, as in the waveform
      @(posedge clk); #0.1;
      check(s, exp_run[c], $sformatf("running sum in cycle %0d", c + 1));
      check(done, c >= 6, $sformatf("done in cycle %0d", c + 1));
    end
    repeat (4) @(posedge clk);
    #0.1 check(s, 123, "sum holds after done");
    @(negedge clk); in_valid = 0;

    // random sequences
    for (int t = 0; t < 300; t++) begin
      int acc, sent, cyc;
      logic [9:0] exp_s;
      @(negedge clk);
      r_final = 1; @(negedge clk); r_final = 0;
      check(s, 0, "cleared by r_final");
      acc = 0; sent = 0; cyc = 0;
      while (sent < 5) begin
        in_valid = ($urandom_range(3, 0) != 0);
        x = 5'($urandom); w = 5'($urandom);
        if (in_valid) begin acc += sval(x) * sval(w); sent++; end
        @(negedge clk); cyc++;
      end
      in_valid = 1; x = 5'($urandom); w = 5'($urandom);   // extra pair must be ignored
      repeat (2) @(negedge clk);
      in_valid = 0;
      check(done, 1, "done after five pairs");
      exp_s = 10'(acc);
      check(s, exp_s, "random sum");
      repeat (2) @(negedge clk);
      check(s, exp_s, "random sum holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
