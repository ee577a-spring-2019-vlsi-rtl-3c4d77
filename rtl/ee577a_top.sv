// ee577a_top: the two designs side by side, the pipelined CPU and the BNN
// multiply-accumulate accelerator.
//
// The two share only the clock; each has its own reset and brings its own
// ports out. The CPU takes one pre-decoded control word per cycle and exposes
// its register file and write-back strobe; the accelerator takes one (x, w)
// pair per cycle and returns the accumulated sum and a done flag. Active-low
// reset for the CPU and active-high resets for the accelerator follow the
// conventions of each block.
module ee577a_top
  import cpu_pkg::*;
(
  input  logic        clk,
  // CPU
  input  logic        cpu_rst_n,
  input  ctrl_word_t  cpu_ctrl,
  output word_t       cpu_regs [NUM_REGS],
  output logic        cpu_wb_we,
  output reg_sel_t    cpu_wb_addr,
  output word_t       cpu_wb_data,
  // BNN accelerator
  input  logic        bnn_r,
  input  logic        bnn_r_final,
  input  logic        bnn_in_valid,
  input  logic [4:0]  bnn_x,
  input  logic [4:0]  bnn_w,
  output logic [9:0]  bnn_s,
  output logic        bnn_done
);

  cpu_core u_cpu (
    .clk     (clk),
    .rst_n   (cpu_rst_n),
    .ctrl    (cpu_ctrl),
    .regs_o  (cpu_regs),
    .wb_we   (cpu_wb_we),
    .wb_addr (cpu_wb_addr),
    .wb_data (cpu_wb_data)
  );

  bnn_mac u_bnn (
    .clk      (clk),
    .r        (bnn_r),
    .r_final  (bnn_r_final),
    .in_valid (bnn_in_valid),
    .x        (bnn_x),
    .w        (bnn_w),
    .s        (bnn_s),
    .done     (bnn_done)
  );

endmodule
