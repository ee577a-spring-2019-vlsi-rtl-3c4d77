// reg_file: the 8 x 16-bit register file of the CPU's instruction-decode stage.
//
// A 3-to-8 decoder (decoder3to8) turns the write address into one-hot
// register enables; the write data is fanned out to all eight registers (the
// 1-to-8 demux of the write-back path) and only the selected register (reg16)
// loads it on the rising clock edge. The per-register enable stands in for the
// clock gating the circuit uses to save dynamic power. Two independent 8-to-1
// multiplexers (mux8to1) read the registers combinationally. Registers reset
// to zero (the reset is this design's choice; the circuit has none).
//
// Timing: a write in cycle n is visible on the read ports from cycle n+1;
// there is no write-to-read bypass in the same cycle, as in the circuit.
module reg_file
  import cpu_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     we,          // write enable (Reg_write in the WB stage)
  input  reg_sel_t waddr,       // register to write
  input  word_t    wdata,
  input  reg_sel_t raddr1,      // read port 1 select
  input  reg_sel_t raddr2,      // read port 2 select
  output word_t    rdata1,
  output word_t    rdata2,
  output word_t    regs_o [NUM_REGS]  // all registers, for observation
);

  word_t               regs [NUM_REGS];
  logic [NUM_REGS-1:0] wsel;  // decoded write selects (clock-gate enables)

  // 3-to-8 decoder, gated by the write enable
  decoder3to8 u_dec (.en(we), .in(waddr), .out(wsel));

  // eight 16-bit registers; the write data is fanned out to all of them
  // (the 1-to-8 demux) and only the selected one loads it
  for (genvar i = 0; i < NUM_REGS; i++) begin : g_reg
    reg16 u_reg (.clk(clk), .rst_n(rst_n), .en(wsel[i]), .d(wdata), .q(regs[i]));
  end

  // two 8-to-1 read multiplexers
  mux8to1 u_rd1 (.in(regs), .sel(raddr1), .out(rdata1));
  mux8to1 u_rd2 (.in(regs), .sel(raddr2), .out(rdata2));

  assign regs_o = regs;

endmodule
