// sram512: the CPU's 512-bit data memory, 32 words of 16 bits in two banks.
//
// The memory is split into two 256-bit banks of 16 words each. Address bit 4
// selects the bank and bits 3:0 go to the word-line decoder inside the bank.
// A write stores wdata into the addressed word on the rising clock edge. A
// read drives the addressed word through the sense amplifiers into the output
// register on the same edge, so rdata is valid one cycle after read_en (the
// read lands in the MEM/WB stage). rdata holds its value when no read is made.
// read_en and write_en are not expected together; if both are set, the write
// happens and rdata returns the word's old contents.
//
// The split into two 256-bit banks and the write path / sense amplifier
// arrangement follow the circuit; bitline precharge has no counterpart here,
// and the registered read port is this design's choice. The array contents
// are not reset (an SRAM has no reset); rdata resets to zero.
module sram512
  import cpu_pkg::*;
#(
  parameter int unsigned BANK_WORDS = 16   // words per bank (256 bits / 16)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  mem_addr_t addr,
  input  logic      write_en,
  input  logic      read_en,
  input  word_t     wdata,
  output word_t     rdata
);

  localparam int unsigned WL_W = $clog2(BANK_WORDS);

  word_t bank0 [BANK_WORDS];
  word_t bank1 [BANK_WORDS];

  logic            bank_sel;
  logic [WL_W-1:0] wl;       // word line within the selected bank

  assign bank_sel = addr[MEM_AW-1];
  assign wl       = addr[WL_W-1:0];

  always_ff @(posedge clk) begin
    if (write_en) begin
      if (bank_sel) bank1[wl] <= wdata;
      else          bank0[wl] <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rdata <= '0;
    else if (read_en) rdata <= bank_sel ? bank1[wl] : bank0[wl];
  end

endmodule
