// sram: single-port synchronous SRAM, 8 kB as 2048 words of 32 bits.
//
// Stands for the foundry SRAM macro of the SoC, which serves as the one
// memory level for both program and data. One access per clock: with cs
// high and we high the word at addr is written on the rising edge; with cs
// high and we low the word at addr appears on rdata after that edge (one
// cycle read latency). rdata holds its value while cs is low. There is no
// byte mask: the memory controller writes partial words by
// read-modify-write. The port list and the missing byte mask are this
// design's choice; only the size is given for the macro.
module sram #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          cs,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (cs) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
