// csk_adder: constant-width carry-skip adder (CSK).
//
// The W-bit operands are cut into blocks of BLK bits. Inside a block the
// carry ripples; in parallel each block forms its group propagate (all bits
// propagate). When a block propagates, its carry-in skips straight to its
// carry-out through a 2:1 multiplexer, so the worst-case path is one ripple
// block, the skip multiplexers, and one more ripple block. The carry-skip
// topology with constant block width is the one the SoC selected for its
// ALU adder; the block width of 4 bits is this design's choice.
// Purely combinational: sum = a + b + cin, cout is the carry out of bit W-1.
module csk_adder #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = (W + BLK - 1) / BLK;

  logic [NB:0]  cblk;         // carry into each block
  logic [W-1:0] p, g;

  assign p = a ^ b;
  assign g = a & b;
  assign cblk[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int unsigned LO = k * BLK;
    localparam int unsigned HI = ((k + 1) * BLK > W) ? W - 1 : (k + 1) * BLK - 1;
    localparam int unsigned N  = HI - LO + 1;
    logic [N:0] c;
    logic       grp_p;
    assign c[0] = cblk[k];
    for (genvar i = 0; i < N; i++) begin : g_bit
      assign c[i+1]      = g[LO+i] | (p[LO+i] & c[i]);
      assign sum[LO+i]   = p[LO+i] ^ c[i];
    end
    assign grp_p     = &p[HI:LO];
    // skip multiplexer
    assign cblk[k+1] = grp_p ? cblk[k] : c[N];
  end

  assign cout = cblk[NB];
endmodule
