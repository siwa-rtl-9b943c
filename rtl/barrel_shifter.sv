// barrel_shifter: logarithmic barrel shifter for SLL, SRL and SRA.
//
// A left shift is done by bit-reversing the operand, shifting right and
// reversing back, so one right-shifting network of log2(W) stages serves
// all three shifts. Stage k moves the word by 2**k places when bit k of the
// shift amount is set, filling with zero or with the sign bit (arithmetic
// right shift). The barrel structure is the one the SoC selected for its
// ALU; the reversal trick is this design's choice. Combinational.
module barrel_shifter #(
  parameter int unsigned W  = 32,
  parameter int unsigned SW = $clog2(W)
) (
  input  logic [W-1:0]  din,
  input  logic [SW-1:0] shamt,
  input  logic          left,    // 1: shift left logical
  input  logic          arith,   // 1: arithmetic right shift (ignored if left)
  output logic [W-1:0]  dout
);
  logic [W-1:0] stage [SW+1];
  logic [W-1:0] rev_in, res;
  logic         fill;

  always_comb begin
    for (int i = 0; i < W; i++) rev_in[i] = din[W-1-i];
  end

  assign fill     = arith & ~left & din[W-1];
  assign stage[0] = left ? rev_in : din;

  for (genvar k = 0; k < SW; k++) begin : g_stage
    localparam int unsigned S = 1 << k;
    assign stage[k+1] = shamt[k] ? {{S{fill}}, stage[k][W-1:S]} : stage[k];
  end

  assign res = stage[SW];
  always_comb begin
    for (int i = 0; i < W; i++) dout[i] = left ? res[W-1-i] : res[i];
  end
endmodule
