// alu: 32-bit arithmetic and logic unit of the Siwa CPU.
//
// Operations (selected by the control code op, see siwa_pkg::alu_op_e):
// add, subtract, signed and unsigned set-less-than, AND, OR, XOR, logical
// left/right and arithmetic right shift, and pass-B. Addition, subtraction
// and both comparisons share one carry-skip adder (subtraction is a + ~b + 1;
// the comparisons read its carry and overflow); shifts go through a barrel
// shifter, as the SoC chose for area and delay. Flags eq/lt/ltu come from
// a - b, valid for every op except ADD, so the control unit resolves
// branches with the same unit (it selects SUB for them). Combinational: one ALU evaluation per instruction.
// The operation list, the carry-skip adder and the barrel shifter follow
// the document; the operation encoding and the flag outputs are this
// design's choice.
module alu
  import siwa_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         eq,    // a == b
  output logic         lt,    // a <  b signed
  output logic         ltu    // a <  b unsigned
);
  logic         sub;
  logic [W-1:0] bx, sum, sh;
  logic         cout, ovf;

  // Add uses b, everything else that needs the adder subtracts.
  assign sub = (op != ALU_ADD);
  assign bx  = sub ? ~b : b;

  csk_adder #(.W(W)) u_add (.a(a), .b(bx), .cin(sub), .sum(sum), .cout(cout));

  barrel_shifter #(.W(W)) u_sh (
    .din(a), .shamt(b[$clog2(W)-1:0]), .left(op == ALU_SLL),
    .arith(op == ALU_SRA), .dout(sh)
  );

  assign ovf = (a[W-1] != b[W-1]) && (sum[W-1] != a[W-1]);
  assign eq  = (sum == '0);
  assign lt  = sum[W-1] ^ ovf;
  assign ltu = ~cout;

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: y = sum;
      ALU_SLT:          y = W'(lt);
      ALU_SLTU:         y = W'(ltu);
      ALU_XOR:          y = a ^ b;
      ALU_OR:           y = a | b;
      ALU_AND:          y = a & b;
      ALU_SLL, ALU_SRL, ALU_SRA: y = sh;
      ALU_PASSB:        y = b;
      default:          y = '0;
    endcase
  end
endmodule
