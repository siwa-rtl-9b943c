// reg_file: 32 x 32-bit general purpose register file of the Siwa CPU.
//
// Two asynchronous read ports (rs1, rs2) and one write port that writes on
// the rising clock edge when we is high. Register 0 always reads zero and
// ignores writes, as RV32I requires. Reading a register in the same cycle
// it is written returns the old value; the multi-cycle control unit never
// reads a result in the cycle it is written. The register file of the
// fabricated SoC is built from latches with pass-gate read multiplexers;
// here it is written with edge-triggered storage, which behaves the same at
// the port level and keeps the code free of latch timing.
// Size and ports follow the document; flip-flop storage instead of latches,
// and the old value on a same-cycle read, are this design's choice.
module reg_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 32,
  parameter int unsigned AW    = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
endmodule
