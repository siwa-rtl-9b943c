// rv_asm_pkg: RV32I instruction encoders for the testbenches.
//
// Each function returns the 32-bit machine word of one instruction in the
// standard RV32I R/I/S/B/U/J layouts, so test programs can be written as
// lists of calls instead of hand-assembled hex.
// The encodings are the standard RV32I ones (plus MRET); the CSR numbers used with
// them come from siwa_pkg and are this design's choice.
package rv_asm_pkg;
  function automatic logic [31:0] r_t(input logic [6:0] f7, input logic [4:0] rs2, rs1,
                                      input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] i_t(input logic [11:0] imm, input logic [4:0] rs1,
                                      input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] op);
    return {imm, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] s_t(input logic [11:0] imm, input logic [4:0] rs2, rs1,
                                      input logic [2:0] f3);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_t(input logic [12:0] imm, input logic [4:0] rs2, rs1,
                                      input logic [2:0] f3);
    return {imm[12], imm[10:5], rs2, rs1, f3, imm[4:1], imm[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] LUI(input logic [4:0] rd, input logic [19:0] u);   return {u, rd, 7'b0110111}; endfunction
  function automatic logic [31:0] AUIPC(input logic [4:0] rd, input logic [19:0] u); return {u, rd, 7'b0010111}; endfunction
  function automatic logic [31:0] JAL(input logic [4:0] rd, input logic [20:0] o);
    return {o[20], o[10:1], o[11], o[19:12], rd, 7'b1101111};
  endfunction
  function automatic logic [31:0] JALR(input logic [4:0] rd, rs1, input logic [11:0] o); return i_t(o, rs1, 3'b000, rd, 7'b1100111); endfunction
  function automatic logic [31:0] BEQ (input logic [4:0] a, b, input logic [12:0] o); return b_t(o, b, a, 3'b000); endfunction
  function automatic logic [31:0] BNE (input logic [4:0] a, b, input logic [12:0] o); return b_t(o, b, a, 3'b001); endfunction
  function automatic logic [31:0] BLT (input logic [4:0] a, b, input logic [12:0] o); return b_t(o, b, a, 3'b100); endfunction
  function automatic logic [31:0] BGE (input logic [4:0] a, b, input logic [12:0] o); return b_t(o, b, a, 3'b101); endfunction
  function automatic logic [31:0] BLTU(input logic [4:0] a, b, input logic [12:0] o); return b_t(o, b, a, 3'b110); endfunction
  function automatic logic [31:0] BGEU(input logic [4:0] a, b, input logic [12:0] o); return b_t(o, b, a, 3'b111); endfunction
  function automatic logic [31:0] LB (input logic [4:0] rd, rs1, input logic [11:0] o); return i_t(o, rs1, 3'b000, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LH (input logic [4:0] rd, rs1, input logic [11:0] o); return i_t(o, rs1, 3'b001, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LW (input logic [4:0] rd, rs1, input logic [11:0] o); return i_t(o, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LBU(input logic [4:0] rd, rs1, input logic [11:0] o); return i_t(o, rs1, 3'b100, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LHU(input logic [4:0] rd, rs1, input logic [11:0] o); return i_t(o, rs1, 3'b101, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SB(input logic [4:0] rs2, rs1, input logic [11:0] o); return s_t(o, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] SH(input logic [4:0] rs2, rs1, input logic [11:0] o); return s_t(o, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] SW(input logic [4:0] rs2, rs1, input logic [11:0] o); return s_t(o, rs2, rs1, 3'b010); endfunction
  function automatic logic [31:0] ADDI (input logic [4:0] rd, rs1, input logic [11:0] i); return i_t(i, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTI (input logic [4:0] rd, rs1, input logic [11:0] i); return i_t(i, rs1, 3'b010, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTIU(input logic [4:0] rd, rs1, input logic [11:0] i); return i_t(i, rs1, 3'b011, rd, 7'b0010011); endfunction
  function automatic logic [31:0] XORI (input logic [4:0] rd, rs1, input logic [11:0] i); return i_t(i, rs1, 3'b100, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ORI  (input logic [4:0] rd, rs1, input logic [11:0] i); return i_t(i, rs1, 3'b110, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI (input logic [4:0] rd, rs1, input logic [11:0] i); return i_t(i, rs1, 3'b111, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI (input logic [4:0] rd, rs1, input logic [4:0] s); return r_t(7'h00, s, rs1, 3'b001, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRLI (input logic [4:0] rd, rs1, input logic [4:0] s); return r_t(7'h00, s, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRAI (input logic [4:0] rd, rs1, input logic [4:0] s); return r_t(7'h20, s, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ADD (input logic [4:0] rd, a, b); return r_t(7'h00, b, a, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (input logic [4:0] rd, a, b); return r_t(7'h20, b, a, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLL (input logic [4:0] rd, a, b); return r_t(7'h00, b, a, 3'b001, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLT (input logic [4:0] rd, a, b); return r_t(7'h00, b, a, 3'b010, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLTU(input logic [4:0] rd, a, b); return r_t(7'h00, b, a, 3'b011, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XOR (input logic [4:0] rd, a, b); return r_t(7'h00, b, a, 3'b100, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRL (input logic [4:0] rd, a, b); return r_t(7'h00, b, a, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRA (input logic [4:0] rd, a, b); return r_t(7'h20, b, a, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] OR  (input logic [4:0] rd, a, b); return r_t(7'h00, b, a, 3'b110, rd, 7'b0110011); endfunction
  function automatic logic [31:0] AND (input logic [4:0] rd, a, b); return r_t(7'h00, b, a, 3'b111, rd, 7'b0110011); endfunction
  function automatic logic [31:0] ECALL();  return 32'h0000_0073; endfunction
  function automatic logic [31:0] EBREAK(); return 32'h0010_0073; endfunction
  function automatic logic [31:0] MRET();   return 32'h3020_0073; endfunction
  function automatic logic [31:0] CSRRW (input logic [4:0] rd, rs1, input logic [11:0] c); return i_t(c, rs1, 3'b001, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRS (input logic [4:0] rd, rs1, input logic [11:0] c); return i_t(c, rs1, 3'b010, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRC (input logic [4:0] rd, rs1, input logic [11:0] c); return i_t(c, rs1, 3'b011, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRWI(input logic [4:0] rd, z,   input logic [11:0] c); return i_t(c, z, 3'b101, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRSI(input logic [4:0] rd, z,   input logic [11:0] c); return i_t(c, z, 3'b110, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRCI(input logic [4:0] rd, z,   input logic [11:0] c); return i_t(c, z, 3'b111, rd, 7'b1110011); endfunction
  function automatic logic [31:0] FENCE(); return 32'h0FF0_000F; endfunction
endpackage
