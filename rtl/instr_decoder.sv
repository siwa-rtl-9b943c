// instr_decoder: RV32I instruction decoder of the Siwa CPU.
//
// The instruction word on d_read is captured into an internal register by a
// one-cycle pulse on ld_id. The register output is then decoded
// combinationally into a unique 7-bit instruction code (codif, see
// siwa_pkg::codif_e), the immediate (sign- or zero-extended as the
// instruction requires, in the R/I/S/B/U/J layouts of RV32I), the register
// indices rd/rs1/rs2, the CSR number and funct3. Anything that is not a
// supported RV32I or machine-mode instruction (FENCE and FENCE.I included)
// returns codif with all bits set, which the control unit treats as an
// illegal-instruction exception. Fields are valid from the cycle after the
// ld_id pulse. The numeric CODIF values are this design's choice.
module instr_decoder
  import siwa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_id,
  input  logic [31:0] d_read,
  output codif_e      codif,
  output logic [31:0] imm,
  output logic [4:0]  rd,
  output logic [4:0]  rs1,
  output logic [4:0]  rs2,
  output logic [11:0] csr,
  output logic [2:0]  funct3,
  output logic [31:0] instr      // the captured instruction word
);
  logic [31:0] ir;
  assign instr = ir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ir <= 32'h0000_0013;  // ADDI x0,x0,0
    else if (ld_id) ir <= d_read;
  end

  logic [6:0] opc, f7;
  logic [2:0] f3;
  assign opc    = ir[6:0];
  assign f3     = ir[14:12];
  assign f7     = ir[31:25];
  assign rd     = ir[11:7];
  assign rs1    = ir[19:15];
  assign rs2    = ir[24:20];
  assign csr    = ir[31:20];
  assign funct3 = f3;

  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j, imm_z;
  assign imm_i = {{20{ir[31]}}, ir[31:20]};
  assign imm_s = {{20{ir[31]}}, ir[31:25], ir[11:7]};
  assign imm_b = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
  assign imm_u = {ir[31:12], 12'b0};
  assign imm_j = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
  assign imm_z = {27'b0, ir[19:15]};   // CSR immediate, zero-extended

  always_comb begin
    codif = I_ILLEGAL;
    imm   = '0;
    unique case (opc)
      7'b0110111: begin codif = I_LUI;   imm = imm_u; end
      7'b0010111: begin codif = I_AUIPC; imm = imm_u; end
      7'b1101111: begin codif = I_JAL;   imm = imm_j; end
      7'b1100111: begin imm = imm_i; if (f3 == 3'b000) codif = I_JALR; end
      7'b1100011: begin
        imm = imm_b;
        unique case (f3)
          3'b000: codif = I_BEQ;
          3'b001: codif = I_BNE;
          3'b100: codif = I_BLT;
          3'b101: codif = I_BGE;
          3'b110: codif = I_BLTU;
          3'b111: codif = I_BGEU;
          default: codif = I_ILLEGAL;
        endcase
      end
      7'b0000011: begin
        imm = imm_i;
        unique case (f3)
          3'b000: codif = I_LB;
          3'b001: codif = I_LH;
          3'b010: codif = I_LW;
          3'b100: codif = I_LBU;
          3'b101: codif = I_LHU;
          default: codif = I_ILLEGAL;
        endcase
      end
      7'b0100011: begin
        imm = imm_s;
        unique case (f3)
          3'b000: codif = I_SB;
          3'b001: codif = I_SH;
          3'b010: codif = I_SW;
          default: codif = I_ILLEGAL;
        endcase
      end
      7'b0010011: begin
        imm = imm_i;
        unique case (f3)
          3'b000: codif = I_ADDI;
          3'b010: codif = I_SLTI;
          3'b011: codif = I_SLTIU;
          3'b100: codif = I_XORI;
          3'b110: codif = I_ORI;
          3'b111: codif = I_ANDI;
          3'b001: codif = (f7 == 7'b0000000) ? I_SLLI : I_ILLEGAL;
          3'b101: codif = (f7 == 7'b0000000) ? I_SRLI :
                          (f7 == 7'b0100000) ? I_SRAI : I_ILLEGAL;
          default: codif = I_ILLEGAL;
        endcase
      end
      7'b0110011: begin
        if (f7 == 7'b0000000) begin
          unique case (f3)
            3'b000: codif = I_ADD;
            3'b001: codif = I_SLL;
            3'b010: codif = I_SLT;
            3'b011: codif = I_SLTU;
            3'b100: codif = I_XOR;
            3'b101: codif = I_SRL;
            3'b110: codif = I_OR;
            3'b111: codif = I_AND;
            default: codif = I_ILLEGAL;
          endcase
        end else if (f7 == 7'b0100000) begin
          if (f3 == 3'b000)      codif = I_SUB;
          else if (f3 == 3'b101) codif = I_SRA;
        end
      end
      7'b1110011: begin
        imm = imm_z;
        unique case (f3)
          3'b000: begin
            if (ir[31:7] == 25'h0000000)                       codif = I_ECALL;
            else if (ir[31:7] == {12'h001, 13'h0})             codif = I_EBREAK;
            else if (ir[31:7] == {12'h302, 13'h0})             codif = I_MRET;
          end
          3'b001: codif = I_CSRRW;
          3'b010: codif = I_CSRRS;
          3'b011: codif = I_CSRRC;
          3'b101: codif = I_CSRRWI;
          3'b110: codif = I_CSRRSI;
          3'b111: codif = I_CSRRCI;
          default: codif = I_ILLEGAL;
        endcase
      end
      default: codif = I_ILLEGAL;
    endcase
  end
endmodule
