// tb_instr_decoder: feeds encoded RV32I instructions through the ld_id
// capture and checks CODIF, the extended immediate and the register/CSR
// fields; checks that FENCE and malformed words decode as illegal (all
// ones) and that a word is not taken without the ld_id pulse.
// The all-ones code for unknown instructions and the missing FENCE follow
// the document; the numbering of the codes is this design's choice.
module tb_instr_decoder;
  import siwa_pkg::*;
  import rv_asm_pkg::*;
  logic        clk = 0, rst_n = 0, ld_id = 0;
  logic [31:0] d_read, imm, instr;
  codif_e      codif;
  logic [4:0]  rd, rs1, rs2;
  logic [11:0] csr;
  logic [2:0]  funct3;
  int checks = 0, failures = 0;

  instr_decoder dut (.clk, .rst_n, .ld_id, .d_read, .codif, .imm, .rd, .rs1,
                     .rs2, .csr, .funct3, .instr);
  always #5 clk = ~clk;

  task automatic load(input logic [31:0] w);
    @(negedge clk); d_read = w; ld_id = 1;
    @(negedge clk); ld_id = 0; d_read = $urandom;
    #1;
  endtask

  task automatic expect_dec(input string nm, input logic [31:0] w, input codif_e c,
                            input logic [31:0] i, input logic chk_imm);
    load(w);
    checks++;
    if (codif !== c || (chk_imm && imm !== i)) begin
      failures++;
      $display("FAIL %s: codif=%0d want %0d imm=%h want %h", nm, codif, c, imm, i);
    end
  endtask

  initial begin
    #12 rst_n = 1;
    expect_dec("lui",   LUI(5'd3, 20'hABCDE),        I_LUI,   32'hABCDE000, 1);
    expect_dec("auipc", AUIPC(5'd3, 20'h80001),      I_AUIPC, 32'h80001000, 1);
    expect_dec("jal",   JAL(5'd1, 21'h1FFFFC),       I_JAL,   32'hFFFFFFFC, 1);
    expect_dec("jal+",  JAL(5'd1, 21'h00804),        I_JAL,   32'h00000804, 1);
    expect_dec("jalr",  JALR(5'd1, 5'd2, 12'h801),   I_JALR,  32'hFFFFF801, 1);
    expect_dec("beq",   BEQ(5'd1, 5'd2, 13'h1FF0),   I_BEQ,   32'hFFFFFFF0, 1);
    expect_dec("bne",   BNE(5'd1, 5'd2, 13'h0808),   I_BNE,   32'h00000808, 1);
    expect_dec("blt",   BLT(5'd1, 5'd2, 13'h4),      I_BLT,   32'h4, 1);
    expect_dec("bge",   BGE(5'd1, 5'd2, 13'h4),      I_BGE,   32'h4, 1);
    expect_dec("bltu",  BLTU(5'd1, 5'd2, 13'h4),     I_BLTU,  32'h4, 1);
    expect_dec("bgeu",  BGEU(5'd1, 5'd2, 13'h4),     I_BGEU,  32'h4, 1);
    expect_dec("lb",    LB(5'd1, 5'd2, 12'hFFF),     I_LB,    32'hFFFFFFFF, 1);
    expect_dec("lh",    LH(5'd1, 5'd2, 12'h7FF),     I_LH,    32'h7FF, 1);
    expect_dec("lw",    LW(5'd1, 5'd2, 12'h10),      I_LW,    32'h10, 1);
    expect_dec("lbu",   LBU(5'd1, 5'd2, 12'h10),     I_LBU,   32'h10, 1);
    expect_dec("lhu",   LHU(5'd1, 5'd2, 12'h10),     I_LHU,   32'h10, 1);
    expect_dec("sb",    SB(5'd1, 5'd2, 12'h823),     I_SB,    32'hFFFFF823, 1);
    expect_dec("sh",    SH(5'd1, 5'd2, 12'h023),     I_SH,    32'h23, 1);
    expect_dec("sw",    SW(5'd1, 5'd2, 12'h7E1),     I_SW,    32'h7E1, 1);
    expect_dec("addi",  ADDI(5'd1, 5'd2, 12'h800),   I_ADDI,  32'hFFFFF800, 1);
    expect_dec("slti",  SLTI(5'd1, 5'd2, 12'h1),     I_SLTI,  32'h1, 1);
    expect_dec("sltiu", SLTIU(5'd1, 5'd2, 12'h1),    I_SLTIU, 32'h1, 1);
    expect_dec("xori",  XORI(5'd1, 5'd2, 12'h1),     I_XORI,  32'h1, 1);
    expect_dec("ori",   ORI(5'd1, 5'd2, 12'h1),      I_ORI,   32'h1, 1);
    expect_dec("andi",  ANDI(5'd1, 5'd2, 12'h1),     I_ANDI,  32'h1, 1);
    expect_dec("slli",  SLLI(5'd1, 5'd2, 5'd7),      I_SLLI,  32'h7, 1);
    expect_dec("srli",  SRLI(5'd1, 5'd2, 5'd7),      I_SRLI,  32'h7, 1);
    expect_dec("srai",  SRAI(5'd1, 5'd2, 5'd7),      I_SRAI,  32'h407, 1);
    expect_dec("add",   ADD(5'd1, 5'd2, 5'd3),       I_ADD,   0, 0);
    expect_dec("sub",   SUB(5'd1, 5'd2, 5'd3),       I_SUB,   0, 0);
    expect_dec("sll",   SLL(5'd1, 5'd2, 5'd3),       I_SLL,   0, 0);
    expect_dec("slt",   SLT(5'd1, 5'd2, 5'd3),       I_SLT,   0, 0);
    expect_dec("sltu",  SLTU(5'd1, 5'd2, 5'd3),      I_SLTU,  0, 0);
    expect_dec("xor",   XOR(5'd1, 5'd2, 5'd3),       I_XOR,   0, 0);
    expect_dec("srl",   SRL(5'd1, 5'd2, 5'd3),       I_SRL,   0, 0);
    expect_dec("sra",   SRA(5'd1, 5'd2, 5'd3),       I_SRA,   0, 0);
    expect_dec("or",    OR(5'd1, 5'd2, 5'd3),        I_OR,    0, 0);
    expect_dec("and",   AND(5'd1, 5'd2, 5'd3),       I_AND,   0, 0);
    expect_dec("ecall", ECALL(),                     I_ECALL, 0, 0);
    expect_dec("ebreak",EBREAK(),                    I_EBREAK,0, 0);
    expect_dec("mret",  MRET(),                      I_MRET,  0, 0);
    expect_dec("csrrw", CSRRW(5'd1, 5'd2, 12'h7C0),  I_CSRRW, 0, 0);
    expect_dec("csrrs", CSRRS(5'd1, 5'd2, 12'h7C0),  I_CSRRS, 0, 0);
    expect_dec("csrrc", CSRRC(5'd1, 5'd2, 12'h7C0),  I_CSRRC, 0, 0);
    expect_dec("csrrwi",CSRRWI(5'd1, 5'd31, 12'h7C0),I_CSRRWI,32'd31, 1);
    expect_dec("csrrsi",CSRRSI(5'd1, 5'd5, 12'h7C0), I_CSRRSI,32'd5, 1);
    expect_dec("csrrci",CSRRCI(5'd1, 5'd5, 12'h7C0), I_CSRRCI,32'd5, 1);
    expect_dec("fence", FENCE(),                     I_ILLEGAL, 0, 0);
    expect_dec("zero",  32'h0,                       I_ILLEGAL, 0, 0);
    expect_dec("badsub",r_t(7'h20, 5'd1, 5'd2, 3'b001, 5'd3, 7'b0110011), I_ILLEGAL, 0, 0);
    expect_dec("badld", i_t(12'h0, 5'd1, 3'b011, 5'd2, 7'b0000011), I_ILLEGAL, 0, 0);
    // field extraction
    load(r_t(7'h00, 5'd17, 5'd9, 3'b110, 5'd22, 7'b0110011));
    checks++;
    if (rd !== 5'd22 || rs1 !== 5'd9 || rs2 !== 5'd17 || funct3 !== 3'b110) begin
      failures++; $display("FAIL fields rd=%0d rs1=%0d rs2=%0d", rd, rs1, rs2);
    end
    load(CSRRS(5'd4, 5'd0, 12'h342));
    checks++;
    if (csr !== 12'h342) begin failures++; $display("FAIL csr=%h", csr); end
    // without ld_id the captured word must not change
    @(negedge clk); d_read = ADD(5'd1, 5'd2, 5'd3); @(negedge clk); #1;
    checks++;
    if (codif !== I_CSRRS) begin failures++; $display("FAIL captured without ld_id"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
