// tb_instr_sweep: the per-instruction workload of the original evaluation:
// every instruction is executed 1000 times with random operands, and the
// cycles it takes are measured.
// For each instruction under test, the SRAM gets
//   0x000  a prologue that loads random values into x1..x15 (LUI + ADDI)
//          and 0x900 into x31 (base for JALR),
//   0x100  1000 copies of the instruction with random rd/rs1/rs2 (x1..x15)
//          and random immediates; loads and stores use x0 as base and hit
//          random aligned addresses in 0x1400..0x1FFF (base x30 = 0x1C00); branches and jumps
//          go to the next instruction (taken or not); CSR instructions use
//          frls, isval, isconf and mepc,
//   0x10A0 a jump to itself,
//   0x1400 3 kB of random data.
// The CPU runs with the memory and bus controller and the SRAM at their
// default sizes. A reference model executes the same program; all
// registers, the CSRs used and the data region are compared after each
// run. The cycles between the retirement of the last prologue instruction
// and the last tested instruction must be exactly 1000 x the instruction's
// cycle count (4 for ALU, branch, jump and CSR, 6 for loads and SW, 7 for
// SB and SH). ECALL, EBREAK and MRET change the control flow and are
// covered by tb_siwa_cpu instead. The measured cycles per instruction and
// the average over the sweep are printed.
// 1000 runs of each instruction with random operands follow the document's
// evaluation; the cycle counts checked are this design's.
module tb_instr_sweep;
  import siwa_pkg::*;
  import rv_asm_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        m_en, m_we, m_uns, mem_rdy, error_drs;
  logic [31:0] m_addr, m_wdata, d_read, err_addr, pc;
  mem_size_e   m_size;
  logic        msg_valid, msg_ack, bs_en, retire, trap;
  bus_pkg_t    msg_pkg, tx_pkg;
  logic [7:0]  gpio_out, gpio_conf, frls;
  logic [31:0] isval, isconf;
  logic [4:0]  istrg;
  logic        sram_cs, sram_we, tx_valid;
  logic [10:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  int checks = 0, failures = 0;

  siwa_cpu dut (.clk, .rst_n, .boot_done(1'b1), .m_en, .m_we, .m_addr, .m_wdata,
    .m_size, .m_uns, .mem_rdy, .error_drs, .d_read, .err_addr, .msg_valid, .msg_pkg,
    .msg_ack, .analog_irq(1'b0), .gpio_in(8'h00), .gpio_out, .gpio_conf, .bs_en, .frls,
    .isval, .isconf, .istrg, .pc, .retire, .trap);
  mbc u_mbc (.clk, .rst_n, .bs_en,
    .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .size(m_size), .uns(m_uns),
    .mem_rdy, .error_drs, .d_read, .err_addr,
    .sram_cs, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .tx_valid, .tx_ready(1'b1), .tx_pkg, .rx_valid(1'b0), .rx_ready(), .rx_pkg('0),
    .msg_valid, .msg_pkg, .msg_ack);
  sram u_sram (.clk, .cs(sram_cs), .we(sram_we), .addr(sram_addr),
               .wdata(sram_wdata), .rdata(sram_rdata));
  always #5 clk = ~clk;

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  localparam int N = 1000;
  localparam logic [31:0] BODY = 32'h100, STOP = BODY + 4 * N, DATA = 32'h1400;
  logic [31:0] img [2048];

  // ---------------------------------------------------------- reference model
  logic [31:0] xr [32];
  logic [31:0] mm [2048];
  logic [31:0] c_frls, c_isval, c_isconf, c_mepc;

  function automatic logic [31:0] csr_rd(input logic [11:0] a);
    case (a)
      CSR_FRLS:   return c_frls;
      CSR_ISVAL:  return c_isval;
      CSR_ISCONF: return c_isconf;
      CSR_MEPC:   return c_mepc;
      default:    return 32'h0;
    endcase
  endfunction
  function automatic void csr_wr(input logic [11:0] a, input logic [31:0] v);
    case (a)
      CSR_FRLS:   c_frls   = v & 32'hFF;
      CSR_ISVAL:  c_isval  = v;
      CSR_ISCONF: c_isconf = v;
      CSR_MEPC:   c_mepc   = v & ~32'h3;
      default: ;
    endcase
  endfunction

  function automatic void ref_run();
    logic [31:0] p, w, a, b, res, ea, ld, iimm, simm, bimm, jimm, nx;
    logic [4:0]  rd;
    logic [2:0]  f3;
    logic        wr;
    for (int i = 0; i < 32; i++) xr[i] = 0;
    c_frls = 0; c_isval = 0; c_isconf = 0; c_mepc = 0;
    for (int i = 0; i < 2048; i++) mm[i] = img[i];
    p = 0;
    while (p != STOP) begin
      w  = mm[p / 4];
      rd = w[11:7]; f3 = w[14:12];
      a  = xr[w[19:15]]; b = xr[w[24:20]];
      iimm = {{20{w[31]}}, w[31:20]};
      simm = {{20{w[31]}}, w[31:25], w[11:7]};
      bimm = {{19{w[31]}}, w[31], w[7], w[30:25], w[11:8], 1'b0};
      jimm = {{11{w[31]}}, w[31], w[19:12], w[20], w[30:21], 1'b0};
      nx = p + 4; wr = 1; res = 0;
      case (w[6:0])
        7'b0110111: res = {w[31:12], 12'h0};
        7'b0010111: res = p + {w[31:12], 12'h0};
        7'b1101111: begin res = p + 4; nx = p + jimm; end
        7'b1100111: begin res = p + 4; nx = (a + iimm) & ~32'h1; end
        7'b1100011: begin
          logic t;
          wr = 0;
          case (f3)
            3'b000: t = a == b;
            3'b001: t = a != b;
            3'b100: t = $signed(a) < $signed(b);
            3'b101: t = $signed(a) >= $signed(b);
            3'b110: t = a < b;
            default: t = a >= b;
          endcase
          if (t) nx = p + bimm;
        end
        7'b0000011: begin
          ea = a + iimm;
          ld = mm[ea[12:2]] >> (8 * ea[1:0]);
          case (f3)
            3'b000: res = {{24{ld[7]}}, ld[7:0]};
            3'b001: res = {{16{ld[15]}}, ld[15:0]};
            3'b100: res = {24'h0, ld[7:0]};
            3'b101: res = {16'h0, ld[15:0]};
            default: res = ld;
          endcase
        end
        7'b0100011: begin
          wr = 0;
          ea = a + simm;
          case (f3)
            3'b000: mm[ea[12:2]][8 * ea[1:0] +: 8] = b[7:0];
            3'b001: mm[ea[12:2]][8 * ea[1:0] +: 16] = b[15:0];
            default: mm[ea[12:2]] = b;
          endcase
        end
        7'b0010011: case (f3)
          3'b000: res = a + iimm;
          3'b010: res = {31'b0, $signed(a) < $signed(iimm)};
          3'b011: res = {31'b0, a < iimm};
          3'b100: res = a ^ iimm;
          3'b110: res = a | iimm;
          3'b111: res = a & iimm;
          3'b001: res = a << w[24:20];
          default: res = w[30] ? 32'($signed(a) >>> w[24:20]) : a >> w[24:20];
        endcase
        7'b0110011: case (f3)
          3'b000: res = w[30] ? a - b : a + b;
          3'b001: res = a << b[4:0];
          3'b010: res = {31'b0, $signed(a) < $signed(b)};
          3'b011: res = {31'b0, a < b};
          3'b100: res = a ^ b;
          3'b101: res = w[30] ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0];
          3'b110: res = a | b;
          default: res = a & b;
        endcase
        7'b1110011: begin
          logic [31:0] old, src;
          old = csr_rd(w[31:20]);
          src = f3[2] ? {27'b0, w[19:15]} : a;
          case (f3[1:0])
            2'b01: csr_wr(w[31:20], src);
            2'b10: if (w[19:15] != 0) csr_wr(w[31:20], old | src);
            default: if (w[19:15] != 0) csr_wr(w[31:20], old & ~src);
          endcase
          res = old;
        end
        default: wr = 0;
      endcase
      if (wr && rd != 0) xr[rd] = res;
      p = nx;
    end
  endfunction

  // ---------------------------------------------------------- program builder
  function automatic logic [4:0] rr(); return 5'(1 + $urandom_range(0, 14)); endfunction
  // DATA (0x1400..0x1FFF) is beyond the 12-bit immediate, so x30 = 0x1C00
  // serves as base and the immediate is the signed offset from it.
  function automatic logic [11:0] daddr(input int align);
    return 12'(DATA + ($urandom_range(0, 3071) & ~(align - 1)) - 32'h1C00);
  endfunction
  function automatic logic [31:0] gen(input codif_e k, input logic [31:0] at);
    logic [11:0] ci [4] = '{CSR_FRLS, CSR_ISVAL, CSR_ISCONF, CSR_MEPC};
    logic [11:0] c, i;
    c = ci[$urandom_range(0, 3)];
    i = 12'($urandom);
    case (k)
      I_LUI:   return LUI(rr(), 20'($urandom));
      I_AUIPC: return AUIPC(rr(), 20'($urandom));
      I_JAL:   return JAL(rr(), 21'd4);
      I_JALR:  return JALR(rr(), 5'd31, 12'(at + 4 - 32'h900));
      I_BEQ:   return BEQ(rr(), rr(), 13'd4);
      I_BNE:   return BNE(rr(), rr(), 13'd4);
      I_BLT:   return BLT(rr(), rr(), 13'd4);
      I_BGE:   return BGE(rr(), rr(), 13'd4);
      I_BLTU:  return BLTU(rr(), rr(), 13'd4);
      I_BGEU:  return BGEU(rr(), rr(), 13'd4);
      I_LB:    return LB(rr(), 5'd30, daddr(1));
      I_LH:    return LH(rr(), 5'd30, daddr(2));
      I_LW:    return LW(rr(), 5'd30, daddr(4));
      I_LBU:   return LBU(rr(), 5'd30, daddr(1));
      I_LHU:   return LHU(rr(), 5'd30, daddr(2));
      I_SB:    return SB(rr(), 5'd30, daddr(1));
      I_SH:    return SH(rr(), 5'd30, daddr(2));
      I_SW:    return SW(rr(), 5'd30, daddr(4));
      I_ADDI:  return ADDI(rr(), rr(), i);
      I_SLTI:  return SLTI(rr(), rr(), i);
      I_SLTIU: return SLTIU(rr(), rr(), i);
      I_XORI:  return XORI(rr(), rr(), i);
      I_ORI:   return ORI(rr(), rr(), i);
      I_ANDI:  return ANDI(rr(), rr(), i);
      I_SLLI:  return SLLI(rr(), rr(), 5'($urandom));
      I_SRLI:  return SRLI(rr(), rr(), 5'($urandom));
      I_SRAI:  return SRAI(rr(), rr(), 5'($urandom));
      I_ADD:   return ADD(rr(), rr(), rr());
      I_SUB:   return SUB(rr(), rr(), rr());
      I_SLL:   return SLL(rr(), rr(), rr());
      I_SLT:   return SLT(rr(), rr(), rr());
      I_SLTU:  return SLTU(rr(), rr(), rr());
      I_XOR:   return XOR(rr(), rr(), rr());
      I_SRL:   return SRL(rr(), rr(), rr());
      I_SRA:   return SRA(rr(), rr(), rr());
      I_OR:    return OR(rr(), rr(), rr());
      I_AND:   return AND(rr(), rr(), rr());
      I_CSRRW: return CSRRW(rr(), rr(), c);
      I_CSRRS: return CSRRS(rr(), rr(), c);
      I_CSRRC: return CSRRC(rr(), rr(), c);
      I_CSRRWI: return CSRRWI(rr(), 5'($urandom), c);
      I_CSRRSI: return CSRRSI(rr(), 5'($urandom), c);
      default: return CSRRCI(rr(), 5'($urandom), c);
    endcase
  endfunction

  function automatic void build(input codif_e k);
    int a;
    for (int i = 0; i < 2048; i++) img[i] = (i >= DATA / 4) ? $urandom : ADDI(0, 0, 12'd0);
    a = 0;
    for (int r = 1; r <= 15; r++) begin
      logic [31:0] v;
      v = $urandom;
      img[a++] = LUI(5'(r), v[31:12] + 20'(v[11]));
      img[a++] = ADDI(5'(r), 5'(r), v[11:0]);
    end
    img[a++] = LUI(31, 20'h00001);
    img[a++] = ADDI(31, 31, -12'sh700);       // 0x900
    img[a++] = LUI(30, 20'h00002);
    img[a++] = ADDI(30, 30, -12'sh400);       // 0x1C00
    for (int i = 0; i < N; i++) img[BODY / 4 + i] = gen(k, BODY + 4 * i);
    img[STOP / 4] = JAL(0, 21'd0);
  endfunction

  function automatic int expect_cycles(input codif_e k);
    if (k inside {I_SB, I_SH}) return 7;
    if (k inside {I_LB, I_LH, I_LW, I_LBU, I_LHU, I_SW}) return 6;
    return 4;
  endfunction

  // ---------------------------------------------------------- measurement
  int cyc = 0, t_start, t_end;
  always @(posedge clk) begin
    cyc++;
    if (retire && pc == BODY - 4) t_start = cyc;
    if (retire && pc == STOP - 4) t_end = cyc;
  end

  initial begin
    int total = 0;
    for (int kk = int'(I_LUI); kk <= int'(I_CSRRCI); kk++) begin
      codif_e k;
      k = codif_e'(kk);
      if (k inside {I_ECALL, I_EBREAK, I_MRET}) continue;
      build(k);
      ref_run();
      rst_n = 0;
      for (int i = 0; i < 2048; i++) u_sram.mem[i] = img[i];
      t_start = -1; t_end = -1;
      repeat (2) @(negedge clk);
      rst_n = 1;
      while (t_end < 0) @(posedge clk);
      repeat (3) @(negedge clk);
      begin
        int bad = 0;
        for (int r = 1; r < 32; r++) if (dut.u_rf.regs[r] !== xr[r]) bad++;
        for (int i = DATA / 4; i < 2048; i++) if (u_sram.mem[i] !== mm[i]) bad++;
        if (frls !== c_frls[7:0] || isval !== c_isval || isconf !== c_isconf ||
            dut.u_csr.mepc !== c_mepc) bad++;
        chk($sformatf("%s results match the reference (%0d differ)", k.name(), bad), bad == 0);
      end
      chk($sformatf("%s: %0d cycles for %0d runs, expected %0d each", k.name(), t_end - t_start, N,
                    expect_cycles(k)), t_end - t_start == N * expect_cycles(k));
      chk($sformatf("%s: no trap", k.name()), !dut.u_csr.mcausea[2:0]);
      $display("%-8s %5.2f cycles/instruction", k.name(), real'(t_end - t_start) / N);
      total += t_end - t_start;
    end
    $display("average over the 43 instructions: %5.2f cycles/instruction", real'(total) / (43 * N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
