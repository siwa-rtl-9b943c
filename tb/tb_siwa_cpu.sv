// tb_siwa_cpu: runs a test program on the CPU attached to the memory and
// bus controller and the SRAM (the boot loader's job is done by writing the
// program straight into the SRAM). A bus model answers reads in the flash
// window and accepts writes, and injects one unsolicited bus message; the
// testbench also pulses the analog interrupt pin.
// The program exercises every RV32I instruction class and all CSR
// instructions, a trap handler at 0x200 that logs mcausea's source field
// and returns with MRET (skipping the faulting instruction for exceptions),
// and then provokes ECALL, EBREAK, an illegal instruction, a bad address,
// and timer, external and analog interrupts. Checks: register results
// against values computed here, memory contents, one log entry per trap
// source, mcauseb of the external message, and the cycle counts: 4 per ALU
// instruction, 6 per word load, 7 per byte store.
// Interrupt check before the fetch and always-taken exceptions follow the
// document; the cycle counts and trap information are this design's choice.
module tb_siwa_cpu;
  import siwa_pkg::*;
  import rv_asm_pkg::*;
  logic        clk = 0, rst_n = 0, analog_irq = 0;
  logic        m_en, m_we, m_uns, mem_rdy, error_drs;
  logic [31:0] m_addr, m_wdata, d_read, err_addr, pc;
  mem_size_e   m_size;
  logic        msg_valid, msg_ack, bs_en, retire, trap;
  bus_pkg_t    msg_pkg;
  logic [7:0]  gpio_in = 8'h3C, gpio_out, gpio_conf, frls;
  logic [31:0] isval, isconf;
  logic [4:0]  istrg;
  logic        sram_cs, sram_we;
  logic [10:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic        tx_valid, tx_ready = 1, rx_valid = 0, rx_ready;
  bus_pkg_t    tx_pkg, rx_pkg = '0;
  int checks = 0, failures = 0;
  int unsigned pcw;

  siwa_cpu dut (.clk, .rst_n, .boot_done(1'b1), .m_en, .m_we, .m_addr, .m_wdata,
    .m_size, .m_uns, .mem_rdy, .error_drs, .d_read, .err_addr, .msg_valid, .msg_pkg,
    .msg_ack, .analog_irq, .gpio_in, .gpio_out, .gpio_conf, .bs_en, .frls, .isval,
    .isconf, .istrg, .pc, .retire, .trap);
  mbc #(.SRAM_WORDS(2048)) u_mbc (.clk, .rst_n, .bs_en,
    .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .size(m_size), .uns(m_uns),
    .mem_rdy, .error_drs, .d_read, .err_addr,
    .sram_cs, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .tx_valid, .tx_ready, .tx_pkg, .rx_valid, .rx_ready, .rx_pkg,
    .msg_valid, .msg_pkg, .msg_ack);
  sram #(.WORDS(2048)) u_sram (.clk, .cs(sram_cs), .we(sram_we), .addr(sram_addr),
                               .wdata(sram_wdata), .rdata(sram_rdata));
  always #5 clk = ~clk;

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  function automatic void at(input int unsigned a); pcw = a; endfunction
  function automatic void e(input logic [31:0] w); u_sram.mem[pcw / 4] = w; pcw += 4; endfunction
  function automatic logic [31:0] rg(input int r); return dut.u_rf.regs[r]; endfunction

  // bus model: flash-window reads answered after a delay; writes logged
  logic [31:0] uart_written = 0;
  initial begin
    forever begin
      @(negedge clk); #1;
      if (tx_valid) begin
        bus_pkg_t req;
        req = tx_pkg;
        if (req.code == MSG_WRITE) uart_written = req.data;
        if (req.code == MSG_READ) begin
          repeat (7) @(negedge clk);
          rx_pkg = '{dst: 0, src: 2'(req.dst), code: MSG_READ_RSP, addr: req.addr, data: 32'hCAFE_BABE};
          rx_valid = 1;
          @(negedge clk); #1;
          while (!rx_ready) begin @(negedge clk); #1; end
          rx_valid = 0;
        end
      end
    end
  end

  // cycle counts between retirements
  int last_ret = 0, cyc = 0;
  int gap_at [int unsigned];
  always @(posedge clk) begin
    cyc++;
    if (retire) begin gap_at[pc] = cyc - last_ret; last_ret = cyc; end
  end

  initial begin
    for (int i = 0; i < 2048; i++) u_sram.mem[i] = 32'h0000_0013;
    // ---------------- main program
    at(0);
    e(ADDI(1, 0, 12'd5));            // 00 x1 = 5
    e(ADDI(2, 0, -12'sd3));          // 04 x2 = -3
    e(ADD(3, 1, 2));                 // 08 x3 = 2
    e(SUB(4, 1, 2));                 // 0c x4 = 8
    e(SLT(5, 2, 1));                 // 10 x5 = 1
    e(SLTU(6, 2, 1));                // 14 x6 = 0
    e(XOR(7, 1, 2));                 // 18
    e(OR(8, 1, 2));                  // 1c
    e(AND(9, 1, 2));                 // 20
    e(SLL(10, 1, 3));                // 24 x10 = 20
    e(SRL(11, 2, 3));                // 28
    e(SRA(12, 2, 3));                // 2c x12 = -1
    e(LUI(13, 20'h12345));           // 30
    e(AUIPC(14, 20'h00001));         // 34 x14 = 0x1034
    e(XORI(15, 1, 12'h0F0));         // 38
    e(ORI(16, 2, 12'h100));          // 3c
    e(ANDI(17, 2, 12'h0F0));         // 40
    e(SLTI(18, 2, 12'd0));           // 44 x18 = 1
    e(SLTIU(19, 1, 12'hFFF));        // 48 x19 = 1
    e(SLLI(20, 1, 5'd28));           // 4c
    e(SRLI(21, 2, 5'd28));           // 50 x21 = 0xF
    e(SRAI(22, 2, 5'd1));            // 54 x22 = -2
    // branches: x29 counts the taken/not-taken outcomes
    e(BEQ(1, 1, 13'd8));             // 58 taken
    e(ADDI(29, 29, 12'd100));        // 5c skipped
    e(ADDI(29, 0, 12'd1));           // 60
    e(BNE(1, 1, 13'd8));             // 64 not taken
    e(ADDI(29, 29, 12'd1));          // 68
    e(BLT(2, 1, 13'd8));             // 6c taken
    e(ADDI(29, 29, 12'd100));        // 70
    e(BGE(2, 1, 13'd8));             // 74 not taken
    e(ADDI(29, 29, 12'd1));          // 78
    e(BLTU(1, 2, 13'd8));            // 7c taken
    e(ADDI(29, 29, 12'd100));        // 80
    e(BGEU(2, 1, 13'd8));            // 84 taken
    e(ADDI(29, 29, 12'd100));        // 88
    e(JAL(28, 21'h300 - 21'h8C));    // 8c call 0x300
    e(ADDI(29, 29, 12'd1));          // 90 after return
    // memory: word, half, byte
    e(LUI(31, 20'hA1B2C));           // 94
    e(ADDI(31, 31, 12'h3D4));        // 98 x31 = A1B2C3D4
    e(SW(31, 0, 12'h600));           // 9c
    e(LW(23, 0, 12'h600));           // a0
    e(SB(1, 0, 12'h601));            // a4 byte 1 = 05
    e(LB(24, 0, 12'h603));           // a8 0xA1 -> sign ext
    e(LBU(25, 0, 12'h603));          // ac
    e(LH(26, 0, 12'h602));           // b0 0xA1B2
    e(LHU(27, 0, 12'h600));          // b4 0x05D4
    e(SH(2, 0, 12'h604));            // b8 FFFD at 604
    e(LW(30, 0, 12'h604));           // bc (upper half was 0x0013 from fill)
    // CSR instructions
    e(ADDI(31, 0, 12'h200));         // c0
    e(CSRRW(0, 31, CSR_MTVEC));      // c4 mtvec = 0x200
    e(LUI(31, 20'h00010));           // c8
    e(ADDI(31, 31, 12'h013));        // cc
    e(CSRRW(0, 31, CSR_MCR));        // d0 bs_en, maie, mieio, miet
    e(CSRRWI(0, 5'd9, CSR_FRLS));    // d4 frls = 9
    e(CSRRSI(0, 5'd6, CSR_FRLS));    // d8 frls = 15
    e(CSRRCI(0, 5'd1, CSR_FRLS));    // dc frls = 14
    e(CSRRS(11, 0, CSR_FRLS));       // e0 x11 = 14
    e(CSRRC(0, 1, CSR_FRLS));        // e4 frls = 14 & ~5 = 10
    e(CSRRS(12, 0, CSR_GPIO));       // e8 x12 = gpio pins
    // bus accesses
    e(LUI(31, 20'h00800));           // ec
    e(LW(13, 31, 12'h100));          // f0 bus read -> CAFEBABE
    e(LUI(31, 20'h01800));           // f4
    e(SW(1, 31, 12'h004));           // f8 bus write to UART window
    // exceptions
    e(ECALL());                      // fc
    e(32'hFFFF_FFFF);                // 100 illegal
    e(LUI(31, 20'h00004));           // 104
    e(LW(0, 31, 12'h0));             // 108 bad address 0x4000
    e(EBREAK());                     // 10c
    // timer, then wait for timer/external/analog interrupts
    e(ADDI(31, 0, 12'd1000));        // 110
    e(CSRRW(0, 31, CSR_TMRFNC));     // 114
    e(ADDI(15, 0, 12'd400));         // 118
    e(ADDI(15, 15, -12'sd1));        // 11c loop
    e(BNE(15, 0, -13'sd4));          // 120
    e(ADDI(31, 0, 12'h600));         // 124 done marker
    e(SW(31, 31, 12'h1FC));          // 128 mem[0x7FC] = 0x600
    e(JAL(0, 21'd0));                // 12c stay
    // ---------------- subroutine at 0x300
    at(32'h300);
    e(ADDI(16, 0, 12'd77));
    e(JALR(0, 28, 12'd0));
    // ---------------- trap handler at 0x200: saves x20..x25, keeps the
    // trap count at 0x718, logs source and mcauseb, restores and returns
    at(32'h200);
    for (int r = 20; r <= 25; r++) e(SW(r, 0, 12'(32'h700 + 4 * (r - 20))));   // 200..214
    e(CSRRS(20, 0, CSR_MCAUSEA));    // 218
    e(ANDI(22, 20, 12'd7));          // 21c source
    e(LW(21, 0, 12'h718));           // 220
    e(ADDI(21, 21, 12'd1));          // 224
    e(SW(21, 0, 12'h718));           // 228 count
    e(SLLI(23, 21, 5'd2));           // 22c
    e(SW(22, 23, 12'h400));          // 230 log[count] = source
    e(CSRRS(24, 0, CSR_MCAUSEB));    // 234
    e(SW(24, 23, 12'h480));          // 238 logb[count] = mcauseb
    e(CSRRS(24, 0, CSR_MEPC));       // 23c
    e(ADDI(25, 0, 12'd4));           // 240
    e(BNE(22, 25, 13'd8));           // 244 not timer -> skip stop
    e(CSRRW(0, 0, CSR_TMRFNC));      // 248 stop the timer
    e(ADDI(25, 0, 12'd3));           // 24c
    e(BLT(22, 25, 13'd12));          // 250 source 1,2 -> skip instr
    e(ADDI(25, 0, 12'd6));           // 254
    e(BLT(22, 25, 13'd12));          // 258 3,4,5 -> return as is
    e(ADDI(24, 24, 12'd4));          // 25c skip faulting instruction
    e(CSRRW(0, 24, CSR_MEPC));       // 260
    for (int r = 20; r <= 25; r++) e(LW(r, 0, 12'(32'h700 + 4 * (r - 20))));   // 264..278
    e(MRET());                       // 27c
    u_sram.mem[32'h718 / 4] = 0;

    #12 rst_n = 1;
    // external message and analog pulse while the program waits
    wait (pc == 32'h11c);
    @(negedge clk);
    rx_pkg = '{dst: 0, src: ID_UART, code: MSG_DATA, addr: 25'h1800000, data: 32'h0000_0042};
    rx_valid = 1;
    @(negedge clk); #1;
    while (!rx_ready) begin @(negedge clk); #1; end
    rx_valid = 0;
    repeat (300) @(negedge clk);
    analog_irq = 1; repeat (5) @(negedge clk); analog_irq = 0;
    wait (u_sram.mem[32'h7FC / 4] == 32'h600);
    repeat (2) @(negedge clk);

    // ---------------- checks
    chk("add",  rg(3) == 2);
    chk("sub",  rg(4) == 8);
    chk("slt",  rg(5) == 1);
    chk("sltu", rg(6) == 0);
    chk("xor",  rg(7) == (32'd5 ^ 32'hFFFFFFFD));
    chk("or",   rg(8) == (32'd5 | 32'hFFFFFFFD));
    chk("and",  rg(9) == (32'd5 & 32'hFFFFFFFD));
    chk("sll",  rg(10) == 20);
    chk("csrrs frls", rg(11) == 14);
    chk("gpio read", rg(12) == 32'h3C);
    chk("bus read", rg(13) == 32'hCAFE_BABE);
    chk("auipc", rg(14) == 32'h1034);
    chk("ori",  rg(16) == 77);       // overwritten by the subroutine
    chk("andi", rg(17) == (32'hFFFFFFFD & 32'hF0));
    chk("slti", rg(18) == 1);
    chk("sltiu", rg(19) == 1);
    chk("traps counted", u_sram.mem[32'h718 / 4] == 7);
    chk("slli", rg(20) == 32'h5000_0000);
    chk("srli", rg(21) == 32'hF);
    chk("srai", rg(22) == 32'hFFFF_FFFE);
    chk("lw",   rg(23) == 32'hA1B2C3D4);
    chk("lb",   rg(24) == 32'hFFFFFFA1);
    chk("lbu",  rg(25) == 32'h000000A1);
    chk("lh",   rg(26) == 32'hFFFFA1B2);
    chk("lhu",  rg(27) == 32'h000005D4);
    chk("jal link", rg(28) == 32'h90);
    chk("branches", rg(29) == 4);
    chk("sh",   rg(30) == 32'h0000FFFD);
    chk("csrrc frls", frls == 10);
    chk("uart write", uart_written == 5);
    chk("mcr", dut.mcr[16] && dut.mcr[4] && dut.mcr[1] && dut.mcr[0]);
    begin
      int seen [8];
      for (int i = 0; i < 8; i++) seen[i] = 0;
      for (int i = 1; i <= 7; i++) seen[u_sram.mem[(32'h400 + 4 * i) / 4] % 8]++;
      for (int s = 1; s <= 7; s++) chk($sformatf("trap source %0d taken once", s), seen[s] == 1);
      for (int i = 1; i <= 7; i++)
        if (u_sram.mem[(32'h400 + 4 * i) / 4] == 3)
          chk("mcauseb holds the bus message data", u_sram.mem[(32'h480 + 4 * i) / 4] == 32'h42);
    end
    chk("exception order", u_sram.mem[(32'h404) / 4] == 6 && u_sram.mem[(32'h408) / 4] == 1 &&
                           u_sram.mem[(32'h40C) / 4] == 2 && u_sram.mem[(32'h410) / 4] == 7);
    chk($sformatf("ALU instruction 4 cycles (%0d)", gap_at[32'h8]), gap_at[32'h8] == 4);
    chk($sformatf("ALU instruction 4 cycles (%0d)", gap_at[32'h54]), gap_at[32'h54] == 4);
    chk($sformatf("branch 4 cycles (%0d)", gap_at[32'h64]), gap_at[32'h64] == 4);
    chk($sformatf("word load 6 cycles (%0d)", gap_at[32'ha0]), gap_at[32'ha0] == 6);
    chk($sformatf("byte store 7 cycles (%0d)", gap_at[32'ha4]), gap_at[32'ha4] == 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
