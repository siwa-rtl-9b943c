// tb_siwa_soc: end-to-end test of the whole chip at its default sizes
// (8 kB SRAM, 2048-word boot, SPI divider 2, UART divider 174, two-entry
// bus FIFOs). A behavioural SPI flash holds a program built here with the
// instruction encoders; the chip boots it over the SPI agent and the
// system bus, then the program
//   - sums 10..1 in a loop and stores the result (word store),
//   - patches a byte and a half word (read-modify-write stores),
//   - drives three GPIO pins and reads the pads back,
//   - reads a word from the flash and writes one to it over the bus,
//   - sends "Hi!" through the UART (later bytes wait for the first; the
//     status read that follows finds the UART's input FIFO full and is
//     retried on the bus) and reads the UART status,
//   - writes the analog front-end registers,
//   - provokes an illegal instruction, ECALL, a bad address and EBREAK,
//     then switches the bus side of the memory controller off (mcr.bs_en)
//     and shows that a flash read is then a bad address,
//   - starts the timer and waits in a loop while the testbench sends a byte
//     into the UART (external interrupt) and pulses the analog interrupt.
// The trap handler logs every trap's source and mcauseb in SRAM.
// The testbench checks the results, decodes the UART line, and counts each
// mechanism of the design (boot copy, bus slot use by every agent, bus
// retries, FIFO back-pressure, CPU waits on memory, each trap source, timer
// hits, flash programming, GPIO drive); any that never happened fails.
// The boot from flash, the bus with its FIFOs and the interrupt sources
// follow the document; program, IDs and clock dividers are this design's.
module tb_siwa_soc;
  import siwa_pkg::*;
  import rv_asm_pkg::*;
  localparam int BIT = 174;          // UART bit time in clocks (default)
  logic        clk = 0, rst_n = 0;
  logic        spi_sclk, spi_cs_n, spi_mosi, spi_miso;
  logic        uart_txd, uart_rxd = 1;
  logic [7:0]  gpio_pad_out, gpio_pad_oe, gpio_pad_in = 8'hA8, frls, uart_overruns;
  logic        analog_irq = 0, boot_done, boot_err, retire, trap;
  logic [31:0] isval, isconf, pc;
  logic [4:0]  istrg;
  int checks = 0, failures = 0;
  int unsigned pcw;

  siwa_soc dut (.*);
  spi_flash_model #(.BYTES(16384)) flash (.sclk(spi_sclk), .cs_n(spi_cs_n),
                                          .mosi(spi_mosi), .miso(spi_miso));
  always #5 clk = ~clk;

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  function automatic void at(input int unsigned a); pcw = a; endfunction
  function automatic void e(input logic [31:0] w);
    for (int b = 0; b < 4; b++) flash.mem[pcw + b] = w[8*b +: 8];
    pcw += 4;
  endfunction
  function automatic logic [31:0] sram(input int unsigned a); return dut.u_sram.mem[a / 4]; endfunction

  // ------------------------------------------------ mechanism counters
  int n_boot_wr, n_slot [3], n_retry, n_backpress, n_wait, n_timer_hit, n_gpio_drive;
  int n_traps;
  always @(posedge clk) if (rst_n) begin
    if (!boot_done && dut.m_en && dut.m_we) n_boot_wr++;
    for (int i = 0; i < 3; i++) if (dut.drv_valid[i] && dut.bus_ack) n_slot[i]++;
    if (dut.bus_valid && !dut.bus_ack) n_retry++;
    if ((dut.uart_rx_v && !dut.uart_rx_r) || (dut.mbc_tx_v && !dut.mbc_tx_r)) n_backpress++;
    if (dut.u_cpu.st == 3'd4) n_wait++;
    if (dut.u_cpu.timer_hit) n_timer_hit++;
    if (gpio_pad_oe == 8'h07 && gpio_pad_out[2:0] == 3'b101) n_gpio_drive++;
    if (trap) n_traps++;
  end

  // ------------------------------------------------ UART line decoder
  byte tx_bytes [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      repeat (BIT / 2) @(posedge clk);
      if (uart_txd == 0) begin
        for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = uart_txd; end
        repeat (BIT) @(posedge clk);
        chk("UART stop bit", uart_txd == 1);
        tx_bytes.push_back(b);
      end
    end
  end
  task automatic uart_send(input logic [7:0] b);
    uart_rxd = 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (BIT) @(posedge clk); end
    uart_rxd = 1; repeat (BIT) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 16384; i++) flash.mem[i] = 8'h00;
    for (int a = 0; a < 8192; a += 4) begin at(a); e(ADDI(0, 0, 12'd0)); end
    at(32'h2000); e(32'h1234_5678);                 // data word in the flash
    // ---------------- main program
    at(0);
    e(LUI(1, 20'h00010));
    e(ADDI(1, 1, 12'h713));          // mcr: bs_en, gpio_conf 07, maie, mieio, miet
    e(ADDI(2, 0, 12'h400));
    e(CSRRW(0, 2, CSR_MTVEC));
    e(CSRRW(0, 1, CSR_MCR));
    e(ADDI(3, 0, 12'd0));
    e(ADDI(4, 0, 12'd10));
    e(ADD(3, 3, 4));                 // loop: x3 += x4
    e(ADDI(4, 4, -12'sd1));
    e(BNE(4, 0, -13'sd8));
    e(SW(3, 0, 12'h100));            // 55
    e(ADDI(5, 0, 12'h05A));
    e(SB(5, 0, 12'h101));
    e(SH(5, 0, 12'h106));
    e(CSRRWI(0, 5'd5, CSR_GPIO));
    e(CSRRS(6, 0, CSR_GPIO));
    e(SW(6, 0, 12'h108));
    e(LUI(7, 20'h00802));            // flash byte 0x2000 on the bus
    e(LW(8, 7, 12'h0));
    e(SW(8, 0, 12'h10C));
    e(SW(3, 7, 12'h4));              // program 55 at flash 0x2004
    e(LUI(9, 20'h01800));            // UART
    e(ADDI(10, 0, 12'h048));
    e(SW(10, 9, 12'h0));
    e(ADDI(10, 0, 12'h069));
    e(SW(10, 9, 12'h0));
    e(ADDI(10, 0, 12'h021));
    e(SW(10, 9, 12'h0));             // UART input FIFO now full
    e(LW(11, 9, 12'h0));             // status
    e(SW(11, 0, 12'h110));
    e(CSRRWI(0, 5'd27, CSR_FRLS));
    e(ADDI(12, 0, 12'h123));
    e(CSRRW(0, 12, CSR_ISVAL));
    e(CSRRWI(0, 5'd7, CSR_ISCONF));
    e(CSRRWI(0, 5'd17, CSR_ISTRG));
    e(32'h0000_0000);                // illegal
    e(ECALL());
    e(LUI(12, 20'h00002));
    e(LW(0, 12, 12'h0));             // 0x2000: no memory there
    e(EBREAK());
    e(LUI(14, 20'h00010));           // mcr.bs_en
    e(CSRRC(0, 14, CSR_MCR));        // bus side off
    e(LW(0, 7, 12'h0));              // flash read now a bad address
    e(CSRRS(0, 14, CSR_MCR));        // bus side on again
    e(ADDI(31, 0, 12'd1000));
    e(CSRRW(0, 31, CSR_TMRFNC));
    e(LUI(15, 20'h00005));
    e(ADDI(15, 15, -12'sd1));        // wait loop
    e(BNE(15, 0, -13'sd4));
    e(ADDI(13, 0, 12'h600));
    e(SW(13, 13, 12'h1FC));          // done marker at 0x7FC
    e(JAL(0, 21'd0));
    // ---------------- trap handler at 0x400
    at(32'h400);
    for (int r = 20; r <= 25; r++) e(SW(r, 0, 12'(32'h700 + 4 * (r - 20))));
    e(CSRRS(20, 0, CSR_MCAUSEA));
    e(ANDI(22, 20, 12'd7));
    e(LW(21, 0, 12'h718));
    e(ADDI(21, 21, 12'd1));
    e(SW(21, 0, 12'h718));
    e(SLLI(23, 21, 5'd2));
    e(SW(22, 23, 12'h600));          // log[n] = source
    e(CSRRS(24, 0, CSR_MCAUSEB));
    e(SW(24, 23, 12'h680));          // logb[n] = mcauseb
    e(CSRRS(24, 0, CSR_MEPC));
    e(ADDI(25, 0, 12'd4));
    e(BNE(22, 25, 13'd8));
    e(CSRRW(0, 0, CSR_TMRFNC));      // timer: stop it
    e(ADDI(25, 0, 12'd3));
    e(BLT(22, 25, 13'd12));          // 1, 2: skip the instruction
    e(ADDI(25, 0, 12'd6));
    e(BLT(22, 25, 13'd12));          // 3, 4, 5: return to it
    e(ADDI(24, 24, 12'd4));
    e(CSRRW(0, 24, CSR_MEPC));
    for (int r = 20; r <= 25; r++) e(LW(r, 0, 12'(32'h700 + 4 * (r - 20))));
    e(MRET());
    at(32'h718); e(32'd0);           // trap count

    #12 rst_n = 1;
    wait (boot_done);
    $display("boot done at %0t", $time);
    wait (tx_bytes.size() == 3);
    uart_send(8'h42);
    repeat (2000) @(posedge clk);
    @(negedge clk) analog_irq = 1;
    repeat (4) @(negedge clk);
    analog_irq = 0;
    while (sram(32'h7FC) != 32'h600) @(posedge clk);
    repeat (5) @(posedge clk);

    // ---------------- results
    chk("boot without error", !boot_err);
    chk("loop sum", sram(32'h100) == 32'h0000_5A37);
    chk("half-word store", sram(32'h104) == 32'h005A_0013);
    chk("gpio read back", sram(32'h108) == 32'h0000_00AD);
    chk("gpio pads", gpio_pad_oe == 8'h07 && gpio_pad_out[2:0] == 3'b101);
    chk("bus read from flash", sram(32'h10C) == 32'h1234_5678);
    chk("flash programmed", {flash.mem[32'h2007], flash.mem[32'h2006], flash.mem[32'h2005],
                             flash.mem[32'h2004]} == 32'd55 && flash.n_prog == 1);
    chk("uart bytes", tx_bytes.size() == 3 && tx_bytes[0] == 8'h48 && tx_bytes[1] == 8'h69 &&
                       tx_bytes[2] == 8'h21);
    chk("uart status read", sram(32'h110) <= 1);
    chk("analog registers", frls == 27 && isval == 32'h123 && isconf == 7 && istrg == 17);
    chk("trap count", sram(32'h718) == 8);
    chk("exception order", sram(32'h604) == 1 && sram(32'h608) == 6 && sram(32'h60C) == 2 &&
                           sram(32'h610) == 7 && sram(32'h614) == 2);
    chk("bus access with the bus side off is a bad address", sram(32'h694) == 32'h0080_2000);
    chk("bad address in mcauseb", sram(32'h68C) == 32'h2000);
    begin
      int seen [8];
      for (int i = 0; i < 8; i++) seen[i] = 0;
      for (int i = 1; i <= 8; i++) seen[sram(32'h600 + 4 * i) % 8]++;
      for (int s = 1; s <= 7; s++) chk($sformatf("trap source %0d seen", s), seen[s] == (s == 2 ? 2 : 1));
      for (int i = 1; i <= 8; i++)
        if (sram(32'h600 + 4 * i) == 3) chk("received byte in mcauseb", sram(32'h680 + 4 * i) == 32'h42);
    end
    chk("no UART overrun", uart_overruns == 0);
    // ---------------- mechanisms
    $display("boot writes %0d, packages per agent %0d/%0d/%0d, retries %0d, back-pressure %0d",
             n_boot_wr, n_slot[0], n_slot[1], n_slot[2], n_retry, n_backpress);
    $display("cpu memory waits %0d, timer hits %0d, traps %0d, gpio drive %0d, flash reads %0d",
             n_wait, n_timer_hit, n_traps, n_gpio_drive, flash.n_read);
    chk("boot copied every word", n_boot_wr == 2048);
    chk("every agent used its bus slot", n_slot[0] > 0 && n_slot[1] > 0 && n_slot[2] > 0);
    chk("bus retry happened", n_retry > 0);
    chk("FIFO back-pressure happened", n_backpress > 0);
    chk("CPU waited on memory", n_wait > 0);
    chk("timer hit", n_timer_hit > 0);
    chk("every trap taken", n_traps == 8);
    chk("gpio driven", n_gpio_drive > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
