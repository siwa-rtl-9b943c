// tb_boot_loader: the boot loader driving a real MBC and SRAM; a bus model
// answers the flash reads with a random delay. Checks that every word of
// the boot image lands at its SRAM address, that reads go to consecutive
// flash-window addresses with never more than one outstanding (the
// handshake), that boot_done rises only at the end, and that the CPU's
// request signals reach the MBC afterwards.
// The copy from flash to SRAM with one transaction at a time follows the
// document's handshaked boot; addresses and sizes are this design's choice.
module tb_boot_loader;
  import siwa_pkg::*;
  localparam int WORDS = 64;
  logic        clk = 0, rst_n = 0;
  logic        boot_done, boot_err;
  logic        c_en = 0, c_we = 0, c_uns = 0, m_en, m_we, m_uns;
  logic [31:0] c_addr = 0, c_wdata = 0, m_addr, m_wdata;
  mem_size_e   c_size = SZ_W, m_size;
  logic        mem_rdy, error_drs;
  logic [31:0] d_read, err_addr;
  logic        sram_cs, sram_we;
  logic [10:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic        tx_valid, tx_ready = 1, rx_valid = 0, rx_ready, msg_valid;
  bus_pkg_t    tx_pkg, rx_pkg = '0, msg_pkg;
  logic [31:0] image [WORDS];
  int checks = 0, failures = 0, reads = 0, outstanding = 0, max_out = 0, order_bad = 0;

  boot_loader #(.BOOT_WORDS(WORDS)) dut (.clk, .rst_n, .boot_done, .boot_err,
    .c_en, .c_we, .c_addr, .c_wdata, .c_size, .c_uns,
    .m_en, .m_we, .m_addr, .m_wdata, .m_size, .m_uns, .mem_rdy, .error_drs, .d_read);
  mbc #(.SRAM_WORDS(2048)) u_mbc (.clk, .rst_n, .bs_en(1'b1),
    .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .size(m_size), .uns(m_uns),
    .mem_rdy, .error_drs, .d_read, .err_addr,
    .sram_cs, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .tx_valid, .tx_ready, .tx_pkg, .rx_valid, .rx_ready, .rx_pkg,
    .msg_valid, .msg_pkg, .msg_ack(1'b0));
  sram #(.WORDS(2048)) u_sram (.clk, .cs(sram_cs), .we(sram_we), .addr(sram_addr),
                               .wdata(sram_wdata), .rdata(sram_rdata));
  always #5 clk = ~clk;

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  // flash responder
  initial begin
    forever begin
      @(negedge clk); #1;
      if (tx_valid && tx_pkg.code == MSG_READ) begin
        int idx;
        bus_pkg_t req;
        req = tx_pkg;
        idx = (int'(req.addr) - int'(BUS_BASE)) / 4;
        if (idx != reads) order_bad++;
        reads++;
        outstanding++;
        if (outstanding > max_out) max_out = outstanding;
        repeat ($urandom % 20 + 1) @(negedge clk);
        rx_pkg = '{dst: 0, src: ID_SPI, code: MSG_READ_RSP, addr: req.addr, data: image[idx % WORDS]};
        rx_valid = 1;
        @(negedge clk); #1;
        while (!rx_ready) begin @(negedge clk); #1; end
        rx_valid = 0;
        outstanding--;
      end
    end
  end

  initial begin
    for (int i = 0; i < WORDS; i++) image[i] = $urandom;
    #12 rst_n = 1;
    while (!boot_done) begin
      @(negedge clk);
      if (!boot_done && reads > WORDS) break;
    end
    chk("boot done without error", boot_done && !boot_err);
    chk($sformatf("one read per word (%0d)", reads), reads == WORDS);
    chk("consecutive addresses", order_bad == 0);
    chk("one request in flight at a time", max_out == 1);
    for (int i = 0; i < WORDS; i++)
      chk($sformatf("sram[%0d]", i), u_sram.mem[i] == image[i]);
    // CPU requests now pass through
    @(negedge clk); c_en = 1; c_addr = 32'h8; c_size = SZ_W; #1;
    chk("cpu request passed", m_en && m_addr == 32'h8);
    @(negedge clk); c_en = 0;
    while (!mem_rdy) @(negedge clk);
    chk("cpu reads booted word", d_read == image[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
