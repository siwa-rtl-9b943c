// tb_spi_ctrl: drives read and write packages into the SPI agent, with a
// flash model on its pins. Reads must return the four flash bytes at the
// package address minus 8 MB, little-endian, to the requester, and take
// one 64-bit SPI transfer (at least 64 * 2 * CLK_DIV cycles). Writes must
// issue WRITE ENABLE then PAGE PROGRAM and land in the flash array.
// Flash reads and writes over the SPI follow the document; the flash commands
// and the SPI clock divider are this design's choice.
module tb_spi_ctrl;
  import siwa_pkg::*;
  localparam int DIV = 2;
  logic     clk = 0, rst_n = 0;
  logic     rx_valid = 0, rx_ready, tx_valid, tx_ready = 0;
  bus_pkg_t rx_pkg = '0, tx_pkg;
  logic     sclk, cs_n, mosi, miso;
  int checks = 0, failures = 0;

  spi_ctrl #(.CLK_DIV(DIV)) dut (.clk, .rst_n, .rx_valid, .rx_ready, .rx_pkg,
                                 .tx_valid, .tx_ready, .tx_pkg, .sclk, .cs_n, .mosi, .miso);
  spi_flash_model #(.BYTES(4096)) flash (.sclk, .cs_n, .mosi, .miso);
  always #5 clk = ~clk;

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  task automatic send(input bus_pkg_t p);
    @(negedge clk); rx_pkg = p; rx_valid = 1; #1;
    while (!rx_ready) begin @(negedge clk); #1; end
    @(negedge clk); rx_valid = 0;
  endtask

  task automatic do_read(input logic [23:0] fa, input logic [1:0] src);
    int t0, cyc;
    logic [31:0] want;
    want = {flash.mem[(fa+3)%4096], flash.mem[(fa+2)%4096], flash.mem[(fa+1)%4096], flash.mem[fa%4096]};
    t0 = $time;
    send('{dst: 3'(ID_SPI), src: src, code: MSG_READ, addr: 25'(BUS_BASE) + 25'(fa), data: 0});
    while (!tx_valid) @(negedge clk);
    cyc = ($time - t0) / 10;
    chk($sformatf("read %h data %h want %h", fa, tx_pkg.data, want), tx_pkg.data == want);
    chk("read rsp header", tx_pkg.dst == {1'b0, src} && tx_pkg.src == ID_SPI && tx_pkg.code == MSG_READ_RSP);
    chk($sformatf("read latency %0d cycles", cyc), cyc >= 64 * 2 * DIV && cyc <= 64 * 2 * DIV + 10);
    tx_ready = 1; @(negedge clk); tx_ready = 0;
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) flash.mem[i] = 8'($urandom);
    #12 rst_n = 1;
    do_read(24'h000000, ID_MBC);
    do_read(24'h000123, ID_UART);
    for (int i = 0; i < 5; i++) do_read(24'($urandom % 4000), ID_MBC);
    // write
    send('{dst: 3'(ID_SPI), src: ID_MBC, code: MSG_WRITE, addr: 25'(BUS_BASE) + 25'h40, data: 32'hA1B2C3D4});
    while (!(rx_ready && cs_n)) @(negedge clk);
    repeat (4) @(negedge clk);
    chk("wren issued", flash.n_wren == 1);
    chk("program issued", flash.n_prog == 1 && flash.n_prog_bytes == 4);
    chk("program data", {flash.mem[16'h43], flash.mem[16'h42], flash.mem[16'h41], flash.mem[16'h40]} == 32'hA1B2C3D4);
    do_read(24'h000040, ID_MBC);
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
