// siwa_soc: top level of the Siwa low-power RISC-V system on chip.
//
// An RV32I multi-cycle CPU reaches one 8 kB SRAM (program and data) and the
// system bus through its memory and bus controller (MBC). The bus is a
// 65-bit parallel bus with two protocol lines and distributed arbitration;
// three agents sit on it, each behind a bus interface with a two-package
// input FIFO and output FIFO: the MBC (ID 0), the SPI flash controller
// (ID 1) and the UART (ID 2). Bus lines are wired-OR of the interfaces'
// drivers. After reset the boot loader copies BOOT_WORDS words from the
// external SPI flash into the SRAM through the MBC, then the CPU starts at
// address 0. Eight GPIO pins are controlled through the CPU's CSRs. The
// analog stimulation front end is outside this RTL: its control registers
// (frls, isval, isconf, istrg) and its interrupt pin are top-level ports.
//
// Ports: clk/rst_n (active-low asynchronous reset), SPI pins to the flash,
// UART txd/rxd, GPIO pad signals, the analog interface signals, and
// observation outputs (boot_done, boot_err, pc, retire, trap) for test.
// The block structure, the three bus agents, the two-entry FIFOs, the
// 8 kB SRAM and the boot from flash follow the document; agent IDs, the
// wired-OR bus, the SPI and UART clock dividers and the observation ports
// are this design's choice.
module siwa_soc
  import siwa_pkg::*;
#(
  parameter int unsigned SRAM_WORDS = 2048,   // 8 kB
  parameter int unsigned BOOT_WORDS = 2048,   // whole SRAM
  parameter int unsigned SPI_DIV    = 2,
  parameter int unsigned UART_DIV   = 174,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // SPI flash
  output logic        spi_sclk,
  output logic        spi_cs_n,
  output logic        spi_mosi,
  input  logic        spi_miso,
  // UART
  output logic        uart_txd,
  input  logic        uart_rxd,
  // GPIO pads
  output logic [7:0]  gpio_pad_out,
  output logic [7:0]  gpio_pad_oe,
  input  logic [7:0]  gpio_pad_in,
  // analog stimulation interface
  input  logic        analog_irq,
  output logic [7:0]  frls,
  output logic [31:0] isval,
  output logic [31:0] isconf,
  output logic [4:0]  istrg,
  // observation
  output logic        boot_done,
  output logic        boot_err,
  output logic [31:0] pc,
  output logic        retire,
  output logic        trap,
  output logic [7:0]  uart_overruns
);
  localparam int unsigned AW = $clog2(SRAM_WORDS);

  // ------------------------------------------------------------ CPU
  logic        c_en, c_we, c_uns, m_en, m_we, m_uns;
  logic [31:0] c_addr, c_wdata, m_addr, m_wdata;
  mem_size_e   c_size, m_size;
  logic        mem_rdy, error_drs, bs_en, msg_valid, msg_ack;
  logic [31:0] d_read, err_addr;
  bus_pkg_t    msg_pkg;
  logic [7:0]  gpio_in, gpio_out, gpio_conf;

  siwa_cpu u_cpu (
    .clk, .rst_n, .boot_done,
    .m_en(c_en), .m_we(c_we), .m_addr(c_addr), .m_wdata(c_wdata),
    .m_size(c_size), .m_uns(c_uns), .mem_rdy(mem_rdy & boot_done),
    .error_drs(error_drs & boot_done), .d_read, .err_addr,
    .msg_valid, .msg_pkg, .msg_ack,
    .analog_irq, .gpio_in, .gpio_out, .gpio_conf, .bs_en,
    .frls, .isval, .isconf, .istrg, .pc, .retire, .trap
  );

  boot_loader #(.BOOT_WORDS(BOOT_WORDS)) u_boot (
    .clk, .rst_n, .boot_done, .boot_err,
    .c_en, .c_we, .c_addr, .c_wdata, .c_size, .c_uns,
    .m_en, .m_we, .m_addr, .m_wdata, .m_size, .m_uns,
    .mem_rdy, .error_drs, .d_read
  );

  // ------------------------------------------------------ MBC + SRAM
  logic          sram_cs, sram_we;
  logic [AW-1:0] sram_addr;
  logic [31:0]   sram_wdata, sram_rdata;
  logic          mbc_tx_v, mbc_tx_r, mbc_rx_v, mbc_rx_r;
  bus_pkg_t      mbc_tx_p, mbc_rx_p;

  mbc #(.SRAM_WORDS(SRAM_WORDS)) u_mbc (
    .clk, .rst_n, .bs_en,
    .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .size(m_size),
    .uns(m_uns), .mem_rdy, .error_drs, .d_read, .err_addr,
    .sram_cs, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .tx_valid(mbc_tx_v), .tx_ready(mbc_tx_r), .tx_pkg(mbc_tx_p),
    .rx_valid(mbc_rx_v), .rx_ready(mbc_rx_r), .rx_pkg(mbc_rx_p),
    .msg_valid, .msg_pkg, .msg_ack
  );

  sram #(.WORDS(SRAM_WORDS)) u_sram (
    .clk, .cs(sram_cs), .we(sram_we), .addr(sram_addr),
    .wdata(sram_wdata), .rdata(sram_rdata)
  );

  // ------------------------------------------------------ system bus
  logic [BUS_W-1:0] bus_data;
  logic             bus_valid, bus_ack;
  logic [BUS_W-1:0] drv_data  [N_AGENTS];
  logic             drv_valid [N_AGENTS];
  logic             drv_ack   [N_AGENTS];

  always_comb begin
    bus_data  = '0;
    bus_valid = 1'b0;
    bus_ack   = 1'b0;
    for (int i = 0; i < N_AGENTS; i++) begin
      bus_data  = bus_data  | drv_data[i];
      bus_valid = bus_valid | drv_valid[i];
      bus_ack   = bus_ack   | drv_ack[i];
    end
  end

  bus_interface #(.ID(ID_MBC), .N_AGENTS(N_AGENTS), .DEPTH(FIFO_DEPTH)) u_bi_mbc (
    .clk, .rst_n,
    .tx_valid(mbc_tx_v), .tx_ready(mbc_tx_r), .tx_pkg(mbc_tx_p),
    .rx_valid(mbc_rx_v), .rx_ready(mbc_rx_r), .rx_pkg(mbc_rx_p),
    .bus_data, .bus_valid, .bus_ack,
    .drv_data(drv_data[0]), .drv_valid(drv_valid[0]), .drv_ack(drv_ack[0])
  );

  // SPI agent
  logic     spi_tx_v, spi_tx_r, spi_rx_v, spi_rx_r;
  bus_pkg_t spi_tx_p, spi_rx_p;

  bus_interface #(.ID(ID_SPI), .N_AGENTS(N_AGENTS), .DEPTH(FIFO_DEPTH)) u_bi_spi (
    .clk, .rst_n,
    .tx_valid(spi_tx_v), .tx_ready(spi_tx_r), .tx_pkg(spi_tx_p),
    .rx_valid(spi_rx_v), .rx_ready(spi_rx_r), .rx_pkg(spi_rx_p),
    .bus_data, .bus_valid, .bus_ack,
    .drv_data(drv_data[1]), .drv_valid(drv_valid[1]), .drv_ack(drv_ack[1])
  );

  spi_ctrl #(.CLK_DIV(SPI_DIV)) u_spi (
    .clk, .rst_n,
    .rx_valid(spi_rx_v), .rx_ready(spi_rx_r), .rx_pkg(spi_rx_p),
    .tx_valid(spi_tx_v), .tx_ready(spi_tx_r), .tx_pkg(spi_tx_p),
    .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso)
  );

  // UART agent
  logic     uart_tx_v, uart_tx_r, uart_rx_v, uart_rx_r;
  bus_pkg_t uart_tx_p, uart_rx_p;

  bus_interface #(.ID(ID_UART), .N_AGENTS(N_AGENTS), .DEPTH(FIFO_DEPTH)) u_bi_uart (
    .clk, .rst_n,
    .tx_valid(uart_tx_v), .tx_ready(uart_tx_r), .tx_pkg(uart_tx_p),
    .rx_valid(uart_rx_v), .rx_ready(uart_rx_r), .rx_pkg(uart_rx_p),
    .bus_data, .bus_valid, .bus_ack,
    .drv_data(drv_data[2]), .drv_valid(drv_valid[2]), .drv_ack(drv_ack[2])
  );

  uart #(.BAUD_DIV(UART_DIV)) u_uart (
    .clk, .rst_n,
    .rx_valid(uart_rx_v), .rx_ready(uart_rx_r), .rx_pkg(uart_rx_p),
    .tx_valid(uart_tx_v), .tx_ready(uart_tx_r), .tx_pkg(uart_tx_p),
    .txd(uart_txd), .rxd(uart_rxd), .overruns(uart_overruns)
  );

  // ------------------------------------------------------------ GPIO
  gpio #(.N(8)) u_gpio (
    .clk, .rst_n, .conf(gpio_conf), .out(gpio_out), .value(gpio_in),
    .pad_out(gpio_pad_out), .pad_oe(gpio_pad_oe), .pad_in(gpio_pad_in)
  );
endmodule
