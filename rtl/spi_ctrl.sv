// spi_ctrl: SPI agent of the Siwa system bus, driving the external flash.
//
// The agent takes bus packages from its bus interface and turns them into
// SPI-flash transactions (SPI mode 0: SCLK idles low, MOSI changes after a
// falling edge, MISO is sampled on the rising edge, bytes MSB first):
//   MSG_READ  -> READ (0x03), 24-bit address, four data bytes in; the bytes
//                at flash addresses a, a+1, a+2, a+3 become data[7:0],
//                [15:8], [23:16], [31:24]; the word is sent back to the
//                requester as MSG_READ_RSP.
//   MSG_WRITE -> WRITE ENABLE (0x06), then PAGE PROGRAM (0x02), 24-bit
//                address and the four data bytes in the same order.
// Other codes are dropped. The flash address is the package address minus
// 8 MB, the start of the flash window in the memory map. SCLK runs at
// clk / (2*CLK_DIV). One package is served at a time; the next is taken
// from the input FIFO only when the SPI lines are idle. The flash command
// set, the SPI mode and the divider are this design's choice; the document
// only gives the 16 MB flash on the SPI port and its use for booting.
module spi_ctrl
  import siwa_pkg::*;
#(
  parameter int unsigned CLK_DIV = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  // from the bus interface
  input  logic     rx_valid,
  output logic     rx_ready,
  input  bus_pkg_t rx_pkg,
  output logic     tx_valid,
  input  logic     tx_ready,
  output bus_pkg_t tx_pkg,
  // SPI pins
  output logic     sclk,
  output logic     cs_n,
  output logic     mosi,
  input  logic     miso
);
  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  typedef enum logic [2:0] { S_IDLE, S_WREN, S_GAP, S_XFER, S_RESP } state_e;

  state_e      st;
  bus_pkg_t    req;
  logic [63:0] sh_out, sh_in;
  logic [6:0]  nbits, cnt;
  logic [DW-1:0] div;
  logic        tick;
  logic [23:0] faddr;

  assign tick  = (div == DW'(CLK_DIV - 1));
  assign faddr = 24'(rx_pkg.addr - 25'(BUS_BASE));

  assign rx_ready = (st == S_IDLE);
  assign tx_valid = (st == S_RESP);
  assign tx_pkg   = '{dst: {1'b0, req.src}, src: ID_SPI, code: MSG_READ_RSP,
                      addr: req.addr,
                      data: {sh_in[7:0], sh_in[15:8], sh_in[23:16], sh_in[31:24]}};
  assign mosi     = sh_out[63];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      req    <= '0;
      sh_out <= '0;
      sh_in  <= '0;
      nbits  <= '0;
      cnt    <= '0;
      div    <= '0;
      sclk   <= 1'b0;
      cs_n   <= 1'b1;
    end else begin
      div <= (st == S_IDLE || st == S_RESP || tick) ? '0 : div + 1'b1;
      unique case (st)
        S_IDLE: if (rx_valid) begin
          req <= rx_pkg;
          if (rx_pkg.code == MSG_READ) begin
            sh_out <= {8'h03, faddr, 32'h0};
            nbits  <= 7'd64;
            cnt    <= '0;
            cs_n   <= 1'b0;
            st     <= S_XFER;
          end else if (rx_pkg.code == MSG_WRITE) begin
            sh_out <= {8'h06, 56'h0};
            nbits  <= 7'd8;
            cnt    <= '0;
            cs_n   <= 1'b0;
            st     <= S_WREN;
          end
        end
        S_WREN, S_XFER: if (tick) begin
          if (!sclk) begin
            sclk  <= 1'b1;
            sh_in <= {sh_in[62:0], miso};
          end else begin
            sclk   <= 1'b0;
            sh_out <= {sh_out[62:0], 1'b0};
            cnt    <= cnt + 1'b1;
            if (cnt + 1'b1 == nbits) begin
              cs_n <= 1'b1;
              if (st == S_WREN) st <= S_GAP;
              else              st <= (req.code == MSG_READ) ? S_RESP : S_IDLE;
            end
          end
        end
        S_GAP: if (tick) begin
          sh_out <= {8'h02, 24'(req.addr - 25'(BUS_BASE)),
                     req.data[7:0], req.data[15:8], req.data[23:16], req.data[31:24]};
          nbits  <= 7'd64;
          cnt    <= '0;
          cs_n   <= 1'b0;
          st     <= S_XFER;
        end
        S_RESP: if (tx_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
