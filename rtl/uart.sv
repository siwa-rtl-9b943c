// uart: UART agent of the Siwa system bus.
//
// Asynchronous serial port, 8 data bits, no parity, one stop bit, LSB
// first, BAUD_DIV clock cycles per bit (174 gives 115200 baud at 20 MHz).
// Bus side:
//   MSG_WRITE  -> data[7:0] is transmitted on txd (the package is taken
//                 from the input FIFO only when the transmitter is free).
//   MSG_READ   -> answered with MSG_READ_RSP, data = {31'b0, tx_busy}.
//   A byte received on rxd is sent to the CPU's MBC as a MSG_DATA package
//   with the byte in data[7:0]; the CPU sees it as an external interrupt.
// The receiver synchronises rxd with two flip-flops, finds the start bit's
// falling edge, and samples each bit in its middle. One received byte is
// held while the bus interface is busy; a byte arriving while one is still
// held is dropped and counted in overruns. The frame format, baud divider
// and the package use are this design's choice; the document names the
// UART as a bus agent only.
module uart
  import siwa_pkg::*;
#(
  parameter int unsigned BAUD_DIV = 174
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     rx_valid,
  output logic     rx_ready,
  input  bus_pkg_t rx_pkg,
  output logic     tx_valid,
  input  logic     tx_ready,
  output bus_pkg_t tx_pkg,
  output logic     txd,
  input  logic     rxd,
  output logic [7:0] overruns
);
  localparam int unsigned BW = $clog2(BAUD_DIV + 1);

  // ------------------------------------------------------- transmitter
  logic [9:0]    tx_sh;
  logic [3:0]    tx_cnt;
  logic [BW-1:0] tx_div;
  logic          tx_busy;

  // -------------------------------------------------------- responder
  logic     rsp_pend;
  bus_pkg_t rsp;

  // --------------------------------------------------------- receiver
  logic [2:0]    rx_sync;
  logic          rx_act;
  logic [3:0]    rx_cnt;
  logic [BW-1:0] rx_div;
  logic [7:0]    rx_sh;
  logic          byte_pend;
  logic [7:0]    byte_q;

  assign txd = tx_busy ? tx_sh[0] : 1'b1;

  // Take a package when it can be served now.
  always_comb begin
    rx_ready = 1'b0;
    if (rx_valid) begin
      unique case (rx_pkg.code)
        MSG_WRITE: rx_ready = !tx_busy;
        MSG_READ:  rx_ready = !rsp_pend;
        default:   rx_ready = 1'b1;   // dropped
      endcase
    end
  end

  // Responses go first, then received bytes.
  always_comb begin
    tx_valid = rsp_pend || byte_pend;
    if (rsp_pend) tx_pkg = rsp;
    else tx_pkg = '{dst: {1'b0, ID_MBC}, src: ID_UART, code: MSG_DATA,
                    addr: 25'(UART_BASE), data: {24'b0, byte_q}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh     <= '1;
      tx_cnt    <= '0;
      tx_div    <= '0;
      tx_busy   <= 1'b0;
      rsp_pend  <= 1'b0;
      rsp       <= '0;
      rx_sync   <= '1;
      rx_act    <= 1'b0;
      rx_cnt    <= '0;
      rx_div    <= '0;
      rx_sh     <= '0;
      byte_pend <= 1'b0;
      byte_q    <= '0;
      overruns  <= '0;
    end else begin
      // transmit
      if (rx_valid && rx_ready && rx_pkg.code == MSG_WRITE) begin
        tx_sh   <= {1'b1, rx_pkg.data[7:0], 1'b0};
        tx_cnt  <= '0;
        tx_div  <= '0;
        tx_busy <= 1'b1;
      end else if (tx_busy) begin
        if (tx_div == BW'(BAUD_DIV - 1)) begin
          tx_div <= '0;
          tx_sh  <= {1'b1, tx_sh[9:1]};
          tx_cnt <= tx_cnt + 1'b1;
          if (tx_cnt == 4'd9) tx_busy <= 1'b0;
        end else begin
          tx_div <= tx_div + 1'b1;
        end
      end
      // status read
      if (rx_valid && rx_ready && rx_pkg.code == MSG_READ) begin
        rsp_pend <= 1'b1;
        rsp      <= '{dst: {1'b0, rx_pkg.src}, src: ID_UART, code: MSG_READ_RSP,
                      addr: rx_pkg.addr, data: {31'b0, tx_busy}};
      end else if (rsp_pend && tx_ready) begin
        rsp_pend <= 1'b0;
      end
      if (!rsp_pend && byte_pend && tx_ready) byte_pend <= 1'b0;
      // receive
      rx_sync <= {rx_sync[1:0], rxd};
      if (!rx_act) begin
        if (rx_sync[2] && !rx_sync[1]) begin   // falling edge: start bit
          rx_act <= 1'b1;
          rx_cnt <= '0;
          rx_div <= BW'(BAUD_DIV / 2);
        end
      end else if (rx_div == BW'(BAUD_DIV - 1)) begin
        rx_div <= '0;
        rx_cnt <= rx_cnt + 1'b1;
        if (rx_cnt == 4'd0) begin
          if (rx_sync[1]) rx_act <= 1'b0;      // false start
        end else if (rx_cnt <= 4'd8) begin
          rx_sh <= {rx_sync[1], rx_sh[7:1]};
        end else begin                           // stop bit
          rx_act <= 1'b0;
          if (rx_sync[1]) begin
            if (byte_pend && !(tx_ready && !rsp_pend)) overruns <= overruns + 1'b1;
            else begin byte_pend <= 1'b1; byte_q <= rx_sh; end
          end
        end
      end else begin
        rx_div <= rx_div + 1'b1;
      end
    end
  end
endmodule
