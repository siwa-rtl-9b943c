// spi_flash_model: behavioural model of an external SPI NOR flash for the
// testbenches (SPI mode 0). Understands READ (0x03, 24-bit address, data
// out from the next falling edge on), WRITE ENABLE (0x06) and PAGE PROGRAM
// (0x02, 24-bit address, data bytes; only after WRITE ENABLE). The array is
// BYTES long and the address wraps. It counts the commands it has served.
// The flash itself is an off-chip part that the document only names; the
// command set modelled is that of common SPI NOR flashes, this design's choice.
module spi_flash_model #(
  parameter int BYTES = 65536
) (
  input  logic sclk,
  input  logic cs_n,
  input  logic mosi,
  output logic miso
);
  logic [7:0]  mem [BYTES];
  int          bitc;
  logic [7:0]  sh, cmd;
  logic [23:0] addr;
  logic        wel = 0;
  int          n_read = 0, n_wren = 0, n_prog = 0, n_prog_bytes = 0;

  initial miso = 0;

  always @(negedge cs_n) bitc = 0;

  always @(posedge cs_n) begin
    if (cmd == 8'h02 && bitc > 32) begin n_prog++; wel = 0; end
  end

  always @(posedge sclk) begin
    if (!cs_n) begin
      sh = {sh[6:0], mosi};
      bitc++;
      if (bitc == 8) begin
        cmd = sh;
        if (cmd == 8'h06) begin wel = 1; n_wren++; end
        if (cmd == 8'h03) n_read++;
      end else if (bitc > 8 && bitc <= 32) begin
        addr = {addr[22:0], mosi};
      end else if (bitc > 32 && (bitc - 32) % 8 == 0 && cmd == 8'h02 && wel) begin
        mem[(int'(addr) + (bitc - 33) / 8) % BYTES] = sh;
        n_prog_bytes++;
      end
    end
  end

  always @(negedge sclk) begin
    if (!cs_n && cmd == 8'h03 && bitc >= 32) begin
      int k;
      k = bitc - 32;
      miso = mem[(int'(addr) + k / 8) % BYTES][7 - k % 8];
    end
  end
endmodule
