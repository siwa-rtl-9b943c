// tb_uart: sends write packages to the UART and decodes txd in the
// testbench (start bit, 8 data bits LSB first, stop bit, BAUD_DIV cycles per
// bit); drives frames into rxd and expects MSG_DATA packages to the MBC;
// checks the status read and that a byte arriving while one is still held
// is counted as an overrun.
// A UART that talks to the CPU through bus messages follows the document;
// the frame, baud divider and message codes are this design's choice.
module tb_uart;
  import siwa_pkg::*;
  localparam int DIV = 8;
  logic     clk = 0, rst_n = 0;
  logic     rx_valid = 0, rx_ready, tx_valid, tx_ready = 0;
  bus_pkg_t rx_pkg = '0, tx_pkg;
  logic     txd, rxd = 1;
  logic [7:0] overruns;
  int checks = 0, failures = 0;

  uart #(.BAUD_DIV(DIV)) dut (.clk, .rst_n, .rx_valid, .rx_ready, .rx_pkg,
                              .tx_valid, .tx_ready, .tx_pkg, .txd, .rxd, .overruns);
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

  // receive one frame from txd
  task automatic get_tx(output logic [7:0] b, output int bit_cycles);
    int t0;
    while (txd) @(negedge clk);
    t0 = $time;
    repeat (DIV / 2) @(negedge clk);
    chk("start bit", !txd);
    for (int i = 0; i < 8; i++) begin
      repeat (DIV) @(negedge clk);
      b[i] = txd;
    end
    repeat (DIV) @(negedge clk);
    chk("stop bit", txd);
    bit_cycles = ($time - t0) / 10;
  endtask

  task automatic put_rx(input logic [7:0] b);
    @(negedge clk); rxd = 0;
    repeat (DIV) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (DIV) @(negedge clk); end
    rxd = 1; repeat (DIV) @(negedge clk);
  endtask

  initial begin
    logic [7:0] b;
    int cyc;
    #12 rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      logic [7:0] v;
      v = 8'($urandom);
      fork
        send('{dst: 3'(ID_UART), src: ID_MBC, code: MSG_WRITE, addr: 25'(UART_BASE), data: {24'h0, v}});
        get_tx(b, cyc);
      join
      chk($sformatf("tx byte %h want %h n=%0d t=%0t", b, v, n, $time), b == v);
      chk("tx bit time", cyc == DIV / 2 + 9 * DIV);
      repeat (DIV) @(negedge clk);
    end
    // status read while idle
    send('{dst: 3'(ID_UART), src: ID_MBC, code: MSG_READ, addr: 25'(UART_BASE), data: 0});
    while (!tx_valid) @(negedge clk);
    chk("status rsp", tx_pkg.code == MSG_READ_RSP && tx_pkg.dst == 3'(ID_MBC) && tx_pkg.data == 0);
    tx_ready = 1; @(negedge clk); tx_ready = 0;
    // receive
    put_rx(8'hC3);
    repeat (4) @(negedge clk);
    chk("rx package", tx_valid && tx_pkg.code == MSG_DATA && tx_pkg.dst == 3'(ID_MBC) &&
                      tx_pkg.src == ID_UART && tx_pkg.data == 32'hC3);
    // second byte while the first is held: overrun
    put_rx(8'h5A);
    repeat (4) @(negedge clk);
    chk("overrun counted", overruns == 1 && tx_pkg.data == 32'hC3);
    tx_ready = 1; @(negedge clk); tx_ready = 0;
    chk("released", !tx_valid);
    put_rx(8'h81);
    repeat (4) @(negedge clk);
    chk("rx after release", tx_valid && tx_pkg.data == 32'h81);
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
