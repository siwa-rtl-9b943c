// tb_mbc: the memory and bus controller with the SRAM and a bus model on its
// FIFO ports. Checks byte/half/word loads and stores against a byte-array
// model with sign and zero extension, the latencies (2 cycles for loads and
// word stores, 3 for byte and half-word stores), bad-address and misaligned
// errors with recovery on the next enable, the bus packages sent for reads
// and writes in the 8 MB-32 MB window, reply matching while an unsolicited
// message is parked in the message register, and bs_en = 0 blocking the bus.
// The memory map and the enable/mem_rdy/error handshake follow the document;
// the latencies and message handling checked are this design's choice.
module tb_mbc;
  import siwa_pkg::*;
  logic        clk = 0, rst_n = 0, bs_en = 1;
  logic        en = 0, we = 0, uns = 0, mem_rdy, error_drs;
  logic [31:0] addr = 0, wdata = 0, d_read, err_addr;
  mem_size_e   size = SZ_W;
  logic        sram_cs, sram_we;
  logic [10:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic        tx_valid, tx_ready = 1, rx_valid = 0, rx_ready, msg_valid, msg_ack = 0;
  bus_pkg_t    tx_pkg, rx_pkg = '0, msg_pkg;
  logic [7:0]  model [8192];
  int checks = 0, failures = 0;

  mbc #(.SRAM_WORDS(2048)) dut (.*);
  sram #(.WORDS(2048)) u_sram (.clk, .cs(sram_cs), .we(sram_we), .addr(sram_addr),
                               .wdata(sram_wdata), .rdata(sram_rdata));
  always #5 clk = ~clk;

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  // One transaction: returns the cycles from the en pulse to mem_rdy or error.
  task automatic acc(input logic w, input logic [31:0] a, input logic [31:0] d,
                     input mem_size_e s, input logic u,
                     output logic [31:0] q, output int cyc, output logic err);
    @(negedge clk); en = 1; we = w; addr = a; wdata = d; size = s; uns = u;
    @(negedge clk); en = 0; cyc = 1; #1;
    while (!mem_rdy && !error_drs) begin @(negedge clk); cyc++; #1; end
    q = d_read; err = error_drs;
  endtask

  function automatic logic [31:0] mload(input logic [31:0] a, input mem_size_e s, input logic u);
    logic [31:0] w;
    w = {model[a+3], model[a+2], model[a+1], model[a]};
    case (s)
      SZ_B: return u ? {24'b0, w[7:0]} : {{24{w[7]}}, w[7:0]};
      SZ_H: return u ? {16'b0, w[15:0]} : {{16{w[15]}}, w[15:0]};
      default: return w;
    endcase
  endfunction

  initial begin
    logic [31:0] q;
    int cyc;
    logic err;
    #12 rst_n = 1;
    for (int i = 0; i < 8192; i += 4) begin
      logic [31:0] v;
      v = $urandom;
      acc(1, i, v, SZ_W, 0, q, cyc, err);
      {model[i+3], model[i+2], model[i+1], model[i]} = v;
    end
    acc(1, 32'h100, 32'h8899AABB, SZ_W, 0, q, cyc, err);
    {model[259], model[258], model[257], model[256]} = 32'h8899AABB;
    chk($sformatf("word store 2 cycles (%0d)", cyc), cyc == 2 && !err);
    acc(0, 32'h100, 0, SZ_W, 0, q, cyc, err);
    chk($sformatf("word load 2 cycles (%0d)", cyc), cyc == 2 && q == 32'h8899AABB);
    acc(1, 32'h101, 32'h000000F5, SZ_B, 0, q, cyc, err);
    model[257] = 8'hF5;
    chk($sformatf("byte store 3 cycles (%0d)", cyc), cyc == 3 && !err);
    acc(0, 32'h100, 0, SZ_W, 0, q, cyc, err);
    chk("byte merged", q == 32'h8899F5BB);
    acc(0, 32'h101, 0, SZ_B, 0, q, cyc, err);
    chk("lb sign", q == 32'hFFFFFFF5);
    acc(0, 32'h101, 0, SZ_B, 1, q, cyc, err);
    chk("lbu zero", q == 32'h000000F5);
    acc(0, 32'h102, 0, SZ_H, 0, q, cyc, err);
    chk("lh sign", q == 32'hFFFF8899);
    acc(0, 32'h102, 0, SZ_H, 1, q, cyc, err);
    chk("lhu zero", q == 32'h00008899);
    // random mix
    for (int n = 0; n < 600; n++) begin
      mem_size_e s;
      logic [31:0] a, v;
      logic w, u;
      s = mem_size_e'($urandom % 3);
      a = $urandom % 8192;
      a = (s == SZ_W) ? a & ~32'h3 : (s == SZ_H) ? a & ~32'h1 : a;
      w = 1'($urandom); u = 1'($urandom) && s != SZ_W; v = $urandom;
      acc(w, a, v, s, u, q, cyc, err);
      if (w) begin
        model[a] = v[7:0];
        if (s != SZ_B) model[a+1] = v[15:8];
        if (s == SZ_W) begin model[a+2] = v[23:16]; model[a+3] = v[31:24]; end
      end else begin
        chk($sformatf("load %h size %0d: %h want %h", a, s, q, mload(a, s, u)), q == mload(a, s, u));
      end
    end
    // errors
    acc(0, 32'h0000_4000, 0, SZ_W, 0, q, cyc, err);
    chk("8 kB..8 MB is a bad address", err && err_addr == 32'h4000);
    repeat (3) @(negedge clk);
    chk("error held until next enable", error_drs && !mem_rdy);
    acc(0, 32'h0000_0102, 0, SZ_W, 0, q, cyc, err);
    chk("misaligned word", err);
    acc(0, 32'h0000_0101, 0, SZ_H, 0, q, cyc, err);
    chk("misaligned half", err);
    acc(0, 32'h0000_0100, 0, SZ_W, 0, q, cyc, err);
    chk("recovers", !err && q == mload(32'h100, SZ_W, 0));
    acc(0, 32'h0200_0000, 0, SZ_W, 0, q, cyc, err);
    chk("32 MB and up is a bad address", err);
    // bus read with an unsolicited message in front of the reply
    fork
      acc(0, 32'h0080_0010, 0, SZ_W, 0, q, cyc, err);
      begin
        while (!tx_valid) @(negedge clk);
        chk("read pkg", tx_pkg.dst == 3'(ID_SPI) && tx_pkg.src == ID_MBC &&
                        tx_pkg.code == MSG_READ && tx_pkg.addr == 25'h0800010);
        @(negedge clk);
        rx_valid = 1; rx_pkg = '{dst: 0, src: ID_UART, code: MSG_DATA, addr: 0, data: 32'h41};
        @(negedge clk); #1;
        chk("message parked", msg_valid && msg_pkg.data == 32'h41);
        rx_pkg = '{dst: 0, src: ID_SPI, code: MSG_READ_RSP, addr: 25'h0800010, data: 32'hFEEDBEEF};
        @(negedge clk); rx_valid = 0;
      end
    join
    chk("bus read data", !err && q == 32'hFEEDBEEF);
    chk("message still held", msg_valid);
    @(negedge clk); msg_ack = 1; @(negedge clk); msg_ack = 0;
    chk("message consumed", !msg_valid);
    // bus write to the UART window
    fork
      acc(1, 32'h0180_0004, 32'h0000_0055, SZ_W, 0, q, cyc, err);
      begin
        while (!tx_valid) @(negedge clk);
        chk("write pkg", tx_pkg.dst == 3'(ID_UART) && tx_pkg.code == MSG_WRITE &&
                         tx_pkg.addr == 25'h1800004 && tx_pkg.data == 32'h55);
      end
    join
    chk("bus write done", !err);
    bs_en = 0;
    acc(0, 32'h0080_0000, 0, SZ_W, 0, q, cyc, err);
    chk("bus off -> error", err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
