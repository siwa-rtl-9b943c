// tb_bus_interface: three bus interfaces on a wired-OR bus, as in the SoC.
// Every agent sends random packages to the two others while the receivers
// apply random back-pressure. Checks that every package arrives once, in
// order per sender/receiver pair, with its contents intact; that only the
// slot owner drives the bus; and that refused offers (a full input FIFO)
// and retries actually happened.
// Three agents, 65 data lines and 2 protocol lines follow the document; the
// time-slot arbitration and valid/ack rules checked are this design's choice.
module tb_bus_interface;
  import siwa_pkg::*;
  localparam int N = 3;
  localparam int PER = 200;
  logic clk = 0, rst_n = 0;
  logic     tx_valid [N], tx_ready [N], rx_valid [N], rx_ready [N];
  bus_pkg_t tx_pkg [N], rx_pkg [N];
  logic [BUS_W-1:0] drv_data [N];
  logic     drv_valid [N], drv_ack [N];
  logic [BUS_W-1:0] bus_data;
  logic     bus_valid, bus_ack;
  bus_pkg_t exp_q [N][N][$];
  int checks = 0, failures = 0, refused = 0, delivered = 0, sent [N];
  logic regen [N];

  for (genvar g = 0; g < N; g++) begin : g_if
    bus_interface #(.ID(2'(g)), .N_AGENTS(N), .DEPTH(2)) u (
      .clk, .rst_n, .tx_valid(tx_valid[g]), .tx_ready(tx_ready[g]), .tx_pkg(tx_pkg[g]),
      .rx_valid(rx_valid[g]), .rx_ready(rx_ready[g]), .rx_pkg(rx_pkg[g]),
      .bus_data, .bus_valid, .bus_ack,
      .drv_data(drv_data[g]), .drv_valid(drv_valid[g]), .drv_ack(drv_ack[g]));
  end

  always_comb begin
    bus_data = '0; bus_valid = 0; bus_ack = 0;
    for (int i = 0; i < N; i++) begin
      bus_data |= drv_data[i]; bus_valid |= drv_valid[i]; bus_ack |= drv_ack[i];
    end
  end
  always #5 clk = ~clk;

  function automatic bus_pkg_t mk(input int s);
    bus_pkg_t p;
    int d;
    d = (s + 1 + ($urandom % (N - 1))) % N;
    p = '{dst: 3'(d), src: 2'(s), code: 3'($urandom), addr: 25'($urandom), data: $urandom};
    return p;
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin tx_valid[i] = 0; rx_ready[i] = 0; tx_pkg[i] = mk(i); sent[i] = 0; regen[i] = 0; end
    #12 rst_n = 1;
    while (delivered < N * PER) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (regen[i]) begin tx_pkg[i] = mk(i); regen[i] = 0; end
        tx_valid[i] = (sent[i] < PER) && ($urandom % 2 == 0);
        rx_ready[i] = ($urandom % 4 == 0);
      end
      #1;
      // a valid offer with no ack is a refused (retried) transfer
      if (bus_valid && !bus_ack) refused++;
      checks++;
      begin
        int owners;
        owners = 0;
        for (int i = 0; i < N; i++) owners += int'(drv_valid[i]);
        if (owners > 1) begin failures++; $display("FAIL %0d drivers", owners); end
      end
      // handshakes are evaluated on the settled values before the edge
      for (int i = 0; i < N; i++) begin
        if (rx_valid[i] && rx_ready[i]) begin
          bus_pkg_t got, want;
          got = rx_pkg[i];
          checks++;
          if (exp_q[got.src][i].size() == 0) begin
            failures++; $display("FAIL unexpected package at %0d", i);
          end else begin
            want = exp_q[got.src][i].pop_front();
            if (got !== want) begin failures++; $display("FAIL %0d got %h want %h", i, got, want); end
          end
          delivered++;
        end
        if (tx_valid[i] && tx_ready[i]) begin
          exp_q[i][tx_pkg[i].dst].push_back(tx_pkg[i]);
          sent[i]++;
          regen[i] = 1;
        end
      end
      @(posedge clk);
    end
    checks++;
    if (refused == 0) begin failures++; $display("FAIL no refused offer seen"); end
    $display("delivered=%0d refused offers=%0d", delivered, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
