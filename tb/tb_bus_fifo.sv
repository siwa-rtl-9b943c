// tb_bus_fifo: random pushes and pops against a queue model; checks data
// order, the full/empty flags at the two-entry depth, and simultaneous
// push and pop.
// The two-entry depth follows the document; the handshake is this design's.
module tb_bus_fifo;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [64:0] in_data = 0, out_data;
  logic [1:0]  count;
  logic [64:0] q [$];
  int checks = 0, failures = 0, fulls = 0, both = 0;

  bus_fifo #(.W(65), .DEPTH(2)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                     .out_valid, .out_ready, .out_data, .count);
  always #5 clk = ~clk;

  initial begin
    #12 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid  = 1'($urandom);
      in_data   = {1'($urandom), $urandom, $urandom};
      out_ready = ($urandom % 3) == 0;
      #1;
      checks++;
      if (in_ready !== (q.size() < 2) || out_valid !== (q.size() > 0) || count !== 2'(q.size())) begin
        failures++; $display("FAIL flags size=%0d in_ready=%b out_valid=%b", q.size(), in_ready, out_valid);
      end
      if (out_valid && q.size() > 0) begin
        checks++;
        if (out_data !== q[0]) begin failures++; $display("FAIL data %h want %h", out_data, q[0]); end
      end
      if (q.size() == 2) fulls++;
      if (in_valid && in_ready && out_valid && out_ready) both++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (fulls == 0 || both == 0) begin failures++; $display("FAIL coverage full=%0d both=%0d", fulls, both); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
