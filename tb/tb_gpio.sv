// tb_gpio: checks pad direction and output from conf/out, and that value
// shows outputs directly and inputs two clock cycles after the pad changes.
// Eight pins configured through mcr follow the document; the polarity and
// the synchroniser are this design's choice.
module tb_gpio;
  logic       clk = 0, rst_n = 0;
  logic [7:0] conf = 0, out = 0, value, pad_out, pad_oe, pad_in = 0;
  logic [7:0] prev_p;
  int checks = 0, failures = 0;

  gpio #(.N(8)) dut (.clk, .rst_n, .conf, .out, .value, .pad_out, .pad_oe, .pad_in);
  always #5 clk = ~clk;

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [7:0] c, o, p;
      c = 8'($urandom); o = 8'($urandom); p = 8'($urandom);
      @(negedge clk); conf = c; out = o; prev_p = pad_in; pad_in = p; #1;
      chk("pads", pad_out == o && pad_oe == c);
      @(negedge clk); #1;
      chk("inputs one cycle later still old", (value & ~c) == (prev_p & ~c));
      @(negedge clk); #1;
      chk($sformatf("value %h", value), value == ((c & o) | (~c & p)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
