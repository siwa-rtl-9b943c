// tb_sram: random writes and reads of the 8 kB SRAM against a shadow array;
// read data must appear one cycle after the read and hold while cs is low.
// The 8 kB size follows the document; the port behaviour is this design's.
module tb_sram;
  logic        clk = 0, cs = 0, we = 0;
  logic [10:0] addr = 0;
  logic [31:0] wdata = 0, rdata, shadow [2048], last;
  logic        written [2048];
  int checks = 0, failures = 0;

  sram #(.WORDS(2048)) dut (.clk, .cs, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 2048; i++) written[i] = 0;
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk); cs = 1; we = 1; addr = 11'(i); wdata = $urandom; shadow[i] = wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      cs = ($urandom % 4) != 0; we = 1'($urandom); addr = 11'($urandom); wdata = $urandom;
      @(posedge clk); #1;
      if (cs && we) shadow[addr] = wdata;
      if (cs && !we) begin
        checks++;
        if (rdata !== shadow[addr]) begin failures++; $display("FAIL @%0d %h want %h", addr, rdata, shadow[addr]); end
        last = rdata;
      end
    end
    @(negedge clk); cs = 1; we = 0; addr = 5; @(posedge clk); #1 last = rdata;
    @(negedge clk); cs = 0; addr = 6; @(posedge clk); #1;
    checks++;
    if (rdata !== last) begin failures++; $display("FAIL rdata changed without cs"); end
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
