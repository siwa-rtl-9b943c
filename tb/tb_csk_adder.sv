// tb_csk_adder: checks the carry-skip adder against the '+' operator on
// corner operands (carry chains that skip whole blocks) and random ones.
// The constant-width carry-skip structure follows the document; the block
// width is this design's choice.
module tb_csk_adder;
  logic [31:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  csk_adder #(.W(32), .BLK(4)) dut (.a, .b, .cin, .sum, .cout);

  task automatic try(input logic [31:0] x, y, input logic c);
    logic [32:0] ref_v;
    a = x; b = y; cin = c;
    #1;
    ref_v = {1'b0, x} + {1'b0, y} + 33'(c);
    checks++;
    if ({cout, sum} !== ref_v) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h, want %h", x, y, c, cout, sum, ref_v);
    end
  endtask

  initial begin
    try(32'hFFFF_FFFF, 32'h0, 1'b1);
    try(32'hFFFF_FFFF, 32'h1, 1'b0);
    try(32'h0FFF_FFF0, 32'h0000_0010, 1'b0);
    try(32'h7FFF_FFFF, 32'h1, 1'b0);
    try(32'h0, 32'h0, 1'b0);
    try(32'hF0F0_F0F0, 32'h0F0F_0F0F, 1'b1);
    for (int i = 0; i < 20000; i++) try($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
