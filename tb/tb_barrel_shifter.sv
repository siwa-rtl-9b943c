// tb_barrel_shifter: checks SLL, SRL and SRA of the barrel shifter against
// the SystemVerilog shift operators for every shift amount and random data.
// The shifts checked follow the document's ALU; the structure is this design's.
module tb_barrel_shifter;
  logic [31:0] din, dout;
  logic [4:0]  shamt;
  logic        left, arith;
  int checks = 0, failures = 0;

  barrel_shifter #(.W(32)) dut (.din, .shamt, .left, .arith, .dout);

  task automatic try(input logic [31:0] d, input logic [4:0] s, input int kind);
    logic [31:0] ref_v;
    din = d; shamt = s; left = (kind == 0); arith = (kind == 2);
    #1;
    case (kind)
      0: ref_v = d << s;
      1: ref_v = d >> s;
      default: ref_v = 32'($signed(d) >>> s);
    endcase
    checks++;
    if (dout !== ref_v) begin
      failures++;
      $display("FAIL kind=%0d %h by %0d -> %h want %h", kind, d, s, dout, ref_v);
    end
  endtask

  initial begin
    for (int s = 0; s < 32; s++)
      for (int k = 0; k < 3; k++) begin
        try(32'h8000_0001, 5'(s), k);
        try(32'h7FFF_FFFE, 5'(s), k);
        for (int r = 0; r < 50; r++) try($urandom, 5'(s), k);
      end
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
