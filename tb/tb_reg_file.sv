// tb_reg_file: random writes and reads of the 32 x 32 register file against
// a shadow array; x0 must stay zero.
// 32 x 32 bits with x0 at zero follow RV32I and the document; the storage
// style is this design's choice.
module tb_reg_file;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  reg_file dut (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1;
      checks++;
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2]) begin
        failures++;
        $display("FAIL r%0d=%h (want %h) r%0d=%h (want %h)", ra1, rd1, shadow[ra1], ra2, rd2, shadow[ra2]);
      end
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
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
