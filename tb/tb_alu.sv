// tb_alu: checks every ALU operation and the eq/lt/ltu flags against a
// reference model written with SystemVerilog operators.
// The operation set checked follows the document; the encoding is this design's.
module tb_alu;
  import siwa_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        eq, lt, ltu;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y, .eq, .lt, .ltu);

  function automatic logic [31:0] model(input alu_op_e o, input logic [31:0] x, z);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_SLL:  return x << z[4:0];
      ALU_SLT:  return 32'($signed(x) < $signed(z));
      ALU_SLTU: return 32'(x < z);
      ALU_XOR:  return x ^ z;
      ALU_SRL:  return x >> z[4:0];
      ALU_SRA:  return 32'($signed(x) >>> z[4:0]);
      ALU_OR:   return x | z;
      ALU_AND:  return x & z;
      ALU_PASSB: return z;
      default:  return '0;
    endcase
  endfunction

  task automatic try(input alu_op_e o, input logic [31:0] x, z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== model(o, x, z)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h want %h", o.name(), x, z, y, model(o, x, z));
    end
    if (o == ALU_SUB) begin
      checks++;
      if (eq !== (x == z) || lt !== ($signed(x) < $signed(z)) || ltu !== (x < z)) begin
        failures++;
        $display("FAIL flags a=%h b=%h eq=%b lt=%b ltu=%b", x, z, eq, lt, ltu);
      end
    end
  endtask

  initial begin
    logic [31:0] edges [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1234_5678};
    for (int o = 0; o <= int'(ALU_PASSB); o++) begin
      foreach (edges[i]) foreach (edges[j]) try(alu_op_e'(o), edges[i], edges[j]);
      for (int r = 0; r < 2000; r++) try(alu_op_e'(o), $urandom, $urandom);
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
