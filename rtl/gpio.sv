// gpio: eight general purpose input/output pins of the Siwa SoC.
//
// Pin i is an output when conf[i] (mcr.gpio_conf) is 1, driving out[i] (the
// value last written to the gpio CSR), and an input otherwise. pad_in is
// synchronised with two flip-flops; value, which the gpio CSR reads, shows
// the output level for output pins and the synchronised pin level for
// input pins, so software reads back the state of every pin. Per-pin
// direction from gpio_conf follows the CSR map; the synchroniser and the
// read-back rule are this design's choice.
module gpio #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] conf,
  input  logic [N-1:0] out,
  output logic [N-1:0] value,
  output logic [N-1:0] pad_out,
  output logic [N-1:0] pad_oe,
  input  logic [N-1:0] pad_in
);
  logic [N-1:0] s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= pad_in;
      s2 <= s1;
    end
  end

  assign pad_out = out;
  assign pad_oe  = conf;
  assign value   = (conf & out) | (~conf & s2);
endmodule
