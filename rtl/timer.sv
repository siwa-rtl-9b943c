// timer: internal machine timer of the Siwa CPU.
//
// TMRVAL counts clock cycles. When it equals the fence value TMRFNC, the
// timer pulses hit for one cycle and TMRVAL restarts from zero, so a fence
// of N gives one hit every N+1 cycles. A fence of zero stops the counter
// (the reset state). Both registers can be written by software through the
// CSR file (wr_fnc / wr_val with wdata); a write to TMRVAL takes precedence
// over counting in that cycle. The counting rule and the stop-at-zero fence
// are this design's reading of "the maximum count value at which the system
// triggers an interrupt".
module timer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_fnc,
  input  logic         wr_val,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] tmrfnc,
  output logic [W-1:0] tmrval,
  output logic         hit
);
  assign hit = (tmrfnc != '0) && (tmrval == tmrfnc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmrfnc <= '0;
      tmrval <= '0;
    end else begin
      if (wr_fnc) tmrfnc <= wdata;
      if (wr_val)            tmrval <= wdata;
      else if (hit)          tmrval <= '0;
      else if (tmrfnc != '0) tmrval <= tmrval + 1'b1;
    end
  end
endmodule
