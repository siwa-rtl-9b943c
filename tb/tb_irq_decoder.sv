// tb_irq_decoder: checks the pending-bit set pulses (analog pin edge after
// synchronisation, timer hit, bus message), the priority order
// analog > timer > external, masking by the enable bits, and that the
// toggle flip-flop actv_ntrpt blocks every request while set.
// The priority and the block on an active interrupt follow the document's
// control-unit figure; the pending/enable rule is this design's choice.
module tb_irq_decoder;
  import siwa_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       analog_irq = 0, timer_hit = 0, ext_msg = 0, enbl_ntrpt = 0;
  logic [5:0] mcr_lo = 0;
  logic       set_maip, set_mipt, set_mipio, actv_ntrpt;
  logic [1:0] cond;
  int checks = 0, failures = 0;

  irq_decoder dut (.clk, .rst_n, .analog_irq, .timer_hit, .ext_msg, .mcr_lo,
                   .enbl_ntrpt, .set_maip, .set_mipt, .set_mipio, .actv_ntrpt, .cond);
  always #5 clk = ~clk;

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  function automatic logic [1:0] model(input logic [5:0] m, input logic act);
    if (act) return 0;
    if (m[MCR_MAIP] & m[MCR_MAIE]) return 1;
    if (m[MCR_MIPT] & m[MCR_MIET]) return 2;
    if (m[MCR_MIPIO] & m[MCR_MIEIO]) return 3;
    return 0;
  endfunction

  int seen;
  initial begin
    #12 rst_n = 1;
    // analog edge: exactly one set pulse, two to three cycles later
    @(negedge clk); analog_irq = 1;
    seen = 0;
    repeat (6) begin @(posedge clk); #1 if (set_maip) seen++; end
    chk("one maip pulse per edge", seen == 1);
    timer_hit = 1; ext_msg = 1; #1;
    chk("timer and bus set pulses", set_mipt && set_mipio);
    timer_hit = 0; ext_msg = 0;
    // every combination of mcr_lo, with and without actv_ntrpt
    for (int act = 0; act < 2; act++) begin
      for (int m = 0; m < 64; m++) begin
        mcr_lo = 6'(m); #1;
        chk($sformatf("cond m=%b act=%0d", m, act), cond == model(6'(m), actv_ntrpt));
      end
      @(negedge clk); enbl_ntrpt = 1; @(negedge clk); enbl_ntrpt = 0;
      chk("toggle", actv_ntrpt == (act == 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
