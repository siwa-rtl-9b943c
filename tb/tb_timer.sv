// tb_timer: checks that the timer counts to the fence value, pulses hit
// once every fence+1 cycles, stops with a zero fence and can be reloaded;
// then compares tmrval, tmrfnc and hit every cycle with a reference model
// over 5000 cycles of random software writes.
// A fence value that triggers the timer follows the document; the restart
// at zero and the fence+1 period are this design's choice.
module tb_timer;
  logic        clk = 0, rst_n = 0, wr_fnc = 0, wr_val = 0, hit;
  logic [31:0] wdata = 0, tmrfnc, tmrval;
  int checks = 0, failures = 0;
  int hits, last, gap_bad;

  timer dut (.clk, .rst_n, .wr_fnc, .wr_val, .wdata, .tmrfnc, .tmrval, .hit);
  always #5 clk = ~clk;

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  initial begin
    #12 rst_n = 1;
    repeat (5) @(posedge clk);
    #1 chk("stopped at zero fence", tmrval == 0 && !hit);
    @(negedge clk); wr_fnc = 1; wdata = 9; @(negedge clk); wr_fnc = 0;
    hits = 0; last = -1; gap_bad = 0;
    for (int c = 0; c < 100; c++) begin
      @(posedge clk); #1;
      if (hit) begin
        if (tmrval != 9) gap_bad++;
        if (last >= 0 && c - last != 10) gap_bad++;
        last = c; hits++;
      end
    end
    chk("10 hits in 100 cycles", hits == 10);
    chk("period of fence+1 cycles", gap_bad == 0);
    @(negedge clk); wr_val = 1; wdata = 3; @(negedge clk); wr_val = 0;
    #1 chk("tmrval written", tmrval == 3);
    @(negedge clk); wr_fnc = 1; wdata = 0; @(negedge clk); wr_fnc = 0;
    last = int'(tmrval);
    repeat (3) @(posedge clk);
    #1 chk("fence 0 stops", tmrval == 32'(last) && !hit);
    // random writes against a reference model
    begin
      logic [31:0] rf, rv;
      int bad = 0, nhit = 0;
      rf = tmrfnc; rv = tmrval;
      for (int c = 0; c < 5000; c++) begin
        @(negedge clk);
        wr_fnc = ($urandom_range(0, 99) < 2);
        wr_val = ($urandom_range(0, 99) < 2);
        wdata  = ($urandom_range(0, 9) == 0) ? 32'd0 : 32'($urandom_range(1, 40));
        if (hit != (rf != 0 && rv == rf) || tmrval != rv || tmrfnc != rf) bad++;
        if (hit) nhit++;
        @(posedge clk);
        if (wr_val) rv = wdata;
        else if (rf != 0 && rv == rf) rv = 0;
        else if (rf != 0) rv = rv + 1;
        if (wr_fnc) rf = wdata;
        #1;
      end
      wr_fnc = 0; wr_val = 0;
      chk($sformatf("random writes match the model (%0d cycles differ)", bad), bad == 0);
      chk("random run produced hits", nhit > 20);
    end
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
