// tb_csr_file: checks reset values, software read/write of every CSR with
// its read-only zero bits, the pending-bit set pulses, trap entry (mepc,
// mcausea, mcauseb, clearing of the serviced pending bit) and the timer
// write strobes.
// The registers and bit fields checked follow the document's register map;
// CSR numbers, reset values and cause codes are this design's choice.
module tb_csr_file;
  import siwa_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [11:0] csr_addr = 0;
  logic        csr_we = 0;
  logic [31:0] csr_wdata = 0, csr_rdata;
  logic        set_maip = 0, set_mipt = 0, set_mipio = 0, trap_take = 0;
  cause_e      trap_cause = CAUSE_NONE;
  logic [31:0] trap_pc = 0, trap_info_b = 0;
  logic [28:0] trap_info_a = 0;
  logic [31:0] tmrfnc = 32'h1111, tmrval = 32'h2222;
  logic        wr_tmrfnc, wr_tmrval;
  logic [7:0]  gpio_in = 8'h5A, gpio_out, frls;
  logic [31:0] mcr, mepc, mtvec, isval, isconf;
  logic [4:0]  istrg;
  int checks = 0, failures = 0;

  csr_file dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask
  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); csr_addr = a; csr_wdata = d; csr_we = 1;
    @(negedge clk); csr_we = 0;
  endtask
  // Read every CSR into a snapshot, so checks can compare several.
  logic [31:0] rv [logic [11:0]];
  task automatic snap();
    logic [11:0] as [13] = '{CSR_MCR, CSR_MEPC, CSR_MCAUSEA, CSR_MCAUSEB, CSR_MTVEC,
                             CSR_TMRFNC, CSR_TMRVAL, CSR_GPIO, CSR_FRLS, CSR_ISVAL,
                             CSR_ISCONF, CSR_ISTRG, 12'h123};
    foreach (as[i]) begin csr_addr = as[i]; #1; rv[as[i]] = csr_rdata; end
  endtask

  initial begin
    #12 rst_n = 1;
    snap(); chk("mcr reset bs_en=1", rv[CSR_MCR] == 32'h0001_0000);
    snap(); chk("mtvec reset 0", rv[CSR_MTVEC] == 0);
    wr(CSR_MCR, 32'hFFFF_FFFF);     snap(); chk("mcr mask", rv[CSR_MCR] == 32'h0001_FF3F);
    wr(CSR_MEPC, 32'hFFFF_FFFF);    snap(); chk("mepc low bits zero", rv[CSR_MEPC] == 32'hFFFF_FFFC);
    wr(CSR_MTVEC, 32'h0000_0123);   snap(); chk("mtvec", rv[CSR_MTVEC] == 32'h0000_0120 && mtvec == 32'h120);
    wr(CSR_MCAUSEA, 32'hDEAD_BEEF); snap(); chk("mcausea", rv[CSR_MCAUSEA] == 32'hDEAD_BEEF);
    wr(CSR_MCAUSEB, 32'h1234_5678); snap(); chk("mcauseb", rv[CSR_MCAUSEB] == 32'h1234_5678);
    wr(CSR_GPIO, 32'hFFFF_FFA5);    snap(); chk("gpio out / read pins", gpio_out == 8'hA5 && rv[CSR_GPIO] == 32'h5A);
    wr(CSR_FRLS, 32'hFFFF_FF81);    snap(); chk("frls 8 bits", rv[CSR_FRLS] == 32'h81 && frls == 8'h81);
    wr(CSR_ISVAL, 32'hCAFE_F00D);   snap(); chk("isval", isval == 32'hCAFE_F00D && rv[CSR_ISVAL] == 32'hCAFE_F00D);
    wr(CSR_ISCONF, 32'h0BAD_C0DE);  chk("isconf", isconf == 32'h0BAD_C0DE);
    wr(CSR_ISTRG, 32'hFFFF_FFFF);   snap(); chk("istrg 5 bits", rv[CSR_ISTRG] == 32'h1F && istrg == 5'h1F);
    snap(); chk("tmr read", rv[CSR_TMRFNC] == 32'h1111 && rv[CSR_TMRVAL] == 32'h2222);
    snap(); chk("unknown reads 0", rv[12'h123] == 0);
    @(negedge clk); csr_addr = CSR_TMRFNC; csr_we = 1; #1;
    chk("timer strobes", wr_tmrfnc && !wr_tmrval);
    csr_addr = CSR_TMRVAL; #1;
    chk("timer strobes 2", !wr_tmrfnc && wr_tmrval);
    @(negedge clk); csr_we = 0;
    // pending bits
    wr(CSR_MCR, 32'h0001_0013);
    @(negedge clk); set_maip = 1; set_mipt = 1; set_mipio = 1;
    @(negedge clk); set_maip = 0; set_mipt = 0; set_mipio = 0;
    chk("pending set", mcr[5] && mcr[3] && mcr[2]);
    // trap entry for the timer clears mipt only
    @(negedge clk); trap_take = 1; trap_cause = CAUSE_TIMER; trap_pc = 32'h0000_0ABC;
    trap_info_a = 29'h1ABCDEF; trap_info_b = 32'h7777_8888;
    @(negedge clk); trap_take = 0;
    snap(); chk("mepc saved", rv[CSR_MEPC] == 32'h0000_0ABC);
    snap(); chk("mcausea", rv[CSR_MCAUSEA] == {29'h1ABCDEF, CAUSE_TIMER});
    snap(); chk("mcauseb", rv[CSR_MCAUSEB] == 32'h7777_8888);
    chk("mipt cleared, others kept", !mcr[2] && mcr[3] && mcr[5]);
    // a set in the same cycle as its own trap is dropped
    @(negedge clk); trap_take = 1; trap_cause = CAUSE_EXT; set_mipio = 1;
    @(negedge clk); trap_take = 0; set_mipio = 0;
    chk("mipio cleared by its trap", !mcr[3]);
    // software clears a pending bit
    wr(CSR_MCR, mcr & ~32'h20);
    chk("software clear maip", !mcr[5]);
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
