// csr_file: control and status registers of the Siwa CPU.
//
// Implements the reduced CSR set of the SoC with the bit fields of its
// register map:
//   mcr      [16] bs_en, [15:8] gpio_conf, [5] maip, [4] maie, [3] mipio,
//            [2] mipt, [1] mieio, [0] miet; other bits read zero
//   mepc     [31:2] saved PC, [1:0] zero
//   mcausea  [31:3] extra information, [2:0] source (siwa_pkg::cause_e)
//   mcauseb  [31:0] extra information (data field of a bus message)
//   mtvec    [31:2] handler address, [1:0] zero; resets to 0
//   tmrfnc, tmrval  32-bit, held in the timer block (write strobes out)
//   gpio     [7:0] written: output levels; read: pin levels
//   frls [7:0], isval [31:0], isconf [31:0], istrg [4:0]: control words of
//            the analog stimulation interface, brought out as ports
// Software access: csr_rdata is a combinational read of csr_addr; a write
// of csr_wdata happens on the clock edge when csr_we is high. Unknown
// addresses read zero and ignore writes. Hardware access: set_* pulses set
// the pending bits (a set wins over a software write in the same cycle);
// trap_take saves trap_pc in mepc, the cause and information in
// mcausea/mcauseb, and clears the pending bit of the interrupt being taken.
// Reset values other than mtvec = 0 (bs_en = 1, everything else 0) and all
// CSR addresses outside the standard mepc/mcause/mtvec numbers are this
// design's choice.
module csr_file
  import siwa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] csr_addr,
  input  logic        csr_we,
  input  logic [31:0] csr_wdata,
  output logic [31:0] csr_rdata,
  // hardware events
  input  logic        set_maip,
  input  logic        set_mipt,
  input  logic        set_mipio,
  input  logic        trap_take,
  input  cause_e      trap_cause,
  input  logic [31:0] trap_pc,
  input  logic [28:0] trap_info_a,
  input  logic [31:0] trap_info_b,
  // timer registers
  input  logic [31:0] tmrfnc,
  input  logic [31:0] tmrval,
  output logic        wr_tmrfnc,
  output logic        wr_tmrval,
  // register values used elsewhere
  input  logic [7:0]  gpio_in,
  output logic [31:0] mcr,
  output logic [31:0] mepc,
  output logic [31:0] mtvec,
  output logic [7:0]  gpio_out,
  output logic [7:0]  frls,
  output logic [31:0] isval,
  output logic [31:0] isconf,
  output logic [4:0]  istrg
);
  localparam logic [31:0] MCR_MASK  = 32'h0001_FF3F;
  localparam logic [31:0] MCR_RESET = 32'h0001_0000;

  logic [31:0] mcausea, mcauseb;

  assign wr_tmrfnc = csr_we && (csr_addr == CSR_TMRFNC);
  assign wr_tmrval = csr_we && (csr_addr == CSR_TMRVAL);

  always_comb begin
    unique case (csr_addr)
      CSR_MCR:     csr_rdata = mcr;
      CSR_MEPC:    csr_rdata = mepc;
      CSR_MCAUSEA: csr_rdata = mcausea;
      CSR_MCAUSEB: csr_rdata = mcauseb;
      CSR_MTVEC:   csr_rdata = mtvec;
      CSR_TMRFNC:  csr_rdata = tmrfnc;
      CSR_TMRVAL:  csr_rdata = tmrval;
      CSR_GPIO:    csr_rdata = {24'b0, gpio_in};
      CSR_FRLS:    csr_rdata = {24'b0, frls};
      CSR_ISVAL:   csr_rdata = isval;
      CSR_ISCONF:  csr_rdata = isconf;
      CSR_ISTRG:   csr_rdata = {27'b0, istrg};
      default:     csr_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcr      <= MCR_RESET;
      mepc     <= '0;
      mcausea  <= '0;
      mcauseb  <= '0;
      mtvec    <= '0;
      gpio_out <= '0;
      frls     <= '0;
      isval    <= '0;
      isconf   <= '0;
      istrg    <= '0;
    end else begin
      logic [31:0] m;
      m = mcr;
      if (csr_we) begin
        unique case (csr_addr)
          CSR_MCR:     m        = csr_wdata & MCR_MASK;
          CSR_MEPC:    mepc     <= {csr_wdata[31:2], 2'b00};
          CSR_MCAUSEA: mcausea  <= csr_wdata;
          CSR_MCAUSEB: mcauseb  <= csr_wdata;
          CSR_MTVEC:   mtvec    <= {csr_wdata[31:2], 2'b00};
          CSR_GPIO:    gpio_out <= csr_wdata[7:0];
          CSR_FRLS:    frls     <= csr_wdata[7:0];
          CSR_ISVAL:   isval    <= csr_wdata;
          CSR_ISCONF:  isconf   <= csr_wdata;
          CSR_ISTRG:   istrg    <= csr_wdata[4:0];
          default: ;
        endcase
      end
      if (trap_take) begin
        mepc    <= {trap_pc[31:2], 2'b00};
        mcausea <= {trap_info_a, trap_cause};
        mcauseb <= trap_info_b;
        unique case (trap_cause)
          CAUSE_ANALOG: m[MCR_MAIP]  = 1'b0;
          CAUSE_TIMER:  m[MCR_MIPT]  = 1'b0;
          CAUSE_EXT:    m[MCR_MIPIO] = 1'b0;
          default: ;
        endcase
      end
      // A set in the cycle its own interrupt is taken belongs to the event
      // being serviced (the bus message is consumed in that same cycle).
      if (set_maip  && !(trap_take && trap_cause == CAUSE_ANALOG)) m[MCR_MAIP]  = 1'b1;
      if (set_mipt  && !(trap_take && trap_cause == CAUSE_TIMER))  m[MCR_MIPT]  = 1'b1;
      if (set_mipio && !(trap_take && trap_cause == CAUSE_EXT))    m[MCR_MIPIO] = 1'b1;
      mcr <= m;
    end
  end
endmodule
