// boot_loader: hard-wired bootstrap of the Siwa SoC.
//
// After reset the boot loader owns the memory and bus controller's CPU
// port. For each word i = 0 .. BOOT_WORDS-1 it asks the MBC for a word load
// from FLASH_BASE + 4*i (the SPI flash window of the memory map, so the MBC
// sends a read package to the SPI agent and waits for its answer), then
// stores that word at SRAM address 4*i. Only one transaction is in flight
// at a time and each waits for mem_rdy, which is the handshake that keeps
// the bus queues from overflowing however slow the flash is. When the
// last word is stored, boot_done rises and stays high, and the CPU's
// request signals (c_*) are passed to the MBC from then on. A bad address
// during boot sets boot_err and the copy continues.
// Copying from flash offset 0 and one word per round trip are this
// design's choice; the document gives the 8 kB size and the handshake.
module boot_loader
  import siwa_pkg::*;
#(
  parameter int unsigned BOOT_WORDS = 2048,
  parameter logic [31:0] FLASH_BASE = BUS_BASE
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        boot_done,
  output logic        boot_err,
  // CPU request
  input  logic        c_en,
  input  logic        c_we,
  input  logic [31:0] c_addr,
  input  logic [31:0] c_wdata,
  input  mem_size_e   c_size,
  input  logic        c_uns,
  // to the MBC
  output logic        m_en,
  output logic        m_we,
  output logic [31:0] m_addr,
  output logic [31:0] m_wdata,
  output mem_size_e   m_size,
  output logic        m_uns,
  input  logic        mem_rdy,
  input  logic        error_drs,
  input  logic [31:0] d_read
);
  localparam int unsigned CW = $clog2(BOOT_WORDS + 1);

  typedef enum logic [2:0] { B_RD, B_RD_WAIT, B_WR, B_WR_WAIT, B_DONE } bstate_e;

  bstate_e     st;
  logic [CW-1:0] idx;
  logic [31:0] word;
  logic        b_en, b_we;
  logic [31:0] b_addr;

  always_comb begin
    b_en   = 1'b0;
    b_we   = 1'b0;
    b_addr = FLASH_BASE + 32'({idx, 2'b00});
    unique case (st)
      B_RD: b_en = mem_rdy | error_drs;
      B_WR: begin b_en = mem_rdy | error_drs; b_we = 1'b1; b_addr = 32'({idx, 2'b00}); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= (BOOT_WORDS == 0) ? B_DONE : B_RD;
      idx      <= '0;
      word     <= '0;
      boot_err <= 1'b0;
    end else begin
      unique case (st)
        B_RD:      if (mem_rdy || error_drs) st <= B_RD_WAIT;
        B_RD_WAIT: if (mem_rdy) begin word <= d_read; st <= B_WR; end
                   else if (error_drs) begin boot_err <= 1'b1; word <= '0; st <= B_WR; end
        B_WR:      if (mem_rdy || error_drs) st <= B_WR_WAIT;
        B_WR_WAIT: if (mem_rdy || error_drs) begin
                     if (error_drs) boot_err <= 1'b1;
                     if (idx == CW'(BOOT_WORDS - 1)) st <= B_DONE;
                     else begin idx <= idx + 1'b1; st <= B_RD; end
                   end
        default: ;
      endcase
    end
  end

  assign boot_done = (st == B_DONE);
  assign m_en    = boot_done ? c_en    : b_en;
  assign m_we    = boot_done ? c_we    : b_we;
  assign m_addr  = boot_done ? c_addr  : b_addr;
  assign m_wdata = boot_done ? c_wdata : word;
  assign m_size  = boot_done ? c_size  : SZ_W;
  assign m_uns   = boot_done ? c_uns   : 1'b0;
endmodule
