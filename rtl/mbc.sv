// mbc: memory and bus controller of the Siwa CPU.
//
// The MBC is the CPU's only path to storage. It decodes the hard-wired
// memory map: byte addresses 0 .. 8 kB go to the SRAM, 8 MB .. 32 MB go out
// on the system bus (8 MB .. 24 MB to the SPI flash agent, 24 MB .. 32 MB to
// the UART agent) and anything else, a misaligned half word or word, or a
// bus access while mcr.bs_en is 0, is a bad address.
//
// CPU handshake: mem_rdy high means the MBC can take a transaction; a
// one-cycle pulse on en starts one with we/addr/wdata/size/uns. mem_rdy is
// low from the next cycle until the transaction is done; for a load the
// result, already shifted and sign- or zero-extended, is then on d_read.
// A bad address raises error_drs (mem_rdy stays low) until the next en
// pulse, which starts the next transaction; err_addr keeps the bad address.
//
// SRAM timing (cycles from the en pulse to mem_rdy high): loads 2, word
// stores 2, byte and half-word stores 3, because the SRAM has no byte mask
// and a partial store is a read-modify-write.
// Bus transactions: a store becomes a MSG_WRITE package and completes when
// the bus interface has accepted it; a load becomes a MSG_READ package and
// completes when the MSG_READ_RSP package from the same agent arrives. Any
// other package that arrives is held in a one-package message register
// (msg_valid/msg_pkg) for the interrupt handler, which consumes it with
// msg_ack. The memory map and the ready/enable/error handshake follow the
// document; cycle counts, the read-modify-write, the message codes and the
// message register are this design's choice.
module mbc
  import siwa_pkg::*;
#(
  parameter int unsigned SRAM_WORDS = 2048,
  parameter int unsigned AW         = $clog2(SRAM_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bs_en,
  // CPU side
  input  logic          en,
  input  logic          we,
  input  logic [31:0]   addr,
  input  logic [31:0]   wdata,
  input  mem_size_e     size,
  input  logic          uns,
  output logic          mem_rdy,
  output logic          error_drs,
  output logic [31:0]   d_read,
  output logic [31:0]   err_addr,
  // SRAM side
  output logic          sram_cs,
  output logic          sram_we,
  output logic [AW-1:0] sram_addr,
  output logic [31:0]   sram_wdata,
  input  logic [31:0]   sram_rdata,
  // bus interface FIFOs
  output logic          tx_valid,
  input  logic          tx_ready,
  output bus_pkg_t      tx_pkg,
  input  logic          rx_valid,
  output logic          rx_ready,
  input  bus_pkg_t      rx_pkg,
  // messages for the interrupt handler
  output logic          msg_valid,
  output bus_pkg_t      msg_pkg,
  input  logic          msg_ack
);
  typedef enum logic [2:0] {
    S_IDLE, S_SRAM_RD, S_WDONE, S_BUS_SEND, S_BUS_WAIT, S_ERR
  } state_e;

  state_e      state, nstate;
  logic        r_we, r_uns;
  logic [31:0] r_addr, r_wdata;
  mem_size_e   r_size;

  // -------------------------------------------------- request decoding
  typedef enum logic [1:0] { T_SRAM, T_BUS, T_BAD } target_e;

  function automatic target_e decode(input logic [31:0] a, input mem_size_e s, input logic bus_on);
    logic misal;
    misal = (s == SZ_H && a[0]) || (s == SZ_W && a[1:0] != 2'b00);
    if (misal)                                  return T_BAD;
    if (a < SRAM_END && a < 32'(SRAM_WORDS * 4)) return T_SRAM;
    if (a >= BUS_BASE && a < BUS_END && bus_on)  return T_BUS;
    return T_BAD;
  endfunction

  // Extract and extend a loaded value.
  function automatic logic [31:0] fmt_load(input logic [31:0] w, input logic [1:0] off,
                                           input mem_size_e s, input logic u);
    logic [31:0] sh;
    sh = w >> {off, 3'b000};
    unique case (s)
      SZ_B:    return u ? {24'b0, sh[7:0]}  : {{24{sh[7]}},  sh[7:0]};
      SZ_H:    return u ? {16'b0, sh[15:0]} : {{16{sh[15]}}, sh[15:0]};
      default: return sh;
    endcase
  endfunction

  // Merge a byte or half word into a word.
  function automatic logic [31:0] merge(input logic [31:0] w, input logic [31:0] d,
                                        input logic [1:0] off, input mem_size_e s);
    logic [31:0] m, v;
    m = (s == SZ_B) ? 32'h0000_00FF : 32'h0000_FFFF;
    m = m << {off, 3'b000};
    v = d << {off, 3'b000};
    return (w & ~m) | (v & m);
  endfunction

  logic    start;
  target_e tgt;
  assign start = en && (state == S_IDLE || state == S_ERR);
  assign tgt   = decode(addr, size, bs_en);

  // ----------------------------------------------------------- control
  logic     is_reply;
  logic [2:0] req_dst;
  assign req_dst  = (r_addr < UART_BASE) ? {1'b0, ID_SPI} : {1'b0, ID_UART};
  assign is_reply = (state == S_BUS_WAIT) && rx_valid &&
                    ({1'b0, rx_pkg.src} == req_dst) && (rx_pkg.code == MSG_READ_RSP);

  always_comb begin
    nstate     = state;
    sram_cs    = 1'b0;
    sram_we    = 1'b0;
    sram_addr  = addr[AW+1:2];
    sram_wdata = wdata;
    tx_valid   = 1'b0;
    tx_pkg     = '{dst: req_dst, src: ID_MBC,
                   code: r_we ? MSG_WRITE : MSG_READ,
                   addr: r_addr[24:0], data: r_wdata};
    if (start) begin
      unique case (tgt)
        T_SRAM: begin
          sram_cs = 1'b1;
          sram_we = we && (size == SZ_W);
          nstate  = (we && size == SZ_W) ? S_WDONE : S_SRAM_RD;
        end
        T_BUS:   nstate = S_BUS_SEND;
        default: nstate = S_ERR;
      endcase
    end else begin
      unique case (state)
        S_SRAM_RD: begin
          if (r_we) begin
            sram_cs    = 1'b1;
            sram_we    = 1'b1;
            sram_addr  = r_addr[AW+1:2];
            sram_wdata = merge(sram_rdata, r_wdata, r_addr[1:0], r_size);
            nstate     = S_WDONE;
          end else begin
            nstate = S_IDLE;
          end
        end
        S_WDONE:    nstate = S_IDLE;
        S_BUS_SEND: begin
          tx_valid = 1'b1;
          if (tx_ready) nstate = r_we ? S_IDLE : S_BUS_WAIT;
        end
        S_BUS_WAIT: if (is_reply) nstate = S_IDLE;
        default: ;
      endcase
    end
  end

  assign mem_rdy   = (state == S_IDLE);
  assign error_drs = (state == S_ERR);

  // Incoming packages: the awaited reply goes to d_read, anything else to
  // the message register when it is free.
  logic capture;
  assign capture  = rx_valid && !is_reply && !msg_valid && bs_en;
  assign rx_ready = is_reply || capture;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      r_we      <= 1'b0;
      r_uns     <= 1'b0;
      r_addr    <= '0;
      r_wdata   <= '0;
      r_size    <= SZ_W;
      d_read    <= '0;
      err_addr  <= '0;
      msg_valid <= 1'b0;
      msg_pkg   <= '0;
    end else begin
      state <= nstate;
      if (start) begin
        r_we    <= we;
        r_uns   <= uns;
        r_addr  <= addr;
        r_wdata <= wdata;
        r_size  <= size;
        if (tgt == T_BAD) err_addr <= addr;
      end
      if (state == S_SRAM_RD && !r_we && !start)
        d_read <= fmt_load(sram_rdata, r_addr[1:0], r_size, r_uns);
      if (is_reply)
        d_read <= fmt_load(rx_pkg.data, 2'b00, r_size, r_uns);
      if (msg_ack)      msg_valid <= 1'b0;
      else if (capture) msg_valid <= 1'b1;
      if (capture)      msg_pkg   <= rx_pkg;
    end
  end

  // The CPU only starts a transaction when the MBC is ready or in error.
  a_en_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                    en |-> (state == S_IDLE || state == S_ERR));
endmodule
