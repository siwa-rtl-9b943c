// irq_decoder: interrupt handler front end of the Siwa CPU.
//
// Three maskable sources are handled: the analog interrupt pin (from the
// stimulation front end), the internal timer and the external bus agents
// (a message waiting in the memory and bus controller). The analog pin is
// synchronised with two flip-flops and its rising edge sets the pending bit
// maip; a timer hit sets mipt; a waiting bus message sets mipio. The
// pending bits themselves live in the mcr CSR; this block only produces
// the set pulses and reads them back.
//
// The priority decoder (Ntrpt_dco) returns cond = 0 while an interrupt is
// being serviced (actv_ntrpt), else 1 for an enabled analog interrupt,
// 2 for the timer, 3 for the external bus, 0 for none. actv_ntrpt is a
// toggle flip-flop flipped by a one-cycle enbl_ntrpt pulse from the control
// unit: on entry to a handler and again on MRET. The decoder, its priority
// order and the toggle flip-flop follow the control-unit block diagram; the
// synchroniser and the set rules are this design's choice.
module irq_decoder
  import siwa_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       analog_irq,   // asynchronous pin
  input  logic       timer_hit,
  input  logic       ext_msg,      // bus message waiting in the MBC
  input  logic [5:0] mcr_lo,       // mcr[5:0]: enables and pending bits
  input  logic       enbl_ntrpt,   // toggle actv_ntrpt
  output logic       set_maip,
  output logic       set_mipt,
  output logic       set_mipio,
  output logic       actv_ntrpt,
  output logic [1:0] cond
);
  logic [2:0] sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync       <= '0;
      actv_ntrpt <= 1'b0;
    end else begin
      sync <= {sync[1:0], analog_irq};
      if (enbl_ntrpt) actv_ntrpt <= ~actv_ntrpt;
    end
  end

  assign set_maip  = sync[1] & ~sync[2];
  assign set_mipt  = timer_hit;
  assign set_mipio = ext_msg;

  logic int_a, int_t, int_e;
  assign int_a = mcr_lo[MCR_MAIP]  & mcr_lo[MCR_MAIE];
  assign int_t = mcr_lo[MCR_MIPT]  & mcr_lo[MCR_MIET];
  assign int_e = mcr_lo[MCR_MIPIO] & mcr_lo[MCR_MIEIO];

  always_comb begin
    if (actv_ntrpt) cond = 2'd0;
    else if (int_a) cond = 2'd1;
    else if (int_t) cond = 2'd2;
    else if (int_e) cond = 2'd3;
    else            cond = 2'd0;
  end
endmodule
