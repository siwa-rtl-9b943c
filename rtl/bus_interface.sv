// bus_interface: bus controller of one agent on the Siwa system bus.
//
// Every agent (MBC, SPI, UART) reaches the shared bus through one of these.
// It holds an output FIFO (agent -> bus) and an input FIFO (bus -> agent),
// DEPTH packages each, and drives the bus's 65 data lines and its two
// protocol lines, valid and ack. The bus is wired-OR: an interface that is
// not sending drives zeros, and the top ORs all drivers together.
//
// Arbitration is distributed, with no central arbiter: every interface
// keeps its own copy of a slot counter that steps 0,1,..,N_AGENTS-1 each
// clock and that all copies leave reset together. An interface may send
// only in the slot equal to its ID. In its slot, if its output FIFO holds a
// package, it puts the package on the data lines and raises valid. The
// interface whose ID matches the package's destination raises ack in the
// same cycle if its input FIFO has room, and takes the package at the clock
// edge; the sender then drops it from its output FIFO. Without ack the
// package stays and is offered again in the sender's next slot, so no FIFO
// can overflow. Packages from one sender to one receiver arrive in order.
// The FIFO depth and the 65 + 2 bus lines follow the SoC's bus drawing;
// the slot scheme and the valid/ack meaning of the two protocol lines are
// this design's choice.
module bus_interface
  import siwa_pkg::bus_pkg_t, siwa_pkg::BUS_W;
#(
  parameter logic [1:0]  ID       = 2'd0,
  parameter int unsigned N_AGENTS = 3,
  parameter int unsigned DEPTH    = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  // agent side: packages to send
  input  logic     tx_valid,
  output logic     tx_ready,
  input  bus_pkg_t tx_pkg,
  // agent side: packages received
  output logic     rx_valid,
  input  logic     rx_ready,
  output bus_pkg_t rx_pkg,
  // bus side: wired-OR of all interfaces' drivers
  input  logic [BUS_W-1:0] bus_data,
  input  logic     bus_valid,
  input  logic     bus_ack,
  output logic [BUS_W-1:0] drv_data,
  output logic     drv_valid,
  output logic     drv_ack
);
  localparam int unsigned SLW = (N_AGENTS > 1) ? $clog2(N_AGENTS) : 1;

  logic [SLW-1:0] slot;
  logic           my_slot;
  logic           out_v, in_rdy;
  logic [BUS_W-1:0] out_head, in_head;
  bus_pkg_t       on_bus;
  logic [$clog2(DEPTH+1)-1:0] out_cnt, in_cnt;   // occupancy, for debug

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  slot <= '0;
    else if (slot == SLW'(N_AGENTS - 1))         slot <= '0;
    else                                         slot <= slot + 1'b1;
  end
  assign my_slot = (slot == SLW'(ID));

  bus_fifo #(.W(BUS_W), .DEPTH(DEPTH)) u_out (
    .clk, .rst_n,
    .in_valid(tx_valid), .in_ready(tx_ready), .in_data(tx_pkg),
    .out_valid(out_v), .out_ready(my_slot & bus_ack), .out_data(out_head),
    .count(out_cnt)
  );

  assign drv_valid = my_slot & out_v;
  assign drv_data  = drv_valid ? out_head : '0;

  assign on_bus  = bus_pkg_t'(bus_data);
  assign drv_ack = bus_valid && (on_bus.dst == {1'b0, ID}) && in_rdy;

  bus_fifo #(.W(BUS_W), .DEPTH(DEPTH)) u_in (
    .clk, .rst_n,
    .in_valid(drv_ack), .in_ready(in_rdy), .in_data(bus_data),
    .out_valid(rx_valid), .out_ready(rx_ready), .out_data(in_head),
    .count(in_cnt)
  );
  assign rx_pkg = bus_pkg_t'(in_head);

  // Only the owner of the slot may raise valid.
  a_valid_in_slot: assert property (@(posedge clk) disable iff (!rst_n) drv_valid |-> my_slot);
endmodule
