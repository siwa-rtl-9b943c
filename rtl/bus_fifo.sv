// bus_fifo: small synchronous FIFO that decouples a bus agent from the bus.
//
// DEPTH entries of W bits (two 65-bit bus packages by default, the depth the
// SoC uses to save area). Valid/ready on both sides: an entry is written on
// a clock edge when in_valid and in_ready (not full), and the head is
// removed when out_valid (not empty) and out_ready. Push and pop can happen
// in the same cycle. out_data shows the head entry combinationally; there
// is no bypass from input to output, so a package spends at least one cycle
// in the FIFO. An assertion checks that the occupancy stays within DEPTH,
// the overflow the bus handshake is there to prevent.
// The depth of two packages follows the document; the valid/ready
// handshake and the assertion are this design's choice.
module bus_fifo #(
  parameter int unsigned W     = 65,
  parameter int unsigned DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid & in_ready;
  assign pop       = out_valid & out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wr_ptr] <= in_data;
        wr_ptr      <= inc(wr_ptr);
      end
      if (pop) rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  // The occupancy can never leave 0..DEPTH: push is gated by in_ready and
  // pop by out_valid.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));
endmodule
