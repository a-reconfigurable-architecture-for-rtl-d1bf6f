// loop_stage: one interconnect switch and the loop shift register behind it.
//
// Loops are rings of one-bit shift registers, one register at the input of
// every member, so the delay from one member to the next is a single switch
// whatever the loop size. This module is the register at one port of a cell
// together with the switch in front of it, which picks the upstream member
// among the four neighbouring cells (and, within that neighbour, one of its
// four ports).
//
// Timing, per simulation step of L internal cycles (shift_en high):
//   cycle 1 (first): the stage loads the spike of the upstream cell itself;
//   cycle k > 1   : it loads the upstream stage's register, so after cycle k
//                   it holds the spike of the member k hops upstream.
// rx is the value being loaded this cycle; the owning cell weighs it with
// the weight of position k. A disabled port loads 0.
// The routing follows the architecture's loop idea; reducing the straight and
// clockwise routing patterns of the interconnect to "take from neighbour d,
// port p" is this design's choice.
module loop_stage
  import pnaa_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        shift_en,
  input  logic                        first,
  input  link_cfg_t                   link,
  input  logic [NPORT-1:0]            nb_spike,  // spike of neighbour in each direction
  input  logic [NPORT-1:0][NPORT-1:0] nb_ring,   // [dir][port] neighbour stage registers
  output logic                        rx,
  output logic                        q
);

  always_comb begin
    if (!link.en)   rx = 1'b0;
    else if (first) rx = nb_spike[link.dir];
    else            rx = nb_ring[link.dir][link.port];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= 1'b0;
    else if (shift_en) q <= rx;
  end

endmodule
