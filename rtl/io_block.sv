// io_block: edge cell linking the loops to external sensors and actuators.
//
// IO blocks surround all four edges of the array and are loop members like
// nodes, with the same four loop ports and the same routing. Toward the
// loops an IO block behaves as a neuron whose spike is the sensor input: the
// sensor pin is sampled at the end of every step and sent during the next
// step. Toward the outside it drives one actuator output: the OR, over the
// step, of the spikes received at the (port, position) pairs selected by a
// mask; it is updated at the end of the step and held for the next one.
//
// Configuration word, MSB first: four link_cfg_t (port 3..0), then
// mask[port 3..0][position NPOS..1]. The IO block being a loop member and an
// external connection follows the architecture; sampling at step ends and
// the OR-of-mask output are this design's choice.
module io_block
  import pnaa_pkg::*;
#(
  parameter int NPOS = 9,
  parameter int LW   = $clog2(NPOS + 1),
  parameter int CFGW = io_cfg_bits(NPOS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        shift_en,
  input  logic                        first,
  input  logic                        last,
  input  logic [LW-1:0]               pos,
  input  logic [NPORT-1:0]            nb_spike,
  input  logic [NPORT-1:0][NPORT-1:0] nb_ring,
  input  logic                        cfg_en,
  input  logic                        cfg_in,
  output logic                        cfg_out,
  input  logic                        sensor_in,
  output logic                        actuator_out,
  output logic                        spike,
  output logic [NPORT-1:0]            ring
);

  typedef struct packed {
    link_cfg_t [NPORT-1:0]         link;
    logic [NPORT-1:0][NPOS-1:0]    mask;
  } io_cfg_t;

  logic [CFGW-1:0]  cfg_bits;
  io_cfg_t          cfg;
  logic [NPORT-1:0] rx;
  logic             hit, seen, seen_sum;
  logic [LW-1:0]    widx;

  cfg_shift_reg #(.W(CFGW)) u_cfg (
    .clk, .rst_n, .cfg_en, .sin(cfg_in), .sout(cfg_out), .q(cfg_bits)
  );
  assign cfg = io_cfg_t'(cfg_bits);

  for (genvar p = 0; p < NPORT; p++) begin : g_port
    loop_stage u_stage (
      .clk, .rst_n, .shift_en, .first,
      .link    (cfg.link[p]),
      .nb_spike(nb_spike),
      .nb_ring (nb_ring),
      .rx      (rx[p]),
      .q       (ring[p])
    );
  end

  assign widx = (pos == '0) ? '0 : pos - 1'b1;

  always_comb begin
    hit = 1'b0;
    for (int p = 0; p < NPORT; p++) begin
      if (rx[p] && int'(widx) < NPOS && cfg.mask[p][widx]) hit = 1'b1;
    end
    seen_sum = (first ? 1'b0 : seen) | hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen         <= 1'b0;
      spike        <= 1'b0;
      actuator_out <= 1'b0;
    end else if (shift_en) begin
      if (last) begin
        spike        <= sensor_in;
        actuator_out <= seen_sum;
        seen         <= 1'b0;
      end else begin
        seen <= seen_sum;
      end
    end
  end

endmodule
