// neuron_node: one neuron of the programmable neural array.
//
// The node is a threshold neuron with the three configurable parameters of
// the architecture: a weight for every input it can receive, one bias and one
// threshold. It sends its one-bit spike into up to four loops (one per face)
// and receives, over a step, the spike of every other member of each loop as
// the loop shifts past its input registers. A received spike at loop port p,
// k hops upstream, adds weight[p][k-1]. At the end of the step the node fires
// for the next step when bias + sum of weights > threshold (the "exceeded"
// comparison of a McCulloch-Pitts neuron); the sum is then cleared.
//
// Interface: clk/rst_n; the step controller's shift_en/first/last/pos; the
// neighbours' spikes and loop registers; the column configuration chain
// (cfg_en, cfg_in, cfg_out). Outputs: spike (held for a whole step) and the
// four loop registers ring, read by the neighbours.
// Configuration word, MSB first: four link_cfg_t (port 3..0), threshold,
// bias, weights [port 3..0][position NPOS..1], all signed WW-bit.
// Weight and accumulator widths and the strict ">" are this design's choice.
module neuron_node
  import pnaa_pkg::*;
#(
  parameter int NPOS = 9,
  parameter int WW   = 8,
  parameter int AW   = 14,
  parameter int LW   = $clog2(NPOS + 1),
  parameter int CFGW = node_cfg_bits(NPOS, WW)
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
  output logic                        spike,
  output logic [NPORT-1:0]            ring
);

  typedef struct packed {
    link_cfg_t [NPORT-1:0]                  link;
    logic signed [WW-1:0]                   threshold;
    logic signed [WW-1:0]                   bias;
    logic [NPORT-1:0][NPOS-1:0][WW-1:0]     weight;
  } node_cfg_t;

  logic [CFGW-1:0] cfg_bits;
  node_cfg_t       cfg;
  logic [NPORT-1:0] rx;
  logic signed [AW-1:0] acc, contrib, acc_sum, total;
  logic [LW-1:0] widx;

  cfg_shift_reg #(.W(CFGW)) u_cfg (
    .clk, .rst_n, .cfg_en, .sin(cfg_in), .sout(cfg_out), .q(cfg_bits)
  );
  assign cfg = node_cfg_t'(cfg_bits);

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
    contrib = '0;
    for (int p = 0; p < NPORT; p++) begin
      if (rx[p] && int'(widx) < NPOS)
        contrib = contrib + AW'(signed'(cfg.weight[p][widx]));
    end
    acc_sum = (first ? AW'(0) : acc) + contrib;
    total   = acc_sum + AW'(cfg.bias);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      spike <= 1'b0;
    end else if (shift_en) begin
      if (last) begin
        spike <= (total > AW'(cfg.threshold));
        acc   <= '0;
      end else begin
        acc <= acc_sum;
      end
    end
  end

endmodule
