// pnaa_top: programmable neural array (PNAA) for locally connected networks.
//
// A ROWS x COLS grid of neuron nodes is surrounded on all four edges by IO
// blocks (no cells at the four corners). Every cell has four loop ports; the
// routing word of each port names the neighbouring port it takes its input
// from, so configured ports form rings ("loops") of one-bit shift registers.
// All members of a loop hear each other once per simulation step: a step is
// step_len internal clock cycles, step_len being the largest loop size less
// one (9 cycles for a loop of 10), independent of the size of the array.
// Because every link is one switch between two registers the internal clock
// does not slow down as loops or the array grow.
//
// Configuration is loaded per column through bit-serial chains: chain c
// (1..COLS) runs from the top IO block through the column's nodes to the
// bottom IO block; chains 0 and COLS+1 run through the left and right IO
// blocks. Shift with cfg_en high and run low. Data enters each cell's LSB and
// leaves its MSB, so the word of the cell farthest from cfg_in is sent first.
//
// Ports: io_*_in are sensor inputs, sampled at the end of each step;
// io_*_out are actuator outputs, updated at the end of each step. Index i of
// the top and bottom vectors belongs to node column i, index i of left and
// right to node row i. node_spike shows every neuron's output (held for one
// step) for observation. step_tick pulses in the last cycle of every step.
// The grid, loops, IO ring, per-column configuration and the cycles-per-step
// rule follow the architecture; the observation port, the routing encoding
// and all widths are this design's choices. Defaults: 5 x 20 nodes, the size
// of a ten-segment nematode locomotion network of 2 x 5 nodes per segment,
// and loops of up to 10 members.
module pnaa_top
  import pnaa_pkg::*;
#(
  parameter int ROWS     = 5,
  parameter int COLS     = 20,
  parameter int LOOP_MAX = 10,
  parameter int WW       = 8,
  parameter int AW       = 14,
  parameter int NPOS     = LOOP_MAX - 1,
  parameter int LW       = $clog2(NPOS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration
  input  logic                     cfg_en,
  input  logic [COLS+1:0]          cfg_in,
  output logic [COLS+1:0]          cfg_out,
  // timing
  input  logic                     run,
  input  logic [LW-1:0]            step_len,
  output logic                     step_tick,
  output logic [31:0]              step_count,
  // sensors and actuators
  input  logic [COLS-1:0]          io_top_in,
  input  logic [COLS-1:0]          io_bot_in,
  input  logic [ROWS-1:0]          io_left_in,
  input  logic [ROWS-1:0]          io_right_in,
  output logic [COLS-1:0]          io_top_out,
  output logic [COLS-1:0]          io_bot_out,
  output logic [ROWS-1:0]          io_left_out,
  output logic [ROWS-1:0]          io_right_out,
  // observation
  output logic [ROWS-1:0][COLS-1:0] node_spike
);

  localparam int GR = ROWS + 2;
  localparam int GC = COLS + 2;

  logic                    shift_en, first, last;
  logic [LW-1:0]           pos;

  logic                    cell_spike [GR][GC];
  logic [NPORT-1:0]        cell_ring  [GR][GC];
  logic                    cell_cfgo  [GR][GC];

  step_controller #(.NPOS(NPOS), .LW(LW), .CW(32)) u_ctrl (
    .clk, .rst_n, .run, .step_len,
    .shift_en, .pos, .first, .last, .step_tick, .step_count
  );

  for (genvar r = 0; r < GR; r++) begin : g_row
    for (genvar c = 0; c < GC; c++) begin : g_col
      localparam bit CORNER  = (r == 0 || r == GR-1) && (c == 0 || c == GC-1);
      localparam bit IS_IO   = !CORNER && (r == 0 || r == GR-1 || c == 0 || c == GC-1);
      localparam bit IS_NODE = !CORNER && !IS_IO;
      // first cell of this column's configuration chain
      localparam bit CHAIN_HEAD = (c == 0 || c == GC-1) ? (r == 1) : (r == 0);

      if (CORNER) begin : g_corner
        assign cell_spike[r][c] = 1'b0;
        assign cell_ring[r][c]  = '0;
        assign cell_cfgo[r][c]  = 1'b0;
      end else begin : g_cell
        logic [NPORT-1:0]            nb_spike;
        logic [NPORT-1:0][NPORT-1:0] nb_ring;
        logic                        sin;

        // neighbours, in pnaa_pkg::dir_e order N, E, S, W
        if (r > 0) begin : g_n
          assign nb_spike[DIR_N] = cell_spike[r-1][c];
          assign nb_ring[DIR_N]  = cell_ring[r-1][c];
        end else begin : g_n0
          assign nb_spike[DIR_N] = 1'b0;
          assign nb_ring[DIR_N]  = '0;
        end
        if (c < GC-1) begin : g_e
          assign nb_spike[DIR_E] = cell_spike[r][c+1];
          assign nb_ring[DIR_E]  = cell_ring[r][c+1];
        end else begin : g_e0
          assign nb_spike[DIR_E] = 1'b0;
          assign nb_ring[DIR_E]  = '0;
        end
        if (r < GR-1) begin : g_s
          assign nb_spike[DIR_S] = cell_spike[r+1][c];
          assign nb_ring[DIR_S]  = cell_ring[r+1][c];
        end else begin : g_s0
          assign nb_spike[DIR_S] = 1'b0;
          assign nb_ring[DIR_S]  = '0;
        end
        if (c > 0) begin : g_w
          assign nb_spike[DIR_W] = cell_spike[r][c-1];
          assign nb_ring[DIR_W]  = cell_ring[r][c-1];
        end else begin : g_w0
          assign nb_spike[DIR_W] = 1'b0;
          assign nb_ring[DIR_W]  = '0;
        end

        if (CHAIN_HEAD) begin : g_head
          assign sin = cfg_in[c];
        end else begin : g_link
          assign sin = cell_cfgo[r-1][c];
        end

        if (IS_NODE) begin : g_node
          neuron_node #(.NPOS(NPOS), .WW(WW), .AW(AW), .LW(LW)) u_node (
            .clk, .rst_n, .shift_en, .first, .last, .pos,
            .nb_spike, .nb_ring,
            .cfg_en, .cfg_in(sin), .cfg_out(cell_cfgo[r][c]),
            .spike(cell_spike[r][c]), .ring(cell_ring[r][c])
          );
        end

        if (IS_IO) begin : g_io
          logic sensor, actuator;
          if (r == 0) begin : g_top
            assign sensor = io_top_in[c-1];
            assign io_top_out[c-1] = actuator;
          end else if (r == GR-1) begin : g_bot
            assign sensor = io_bot_in[c-1];
            assign io_bot_out[c-1] = actuator;
          end else if (c == 0) begin : g_left
            assign sensor = io_left_in[r-1];
            assign io_left_out[r-1] = actuator;
          end else begin : g_right
            assign sensor = io_right_in[r-1];
            assign io_right_out[r-1] = actuator;
          end
          io_block #(.NPOS(NPOS), .LW(LW)) u_io (
            .clk, .rst_n, .shift_en, .first, .last, .pos,
            .nb_spike, .nb_ring,
            .cfg_en, .cfg_in(sin), .cfg_out(cell_cfgo[r][c]),
            .sensor_in(sensor), .actuator_out(actuator),
            .spike(cell_spike[r][c]), .ring(cell_ring[r][c])
          );
        end
      end
    end
  end

  // chain ends: node columns end at the bottom IO block, edge columns at row ROWS
  for (genvar c = 0; c < GC; c++) begin : g_cfgo
    if (c == 0 || c == GC-1) begin : g_edge
      assign cfg_out[c] = cell_cfgo[GR-2][c];
    end else begin : g_mid
      assign cfg_out[c] = cell_cfgo[GR-1][c];
    end
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        node_spike[r][c] = cell_spike[r+1][c+1];
  end

  // configuration must not change while the loops are shifting
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n) !(cfg_en && run))
    else $error("configuration shifted while the array runs");

endmodule
