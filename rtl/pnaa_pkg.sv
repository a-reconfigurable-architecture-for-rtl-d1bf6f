// pnaa_pkg: types and constants shared by the programmable neural array.
//
// A cell of the array (a neuron node or an IO block) has four loop ports,
// one per face (north, east, south, west). Each port holds one stage of a
// loop: a one-bit shift register whose input is taken from a port of one of
// the four neighbouring cells. The per-port routing word (link_cfg_t) names
// that upstream port. Encoding and widths are this design's own choice; the
// architecture only fixes that every face of a node can start one loop.
package pnaa_pkg;

  localparam int NPORT = 4;

  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Routing of one loop port: when en is set, the stage takes its input from
  // port `port` of the neighbour that lies in direction `dir`.
  typedef struct packed {
    logic       en;
    dir_e       dir;
    logic [1:0] port;
  } link_cfg_t;

  localparam int LINK_CFG_W = $bits(link_cfg_t);

  // Configuration word widths, for a loop of up to npos+1 members.
  function automatic int node_cfg_bits(int npos, int ww);
    return NPORT * LINK_CFG_W + 2 * ww + NPORT * npos * ww;
  endfunction

  function automatic int io_cfg_bits(int npos);
    return NPORT * LINK_CFG_W + NPORT * npos;
  endfunction

endpackage
