// pnaa_tb_common.svh: declarations shared by the array testbenches.
//
// Included inside a testbench module that declares ROWS and COLS. Provides
// the signals of pnaa_top, the clock, the check task, a model of every
// cell's configuration (node and IO words laid out as in neuron_node and
// io_block) and load_config, which shifts that model into all column chains
// in parallel and can check that the previous contents come back on cfg_out.
import pnaa_pkg::*;

localparam int LOOP_MAX = 10;
localparam int NPOS = LOOP_MAX - 1;
localparam int LW = $clog2(NPOS + 1);
localparam int WW = 8;
localparam int GR = ROWS + 2, GC = COLS + 2;
localparam int NCFGW = node_cfg_bits(NPOS, WW);
localparam int ICFGW = io_cfg_bits(NPOS);

typedef struct packed {
  link_cfg_t [3:0]                  link;
  logic signed [WW-1:0]             threshold;
  logic signed [WW-1:0]             bias;
  logic [3:0][NPOS-1:0][WW-1:0]     weight;
} node_cfg_t;

typedef struct packed {
  link_cfg_t [3:0]         link;
  logic [3:0][NPOS-1:0]    mask;
} io_cfg_t;

logic clk = 0, rst_n = 1;
logic cfg_en = 0;
logic [COLS+1:0] cfg_in = '0, cfg_out;
logic run = 0;
logic [LW-1:0] step_len = LW'(1);
logic step_tick;
logic [31:0] step_count;
logic [COLS-1:0] io_top_in = '0, io_bot_in = '0, io_top_out, io_bot_out;
logic [ROWS-1:0] io_left_in = '0, io_right_in = '0, io_left_out, io_right_out;
logic [ROWS-1:0][COLS-1:0] node_spike;

always #5 clk = ~clk;

int checks = 0, failures = 0;
// mechanism counters
int n_fire = 0, n_silent = 0, n_self_heard = 0, n_wrap = 0, n_sensor_used = 0;
int n_act_high = 0, n_pause = 0, n_len_change = 0, n_cfg_readback = 0;
int n_four_dir = 0, n_segment_loop_steps = 0, n_steps = 0;

// model state
int kind [GR][GC];              // 0 none, 1 node, 2 io
node_cfg_t ncfg [GR][GC];
io_cfg_t   icfg [GR][GC];
logic      mspike [GR][GC];
logic      mact [GR][GC];
logic      sensor [GR][GC];

task automatic check(logic ok, string what);
  checks++;
  if (!ok) begin
    failures++;
    if (failures < 20) $display("FAIL %s", what);
  end
endtask

initial begin
  #(64'd4000000000);
  failures++;
  $display("watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

function automatic link_cfg_t link_of(int r, int c, int p);
  return (kind[r][c] == 1) ? ncfg[r][c].link[p] : icfg[r][c].link[p];
endfunction

function automatic void nb(int r, int c, dir_e d, output int nr, output int nc);
  nr = r; nc = c;
  case (d)
    DIR_N: nr = r - 1;
    DIR_E: nc = c + 1;
    DIR_S: nr = r + 1;
    default: nc = c - 1;
  endcase
endfunction

function automatic bit exists(int r, int c);
  return r >= 0 && r < GR && c >= 0 && c < GC && kind[r][c] != 0;
endfunction

// value received at port p of cell (r,c) at position k (1-based); also
// reports the cell it came from
function automatic logic hop(int r, int c, int p, int k, output int sr, output int sc);
  int cr = r, cc = c, cp = p, nr, nc;
  link_cfg_t l;
  sr = -1; sc = -1;
  for (int j = 0; j < k; j++) begin
    if (!exists(cr, cc)) return 0;
    l = link_of(cr, cc, cp);
    if (!l.en) return 0;
    nb(cr, cc, l.dir, nr, nc);
    if (j == k - 1) begin
      sr = nr; sc = nc;
      return exists(nr, nc) ? mspike[nr][nc] : 1'b0;
    end
    cr = nr; cc = nc; cp = int'(l.port);
  end
  return 0;
endfunction

function automatic int chain_len(int c);
  return (c == 0 || c == GC - 1) ? ROWS : ROWS + 2;
endfunction

function automatic int chain_row(int c, int i);
  return (c == 0 || c == GC - 1) ? i + 1 : i;
endfunction

function automatic int cell_bits(int r, int c);
  return kind[r][c] == 1 ? NCFGW : ICFGW;
endfunction

function automatic logic cell_bit(int r, int c, int b);
  logic [NCFGW-1:0] nv;
  logic [ICFGW-1:0] iv;
  nv = ncfg[r][c];
  iv = icfg[r][c];
  return kind[r][c] == 1 ? nv[b] : iv[b];
endfunction

// bit `i` of the serial stream of column c (stream index 0 is sent first)
function automatic logic stream_bit(int c, int i);
  int idx = i;
  for (int j = chain_len(c) - 1; j >= 0; j--) begin
    int r = chain_row(c, j);
    int w = cell_bits(r, c);
    if (idx < w) return cell_bit(r, c, w - 1 - idx);
    idx -= w;
  end
  return 0;
endfunction

function automatic int stream_len(int c);
  int n = 0;
  for (int j = 0; j < chain_len(c); j++) n += cell_bits(chain_row(c, j), c);
  return n;
endfunction

task automatic load_config(bit readback);
  int maxlen = 0;
  int lens [GC];
  logic [GC-1:0] ok;
  for (int c = 0; c < GC; c++) begin
    lens[c] = stream_len(c);
    if (lens[c] > maxlen) maxlen = lens[c];
  end
  ok = '1;
  for (int t = 0; t < maxlen; t++) begin
    @(negedge clk);
    cfg_en = 1;
    for (int c = 0; c < GC; c++) begin
      int i = t - (maxlen - lens[c]);
      // every chain shifts maxlen times: its first lens[c] output bits are
      // the previous contents, which equal this stream
      if (readback && t < lens[c] && cfg_out[c] !== stream_bit(c, t)) ok[c] = 0;
      cfg_in[c] = (i >= 0) ? stream_bit(c, i) : 1'b0;
    end
  end
  @(negedge clk);
  cfg_en = 0;
  if (readback) begin
    for (int c = 0; c < GC; c++) check(ok[c], $sformatf("chain %0d read back", c));
    n_cfg_readback++;
  end
endtask

