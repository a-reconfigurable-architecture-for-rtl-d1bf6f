// tb_celegans: nematode locomotion network on the default array.
//
// Maps a ten-segment locomotion model onto the 5 x 20 array, two node
// columns per segment, and checks four behaviours of it.
//
// Network, per segment s (0 = head, 9 = tail): command neurons AVB
// (forward) and AVA (backward), excitatory motor neurons DB, DA (dorsal) and
// VB, VA (ventral), muscle drivers DM and VM, and inhibitory DD, VD.
//   AVB <- sensor above it; AVA <- sensor below it
//   DB(s) <- AVB(s) AND DM(s-1)   (head: left-edge sensor)
//   DA(s) <- AVA(s) AND DM(s+1)   (tail: right-edge sensor)
//   VB(s) <- AVB(s) AND VM(s-1)   (head: left-edge sensor)
//   VA(s) <- AVA(s) AND VM(s+1)   (tail: right-edge sensor)
//   DM <- DB OR DA, vetoed by DD;  VM <- VB OR VA, vetoed by VD
//   VD <- DM;  DD <- VM
// AND is weights 5 + 5 against threshold 7, OR is 10 against 5, a veto -20.
// The weights are this testbench's own; the neuron classes, their links and
// their placement (two segment layouts alternating along the array) follow
// the published mapping.
//
// Loops: each segment is one loop of its 10 nodes (port 0), so a step is 9
// cycles. Links between segments use 6-member loops around a 2 x 3 block of
// nodes spanning the boundary (ports 1 and 2). Sensors reach AVB, AVA and
// the end segments over 2-member loops with the IO blocks (port 3).
//
// Behaviours checked (step counts are from this network's timing, two steps
// per segment):
//   forward  - AVB on, head stimulated: DM and VM waves start at the head and
//              reach each next segment 2 steps later; the muscles oscillate.
//   backward - AVA on, tail stimulated: the waves run tail to head.
//   coiling  - both commands on, only the ventral side of head and tail
//              stimulated: VM turns on from both ends toward the middle and
//              stays on; no DM ever fires.
//   UNC-25 knockout - inhibitory weights set to 0, forward stimulus: every
//              DM and VM turns on head to tail and stays on.
module tb_celegans;
  localparam int ROWS = 5, COLS = 20;
  `include "pnaa_tb_common.svh"

  pnaa_top dut (.*);

  localparam int NSEG = COLS / 2;
  typedef enum int {AVB, AVA, DB, DA, DM, VD, DD, VM, VB, VA} nt_e;

  // rings: members in data-flow order and the port each member uses
  localparam int MAXR = 64;
  int n_rings = 0;
  int ring_n [MAXR];
  int ring_r [MAXR][10];
  int ring_c [MAXR][10];
  int ring_p [MAXR][10];

  // array row of each class, for segment layout A (even s) and B (odd s)
  function automatic int row_of(int s, nt_e t);
    bit a = (s % 2 == 0);
    case (t)
      AVB, DM, DA: return (t == AVB) ? 0 : 1;
      DD, VM, VA:  return (t == DD) ? 2 : 3;
      AVA:         return 4;
      DB:          return a ? 0 : 2;
      VB:          return a ? 2 : 4;
      default:     return a ? 4 : 0;   // VD
    endcase
  endfunction

  function automatic bit right_col(nt_e t);
    return t inside {AVB, DA, DD, VA, AVA};
  endfunction

  // grid coordinates (IO ring included) of neuron t of segment s
  function automatic int gr(int s, nt_e t); return row_of(s, t) + 1; endfunction
  function automatic int gc(int s, nt_e t); return 2 * s + (right_col(t) ? 1 : 0) + 1; endfunction

  function automatic dir_e dir_to(int r, int c, int ur, int uc);
    if (ur == r - 1) return DIR_N;
    if (uc == c + 1) return DIR_E;
    if (ur == r + 1) return DIR_S;
    return DIR_W;
  endfunction

  task automatic add_ring(int n, int rs[10], int cs[10], int ps[10]);
    for (int j = 0; j < n; j++) begin
      int u = (j + n - 1) % n;
      link_cfg_t l;
      if (rs[u] != rs[j] && cs[u] != cs[j]) $fatal(1, "ring members not adjacent");
      l = '{en: 1'b1, dir: dir_to(rs[j], cs[j], rs[u], cs[u]), port: 2'(ps[u])};
      if (kind[rs[j]][cs[j]] == 1) ncfg[rs[j]][cs[j]].link[ps[j]] = l;
      else icfg[rs[j]][cs[j]].link[ps[j]] = l;
      ring_r[n_rings][j] = rs[j]; ring_c[n_rings][j] = cs[j]; ring_p[n_rings][j] = ps[j];
    end
    ring_n[n_rings] = n;
    n_rings++;
  endtask

  // weight of the input from (sr,sc) at node (dr,dc), over the first ring
  // holding both
  task automatic connect(int dr, int dc, int sr, int sc, int w);
    for (int i = 0; i < n_rings; i++) begin
      int di = -1, si = -1;
      for (int j = 0; j < ring_n[i]; j++) begin
        if (ring_r[i][j] == dr && ring_c[i][j] == dc) di = j;
        if (ring_r[i][j] == sr && ring_c[i][j] == sc) si = j;
      end
      if (di >= 0 && si >= 0) begin
        int k = (di - si + ring_n[i]) % ring_n[i];
        ncfg[dr][dc].weight[ring_p[i][di]][k-1] = WW'(w);
        return;
      end
    end
    $fatal(1, "no loop joins (%0d,%0d) and (%0d,%0d)", sr, sc, dr, dc);
  endtask

  task automatic syn(int ds, nt_e dt, int ss, nt_e st, int w);
    connect(gr(ds, dt), gc(ds, dt), gr(ss, st), gc(ss, st), w);
  endtask

  task automatic build(bit knockout);
    int rs[10], cs[10], ps[10];
    n_rings = 0;
    for (int r = 0; r < GR; r++)
      for (int c = 0; c < GC; c++) begin
        ncfg[r][c] = '0;
        icfg[r][c] = '0;
      end
    for (int s = 0; s < NSEG; s++) begin
      int l = 2 * s + 1;
      // segment loop: down the left column, up the right column
      for (int j = 0; j < 5; j++) begin
        rs[j] = j + 1;     cs[j] = l;     ps[j] = 0;
        rs[9-j] = j + 1;   cs[9-j] = l + 1; ps[9-j] = 0;
      end
      add_ring(10, rs, cs, ps);
    end
    for (int s = 0; s + 1 < NSEG; s++) begin
      int l = 2 * s + 1;
      int rows [2][2];
      rows[0][0] = 2; rows[0][1] = gr(s + 1, DB);   // dorsal block
      rows[1][0] = 4; rows[1][1] = gr(s + 1, VB);   // ventral block
      for (int b = 0; b < 2; b++) begin
        int ra = (rows[b][0] < rows[b][1]) ? rows[b][0] : rows[b][1];
        int rb = (rows[b][0] < rows[b][1]) ? rows[b][1] : rows[b][0];
        for (int j = 0; j < 3; j++) begin
          rs[j] = ra;     cs[j] = l + j;     ps[j] = (j == 2) ? 2 : 1;
          rs[5-j] = rb;   cs[5-j] = l + j;   ps[5-j] = (j == 2) ? 2 : 1;
        end
        add_ring(6, rs, cs, ps);
      end
    end
    // sensor links
    for (int s = 0; s < NSEG; s++) begin
      rs[0] = 0;      cs[0] = gc(s, AVB); ps[0] = 0;
      rs[1] = gr(s, AVB); cs[1] = gc(s, AVB); ps[1] = 3;
      add_ring(2, rs, cs, ps);
      rs[0] = GR - 1; cs[0] = gc(s, AVA); ps[0] = 0;
      rs[1] = gr(s, AVA); cs[1] = gc(s, AVA); ps[1] = 3;
      add_ring(2, rs, cs, ps);
    end
    begin
      nt_e ends[4] = '{DB, VB, DA, VA};
      for (int e = 0; e < 4; e++) begin
        int s = (e < 2) ? 0 : NSEG - 1;
        rs[0] = gr(s, ends[e]); cs[0] = (e < 2) ? 0 : GC - 1; ps[0] = 0;
        rs[1] = gr(s, ends[e]); cs[1] = gc(s, ends[e]);     ps[1] = 3;
        add_ring(2, rs, cs, ps);
      end
    end
    // synapses
    for (int s = 0; s < NSEG; s++) begin
      int l = 2 * s + 1;
      connect(gr(s, AVB), gc(s, AVB), 0, gc(s, AVB), 10);
      connect(gr(s, AVA), gc(s, AVA), GR - 1, gc(s, AVA), 10);
      syn(s, DB, s, AVB, 5);
      syn(s, DA, s, AVA, 5);
      syn(s, VB, s, AVB, 5);
      syn(s, VA, s, AVA, 5);
      if (s == 0) begin
        connect(gr(s, DB), gc(s, DB), gr(s, DB), 0, 5);
        connect(gr(s, VB), gc(s, VB), gr(s, VB), 0, 5);
      end else begin
        syn(s, DB, s - 1, DM, 5);
        syn(s, VB, s - 1, VM, 5);
      end
      if (s == NSEG - 1) begin
        connect(gr(s, DA), gc(s, DA), gr(s, DA), GC - 1, 5);
        connect(gr(s, VA), gc(s, VA), gr(s, VA), GC - 1, 5);
      end else begin
        syn(s, DA, s + 1, DM, 5);
        syn(s, VA, s + 1, VM, 5);
      end
      syn(s, DM, s, DB, 10);
      syn(s, DM, s, DA, 10);
      syn(s, DM, s, DD, knockout ? 0 : -20);
      syn(s, VM, s, VB, 10);
      syn(s, VM, s, VA, 10);
      syn(s, VM, s, VD, knockout ? 0 : -20);
      syn(s, VD, s, DM, 10);
      syn(s, DD, s, VM, 10);
      ncfg[gr(s, AVB)][gc(s, AVB)].threshold = 8'sd5;
      ncfg[gr(s, AVA)][gc(s, AVA)].threshold = 8'sd5;
      ncfg[gr(s, DB)][gc(s, DB)].threshold = 8'sd7;
      ncfg[gr(s, DA)][gc(s, DA)].threshold = 8'sd7;
      ncfg[gr(s, VB)][gc(s, VB)].threshold = 8'sd7;
      ncfg[gr(s, VA)][gc(s, VA)].threshold = 8'sd7;
      ncfg[gr(s, DM)][gc(s, DM)].threshold = 8'sd5;
      ncfg[gr(s, VM)][gc(s, VM)].threshold = 8'sd5;
      ncfg[gr(s, VD)][gc(s, VD)].threshold = 8'sd5;
      ncfg[gr(s, DD)][gc(s, DD)].threshold = 8'sd5;
    end
  endtask

  // stimulus: command neurons and the four end sensors
  task automatic stimulus(bit avb, bit ava, bit head_d, bit head_v, bit tail_d, bit tail_v);
    io_top_in = '0; io_bot_in = '0; io_left_in = '0; io_right_in = '0;
    for (int s = 0; s < NSEG; s++) begin
      io_top_in[gc(s, AVB) - 1] = avb;
      io_bot_in[gc(s, AVA) - 1] = ava;
    end
    io_left_in[row_of(0, DB)] = head_d;
    io_left_in[row_of(0, VB)] = head_v;
    io_right_in[row_of(NSEG - 1, DA)] = tail_d;
    io_right_in[row_of(NSEG - 1, VA)] = tail_v;
  endtask

  // one simulation step with run held high; returns the new spikes
  task automatic step();
    logic [31:0] sc0 = step_count;
    int cycles = 0;
    while (step_count == sc0) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    check(cycles == 9, $sformatf("a step of the 10-member loops took %0d cycles", cycles));
  endtask

  function automatic bit sp(int s, nt_e t);
    return node_spike[gr(s, t) - 1][gc(s, t) - 1];
  endfunction

  int on_dm [NSEG], on_vm [NSEG];
  int last_dm_on [NSEG], last_vm_on [NSEG];
  bit dm_osc [NSEG];
  int dm_ever;

  task automatic run_phase(int n, int tail_window);
    for (int s = 0; s < NSEG; s++) begin
      on_dm[s] = -1; on_vm[s] = -1; dm_osc[s] = 0;
      last_dm_on[s] = 0; last_vm_on[s] = 0;
    end
    dm_ever = 0;
    for (int t = 0; t < n; t++) begin
      step();
      for (int s = 0; s < NSEG; s++) begin
        if (sp(s, DM) && on_dm[s] < 0) on_dm[s] = t;
        if (sp(s, VM) && on_vm[s] < 0) on_vm[s] = t;
        if (!sp(s, DM) && on_dm[s] >= 0) dm_osc[s] = 1;
        if (sp(s, DM)) dm_ever++;
        if (t >= n - tail_window) begin
          last_dm_on[s] += sp(s, DM);
          last_vm_on[s] += sp(s, VM);
        end
      end
    end
  endtask

  task automatic quiet();
    stimulus(0, 0, 0, 0, 0, 0);
    repeat (12) step();
    check(node_spike == '0, "network silent after the stimulus is removed");
  endtask

  initial begin : main
    for (int r = 0; r < GR; r++)
      for (int c = 0; c < GC; c++) begin
        automatic bit corner = (r == 0 || r == GR - 1) && (c == 0 || c == GC - 1);
        automatic bit is_edge = (r == 0 || r == GR - 1 || c == 0 || c == GC - 1);
        kind[r][c] = corner ? 0 : (is_edge ? 2 : 1);
      end
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    build(0);
    load_config(0);
    load_config(1);
    @(negedge clk);
    step_len = LW'(9);
    run = 1;
    step();

    // forward locomotion
    stimulus(1, 0, 1, 1, 0, 0);
    run_phase(60, 8);
    for (int s = 0; s < NSEG; s++) begin
      check(on_dm[s] >= 0 && on_vm[s] >= 0, $sformatf("forward: segment %0d muscles active", s));
      if (s > 0) begin
        check(on_dm[s] == on_dm[s-1] + 2, $sformatf("forward: DM wave %0d->%0d", s - 1, s));
        check(on_vm[s] == on_vm[s-1] + 2, $sformatf("forward: VM wave %0d->%0d", s - 1, s));
      end
      check(dm_osc[s], $sformatf("forward: DM %0d oscillates", s));
    end
    $display("forward: DM onsets head %0d tail %0d", on_dm[0], on_dm[NSEG-1]);
    quiet();

    // backward locomotion
    stimulus(0, 1, 0, 0, 1, 1);
    run_phase(60, 8);
    for (int s = 0; s < NSEG; s++) begin
      check(on_dm[s] >= 0 && on_vm[s] >= 0, $sformatf("backward: segment %0d muscles active", s));
      if (s > 0) begin
        check(on_dm[s-1] == on_dm[s] + 2, $sformatf("backward: DM wave %0d->%0d", s, s - 1));
        check(on_vm[s-1] == on_vm[s] + 2, $sformatf("backward: VM wave %0d->%0d", s, s - 1));
      end
    end
    $display("backward: DM onsets head %0d tail %0d", on_dm[0], on_dm[NSEG-1]);
    quiet();

    // coiling: ventral stimulus at head and tail
    stimulus(1, 1, 0, 1, 0, 1);
    run_phase(40, 8);
    check(dm_ever == 0, "coiling: no dorsal muscle fires");
    for (int s = 0; s < NSEG; s++) begin
      check(last_vm_on[s] == 8, $sformatf("coiling: VM %0d held on", s));
      check(on_vm[s] == on_vm[NSEG-1-s], $sformatf("coiling: VM %0d symmetric", s));
      if (s > 0 && s < NSEG / 2)
        check(on_vm[s] == on_vm[s-1] + 2, $sformatf("coiling: VM %0d reached from the end", s));
    end
    $display("coiling: VM onsets end %0d middle %0d", on_vm[0], on_vm[NSEG/2]);
    quiet();

    // UNC-25 knockout: inhibition removed, constant forward stimulus
    @(negedge clk);
    run = 0;
    build(1);
    load_config(0);
    @(negedge clk);
    run = 1;
    step();
    stimulus(1, 0, 1, 1, 0, 0);
    run_phase(60, 10);
    for (int s = 0; s < NSEG; s++) begin
      check(last_dm_on[s] == 10 && last_vm_on[s] == 10, $sformatf("UNC-25: segment %0d locked on", s));
      if (s > 0) check(on_dm[s] > on_dm[s-1], $sformatf("UNC-25: DM %0d after %0d", s, s - 1));
    end
    $display("UNC-25: DM onsets head %0d tail %0d", on_dm[0], on_dm[NSEG-1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
