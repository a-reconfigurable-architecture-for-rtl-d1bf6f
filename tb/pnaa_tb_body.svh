// pnaa_tb_body.svh: body of the end-to-end array testbenches.
//
// Included by a wrapper that declares ROWS, COLS, N_TRIALS and STEPS and
// instantiates pnaa_top as `dut` on the signals declared here. Each trial:
//   1. builds a random configuration (random routing, weights, bias,
//      thresholds, IO masks) and overlays one explicit loop of 2*ROWS nodes
//      running down node column 0 and back up node column 1, the shape of
//      one network segment;
//   2. shifts it into all column chains in parallel, then shifts it a second
//      time and checks that every chain returns the first copy on cfg_out;
//   3. runs STEPS simulation steps with random step lengths (often the
//      segment loop's length less one), random sensors and random pauses of
//      run, and after each step compares every neuron spike and every
//      actuator with a reference model. The model works at step level: it
//      follows each port's routing k hops upstream to find the value a port
//      receives at position k, and applies the neuron and IO rules.
// It also checks that each step takes exactly step_len running cycles, and
// counts the mechanisms of the architecture; one that never happened is a
// failure.
`include "pnaa_tb_common.svh"

task automatic random_config();
  for (int r = 0; r < GR; r++)
    for (int c = 0; c < GC; c++) begin
      for (int p = 0; p < 4; p++) begin
        link_cfg_t l;
        l.en   = ($urandom_range(0, 3) != 0);
        l.dir  = dir_e'($urandom_range(0, 3));
        l.port = 2'($urandom);
        ncfg[r][c].link[p] = l;
        icfg[r][c].link[p] = l;
        for (int k = 0; k < NPOS; k++)
          ncfg[r][c].weight[p][k] = WW'($urandom_range(0, 80) - 40);
        icfg[r][c].mask[p] = NPOS'($urandom) & NPOS'($urandom);
      end
      ncfg[r][c].bias      = WW'($urandom_range(0, 40) - 20);
      ncfg[r][c].threshold = WW'($urandom_range(0, 40) - 20);
    end
  // one segment loop: down grid column 1, across, up grid column 2, port 0
  for (int r = 1; r <= ROWS; r++) begin
    ncfg[r][1].link[0] = '{en: 1'b1, dir: (r == 1) ? DIR_E : DIR_N, port: 2'd0};
    ncfg[r][2].link[0] = '{en: 1'b1, dir: (r == ROWS) ? DIR_W : DIR_S, port: 2'd0};
  end
  // one node that listens in all four directions
  for (int p = 0; p < 4; p++)
    ncfg[1][GC-2].link[p] = '{en: 1'b1, dir: dir_e'(p), port: 2'(p)};
endtask

task automatic apply_sensors();
  for (int c = 1; c <= COLS; c++) begin
    sensor[0][c] = 1'($urandom); sensor[GR-1][c] = 1'($urandom);
    io_top_in[c-1] = sensor[0][c]; io_bot_in[c-1] = sensor[GR-1][c];
  end
  for (int r = 1; r <= ROWS; r++) begin
    sensor[r][0] = 1'($urandom); sensor[r][GC-1] = 1'($urandom);
    io_left_in[r-1] = sensor[r][0]; io_right_in[r-1] = sensor[r][GC-1];
  end
endtask

// advance the model by one step of length len
task automatic model_step(int len);
  logic nsp [GR][GC];
  logic nact [GR][GC];
  for (int r = 0; r < GR; r++)
    for (int c = 0; c < GC; c++) begin
      int sum = 0, sr, sc;
      bit seen = 0, dirs_ok = 1;
      nsp[r][c] = 0; nact[r][c] = mact[r][c];
      if (kind[r][c] == 0) continue;
      for (int p = 0; p < 4; p++)
        for (int k = 1; k <= len; k++) begin
          logic v = hop(r, c, p, k, sr, sc);
          if (sr == r && sc == c) begin
            n_self_heard++;
            if (k < len) n_wrap++;
          end
          if (kind[r][c] == 1) begin
            if (v) sum += int'($signed(ncfg[r][c].weight[p][k-1]));
            if (v && sr >= 0 && kind[sr][sc] == 2 && ncfg[r][c].weight[p][k-1] != 0)
              n_sensor_used++;
          end else if (v && icfg[r][c].mask[p][k-1]) begin
            seen = 1;
          end
        end
      if (kind[r][c] == 1) begin
        nsp[r][c] = (sum + int'($signed(ncfg[r][c].bias))) > int'($signed(ncfg[r][c].threshold));
        for (int p = 0; p < 4; p++)
          if (!ncfg[r][c].link[p].en || ncfg[r][c].link[p].dir != dir_e'(p)) dirs_ok = 0;
        if (dirs_ok) n_four_dir++;
      end else begin
        nsp[r][c] = sensor[r][c];
        nact[r][c] = seen;
      end
    end
  mspike = nsp;
  mact = nact;
endtask

task automatic compare();
  for (int r = 1; r <= ROWS; r++)
    for (int c = 1; c <= COLS; c++) begin
      check(node_spike[r-1][c-1] == mspike[r][c], $sformatf("node (%0d,%0d) spike", r, c));
      if (mspike[r][c]) n_fire++; else n_silent++;
    end
  for (int c = 1; c <= COLS; c++) begin
    check(io_top_out[c-1] == mact[0][c], $sformatf("top actuator %0d", c - 1));
    check(io_bot_out[c-1] == mact[GR-1][c], $sformatf("bottom actuator %0d", c - 1));
    if (mact[0][c]) n_act_high++;
  end
  for (int r = 1; r <= ROWS; r++) begin
    check(io_left_out[r-1] == mact[r][0], $sformatf("left actuator %0d", r - 1));
    check(io_right_out[r-1] == mact[r][GC-1], $sformatf("right actuator %0d", r - 1));
  end
endtask

initial begin : main
  int len, prev_len, cycles;
  logic [31:0] sc0;
  for (int r = 0; r < GR; r++)
    for (int c = 0; c < GC; c++) begin
      automatic bit corner = (r == 0 || r == GR - 1) && (c == 0 || c == GC - 1);
      automatic bit is_edge = (r == 0 || r == GR - 1 || c == 0 || c == GC - 1);
      kind[r][c] = corner ? 0 : (is_edge ? 2 : 1);
      mspike[r][c] = 0; mact[r][c] = 0; sensor[r][c] = 0;
    end
  #1 rst_n = 0;
  repeat (2) @(posedge clk);
  rst_n = 1;
  prev_len = 0;
  for (int trial = 0; trial < N_TRIALS; trial++) begin
    random_config();
    load_config(0);
    load_config(1);
    for (int st = 0; st < STEPS; st++) begin
      len = ($urandom_range(0, 2) == 0) ? $urandom_range(1, NPOS) : 2 * ROWS - 1;
      if (len > NPOS) len = NPOS;
      if (len == 2 * ROWS - 1) n_segment_loop_steps++;
      if (len != prev_len && st > 0) n_len_change++;
      prev_len = len;
      @(negedge clk);
      step_len = LW'(len);
      apply_sensors();
      sc0 = step_count;
      cycles = 0;
      run = 1;
      // run the step, pausing now and then
      forever begin
        @(posedge clk);
        if (run) cycles++;
        #1;
        if (step_count != sc0) break;
        @(negedge clk);
        if ($urandom_range(0, 15) == 0) begin
          run = 0;
          n_pause++;
        end else begin
          run = 1;
        end
      end
      @(negedge clk);
      run = 0;
      check(cycles == len, $sformatf("step took %0d cycles, expected %0d", cycles, len));
      check(step_count == sc0 + 1, "step counter");
      model_step(len);
      compare();
      n_steps++;
    end
  end
  $display("steps=%0d fired=%0d silent=%0d self_heard=%0d wrap=%0d sensor_used=%0d act_high=%0d",
           n_steps, n_fire, n_silent, n_self_heard, n_wrap, n_sensor_used, n_act_high);
  $display("pauses=%0d len_changes=%0d cfg_readbacks=%0d four_dir=%0d segment_loop_steps=%0d",
           n_pause, n_len_change, n_cfg_readback, n_four_dir, n_segment_loop_steps);
  check(n_fire > 0, "a neuron fired");
  check(n_silent > 0, "a neuron stayed silent");
  check(n_self_heard > 0, "a loop closed on itself");
  check(n_wrap > 0, "a loop shorter than the step wrapped around");
  check(n_sensor_used > 0, "a sensor value reached a neuron");
  check(n_act_high > 0, "an actuator was driven");
  check(n_pause > 0, "the array paused with run low");
  check(n_len_change > 0, "the step length changed");
  check(n_cfg_readback > 0, "configuration read back");
  check(n_four_dir > 0, "a node received in four directions");
  check(n_segment_loop_steps > 0, "steps sized for the segment loop");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
