// tb_neuron_node: checks one neuron node in isolation.
// The node is configured through its serial chain with random routing,
// weights, bias and threshold (the word read back from cfg_out is checked).
// Then random simulation steps of random length are run; in every internal
// cycle the neighbours' spikes and loop registers are random. The testbench
// computes which value each port receives, the weighted sum, and the spike
// at the end of each step (bias + sum > threshold), and compares the loop
// registers every cycle and the spike every step.
module tb_neuron_node;
  import pnaa_pkg::*;
  localparam int NPOS = 9, WW = 8, AW = 14;
  localparam int LW = $clog2(NPOS + 1);
  localparam int CFGW = node_cfg_bits(NPOS, WW);

  typedef struct packed {
    link_cfg_t [3:0]                  link;
    logic signed [WW-1:0]             threshold;
    logic signed [WW-1:0]             bias;
    logic [3:0][NPOS-1:0][WW-1:0]     weight;
  } cfg_t;

  logic clk = 0, rst_n = 1, shift_en = 0, first = 0, last = 0;
  logic [LW-1:0] pos = '0;
  logic [3:0] nb_spike = '0;
  logic [3:0][3:0] nb_ring = '0;
  logic cfg_en = 0, cfg_in = 0, cfg_out, spike;
  logic [3:0] ring;
  int checks = 0, failures = 0, fired = 0, quiet = 0;

  neuron_node #(.NPOS(NPOS), .WW(WW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input cfg_t c);
    logic [CFGW-1:0] bits = c;
    for (int i = CFGW - 1; i >= 0; i--) begin
      @(negedge clk);
      cfg_en = 1; cfg_in = bits[i];
    end
    @(negedge clk);
    cfg_en = 0;
  endtask

  initial begin : main
    automatic cfg_t c;
    automatic int sum, len;
    automatic logic [3:0] exp_q;
    automatic logic exp_spike;
    automatic logic [3:0] rxv;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(spike == 0 && ring == 0, "reset state");
    exp_spike = 0;
    for (int trial = 0; trial < 30; trial++) begin
      for (int p = 0; p < 4; p++) begin
        c.link[p].en   = ($urandom_range(0, 4) != 0);
        c.link[p].dir  = dir_e'($urandom_range(0, 3));
        c.link[p].port = 2'($urandom);
        for (int k = 0; k < NPOS; k++) c.weight[p][k] = WW'($urandom_range(0, 255));
      end
      c.bias      = WW'($signed($urandom_range(0, 64)) - 32);
      c.threshold = WW'($signed($urandom_range(0, 100)) - 50);
      load(c);
      // read the configuration back through the chain while loading it again
      begin
        automatic logic [CFGW-1:0] back;
        automatic logic [CFGW-1:0] bits = c;
        for (int i = CFGW - 1; i >= 0; i--) begin
          @(negedge clk);
          back[i] = cfg_out;
          cfg_en = 1; cfg_in = bits[i];
        end
        @(negedge clk);
        cfg_en = 0;
        check(back == bits, "configuration read back through the chain");
      end
      exp_q = ring;
      for (int st = 0; st < 8; st++) begin
        len = $urandom_range(1, NPOS);
        sum = 0;
        for (int k = 1; k <= len; k++) begin
          @(negedge clk);
          shift_en = 1; pos = LW'(k); first = (k == 1); last = (k == len);
          nb_spike = 4'($urandom);
          nb_ring  = 16'($urandom);
          for (int p = 0; p < 4; p++) begin
            if (!c.link[p].en) rxv[p] = 0;
            else if (k == 1) rxv[p] = nb_spike[int'(c.link[p].dir)];
            else rxv[p] = nb_ring[int'(c.link[p].dir)][int'(c.link[p].port)];
            if (rxv[p]) sum += int'($signed(c.weight[p][k-1]));
          end
          @(posedge clk);
          exp_q = rxv;
          if (k == len) exp_spike = (sum + int'($signed(c.bias))) > int'($signed(c.threshold));
          @(negedge clk);
          shift_en = 0;
          check(ring == exp_q, "loop registers");
        end
        check(spike == exp_spike, $sformatf("spike trial %0d step %0d", trial, st));
        if (exp_spike) fired++; else quiet++;
        // an idle cycle must change nothing
        @(negedge clk);
        check(spike == exp_spike && ring == exp_q, "hold while shift_en low");
      end
    end
    check(fired > 10 && quiet > 10, "both firing and silent steps seen");
    $display("steps fired=%0d silent=%0d", fired, quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
