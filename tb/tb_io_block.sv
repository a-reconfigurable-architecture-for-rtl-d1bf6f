// tb_io_block: checks one IO block in isolation.
// Random routing and position masks are loaded through the serial chain.
// Random steps are run with random neighbour values and a random sensor pin.
// The testbench checks the loop registers every cycle; at the end of every
// step it checks that the spike sent into the loops is the sensor value and
// that the actuator output is the OR of the received spikes selected by the
// mask during that step.
module tb_io_block;
  import pnaa_pkg::*;
  localparam int NPOS = 9;
  localparam int LW = $clog2(NPOS + 1);
  localparam int CFGW = io_cfg_bits(NPOS);

  typedef struct packed {
    link_cfg_t [3:0]         link;
    logic [3:0][NPOS-1:0]    mask;
  } cfg_t;

  logic clk = 0, rst_n = 1, shift_en = 0, first = 0, last = 0;
  logic [LW-1:0] pos = '0;
  logic [3:0] nb_spike = '0;
  logic [3:0][3:0] nb_ring = '0;
  logic cfg_en = 0, cfg_in = 0, cfg_out, spike, sensor_in = 0, actuator_out;
  logic [3:0] ring;
  int checks = 0, failures = 0, act_hi = 0, act_lo = 0;

  io_block #(.NPOS(NPOS)) dut (.*);

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

  initial begin : main
    automatic cfg_t c;
    automatic logic [CFGW-1:0] bits;
    automatic int len;
    automatic logic seen, exp_act, exp_spike;
    automatic logic [3:0] rxv, exp_q;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(spike == 0 && actuator_out == 0 && ring == 0, "reset state");
    for (int trial = 0; trial < 30; trial++) begin
      for (int p = 0; p < 4; p++) begin
        c.link[p].en   = ($urandom_range(0, 4) != 0);
        c.link[p].dir  = dir_e'($urandom_range(0, 3));
        c.link[p].port = 2'($urandom);
        c.mask[p] = NPOS'($urandom) & NPOS'($urandom) & NPOS'($urandom);
      end
      bits = c;
      for (int i = CFGW - 1; i >= 0; i--) begin
        @(negedge clk);
        cfg_en = 1; cfg_in = bits[i];
      end
      @(negedge clk);
      cfg_en = 0;
      exp_q = ring;
      for (int st = 0; st < 8; st++) begin
        len = $urandom_range(1, NPOS);
        seen = 0;
        for (int k = 1; k <= len; k++) begin
          @(negedge clk);
          shift_en = 1; pos = LW'(k); first = (k == 1); last = (k == len);
          nb_spike = 4'($urandom);
          nb_ring  = 16'($urandom);
          sensor_in = 1'($urandom);
          for (int p = 0; p < 4; p++) begin
            if (!c.link[p].en) rxv[p] = 0;
            else if (k == 1) rxv[p] = nb_spike[int'(c.link[p].dir)];
            else rxv[p] = nb_ring[int'(c.link[p].dir)][int'(c.link[p].port)];
            if (rxv[p] && c.mask[p][k-1]) seen = 1;
          end
          exp_spike = sensor_in;
          @(posedge clk);
          exp_q = rxv;
          @(negedge clk);
          shift_en = 0;
          check(ring == exp_q, "loop registers");
        end
        exp_act = seen;
        check(spike == exp_spike, "sensor value sent for the next step");
        check(actuator_out == exp_act, $sformatf("actuator trial %0d step %0d", trial, st));
        if (exp_act) act_hi++; else act_lo++;
        @(negedge clk);
        sensor_in = ~sensor_in;
        #1;
        check(spike == exp_spike && actuator_out == exp_act, "hold between steps");
      end
    end
    check(act_hi > 10 && act_lo > 10, "actuator both high and low");
    $display("actuator high=%0d low=%0d", act_hi, act_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
