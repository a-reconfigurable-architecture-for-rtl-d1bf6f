// tb_loop_stage: checks the interconnect switch and loop register.
// Random routing words and random neighbour values are applied; rx must be
// the upstream neighbour's spike on the first cycle of a step, the selected
// neighbour port's register otherwise, and 0 for an unused port. q must load
// rx only when shift_en is high.
module tb_loop_stage;
  import pnaa_pkg::*;
  logic clk = 0, rst_n = 1, shift_en = 0, first = 0;
  link_cfg_t link;
  logic [NPORT-1:0] nb_spike;
  logic [NPORT-1:0][NPORT-1:0] nb_ring;
  logic rx, q, exp_rx, exp_q;
  int checks = 0, failures = 0;

  loop_stage dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link = '0; nb_spike = '0; nb_ring = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_q = 0;
    @(negedge clk);
    check(q == 0, "reset");
    for (int i = 0; i < 500; i++) begin
      link.en   = ($urandom_range(0, 4) != 0);
      link.dir  = dir_e'($urandom_range(0, 3));
      link.port = 2'($urandom);
      nb_spike  = 4'($urandom);
      nb_ring   = 16'($urandom);
      first     = ($urandom_range(0, 2) == 0);
      shift_en  = ($urandom_range(0, 3) != 0);
      #1;
      // model: neighbour index by direction number, port by number
      if (!link.en) exp_rx = 0;
      else if (first) exp_rx = nb_spike[int'(link.dir)];
      else exp_rx = nb_ring[int'(link.dir)][int'(link.port)];
      check(rx == exp_rx, $sformatf("rx step %0d", i));
      @(posedge clk);
      if (shift_en) exp_q = exp_rx;
      @(negedge clk);
      check(q == exp_q, $sformatf("q step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
