// tb_step_controller: checks the step timing.
// For several step lengths (including 0 and one beyond the weight positions,
// both clamped) it runs the controller and checks pos, first, last,
// step_tick and step_count cycle by cycle against a counter model, and that
// a step of a loop of 10 members takes exactly 9 internal cycles. It also
// checks that the controller holds while run is low.
module tb_step_controller;
  localparam int NPOS = 9;
  localparam int LW = $clog2(NPOS + 1);
  logic clk = 0, rst_n = 1, run = 0;
  logic [LW-1:0] step_len = LW'(9);
  logic shift_en, first, last, step_tick;
  logic [LW-1:0] pos;
  logic [31:0] step_count;
  int checks = 0, failures = 0;
  int mpos, mcount, eff;

  step_controller #(.NPOS(NPOS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    automatic int lens[6] = '{9, 3, 1, 0, 15, 5};
    automatic int t_start, n_ticks, c;
    automatic logic [LW-1:0] p0;
    automatic logic [31:0] s0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mpos = 1; mcount = 0;
    foreach (lens[i]) begin
      @(negedge clk);
      run = 0;
      step_len = LW'(lens[i]);
      eff = (lens[i] == 0) ? 1 : (lens[i] > NPOS ? NPOS : lens[i]);
      // align on a step boundary: let the previous length finish
      n_ticks = 0; t_start = -1;
      for (int cyc = 0; cyc < 60; cyc++) begin
        @(negedge clk);
        run = ($urandom_range(0, 7) != 0);
        #1;
        check(int'(pos) == mpos, $sformatf("pos len=%0d", lens[i]));
        check(first == (mpos == 1), "first");
        check(last == (mpos >= eff), "last");
        check(step_tick == (run && mpos >= eff), "step_tick");
        check(step_count == 32'(mcount), "step_count");
        @(posedge clk);
        if (run) begin
          if (mpos >= eff) begin mpos = 1; mcount++; end
          else mpos++;
        end
      end
    end
    // a loop of 10 members: exactly 9 internal cycles per step with run held
    @(negedge clk);
    step_len = LW'(9);
    run = 1;
    do @(negedge clk); while (!step_tick);
    t_start = 0;
    begin
      c = 0;
      do begin @(negedge clk); c++; end while (!step_tick);
      check(c == 9, $sformatf("9 cycles per step for a 10-member loop, got %0d", c));
    end
    // hold while run is low
    run = 0;
    #1;
    begin
      p0 = pos;
      s0 = step_count;
      repeat (5) @(negedge clk);
      check(pos == p0 && step_count == s0, "hold while idle");
      check(!shift_en && !step_tick, "no shifting while idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
