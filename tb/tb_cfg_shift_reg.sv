// tb_cfg_shift_reg: checks the configuration chain link.
// Two registers are chained as in a column; random bit streams are shifted
// in and the contents and serial output are compared with a model of the
// concatenated shift register. Also checks hold (cfg_en low) and reset.
module tb_cfg_shift_reg;
  localparam int W = 13;
  logic clk = 0, rst_n = 1, cfg_en = 0, sin = 0;
  logic s_mid, sout;
  logic [W-1:0] q0, q1;
  logic [2*W-1:0] model;
  int checks = 0, failures = 0;

  cfg_shift_reg #(.W(W)) u0 (.clk, .rst_n, .cfg_en, .sin(sin),   .sout(s_mid), .q(q0));
  cfg_shift_reg #(.W(W)) u1 (.clk, .rst_n, .cfg_en, .sin(s_mid), .sout(sout),  .q(q1));

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check({q1, q0} == '0, "reset value");
    for (int i = 0; i < 200; i++) begin
      cfg_en = ($urandom_range(0, 3) != 0);
      sin    = 1'($urandom);
      @(posedge clk);
      if (cfg_en) model = {model[2*W-2:0], sin};
      @(negedge clk);
      check({q1, q0} == model, $sformatf("contents at %0d", i));
      check(sout == model[2*W-1], "serial output");
    end
    rst_n = 0;
    @(negedge clk);
    check({q1, q0} == '0, "asynchronous reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
