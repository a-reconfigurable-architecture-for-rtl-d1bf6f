// tb_pnaa_full: end-to-end test of the array at its default size (5 x 20
// nodes, loops of up to 10 members). See pnaa_tb_body.svh for what it checks.
module tb_pnaa_full;
  localparam int ROWS = 5, COLS = 20, N_TRIALS = 2, STEPS = 20;
  `include "pnaa_tb_body.svh"
  pnaa_top dut (.*);
endmodule
