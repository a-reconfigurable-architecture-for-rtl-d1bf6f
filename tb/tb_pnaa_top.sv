// tb_pnaa_top: end-to-end test of the array at a reduced size (3 x 4 nodes,
// loops of up to 10 members). See pnaa_tb_body.svh for what it checks.
module tb_pnaa_top;
  localparam int ROWS = 3, COLS = 4, N_TRIALS = 6, STEPS = 25;
  `include "pnaa_tb_body.svh"
  pnaa_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
endmodule
