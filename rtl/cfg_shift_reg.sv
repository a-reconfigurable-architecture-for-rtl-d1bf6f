// cfg_shift_reg: configuration register of one array cell.
//
// The array is configured column by column: each column is one bit-serial
// chain that starts at the IO block on one edge, passes every node of the
// column and stops at the IO block on the opposite edge. This module is one
// link of that chain. While cfg_en is high the register shifts left by one
// bit per clock, taking sin into bit 0 and presenting bit W-1 on sout for
// the next cell. The whole register is visible on q and is used by the cell
// as its configuration; it must not be shifted while the array runs.
// Reset clears the configuration (all loop ports unused, all weights zero).
// The column chain follows the text; the serial one-bit format is this
// design's choice.
module cfg_shift_reg #(
  parameter int W = 8   // at least 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_en,
  input  logic         sin,
  output logic         sout,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (cfg_en) begin
      q <= {q[W-2:0], sin};
    end
  end

  assign sout = q[W-1];

endmodule
