// step_controller: global timing of the array.
//
// The array has two clocks in the sense of the architecture: the internal
// clock that shifts every loop by one stage, and the much slower simulation
// step at which every neuron updates. One step lasts step_len internal
// cycles, where step_len is the size of the largest configured loop less one
// (a loop of 10 neurons needs 9 cycles per step). The length does not depend
// on how many nodes the array has.
//
// While run is high, pos counts 1..step_len; first marks pos==1 and last
// marks pos==step_len (both high together when step_len is 1). step_tick
// pulses with last and step_count counts completed steps. step_len is
// clamped to 1..NPOS, NPOS being the number of weight positions per port.
// While run is low the counter holds. Reset returns to pos=1.
module step_controller #(
  parameter int NPOS = 9,
  parameter int LW   = $clog2(NPOS + 1),
  parameter int CW   = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic [LW-1:0] step_len,
  output logic          shift_en,
  output logic [LW-1:0] pos,
  output logic          first,
  output logic          last,
  output logic          step_tick,
  output logic [CW-1:0] step_count
);

  logic [LW-1:0] len_eff;

  always_comb begin
    if (step_len == '0)                   len_eff = LW'(1);
    else if (int'(step_len) > NPOS)       len_eff = LW'(NPOS);
    else                                  len_eff = step_len;
  end

  assign shift_en  = run;
  assign first     = (pos == LW'(1));
  assign last      = (pos >= len_eff);
  assign step_tick = run && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos        <= LW'(1);
      step_count <= '0;
    end else if (run) begin
      if (last) begin
        pos        <= LW'(1);
        step_count <= step_count + 1'b1;
      end else begin
        pos <= pos + 1'b1;
      end
    end
  end

endmodule
