// step_sequencer: emulation step counter shared by every processor.
//
// Each period of the emulation clock is one emulation step; a design clock
// cycle is the sequence of steps 0..last_step. last_step is N-1 for a full
// cycle and can be lowered so that a design needing fewer steps runs at a
// higher design clock rate. The counter advances on the falling edge, the
// edge at which the processors read the control word of the current step, so
// the processors see step n at the edge that opens step n; between that edge
// and the next one the output already shows n+1. While run is low the step is
// held at 0. cycle_end is high while the next falling edge opens the last
// step of a design cycle; design_clk is high while the next falling edge opens
// a step of the first half of the cycle (0..last_step/2), so its period is
// last_step+1 emulation clocks.
module step_sequencer #(
  parameter int unsigned N = 128
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 run,
  input  logic [$clog2(N)-1:0] last_step,
  output logic [$clog2(N)-1:0] step,
  output logic                 cycle_end,
  output logic                 design_clk
);

  always_ff @(negedge clk) begin
    if (rst || !run) step <= '0;
    else if (step == last_step) step <= '0;
    else step <= step + 1'b1;
  end

  always_comb begin
    cycle_end  = run && (step == last_step);
    design_clk = run && (step <= (last_step >> 1));
  end

endmodule
