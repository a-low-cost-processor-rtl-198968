// module_switch: module level routing switch.
//
// One P-to-1 multiplexer per processor input slot (one per logic processor,
// Q per memory processor, P = R + Q*S slots in all) makes every processor
// output of the module available to every processor input. Slot j's
// multiplexer is steered by the ChooseInput (or CI) field its processor sends
// out. A 2-to-1 multiplexer behind it, steered by use_ext[j], substitutes the
// slot's input from outside the module, which the chip level routing switch
// supplies. Purely combinational; outputs change with the control words
// (falling edge) and the chip routing selects (rising edge), and are sampled
// by the processors at the falling edge that closes the step.
module module_switch #(
  parameter int unsigned P = 64
) (
  input  logic [P-1:0]         proc_out,         // outputs of all processors
  input  logic [$clog2(P)-1:0] choose [P],       // select of each slot
  input  logic [P-1:0]         mod_ext_in,       // input from outside the module
  input  logic [P-1:0]         use_ext,          // take mod_ext_in for the slot
  output logic [P-1:0]         proc_in           // one bit per processor input
);

  always_comb begin
    for (int j = 0; j < P; j++)
      proc_in[j] = use_ext[j] ? mod_ext_in[j] : proc_out[choose[j]];
  end

endmodule
