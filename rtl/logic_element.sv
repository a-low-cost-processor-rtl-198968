// logic_element: operand select multiplexers and an M-input lookup table.
//
// For each of the M lookup-table inputs a 2-to-1 multiplexer picks the operand
// read from the internal stack (sel = 0) or from the external stack
// (sel = 1). The M selected bits form the index into the 2^M-bit LUT field of
// the current control word; operand A (k = 0) is the least significant index
// bit. Purely combinational.
module logic_element #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0]      int_opnd,  // operands from the internal stack
  input  logic [M-1:0]      ext_opnd,  // operands from the external stack
  input  logic [M-1:0]      sel,       // per operand: 0 internal, 1 external
  input  logic [(1<<M)-1:0] lut,       // truth table of this step's function
  output logic              out
);

  logic [M-1:0] idx;

  always_comb begin
    for (int k = 0; k < M; k++) idx[k] = sel[k] ? ext_opnd[k] : int_opnd[k];
    out = lut[idx];
  end

endmodule
