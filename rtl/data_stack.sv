// data_stack: DEPTH x 1-bit operand memory of a logic processor.
//
// One write port and NRD read ports. The reads are registered on the rising
// clock edge (the middle of an emulation step), the write happens on the
// falling edge that closes the step. A value written at the end of step n is
// therefore visible to every later step, while step n itself reads the value
// left at address n by the previous design cycle. The reference
// implementation built this from duplicated two-port RAM blocks; here it is a
// plain register array with NRD read ports.
module data_stack #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned NRD   = 4
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr [NRD],
  output logic [NRD-1:0]           rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic                     wdata
);

  logic [DEPTH-1:0] bits;

  always_ff @(posedge clk) begin
    for (int k = 0; k < NRD; k++) rdata[k] <= bits[raddr[k]];
  end

  always_ff @(negedge clk) begin
    if (we) bits[waddr] <= wdata;
  end

endmodule
