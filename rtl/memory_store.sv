// memory_store: DEPTH x WIDTH word memory of a memory processor.
//
// Holds the emulated memory contents. A read (re) is registered on the rising
// clock edge in the middle of an emulation step and its data is held until the
// next read. A write (we) happens on the falling edge that closes the step.
// The memory processor multiplexes the pre-emulation load port onto the same
// write port.
module memory_store #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

  always_ff @(negedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

endmodule
