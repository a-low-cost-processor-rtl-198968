// control_store: per-processor program memory, one control word per emulation step.
//
// DEPTH words of WIDTH bits. The word for step n is read on the falling clock
// edge that opens emulation step n, as in the processors' timing: control
// word at the first falling edge, operands at the rising edge, results at the
// second falling edge. The store is loaded before emulation through a
// dedicated write port (fill_we/fill_addr/fill_data), also on the falling
// edge, so that a single process owns the array (one write and one read port,
// a simple dual-port RAM). rdata is registered and holds between reads.
module control_store #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 54
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     fill_we,
  input  logic [$clog2(DEPTH)-1:0] fill_addr,
  input  logic [WIDTH-1:0]         fill_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(negedge clk) begin
    if (fill_we) mem[fill_addr] <= fill_data;
    rdata <= mem[raddr];
  end

endmodule
