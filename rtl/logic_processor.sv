// logic_processor: emulates one M-input logic function per emulation step.
//
// Made of a control store, an internal and an external data stack, and a
// logic element. All three memories are N deep, so the step number is the
// read address of the control store and the write address of both stacks.
//
// Timing of emulation step n (one clock period, both edges used):
//   falling edge (opens step n): control word n is read; step n and the run
//     flag are latched.
//   rising edge: the M operand addresses RAA..RAM of the word are read from
//     both stacks.
//   high phase: the logic element selects each operand (SelA..SelM) and looks
//     it up in the LUT field; logic_out is valid until the next rising edge.
//   falling edge (closes step n, opens step n+1): logic_out is written to the
//     internal stack at address n and ext_in to the external stack at
//     address n. ext_in is the network bit selected by choose_input, the
//     ChooseInput field of word n.
// Stack writes only happen in steps that began with run = 1, so the stacks
// keep their contents while the processor is loaded or halted.
//
// Interface: step comes from the shared step sequencer, ext_in from the
// module routing switch; the fill_* port loads the control store before
// emulation. The control-word layout is given in emu_pkg.
module logic_processor
  import emu_pkg::*;
#(
  parameter int unsigned M  = LUT_M,
  parameter int unsigned N  = STEPS_N,
  parameter int unsigned P  = OUTS_P,
  parameter int unsigned CW = lp_cw_width(M, N, P)
) (
  input  logic                 clk,
  input  logic                 run,
  input  logic [$clog2(N)-1:0] step,
  input  logic                 ext_in,
  output logic [$clog2(P)-1:0] choose_input,
  output logic                 logic_out,
  input  logic                 fill_we,
  input  logic [$clog2(N)-1:0] fill_addr,
  input  logic [CW-1:0]        fill_data
);

  localparam int unsigned SW = $clog2(N);
  localparam int unsigned PW = $clog2(P);

  logic [CW-1:0]   cw;
  logic [SW-1:0]   step_q;
  logic            active_q;
  logic [SW-1:0]   raddr [M];
  logic [M-1:0]    sel;
  logic [(1<<M)-1:0] lut;
  logic [M-1:0]    int_opnd, ext_opnd;

  control_store #(.DEPTH(N), .WIDTH(CW)) u_cs (
    .clk(clk), .raddr(step), .rdata(cw),
    .fill_we(fill_we), .fill_addr(fill_addr), .fill_data(fill_data)
  );

  always_ff @(negedge clk) begin
    step_q   <= step;
    active_q <= run;
  end

  // Field decode of the current control word.
  always_comb begin
    choose_input = cw[CW-1 -: PW];
    lut          = cw[M*(1+SW) +: (1<<M)];
    for (int k = 0; k < M; k++) begin
      raddr[k] = cw[lp_opnd_lsb(k, M, SW) +: SW];
      sel[k]   = cw[lp_opnd_lsb(k, M, SW) + SW];
    end
  end

  data_stack #(.DEPTH(N), .NRD(M)) u_int_stack (
    .clk(clk), .raddr(raddr), .rdata(int_opnd),
    .we(active_q), .waddr(step_q), .wdata(logic_out)
  );

  data_stack #(.DEPTH(N), .NRD(M)) u_ext_stack (
    .clk(clk), .raddr(raddr), .rdata(ext_opnd),
    .we(active_q), .waddr(step_q), .wdata(ext_in)
  );

  logic_element #(.M(M)) u_le (
    .int_opnd(int_opnd), .ext_opnd(ext_opnd), .sel(sel), .lut(lut), .out(logic_out)
  );

endmodule
