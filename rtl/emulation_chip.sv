// emulation_chip: one FPGA's worth of the emulator - T modules, the chip level
// routing switch and the step sequencer.
//
// Each emulation step every logic processor evaluates one lookup table and
// every memory processor reads or writes one word; a design clock cycle is
// steps 0..last_step (at most N). Processor outputs travel inside a module
// through the module routing switch and between modules, and to and from the
// P external inputs and P external outputs, through the chip routing switch,
// whose selects are reprogrammed every step from a select store.
//
// Interface
//   clk        emulation clock; both edges are used (see logic_processor).
//   rst, run   rst clears the step counter; run = 1 emulates. Load every
//              store with run = 0.
//   last_step  last step of a design cycle (N-1 for a full cycle).
//   ext_in     chip external inputs, from the target system or other chips.
//   ext_out    chip external outputs, routed every step.
//   step, cycle_end, design_clk  from the step sequencer.
//   fill_*     shared load bus: fill_mod selects a module, fill_lp_sel /
//              fill_mp_sel a processor inside it; fill_lp_we, fill_mp_cs_we
//              and fill_mp_ms_we write fill_data at fill_addr into that
//              processor's control store or memory store. fill_route_we
//              writes fill_route_sel into entry fill_route_idx of step
//              fill_addr of the routing select store.
module emulation_chip
  import emu_pkg::*;
#(
  parameter int unsigned M = LUT_M,
  parameter int unsigned N = STEPS_N,
  parameter int unsigned Q = WORD_Q,
  parameter int unsigned R = NUM_LP,
  parameter int unsigned S = NUM_MP,
  parameter int unsigned T = NUM_MOD,
  parameter int unsigned P = R + Q * S,
  parameter int unsigned FW = (lp_cw_width(M, N, P) > mp_cw_width(Q, N, P)) ?
                              lp_cw_width(M, N, P) : mp_cw_width(Q, N, P),
  parameter int unsigned NE = T * P + P
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          run,
  input  logic [$clog2(N)-1:0]          last_step,
  input  logic [P-1:0]                  ext_in,
  output logic [P-1:0]                  ext_out,
  output logic [$clog2(N)-1:0]          step,
  output logic                          cycle_end,
  output logic                          design_clk,
  input  logic [(T>1?$clog2(T):1)-1:0]  fill_mod,
  input  logic [$clog2(R)-1:0]          fill_lp_sel,
  input  logic [(S>1?$clog2(S):1)-1:0]  fill_mp_sel,
  input  logic                          fill_lp_we,
  input  logic                          fill_mp_cs_we,
  input  logic                          fill_mp_ms_we,
  input  logic [$clog2(N)-1:0]          fill_addr,
  input  logic [FW-1:0]                 fill_data,
  input  logic                          fill_route_we,
  input  logic [$clog2(NE)-1:0]         fill_route_idx,
  input  route_sel_t                    fill_route_sel
);

  logic [P-1:0] mod_out    [T];
  logic [P-1:0] mod_ext_in [T];
  logic [P-1:0] use_ext    [T];

  step_sequencer #(.N(N)) u_seq (
    .clk(clk), .rst(rst), .run(run), .last_step(last_step),
    .step(step), .cycle_end(cycle_end), .design_clk(design_clk)
  );

  for (genvar t = 0; t < T; t++) begin : g_mod
    emulation_module #(.M(M), .N(N), .Q(Q), .R(R), .S(S), .P(P), .FW(FW)) u_mod (
      .clk(clk), .run(run), .step(step),
      .mod_ext_in(mod_ext_in[t]), .use_ext(use_ext[t]), .mod_out(mod_out[t]),
      .fill_mod_en(int'(fill_mod) == t),
      .fill_lp_sel(fill_lp_sel), .fill_mp_sel(fill_mp_sel),
      .fill_lp_we(fill_lp_we), .fill_mp_cs_we(fill_mp_cs_we), .fill_mp_ms_we(fill_mp_ms_we),
      .fill_addr(fill_addr), .fill_data(fill_data)
    );
  end

  chip_switch #(.T(T), .P(P), .N(N), .NE(NE)) u_chip_sw (
    .clk(clk), .step(step),
    .mod_out(mod_out), .mod_ext_in(mod_ext_in), .use_ext(use_ext),
    .ext_in(ext_in), .ext_out(ext_out),
    .fill_we(fill_route_we), .fill_step(fill_addr), .fill_idx(fill_route_idx),
    .fill_sel(fill_route_sel)
  );

endmodule
