// emulation_module: R logic processors and S memory processors on one network.
//
// The first level of the emulator hierarchy. The module has P = R + Q*S
// network outputs (slot r is logic processor r, slot R + s*Q + q is bit q of
// memory processor s) and the same number of processor inputs (slot r feeds
// logic processor r's external stack, slot R + s*Q + q feeds capture bit q of
// memory processor s). The module level routing switch connects them: each
// input slot takes any module output chosen by its processor's control word,
// or, when use_ext is set for that slot, the bit mod_ext_in supplied from
// outside the module. mod_out carries all P outputs to the chip.
//
// All processors receive the same step and run. A sequential filler decodes
// the shared load bus: fill_lp_we with fill_lp_sel loads one logic
// processor's control store, fill_mp_cs_we / fill_mp_ms_we with fill_mp_sel
// load one memory processor's control or memory store, all at fill_addr, and
// only while fill_mod_en is high. Logic processors take the low CW_LP bits of
// fill_data. Timing is that of the processors (see logic_processor).
module emulation_module
  import emu_pkg::*;
#(
  parameter int unsigned M = LUT_M,
  parameter int unsigned N = STEPS_N,
  parameter int unsigned Q = WORD_Q,
  parameter int unsigned R = NUM_LP,
  parameter int unsigned S = NUM_MP,
  parameter int unsigned P = R + Q * S,
  parameter int unsigned FW = (lp_cw_width(M, N, P) > mp_cw_width(Q, N, P)) ?
                              lp_cw_width(M, N, P) : mp_cw_width(Q, N, P)
) (
  input  logic                          clk,
  input  logic                          run,
  input  logic [$clog2(N)-1:0]          step,
  input  logic [P-1:0]                  mod_ext_in,
  input  logic [P-1:0]                  use_ext,
  output logic [P-1:0]                  mod_out,
  input  logic                          fill_mod_en,
  input  logic [$clog2(R)-1:0]          fill_lp_sel,
  input  logic [(S>1?$clog2(S):1)-1:0]  fill_mp_sel,
  input  logic                          fill_lp_we,
  input  logic                          fill_mp_cs_we,
  input  logic                          fill_mp_ms_we,
  input  logic [$clog2(N)-1:0]          fill_addr,
  input  logic [FW-1:0]                 fill_data
);

  localparam int unsigned PW    = $clog2(P);
  localparam int unsigned CW_LP = lp_cw_width(M, N, P);
  localparam int unsigned CW_MP = mp_cw_width(Q, N, P);

  logic [PW-1:0] choose [P];
  logic [P-1:0]  proc_in;
  logic [R-1:0]  lp_cs_we;
  logic [S-1:0]  mp_cs_we, mp_ms_we;

  sequential_filler #(.R(R), .S(S)) u_filler (
    .mod_en(fill_mod_en), .lp_sel(fill_lp_sel), .mp_sel(fill_mp_sel),
    .lp_we(fill_lp_we), .mp_cs_we(fill_mp_cs_we), .mp_ms_we(fill_mp_ms_we),
    .lp_cs_we(lp_cs_we), .mp_cs_we_o(mp_cs_we), .mp_ms_we_o(mp_ms_we)
  );

  for (genvar r = 0; r < R; r++) begin : g_lp
    logic_processor #(.M(M), .N(N), .P(P)) u_lp (
      .clk(clk), .run(run), .step(step),
      .ext_in(proc_in[r]), .choose_input(choose[r]), .logic_out(mod_out[r]),
      .fill_we(lp_cs_we[r]), .fill_addr(fill_addr), .fill_data(fill_data[CW_LP-1:0])
    );
  end

  for (genvar s = 0; s < S; s++) begin : g_mp
    logic [PW-1:0] mp_choose [Q];
    memory_processor #(.Q(Q), .N(N), .P(P)) u_mp (
      .clk(clk), .run(run), .step(step),
      .cap_in(proc_in[R + s*Q +: Q]), .choose(mp_choose), .mem_out(mod_out[R + s*Q +: Q]),
      .fill_cs_we(mp_cs_we[s]), .fill_ms_we(mp_ms_we[s]),
      .fill_addr(fill_addr), .fill_data(fill_data[CW_MP-1:0])
    );
    for (genvar q = 0; q < Q; q++) begin : g_ch
      assign choose[R + s*Q + q] = mp_choose[q];
    end
  end

  module_switch #(.P(P)) u_switch (
    .proc_out(mod_out), .choose(choose), .mod_ext_in(mod_ext_in),
    .use_ext(use_ext), .proc_in(proc_in)
  );

endmodule
