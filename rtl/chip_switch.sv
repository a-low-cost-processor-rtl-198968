// chip_switch: chip level routing switch with its per-step select store.
//
// Connects the T modules, the chip's external inputs and its external outputs.
// It holds one 4-to-1 multiplexer for every module input slot and one for
// every external output:
//   module t, slot j : output j of module (t+1) mod T, output j of module
//                      (t+2) mod T, external input j, external input j+1
//                      (mod P) - options 0..3 of route_opt_e.
//   external output j: output j of module 0, 1 or 2 (options 0..2, for the
//                      modules that exist), or external input j (option 3),
//                      which lets a chip forward a signal between two others.
// Each module slot also has a use_ext bit telling the module to take the
// chip-level bit instead of its own network for that slot.
//
// The selects can change every emulation step: a select store of N words
// (one per step, T*P + P entries of 3 bits each, kept in large RAM in the
// reference implementation) is read on the rising edge in the middle of each
// step, so the new routing settles before the processors write at the falling
// edge that closes the step. The step being run is latched on the falling
// edge that opens it. Before emulation the store is loaded entry by entry
// through fill_we / fill_step / fill_idx / fill_sel (on the falling edge);
// entry index t*P + j is module t slot j, T*P + j is external output j (its
// use_ext bit is not used).
module chip_switch
  import emu_pkg::*;
#(
  parameter int unsigned T = NUM_MOD,
  parameter int unsigned P = OUTS_P,
  parameter int unsigned N = STEPS_N,
  parameter int unsigned NE = T * P + P
) (
  input  logic                  clk,
  input  logic [$clog2(N)-1:0]  step,
  input  logic [P-1:0]          mod_out    [T],
  output logic [P-1:0]          mod_ext_in [T],
  output logic [P-1:0]          use_ext    [T],
  input  logic [P-1:0]          ext_in,
  output logic [P-1:0]          ext_out,
  input  logic                  fill_we,
  input  logic [$clog2(N)-1:0]  fill_step,
  input  logic [$clog2(NE)-1:0] fill_idx,
  input  route_sel_t            fill_sel
);

  localparam int unsigned EW = $bits(route_sel_t);

  logic [NE*EW-1:0]     sel_mem [N];
  logic [NE*EW-1:0]     sel_q;
  logic [$clog2(N)-1:0] step_q;

  always_ff @(negedge clk) begin
    step_q <= step;
    if (fill_we) sel_mem[fill_step][fill_idx*EW +: EW] <= fill_sel;
  end

  always_ff @(posedge clk) sel_q <= sel_mem[step_q];

  always_comb begin
    for (int t = 0; t < T; t++) begin
      for (int j = 0; j < P; j++) begin
        route_sel_t e;
        e = route_sel_t'(sel_q[(t*P + j)*EW +: EW]);
        use_ext[t][j] = e.use_ext;
        unique case (e.opt)
          RT_MOD_NEXT:  mod_ext_in[t][j] = mod_out[(t+1) % T][j];
          RT_MOD_NEXT2: mod_ext_in[t][j] = mod_out[(t+2) % T][j];
          RT_EXT_J:     mod_ext_in[t][j] = ext_in[j];
          default:      mod_ext_in[t][j] = ext_in[(j+1) % P];
        endcase
      end
    end
    // External outputs use only the option bits of their entry.
    for (int j = 0; j < P; j++) begin
      route_opt_e o;
      o = route_opt_e'(sel_q[(T*P + j)*EW +: $bits(route_opt_e)]);
      if (o == RT_EXT_J1)             ext_out[j] = ext_in[j];
      else if (int'(o) < int'(T))     ext_out[j] = mod_out[int'(o)][j];
      else                            ext_out[j] = 1'b0;
    end
  end

endmodule
