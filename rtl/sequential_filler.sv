// sequential_filler: steers the shared load port to one processor at a time.
//
// A chip has too few pins to load every control and memory store at once, so
// one shared load bus (address and data) is broadcast and this decoder turns
// the logic-processor and memory-processor selects into one-hot write
// enables. mod_en gates the whole module so that a chip-level module select
// can share the bus among modules. Used only before emulation; purely
// combinational.
module sequential_filler #(
  parameter int unsigned R = 32,
  parameter int unsigned S = 4
) (
  input  logic                          mod_en,
  input  logic [$clog2(R)-1:0]          lp_sel,
  input  logic [(S>1?$clog2(S):1)-1:0]  mp_sel,
  input  logic                          lp_we,      // load an LP control store
  input  logic                          mp_cs_we,   // load an MP control store
  input  logic                          mp_ms_we,   // load an MP memory store
  output logic [R-1:0]                  lp_cs_we,
  output logic [S-1:0]                  mp_cs_we_o,
  output logic [S-1:0]                  mp_ms_we_o
);

  always_comb begin
    lp_cs_we   = '0;
    mp_cs_we_o = '0;
    mp_ms_we_o = '0;
    for (int r = 0; r < R; r++)
      lp_cs_we[r] = mod_en && lp_we && (lp_sel == r[$clog2(R)-1:0]);
    for (int s = 0; s < S; s++) begin
      mp_cs_we_o[s] = mod_en && mp_cs_we && (int'(mp_sel) == s);
      mp_ms_we_o[s] = mod_en && mp_ms_we && (int'(mp_sel) == s);
    end
  end

endmodule
