// emu_pkg: sizes, control-word layouts and helpers shared by the emulator RTL.
//
// The emulator is a processor-based logic emulator. Every emulation step each
// logic processor (LP) evaluates one M-input lookup table and each memory
// processor (MP) reads or writes one Q-bit word. A design clock cycle is N
// emulation steps. The defaults are the chosen parameter set of the reference
// implementation: M = 4, N = 128, Q = 8, P = 64 outputs per module made of
// R = 32 LPs and S = 4 MPs, and T = 3 modules per chip.
//
// Control-word widths follow the published formulas:
//   LP word = log2(P) + M + 2^M + M*log2(N)   (54 bits at the defaults)
//   MP word = log2(N) + 1 + Q*log2(P)         (56 bits at the defaults)
// Field order inside a word (most significant field first) follows the field
// tables: LP = ChooseInput | LUT | SelA RAA | ... | SelM RAM,
//         MP = MWA | W/R | CI1 | ... | CIQ.
// The bit-level placement inside each field is this design's own choice.
package emu_pkg;

  // Architecture defaults.
  localparam int unsigned LUT_M   = 4;    // lookup table inputs
  localparam int unsigned STEPS_N = 128;  // emulation steps per design cycle
  localparam int unsigned WORD_Q  = 8;    // memory word size
  localparam int unsigned NUM_LP  = 32;   // logic processors per module (R)
  localparam int unsigned NUM_MP  = 4;    // memory processors per module (S)
  localparam int unsigned NUM_MOD = 3;    // modules per chip (T)
  localparam int unsigned OUTS_P  = NUM_LP + WORD_Q * NUM_MP;  // 64

  // Operand source select inside an LP control word.
  typedef enum logic {
    SRC_INTERNAL = 1'b0,
    SRC_EXTERNAL = 1'b1
  } src_e;

  // Option of a chip-level 4-to-1 routing multiplexer that feeds input slot j
  // of module t: the same slot's output in the next or the one after next
  // module, or chip external input j or j+1.
  typedef enum logic [1:0] {
    RT_MOD_NEXT  = 2'd0,
    RT_MOD_NEXT2 = 2'd1,
    RT_EXT_J     = 2'd2,
    RT_EXT_J1    = 2'd3
  } route_opt_e;

  // One entry of the chip routing select store: for a module input slot,
  // use_ext picks the chip-level path over the module switch.
  typedef struct packed {
    logic       use_ext;
    route_opt_e opt;
  } route_sel_t;

  // Width of an LP control word.
  function automatic int unsigned lp_cw_width(int unsigned m, int unsigned n, int unsigned p);
    return $clog2(p) + m + (1 << m) + m * $clog2(n);
  endfunction

  // Width of an MP control word.
  function automatic int unsigned mp_cw_width(int unsigned q, int unsigned n, int unsigned p);
    return $clog2(n) + 1 + q * $clog2(p);
  endfunction

  // Bit offset of operand k's {Sel, RA} field in an LP control word
  // (operand 0 = A sits just below the LUT field).
  // sw is the step-address width log2(N).
  function automatic int unsigned lp_opnd_lsb(int unsigned k, int unsigned m, int unsigned sw);
    return (m - 1 - k) * (1 + sw);
  endfunction

  // Bit offset of the CI field of memory-word bit q (q = 0 is CI1).
  // pw is the select width log2(P).
  function automatic int unsigned mp_ci_lsb(int unsigned q, int unsigned qw, int unsigned pw);
    return (qw - 1 - q) * pw;
  endfunction

endpackage
