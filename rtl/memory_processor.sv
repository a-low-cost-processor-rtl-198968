// memory_processor: emulates memory, one word read or write per emulation step.
//
// Made of a control store, a memory store (N words of Q bits), a capture
// memory word unit and a release memory word unit. Control word fields:
// MWA (word address), W/R (1 write, 0 read) and CI1..CIQ, the network output
// each of the Q word bits is taken from. The CI fields leave the processor as
// choose[q] and steer the module routing switch, which returns the selected
// bits on cap_in.
//
// Timing of emulation step n:
//   falling edge (opens step n): control word n is read; the run flag is
//     latched.
//   rising edge: for a read, word MWA is read; the release unit drives its Q
//     bits on mem_out, where they stay until the next read.
//   falling edge (closes step n): for a write, the capture unit assembles the
//     Q bits of cap_in (bit q selected by CI(q+1)) into a word that is written
//     at MWA.
// Before emulation (run = 0) fill_cs_we loads the control store and
// fill_ms_we loads the memory store (low Q bits of fill_data); both share
// fill_addr.
module memory_processor
  import emu_pkg::*;
#(
  parameter int unsigned Q  = WORD_Q,
  parameter int unsigned N  = STEPS_N,
  parameter int unsigned P  = OUTS_P,
  parameter int unsigned CW = mp_cw_width(Q, N, P)
) (
  input  logic                 clk,
  input  logic                 run,
  input  logic [$clog2(N)-1:0] step,
  input  logic [Q-1:0]         cap_in,
  output logic [$clog2(P)-1:0] choose [Q],
  output logic [Q-1:0]         mem_out,
  input  logic                 fill_cs_we,
  input  logic                 fill_ms_we,
  input  logic [$clog2(N)-1:0] fill_addr,
  input  logic [CW-1:0]        fill_data
);

  localparam int unsigned SW = $clog2(N);
  localparam int unsigned PW = $clog2(P);

  logic [CW-1:0] cw;
  logic          active_q;
  logic [SW-1:0] mwa;
  logic          wr;
  logic [Q-1:0]  cap_word;
  logic          ms_we;
  logic [SW-1:0] ms_waddr;
  logic [Q-1:0]  ms_wdata;

  control_store #(.DEPTH(N), .WIDTH(CW)) u_cs (
    .clk(clk), .raddr(step), .rdata(cw),
    .fill_we(fill_cs_we), .fill_addr(fill_addr), .fill_data(fill_data)
  );

  always_ff @(negedge clk) active_q <= run;

  always_comb begin
    mwa = cw[CW-1 -: SW];
    wr  = cw[CW-1-SW];
    for (int q = 0; q < Q; q++) choose[q] = cw[mp_ci_lsb(q, Q, PW) +: PW];
  end

  // Capture memory word unit: bit q of the word is the network bit chosen by
  // CI(q+1).
  always_comb begin
    for (int q = 0; q < Q; q++) cap_word[q] = cap_in[q];
  end

  // Write port: emulation writes, or the pre-emulation load.
  always_comb begin
    ms_we    = (active_q && wr) || fill_ms_we;
    ms_waddr = fill_ms_we ? fill_addr : mwa;
    ms_wdata = fill_ms_we ? fill_data[Q-1:0] : cap_word;
  end

  // Release memory word unit: the read word is held in the store's output
  // register and broken up into Q single-bit network outputs.
  memory_store #(.DEPTH(N), .WIDTH(Q)) u_ms (
    .clk(clk), .re(active_q && !wr), .raddr(mwa), .rdata(mem_out),
    .we(ms_we), .waddr(ms_waddr), .wdata(ms_wdata)
  );

endmodule
