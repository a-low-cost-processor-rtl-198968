// tb_emulation_chip: end-to-end run of a full-size emulation chip (default
// parameters) emulating a 4-bit x 4-bit array multiplier.
//
// The testbench acts as the emulation compiler. It builds the multiplier as a
// gate netlist (16 AND gates, then three rows of half and full adders made of
// XOR and majority lookup tables), schedules one gate per emulation step
// round-robin on logic processors 0..7 of module 0, and writes the control
// words: an operand made on the same processor is read from the internal
// stack; an operand made elsewhere is captured into the consumer's external
// stack, through the module routing switch, in the step that produced it.
//   step 0      LPs 0..7 capture the multiplier inputs from chip external
//               inputs (A on 0..3, B0..B2 on 4..6, B3 on 8 via the "input
//               j+1" option).
//   steps 1..8  each of those LPs re-emits its input so others can capture it.
//   steps 9..48 the 40 gates.
//   step 49     LPs 0..7 each re-emit one product bit; memory processor 0 of
//               module 0 writes the 8 bits as one word (address 5).
//   step 50     memory processor 0 reads word 5: the product appears on its
//               outputs, routed to chip outputs 32..39, and stays there.
// Other mechanisms in the same program: module 1 LP 0 and module 2 LP 1
// capture product bits from module 0 across the chip switch in step 49 and
// drive them (inverted / as is) to chip outputs 0 and 1 in step 50;
// chip output 9 forwards chip input 9; memory processor 1 of module 0 reads a
// preloaded word onto chip outputs 40..47; module 2 LP 2 emulates a toggle
// flip-flop by reading, in step 5, the value it stored at step 5 in the
// previous design cycle, shown on chip output 2. All 256 input pairs are run, with
// design cycles of 128, 64 and 51 steps. Every step the step counter is
// checked, and the number of emulation clocks per design cycle must be
// last_step + 1.
module tb_emulation_chip;
  import emu_pkg::*;
  localparam int N = STEPS_N, T = NUM_MOD, R = NUM_LP, S = NUM_MP, P = OUTS_P;
  localparam int NE = T * P + P;
  localparam int W = 49;  // copy/write step; the read step is W+1

  logic clk = 1'b1, rst = 1'b1, run = 1'b0;
  logic [6:0] last_step = 7'd127;
  logic [P-1:0] ext_in = '0, ext_out;
  logic [6:0] step;
  logic cycle_end, design_clk;
  logic [1:0] fill_mod = '0;
  logic [4:0] fill_lp_sel = '0;
  logic [1:0] fill_mp_sel = '0;
  logic fill_lp_we = 1'b0, fill_mp_cs_we = 1'b0, fill_mp_ms_we = 1'b0;
  logic [6:0] fill_addr = '0;
  logic [55:0] fill_data = '0;
  logic fill_route_we = 1'b0;
  logic [7:0] fill_route_idx = '0;
  route_sel_t fill_route_sel;

  emulation_chip dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Compiler image.
  logic [53:0] lpw [T][R][N];
  logic [55:0] mpw [T][S][N];
  logic [2:0]  rte [N][NE];
  int nproc [64], nstep [64];
  int nnodes = 0, next_step = 0, gate_count = 0;

  // Mechanism counters.
  int n_int_opnd = 0, n_ext_opnd = 0, n_mod_capture = 0, n_chip_in_capture = 0;
  int n_cross_mod = 0, n_mp_write = 0, n_mp_read = 0, n_fwd = 0, n_rom = 0;
  int n_cycles [3];
  int n_toggle = 0;
  logic ff_prev;
  bit ff_seen = 0;

  // Memory processor 0 of module 0 as seen from inside: count its emulation
  // writes (falling edge) and reads (rising edge).
  always @(negedge clk)
    if (dut.g_mod[0].u_mod.g_mp[0].u_mp.active_q && dut.g_mod[0].u_mod.g_mp[0].u_mp.wr)
      n_mp_write++;

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int K_BUF = 0, K_NOT = 1, K_AND = 2, K_XOR2 = 3, K_XOR3 = 4, K_MAJ = 5;

  function automatic logic [15:0] lut_of(int kind);
    logic [15:0] t;
    for (int i = 0; i < 16; i++) begin
      logic a, b, c;
      a = i[0]; b = i[1]; c = i[2];
      case (kind)
        K_BUF:  t[i] = a;
        K_NOT:  t[i] = !a;
        K_AND:  t[i] = a & b;
        K_XOR2: t[i] = a ^ b;
        K_XOR3: t[i] = a ^ b ^ c;
        default: t[i] = (a & b) | (a & c) | (b & c);
      endcase
    end
    return t;
  endfunction

  // Set operand k of word (m, p, s): {Sel, RA} at bits 31-8k .. 24-8k.
  function automatic void set_opnd(int m, int p, int s, int k, bit ext, int addr);
    lpw[m][p][s][31 - 8*k] = ext;
    lpw[m][p][s][30 - 8*k -: 7] = 7'(addr);
  endfunction

  // Make operand k of processor p's step s read node nd, arranging the
  // capture when nd lives on another processor of module 0.
  function automatic void use_node(int p, int s, int k, int nd);
    if (nproc[nd] == p) begin
      set_opnd(0, p, s, k, 1'b0, nstep[nd]);
      n_int_opnd++;
    end else begin
      set_opnd(0, p, s, k, 1'b1, nstep[nd]);
      lpw[0][p][nstep[nd]][53:48] = 6'(nproc[nd]);
      n_ext_opnd++;
      n_mod_capture++;
    end
  endfunction

  function automatic int gate(int kind, int a, int b = -1, int c = -1);
    int p, s;
    p = gate_count % 8;
    s = next_step;
    gate_count++;
    next_step++;
    lpw[0][p][s][47:32] = lut_of(kind);
    use_node(p, s, 0, a);
    if (b >= 0) use_node(p, s, 1, b);
    if (c >= 0) use_node(p, s, 2, c);
    nproc[nnodes] = p;
    nstep[nnodes] = s;
    nnodes++;
    return nnodes - 1;
  endfunction

  int a_nd [4], b_nd [4], prod [8];

  task automatic compile();
    int pp [4][4];
    int r [4], top;
    for (int m = 0; m < T; m++) begin
      for (int p = 0; p < R; p++) for (int s = 0; s < N; s++) lpw[m][p][s] = '0;
      for (int q = 0; q < S; q++) for (int s = 0; s < N; s++) mpw[m][q][s] = '0;
    end
    for (int s = 0; s < N; s++) for (int e = 0; e < NE; e++) rte[s][e] = '0;
    // Step 0: capture the primary inputs from the chip pins.
    for (int k = 0; k < 8; k++) begin
      rte[0][k] = (k == 7) ? {1'b1, RT_EXT_J1} : {1'b1, RT_EXT_J};
      n_chip_in_capture++;
    end
    // Steps 1..8: re-emit them.
    for (int k = 0; k < 8; k++) begin
      lpw[0][k][1 + k][47:32] = lut_of(K_BUF);
      set_opnd(0, k, 1 + k, 0, 1'b1, 0);
      n_ext_opnd++;
      nproc[nnodes] = k; nstep[nnodes] = 1 + k; nnodes++;
    end
    for (int k = 0; k < 4; k++) begin a_nd[k] = k; b_nd[k] = 4 + k; end
    next_step = 9;
    // Partial products pp[i][j] = A[j] & B[i].
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) pp[i][j] = gate(K_AND, a_nd[j], b_nd[i]);
    // Rows of adders.
    for (int j = 0; j < 4; j++) r[j] = pp[0][j];
    prod[0] = r[0];
    top = -1;
    for (int i = 1; i < 4; i++) begin
      int x [4], nr [4], c;
      x[0] = r[1]; x[1] = r[2]; x[2] = r[3]; x[3] = top;
      // bit 0: half adder
      nr[0] = gate(K_XOR2, x[0], pp[i][0]);
      c = gate(K_AND, x[0], pp[i][0]);
      for (int j = 1; j < 4; j++) begin
        if (x[j] >= 0) begin
          nr[j] = gate(K_XOR3, x[j], pp[i][j], c);
          c = gate(K_MAJ, x[j], pp[i][j], c);
        end else begin
          nr[j] = gate(K_XOR2, pp[i][j], c);
          c = gate(K_AND, pp[i][j], c);
        end
      end
      prod[i] = nr[0];
      for (int j = 0; j < 4; j++) r[j] = nr[j];
      top = c;
    end
    prod[4] = r[1]; prod[5] = r[2]; prod[6] = r[3]; prod[7] = top;
    if (next_step != W) $display("schedule ends at step %0d, expected %0d", next_step, W);
    // Step W: LPs 0..7 re-emit product bits; MP0 writes them at word 5.
    for (int q = 0; q < 8; q++) begin
      lpw[0][q][W][47:32] = lut_of(K_BUF);
      use_node(q, W, 0, prod[q]);
    end
    for (int s = 0; s < N; s++) mpw[0][0][s] = {7'd5, 1'b0, 48'h0};
    begin
      logic [47:0] ci;
      for (int q = 0; q < 8; q++) ci[47 - 6*q -: 6] = 6'(q);
      mpw[0][0][W] = {7'd5, 1'b1, ci};
    end
    // MP1 reads preloaded word 3 in every step.
    for (int s = 0; s < N; s++) mpw[0][1][s] = {7'd3, 1'b0, 48'h0};
    // Cross-module: module 1 slot 0 takes module 0 slot 0 (option "module
    // after next"), module 2 slot 1 takes module 0 slot 1 (option "next").
    rte[W][1*P + 0] = {1'b1, RT_MOD_NEXT2};
    rte[W][2*P + 1] = {1'b1, RT_MOD_NEXT};
    lpw[1][0][W + 1][47:32] = lut_of(K_NOT);
    lpw[1][0][W + 1][31:24] = {1'b1, 7'(W)};
    lpw[2][1][W + 1][47:32] = lut_of(K_BUF);
    lpw[2][1][W + 1][31:24] = {1'b1, 7'(W)};
    rte[W + 1][T*P + 0] = {1'b0, 2'd1};   // chip out 0 <- module 1
    rte[W + 1][T*P + 1] = {1'b0, 2'd2};   // chip out 1 <- module 2
    for (int s = 0; s < N; s++) rte[s][T*P + 9] = {1'b0, 2'd3};  // forward input 9
    // Sequential logic: module 2 LP 2 is a toggle flip-flop. In step 5 it
    // inverts what it wrote at address 5 one design cycle earlier; chip
    // output 2 shows it in that step.
    lpw[2][2][5][47:32] = lut_of(K_NOT);
    lpw[2][2][5][31:24] = {1'b0, 7'd5};
    rte[5][T*P + 2] = {1'b0, 2'd2};
  endtask

  task automatic load();
    run = 1'b0;
    for (int m = 0; m < T; m++) begin
      for (int p = 0; p < R; p++)
        for (int s = 0; s < N; s++) begin
          @(posedge clk); #1;
          fill_mod = 2'(m); fill_lp_sel = 5'(p); fill_addr = 7'(s);
          fill_data = {2'b00, lpw[m][p][s]}; fill_lp_we = 1'b1;
        end
      @(posedge clk); #1; fill_lp_we = 1'b0;
      for (int q = 0; q < S; q++)
        for (int s = 0; s < N; s++) begin
          @(posedge clk); #1;
          fill_mod = 2'(m); fill_mp_sel = 2'(q); fill_addr = 7'(s);
          fill_data = mpw[m][q][s]; fill_mp_cs_we = 1'b1;
        end
      @(posedge clk); #1; fill_mp_cs_we = 1'b0;
    end
    // Memory store of module 0 MP1: word 3 = A5.
    @(posedge clk); #1;
    fill_mod = 2'd0; fill_mp_sel = 2'd1; fill_addr = 7'd3; fill_data = 56'hA5;
    fill_mp_ms_we = 1'b1;
    @(posedge clk); #1; fill_mp_ms_we = 1'b0;
    for (int s = 0; s < N; s++)
      for (int e = 0; e < NE; e++) begin
        @(posedge clk); #1;
        fill_addr = 7'(s); fill_route_idx = 8'(e);
        fill_route_sel = route_sel_t'(rte[s][e]); fill_route_we = 1'b1;
      end
    @(posedge clk); #1; fill_route_we = 1'b0;
  endtask

  task automatic set_inputs(logic [3:0] a, logic [3:0] b);
    ext_in[3:0] = a;
    ext_in[6:4] = b[2:0];
    ext_in[8]   = b[3];
    ext_in[7]   = !b[3];   // decoy: the LP reading B3 must take input j+1
    ext_in[9]   = 1'($urandom);
  endtask

  // Run one design cycle whose inputs were set beforehand; check on the way.
  task automatic design_cycle(int ls, logic [3:0] a, logic [3:0] b, int li);
    int clocks;
    clocks = 0;
    for (int n = 0; n <= ls; n++) begin
      @(negedge clk); #1;      // opens step n
      clocks++;
      checks++;
      if (int'(step) != ((n == ls) ? 0 : n + 1)) begin
        failures++;
        $display("step counter %0d in step %0d", step, n);
      end
      @(posedge clk); #1;
      checks++;
      if (ext_out[9] !== ext_in[9]) failures++; else n_fwd++;
      checks++;
      if (ext_out[47:40] !== 8'hA5) failures++; else n_rom++;
      if (n == 5) begin
        if (ff_seen) begin
          checks++;
          if (ext_out[2] !== !ff_prev) begin
            failures++;
            $display("flip-flop did not toggle");
          end else n_toggle++;
        end
        ff_prev = ext_out[2];
        ff_seen = 1;
      end
      if (n == W + 1) begin
        logic [7:0] pr;
        pr = 8'(a * b);
        n_mp_read++;
        checks++;
        if (ext_out[0] !== !pr[0] || ext_out[1] !== pr[1]) begin
          failures++;
          $display("cross-module %h*%h: out %b%b", a, b, ext_out[1], ext_out[0]);
        end else n_cross_mod++;
      end
      if (n == ls) begin
        logic [7:0] pr;
        pr = 8'(a * b);
        checks++;
        if (ext_out[39:32] !== pr) begin
          failures++;
          $display("product %0d*%0d: got %0d", a, b, ext_out[39:32]);
        end
      end
      // cycle_end announces that the next falling edge opens the last step.
      checks++;
      if (cycle_end !== (n == ls - 1)) begin
        failures++;
        $display("cycle_end %b in step %0d", cycle_end, n);
      end
    end
    checks++;
    if (clocks != ls + 1) failures++;
    n_cycles[li]++;
  endtask

  initial begin
    int ls_list [3] = '{127, 63, W + 1};
    fill_route_sel = '0;
    foreach (n_cycles[i]) n_cycles[i] = 0;
    compile();
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    load();
    for (int li = 0; li < 3; li++) begin
      int first, last;
      last_step = 7'(ls_list[li]);
      first = (li == 0) ? 0 : (li == 1 ? 96 : 176);
      last  = (li == 0) ? 96 : (li == 1 ? 176 : 256);
      @(posedge clk); #1;
      run = 1'b0;
      @(negedge clk); #1;
      set_inputs(4'(first), 4'(first >> 4));
      @(posedge clk); #1;
      run = 1'b1;
      for (int v = first; v < last; v++) begin
        logic [3:0] a, b;
        a = 4'(v); b = 4'(v >> 4);
        fork
          design_cycle(ls_list[li], a, b, li);
          begin
            // New inputs during the last step, before the next capture.
            for (int n = 0; n < ls_list[li]; n++) @(negedge clk);
            @(posedge clk); #2;
            if (v + 1 < last) set_inputs(4'(v + 1), 4'((v + 1) >> 4));
          end
        join
      end
    end
    $display("mechanisms: int_opnd=%0d ext_opnd=%0d module_capture=%0d chip_in_capture=%0d cross_module=%0d mp_write=%0d mp_read=%0d forward=%0d preloaded_read=%0d toggles=%0d cycles128=%0d cycles64=%0d cycles51=%0d",
             n_int_opnd, n_ext_opnd, n_mod_capture, n_chip_in_capture, n_cross_mod,
             n_mp_write, n_mp_read, n_fwd, n_rom, n_toggle, n_cycles[0], n_cycles[1], n_cycles[2]);
    if (n_int_opnd == 0) failures++;
    if (n_ext_opnd == 0) failures++;
    if (n_mod_capture == 0) failures++;
    if (n_chip_in_capture == 0) failures++;
    if (n_cross_mod == 0) failures++;
    if (n_mp_write == 0) failures++;
    if (n_mp_read == 0) failures++;
    if (n_fwd == 0) failures++;
    if (n_rom == 0) failures++;
    if (n_toggle == 0) failures++;
    foreach (n_cycles[i]) if (n_cycles[i] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
