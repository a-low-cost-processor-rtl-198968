// tb_chip_capacity: fills a full-size emulation chip (default parameters) to
// capacity with random programs and compares it, step by step, with a
// reference model of the whole chip written independently of the RTL.
//
// Capacity exercised: all 96 logic processors evaluate a random 4-input
// function in each of the 128 steps of a design cycle (12,288 lookup-table
// evaluations per design cycle, the chip's whole logic capacity); all 12
// memory processors access one word in every step, and over the test every
// one of the 12 x 128 words (12,288 memory bits) is both written and read;
// every routing select entry of every step is random.
//
// Phases:
//   1. Every memory store is preloaded with random words over the load bus.
//   2. A clearing program (all words zero: lookup tables of constant 0,
//      ChooseInput 0, no external paths) runs for one design cycle, so every
//      data stack holds 0 and the model knows the whole state.
//   3. Random program A (random control words and routing selects; each
//      memory processor visits its 128 words in a random odd-stride order and
//      reads or writes at random) runs for two design cycles.
//   4. Program B - the same but with every read/write bit inverted and new
//      random logic words and selects - is loaded with run = 0, which must
//      leave stacks and memory untouched, and runs for two design cycles.
//      Words that program A only wrote are now read, and vice versa.
// Chip inputs change at random at the start of every step. The model works
// from the control words: in step n each LP reads its stacks (entries below n
// from this design cycle, the rest from the last one), each MP reading
// replaces its held output word, every module input slot and chip output is
// formed from the routing selects, and at the end of the step the stacks and
// written memory words are updated. After the rising edge of every step the
// three modules' 64-bit output networks and the 64 chip outputs must equal
// the model.
module tb_chip_capacity;
  import emu_pkg::*;
  localparam int N = STEPS_N, T = NUM_MOD, R = NUM_LP, S = NUM_MP, P = OUTS_P;
  localparam int Q = WORD_Q;
  localparam int NE = T * P + P;

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
  int n_lut = 0, n_mp_rd = 0, n_mp_wr = 0, n_ext_route = 0, n_cycles = 0;
  bit word_read [T][S][N], word_written [T][S][N];

  // Program image.
  logic [53:0] lpw [T][R][N];
  logic [55:0] mpw [T][S][N];
  logic [2:0]  rte [N][NE];

  // Model state.
  bit         istk [T][R][N], estk [T][R][N];
  logic [7:0] mem  [T][S][N];
  logic [7:0] hold [T][S];
  logic [P-1:0] mout [T], min [T];
  logic [P-1:0] eout;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_clear();
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < R; r++) for (int s = 0; s < N; s++) lpw[t][r][s] = '0;
      for (int m = 0; m < S; m++) for (int s = 0; s < N; s++) mpw[t][m][s] = '0;
    end
    for (int s = 0; s < N; s++) for (int e = 0; e < NE; e++) rte[s][e] = '0;
  endtask

  // Random program; flip inverts the read/write pattern of the last one.
  int stride [T][S], offs [T][S];
  bit wr_pat [T][S][N];
  task automatic make_random(bit flip);
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < R; r++)
        for (int s = 0; s < N; s++) lpw[t][r][s] = 54'({$urandom, $urandom});
      for (int m = 0; m < S; m++) begin
        if (!flip) begin
          stride[t][m] = 2 * ($urandom % 64) + 1;
          offs[t][m] = $urandom % N;
          for (int s = 0; s < N; s++) wr_pat[t][m][s] = 1'($urandom);
        end else
          for (int s = 0; s < N; s++) wr_pat[t][m][s] = !wr_pat[t][m][s];
        for (int s = 0; s < N; s++) begin
          logic [47:0] ci;
          ci = 48'({$urandom, $urandom});
          mpw[t][m][s] = {7'((stride[t][m] * s + offs[t][m]) % N), wr_pat[t][m][s], ci};
        end
      end
    end
    for (int s = 0; s < N; s++) for (int e = 0; e < NE; e++) rte[s][e] = 3'($urandom);
  endtask

  task automatic load_program();
    run = 1'b0;
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < R; r++)
        for (int s = 0; s < N; s++) begin
          @(posedge clk); #1;
          fill_mod = 2'(t); fill_lp_sel = 5'(r); fill_addr = 7'(s);
          fill_data = {2'b00, lpw[t][r][s]}; fill_lp_we = 1'b1;
        end
      @(posedge clk); #1; fill_lp_we = 1'b0;
      for (int m = 0; m < S; m++)
        for (int s = 0; s < N; s++) begin
          @(posedge clk); #1;
          fill_mod = 2'(t); fill_mp_sel = 2'(m); fill_addr = 7'(s);
          fill_data = mpw[t][m][s]; fill_mp_cs_we = 1'b1;
        end
      @(posedge clk); #1; fill_mp_cs_we = 1'b0;
    end
    for (int s = 0; s < N; s++)
      for (int e = 0; e < NE; e++) begin
        @(posedge clk); #1;
        fill_addr = 7'(s); fill_route_idx = 8'(e);
        fill_route_sel = route_sel_t'(rte[s][e]); fill_route_we = 1'b1;
      end
    @(posedge clk); #1; fill_route_we = 1'b0;
  endtask

  task automatic preload_memory();
    for (int t = 0; t < T; t++)
      for (int m = 0; m < S; m++)
        for (int a = 0; a < N; a++) begin
          @(posedge clk); #1;
          mem[t][m][a] = 8'($urandom);
          fill_mod = 2'(t); fill_mp_sel = 2'(m); fill_addr = 7'(a);
          fill_data = {48'h0, mem[t][m][a]}; fill_mp_ms_we = 1'b1;
        end
    @(posedge clk); #1; fill_mp_ms_we = 1'b0;
  endtask

  // Model of step n, up to the values on the networks (high phase).
  function automatic void model_step(int n, bit count);
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < R; r++) begin
        logic [53:0] w;
        logic [3:0] idx;
        w = lpw[t][r][n];
        for (int k = 0; k < 4; k++) begin
          int a;
          a = int'(w[30 - 8*k -: 7]);
          idx[k] = w[31 - 8*k] ? estk[t][r][a] : istk[t][r][a];
        end
        mout[t][r] = w[32 + int'(idx)];
        if (count) n_lut++;
      end
      for (int m = 0; m < S; m++) begin
        logic [55:0] w;
        w = mpw[t][m][n];
        if (!w[48]) begin
          hold[t][m] = mem[t][m][int'(w[55:49])];
          if (count) begin
            n_mp_rd++;
            word_read[t][m][int'(w[55:49])] = 1;
          end
        end
        for (int q = 0; q < Q; q++) mout[t][R + m*Q + q] = hold[t][m][q];
      end
    end
    for (int t = 0; t < T; t++)
      for (int j = 0; j < P; j++) begin
        int ch;
        logic [2:0] e;
        logic chip_bit;
        if (j < R) ch = int'(lpw[t][j][n][53:48]);
        else       ch = int'(mpw[t][(j - R) / Q][n][47 - 6*((j - R) % Q) -: 6]);
        e = rte[n][t*P + j];
        case (e[1:0])
          2'd0:    chip_bit = mout[(t + 1) % T][j];
          2'd1:    chip_bit = mout[(t + 2) % T][j];
          2'd2:    chip_bit = ext_in[j];
          default: chip_bit = ext_in[(j + 1) % P];
        endcase
        min[t][j] = e[2] ? chip_bit : mout[t][ch];
      end
    for (int j = 0; j < P; j++) begin
      logic [2:0] e;
      e = rte[n][T*P + j];
      eout[j] = (e[1:0] == 2'd3) ? ext_in[j] : mout[int'(e[1:0])][j];
      if (count && e[1:0] == 2'd3) n_ext_route++;
    end
  endfunction

  // Model of the writes at the falling edge that closes step n.
  function automatic void model_commit(int n, bit count);
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < R; r++) begin
        istk[t][r][n] = mout[t][r];
        estk[t][r][n] = min[t][r];
      end
      for (int m = 0; m < S; m++)
        if (mpw[t][m][n][48]) begin
          int a;
          a = int'(mpw[t][m][n][55:49]);
          for (int q = 0; q < Q; q++) mem[t][m][a][q] = min[t][R + m*Q + q];
          if (count) begin
            n_mp_wr++;
            word_written[t][m][a] = 1;
          end
        end
    end
  endfunction

  // One design cycle of 128 steps; run must already be 1.
  task automatic design_cycle(bit check);
    for (int n = 0; n < N; n++) begin
      @(negedge clk); #1;
      if (check) ext_in = {$urandom, $urandom};
      model_step(n, check);
      @(posedge clk); #1;
      if (check) begin
        for (int t = 0; t < T; t++) begin
          checks++;
          if (dut.mod_out[t] !== mout[t]) begin
            failures++;
            if (failures < 10)
              $display("step %0d module %0d: network %h, model %h", n, t, dut.mod_out[t], mout[t]);
          end
        end
        checks++;
        if (ext_out !== eout) begin
          failures++;
          if (failures < 10) $display("step %0d: chip outputs %h, model %h", n, ext_out, eout);
        end
      end
      model_commit(n, check);
    end
    n_cycles++;
  endtask

  task automatic run_cycles(int count, bit check);
    @(posedge clk); #1;
    run = 1'b1;
    for (int c = 0; c < count; c++) design_cycle(check);
    run = 1'b0;
  endtask

  initial begin
    int words_rw;
    fill_route_sel = '0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    preload_memory();
    make_clear();
    load_program();
    run_cycles(1, 1'b0);
    // The clearing program leaves all stacks at 0 and every MP holding
    // word 0, which it read in the last step.
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < R; r++)
        for (int s = 0; s < N; s++) begin istk[t][r][s] = 0; estk[t][r][s] = 0; end
      for (int m = 0; m < S; m++) hold[t][m] = mem[t][m][0];
    end
    make_random(1'b0);
    load_program();
    run_cycles(2, 1'b1);
    make_random(1'b1);
    load_program();
    run_cycles(2, 1'b1);
    words_rw = 0;
    for (int t = 0; t < T; t++)
      for (int m = 0; m < S; m++)
        for (int a = 0; a < N; a++) if (word_read[t][m][a] && word_written[t][m][a]) words_rw++;
    $display("capacity: lut_evaluations=%0d (%0d per design cycle) mp_reads=%0d mp_writes=%0d words_written_and_read=%0d of %0d chip_input_forwards=%0d design_cycles=%0d",
             n_lut, n_lut / 4, n_mp_rd, n_mp_wr, words_rw, T * S * N, n_ext_route, n_cycles);
    checks++;
    if (n_lut != 4 * T * R * N) failures++;
    checks++;
    if (words_rw != T * S * N) failures++;
    if (n_mp_rd == 0 || n_mp_wr == 0 || n_ext_route == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
