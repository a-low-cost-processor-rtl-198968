// tb_engine_relay: three full-size emulation chips (default parameters) wired
// in a line, A -> B -> C, the way chips on a multi-chip board that lack a
// direct link reach each other through an intermediate chip.
//
// Board wiring (this testbench's own, pin j to pin j): the testbench drives
// A's inputs; A's outputs drive B's inputs; B's outputs drive C's inputs.
// All chips share the emulation clock, run and last_step, so they step
// together. Design cycle of 4 steps (last_step = 3), lanes j = 0..7:
//   step 0  A: LP j of module 0 captures A input j (chip switch "input j").
//   step 1  A: LP j drives NOT of what it captured; A output j shows module 0.
//           B: output j forwards B input j (option "input j").
//           C: LP j of module 0 captures C input j - the value computed on A
//           in this same step, after crossing two chip boundaries.
//   step 2  C: LP j drives NOT of what it captured, shown on C output j.
// Lanes 8..15 are processed on the middle chip instead of forwarded: A's LP
// j captures A input j in step 0 and drives it as x in step 1 and as NOT x in
// step 2; B's LP j captures B input j in both steps and drives their XOR in
// step 3, which must be 1. This also shows that each capture takes the value
// of its own step.
// Checks per design cycle: B output j (lanes 0..7) is NOT x in step 1; C
// output j is x in step 2; B output j (lanes 8..15) is 1 in step 3. The three
// step counters must agree in every step. 500 random design cycles are run.
module tb_engine_relay;
  import emu_pkg::*;
  localparam int N = STEPS_N, T = NUM_MOD, R = NUM_LP, S = NUM_MP, P = OUTS_P;
  localparam int NE = T * P + P;
  localparam int NC = 3;  // chips A, B, C
  localparam int LAST = 3;

  logic clk = 1'b1, rst = 1'b1, run = 1'b0;
  logic [6:0] last_step = 7'(LAST);
  logic [P-1:0] a_in = '0;
  logic [P-1:0] ext_out [NC];
  logic [6:0] step [NC];
  logic cycle_end [NC], design_clk [NC];
  logic [1:0] fill_mod = '0;
  logic [4:0] fill_lp_sel = '0;
  logic [1:0] fill_mp_sel = '0;
  logic fill_lp_we [NC], fill_mp_cs_we [NC], fill_route_we [NC];
  logic [6:0] fill_addr = '0;
  logic [55:0] fill_data [NC];
  logic [7:0] fill_route_idx = '0;
  route_sel_t fill_route_sel [NC];

  for (genvar c = 0; c < NC; c++) begin : g_chip
    emulation_chip u_chip (
      .clk(clk), .rst(rst), .run(run), .last_step(last_step),
      .ext_in(c == 0 ? a_in : ext_out[c == 0 ? 0 : c - 1]), .ext_out(ext_out[c]),
      .step(step[c]), .cycle_end(cycle_end[c]), .design_clk(design_clk[c]),
      .fill_mod(fill_mod), .fill_lp_sel(fill_lp_sel), .fill_mp_sel(fill_mp_sel),
      .fill_lp_we(fill_lp_we[c]), .fill_mp_cs_we(fill_mp_cs_we[c]), .fill_mp_ms_we(1'b0),
      .fill_addr(fill_addr), .fill_data(fill_data[c]),
      .fill_route_we(fill_route_we[c]), .fill_route_idx(fill_route_idx),
      .fill_route_sel(fill_route_sel[c]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_two_hop = 0, n_mid_proc = 0, n_cycles = 0, n_lockstep = 0;

  logic [53:0] lpw [NC][T][R][N];
  logic [55:0] mpw [NC][T][S][N];
  logic [2:0]  rte [NC][N][NE];

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [15:0] LUT_NOT_A = 16'h5555;   // !operand A
  localparam logic [15:0] LUT_BUF_A = 16'hAAAA;   // operand A
  localparam logic [15:0] LUT_XOR_AB = 16'h6666;  // A ^ B

  task automatic compile();
    for (int c = 0; c < NC; c++) begin
      for (int t = 0; t < T; t++) begin
        for (int r = 0; r < R; r++) for (int s = 0; s < N; s++) lpw[c][t][r][s] = '0;
        for (int m = 0; m < S; m++) for (int s = 0; s < N; s++) mpw[c][t][m][s] = '0;
      end
      for (int s = 0; s < N; s++) for (int e = 0; e < NE; e++) rte[c][s][e] = '0;
    end
    for (int j = 0; j < 8; j++) begin
      // Chip A, lanes 0..7: capture in step 0, NOT in step 1.
      rte[0][0][j] = {1'b1, RT_EXT_J};
      lpw[0][0][j][1][47:32] = LUT_NOT_A;
      lpw[0][0][j][1][31:24] = {1'b1, 7'd0};
      // Chip B forwards lanes 0..7 in step 1.
      rte[1][1][T*P + j] = {1'b0, 2'd3};
      // Chip C captures them in step 1 and inverts them back in step 2.
      rte[2][1][j] = {1'b1, RT_EXT_J};
      lpw[2][0][j][2][47:32] = LUT_NOT_A;
      lpw[2][0][j][2][31:24] = {1'b1, 7'd1};
      // Lanes 8..15: A's LP captures in step 0, drives x in step 1 and NOT x
      // in step 2; B's LP captures in steps 1 and 2 and XORs them in step 3.
      rte[0][0][8 + j] = {1'b1, RT_EXT_J};
      lpw[0][0][8 + j][1][47:32] = LUT_BUF_A;
      lpw[0][0][8 + j][1][31:24] = {1'b1, 7'd0};
      lpw[0][0][8 + j][2][47:32] = LUT_NOT_A;
      lpw[0][0][8 + j][2][31:24] = {1'b1, 7'd0};
      rte[1][1][8 + j] = {1'b1, RT_EXT_J};
      rte[1][2][8 + j] = {1'b1, RT_EXT_J};
      lpw[1][0][8 + j][3][47:32] = LUT_XOR_AB;
      lpw[1][0][8 + j][3][31:16] = {1'b1, 7'd1, 1'b1, 7'd2};
    end
    for (int c = 0; c < NC; c++)
      for (int t = 0; t < T; t++)
        for (int m = 0; m < S; m++)
          for (int s = 0; s < N; s++) mpw[c][t][m][s] = {7'd0, 1'b0, 48'h0};
  endtask

  // All three chips are loaded at once over their own strobes and data.
  task automatic load();
    run = 1'b0;
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < R; r++)
        for (int s = 0; s < N; s++) begin
          @(posedge clk); #1;
          fill_mod = 2'(t); fill_lp_sel = 5'(r); fill_addr = 7'(s);
          for (int c = 0; c < NC; c++) begin
            fill_data[c] = {2'b00, lpw[c][t][r][s]};
            fill_lp_we[c] = 1'b1;
          end
        end
      @(posedge clk); #1;
      for (int c = 0; c < NC; c++) fill_lp_we[c] = 1'b0;
      for (int m = 0; m < S; m++)
        for (int s = 0; s < N; s++) begin
          @(posedge clk); #1;
          fill_mod = 2'(t); fill_mp_sel = 2'(m); fill_addr = 7'(s);
          for (int c = 0; c < NC; c++) begin
            fill_data[c] = mpw[c][t][m][s];
            fill_mp_cs_we[c] = 1'b1;
          end
        end
      @(posedge clk); #1;
      for (int c = 0; c < NC; c++) fill_mp_cs_we[c] = 1'b0;
    end
    for (int s = 0; s < N; s++)
      for (int e = 0; e < NE; e++) begin
        @(posedge clk); #1;
        fill_addr = 7'(s); fill_route_idx = 8'(e);
        for (int c = 0; c < NC; c++) begin
          fill_route_sel[c] = route_sel_t'(rte[c][s][e]);
          fill_route_we[c] = 1'b1;
        end
      end
    @(posedge clk); #1;
    for (int c = 0; c < NC; c++) fill_route_we[c] = 1'b0;
  endtask

  task automatic design_cycle(logic [15:0] x);
    for (int n = 0; n <= LAST; n++) begin
      @(negedge clk); #1;
      checks++;
      if (step[0] !== step[1] || step[1] !== step[2]) failures++; else n_lockstep++;
      @(posedge clk); #1;
      if (n == 1) begin
        checks++;
        if (ext_out[1][7:0] !== ~x[7:0]) begin
          failures++;
          $display("B forward %h, expected %h", ext_out[1][7:0], ~x[7:0]);
        end else n_fwd++;
      end
      if (n == 2) begin
        checks++;
        if (ext_out[2][7:0] !== x[7:0]) begin
          failures++;
          $display("C result %h, expected %h", ext_out[2][7:0], x[7:0]);
        end else n_two_hop++;
      end
      if (n == 3) begin
        checks++;
        if (ext_out[1][15:8] !== 8'hFF) begin
          failures++;
          $display("B processing %h, expected ff", ext_out[1][15:8]);
        end else n_mid_proc++;
      end
    end
    n_cycles++;
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin
      fill_lp_we[c] = 1'b0; fill_mp_cs_we[c] = 1'b0; fill_route_we[c] = 1'b0;
      fill_data[c] = '0; fill_route_sel[c] = '0;
    end
    compile();
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    load();
    @(posedge clk); #1;
    run = 1'b0;
    @(negedge clk); #1;
    begin
      logic [15:0] x;
      x = 16'($urandom);
      a_in[15:0] = x;
      @(posedge clk); #1;
      run = 1'b1;
      for (int v = 0; v < 500; v++) begin
        logic [15:0] nx;
        nx = 16'($urandom);
        fork
          design_cycle(x);
          begin
            // New inputs during the last step, before the next capture.
            for (int n = 0; n < LAST; n++) @(negedge clk);
            @(posedge clk); #2;
            a_in[15:0] = nx;
          end
        join
        x = nx;
      end
    end
    $display("mechanisms: forwards=%0d two_hop=%0d mid_chip_processing=%0d lockstep=%0d cycles=%0d",
             n_fwd, n_two_hop, n_mid_proc, n_lockstep, n_cycles);
    if (n_fwd == 0 || n_two_hop == 0 || n_mid_proc == 0 || n_lockstep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
