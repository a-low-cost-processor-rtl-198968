// tb_multiplier_schedule: runs the hand-scheduled 4-bit x 4-bit multiplier
// on a full-size emulation chip (default parameters), one gate or one capture
// per logic processor per emulation step, and checks all 256 products.
//
// The multiplier adds the four partial products row by row: D = A & B0;
// E = C + D with the initial partial product C = 0; F = A & B1; G = E/2 + F with carries EF0..EF2; H = A & B2; G/2 + H gives I
// with carries GH0..GH2; J = A & B3; I/2 + J gives K with carries IJ0..IJ2.
// The product is K4 K3 K2 K1 K0 I0 G0 E0. Logic processors 0..7 of module 0
// carry the schedule below, 19 steps long (design cycle of last_step = 18):
// "Cal" is a lookup-table evaluation (AND, XOR or majority of stack values),
// "Cap" puts another processor's result of the same step into this
// processor's external stack through the module routing switch.
//
//   step  LP0            LP1            LP2            LP3
//   0     Cap A0                        Cap A1
//   1     Cap B0                        Cap B0
//   2     Cal D0                        Cal D1
//   3     Cal E0 Cap B1                 Cal E1 Cap B1  Cap E1
//   4     Cal F0 Cap F3  Cap F3         Cal F1 Cap F0  Cap F0
//   5     Cap B2                        Cal G0 Cap B2  Cal EF0
//   7     Cap EF2        Cap EF2
//   8     Cal G3         Cal G4 Cap G3  Cap G4         Cap G4
//   9     Cal H0 Cap H2  Cap H2         Cal H1 Cap H3  Cap H3
//   11    Cap GH1        Cap GH1
//   12    Cal I2 Cap B3  Cal GH2 Cap I2 Cap GH2        Cap GH2
//   13                                  Cal I3 Cap B3  Cal I4 Cap I3
//   14    Cal J0 Cap J1  Cap J1         Cal J1 Cap J2  Cap J2
//   15    Cap IJ0        Cap IJ0
//   16    Cal K1         Cal IJ1        Cap IJ1        Cap IJ1
//   17                                  Cal K2         Cal IJ2
//
//   step  LP4            LP5            LP6            LP7
//   0     Cap A2                        Cap A3
//   1     Cap B0                        Cap B0
//   2     Cal D2                        Cal D3
//   3     Cal E2 Cap B1  Cap E2         Cal E3 Cap B1  Cap E3
//   4     Cal F2 Cap F1  Cap F1         Cal F3 Cap F2  Cap F2
//   5     Cap EF0        Cap EF0
//   6     Cal G1 Cap B2  Cal EF1 Cap G1 Cap EF1        Cap EF1
//   7                                  Cal G2 Cap B2  Cal EF2 Cap G2
//   9     Cal H2 Cap H0  Cap H0         Cal H3 Cap H1  Cap H1
//   10    Cal I0 Cap B3  Cal GH0        Cap GH0        Cap GH0
//   11                                 Cal I1 Cap B3  Cal GH1 Cap I1
//   13    Cap I4         Cap I4
//   14    Cal J2 Cap J3  Cap J3         Cal J3 Cap J0  Cap J0
//   15                                 Cal K0         Cal IJ0
//   17    Cap IJ2        Cap IJ2
//   18    Cal K3         Cal K4
//
// A capture of a value computed in the same step works because results cross
// the module switch during the high clock phase and are written at the
// closing falling edge. The multiplicand bits A0..A3 come straight from chip
// inputs 0, 2, 4, 6 in step 0 (chip switch option "input j"). The multiplier
// bits are needed in later steps, so logic processors 8..11 capture B0..B3
// from chip inputs 8..11 in step 0 and re-emit them from their external
// stacks in every later step; the schedule's "Cap Bk" takes them from there.
// Chip outputs 0..7 show module 0's processors (option "module 0"), so each
// product bit is checked on the chip output of the processor that computes
// it, in the step it is computed. The counts of internal-stack operands,
// external-stack operands, same-step captures and chip-input captures must
// all be non-zero, and a design cycle must take last_step + 1 clocks. The
// program is also run in a 128-step design cycle, where steps 19..127 idle.
module tb_multiplier_schedule;
  import emu_pkg::*;
  localparam int N = STEPS_N, T = NUM_MOD, R = NUM_LP, S = NUM_MP, P = OUTS_P;
  localparam int NE = T * P + P;
  localparam int LAST = 18;

  logic clk = 1'b1, rst = 1'b1, run = 1'b0;
  logic [6:0] last_step = 7'(LAST);
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
  int n_int = 0, n_ext = 0, n_cap = 0, n_pin = 0, n_products = 0;
  int n_cycles [2];

  logic [53:0] lpw [T][R][N];
  logic [55:0] mpw [T][S][N];
  logic [2:0]  rte [N][NE];

  // Where each product bit is computed: processor and step.
  int pbit_lp   [8] = '{0, 2, 4, 6, 0, 2, 4, 5};
  int pbit_step [8] = '{3, 5, 10, 15, 16, 17, 18, 18};

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int K_BUF = 0, K_AND = 1, K_XOR2 = 2, K_XOR3 = 3, K_MAJ = 4;

  function automatic logic [15:0] lut_of(int kind);
    logic [15:0] t;
    for (int i = 0; i < 16; i++) begin
      logic a, b, c;
      a = i[0]; b = i[1]; c = i[2];
      case (kind)
        K_BUF:  t[i] = a;
        K_AND:  t[i] = a & b;
        K_XOR2: t[i] = a ^ b;
        K_XOR3: t[i] = a ^ b ^ c;
        default: t[i] = (a & b) | (a & c) | (b & c);
      endcase
    end
    return t;
  endfunction

  // Operand codes: i(s) reads the internal stack at s, x(s) the external.
  function automatic int i_(int s); return s; endfunction
  function automatic int x_(int s); return 256 + s; endfunction

  // Cal: processor p evaluates kind over up to three operands in step s.
  function automatic void cal(int p, int s, int kind, int a, int b = -1, int c = -1);
    int ops [3];
    ops = '{a, b, c};
    lpw[0][p][s][47:32] = lut_of(kind);
    for (int k = 0; k < 3; k++)
      if (ops[k] >= 0) begin
        lpw[0][p][s][31 - 8*k] = (ops[k] >= 256);
        lpw[0][p][s][30 - 8*k -: 7] = 7'(ops[k] % 256);
        if (ops[k] >= 256) n_ext++; else n_int++;
      end
  endfunction

  // Cap: processor p stores processor src's result of step s at address s.
  function automatic void cap(int p, int s, int src);
    lpw[0][p][s][53:48] = 6'(src);
    n_cap++;
  endfunction

  task automatic compile();
    for (int m = 0; m < T; m++) begin
      for (int p = 0; p < R; p++) for (int s = 0; s < N; s++) lpw[m][p][s] = '0;
      for (int q = 0; q < S; q++) for (int s = 0; s < N; s++) mpw[m][q][s] = '0;
    end
    for (int s = 0; s < N; s++) for (int e = 0; e < NE; e++) rte[s][e] = '0;
    // Step 0: A0..A3 into LPs 0, 2, 4, 6 and B0..B3 into LPs 8..11.
    for (int k = 0; k < 4; k++) begin
      rte[0][2*k] = {1'b1, RT_EXT_J};
      rte[0][8 + k] = {1'b1, RT_EXT_J};
      n_pin += 2;
    end
    for (int k = 0; k < 4; k++)
      for (int s = 1; s <= LAST; s++) cal(8 + k, s, K_BUF, x_(0));
    // LP0
    cap(0, 1, 8);
    cal(0, 2, K_AND, x_(0), x_(1));                       // D0
    cal(0, 3, K_BUF, i_(2));             cap(0, 3, 9);    // E0, B1
    cal(0, 4, K_AND, x_(0), x_(3));      cap(0, 4, 6);    // F0, F3
    cap(0, 5, 10);                                        // B2
    cap(0, 7, 7);                                         // EF2
    cal(0, 8, K_XOR2, x_(4), x_(7));                      // G3
    cal(0, 9, K_AND, x_(0), x_(5));      cap(0, 9, 4);    // H0, H2
    cap(0, 11, 7);                                        // GH1
    cal(0, 12, K_XOR3, i_(8), x_(9), x_(11)); cap(0, 12, 11); // I2, B3
    cal(0, 14, K_AND, x_(0), x_(12));    cap(0, 14, 2);   // J0, J1
    cap(0, 15, 7);                                        // IJ0
    cal(0, 16, K_XOR3, i_(12), x_(14), x_(15));           // K1
    // LP1
    cap(1, 4, 6);                                         // F3
    cap(1, 7, 7);                                         // EF2
    cal(1, 8, K_AND, x_(4), x_(7));      cap(1, 8, 0);    // G4, G3
    cap(1, 9, 4);                                         // H2
    cap(1, 11, 7);                                        // GH1
    cal(1, 12, K_MAJ, x_(8), x_(9), x_(11)); cap(1, 12, 0); // GH2, I2
    cap(1, 14, 2);                                        // J1
    cap(1, 15, 7);                                        // IJ0
    cal(1, 16, K_MAJ, x_(12), x_(14), x_(15));            // IJ1
    // LP2
    cap(2, 1, 8);
    cal(2, 2, K_AND, x_(0), x_(1));                       // D1
    cal(2, 3, K_BUF, i_(2));             cap(2, 3, 9);    // E1, B1
    cal(2, 4, K_AND, x_(0), x_(3));      cap(2, 4, 0);    // F1, F0
    cal(2, 5, K_XOR2, i_(3), x_(4));     cap(2, 5, 10);   // G0, B2
    cap(2, 8, 1);                                         // G4
    cal(2, 9, K_AND, x_(0), x_(5));      cap(2, 9, 6);    // H1, H3
    cap(2, 12, 1);                                        // GH2
    cal(2, 13, K_XOR3, x_(8), x_(9), x_(12)); cap(2, 13, 11); // I3, B3
    cal(2, 14, K_AND, x_(0), x_(13));    cap(2, 14, 4);   // J1, J2
    cap(2, 16, 1);                                        // IJ1
    cal(2, 17, K_XOR3, i_(13), x_(14), x_(16));           // K2
    // LP3
    cap(3, 3, 2);                                         // E1
    cap(3, 4, 0);                                         // F0
    cal(3, 5, K_AND, x_(3), x_(4));                       // EF0
    cap(3, 8, 1);                                         // G4
    cap(3, 9, 6);                                         // H3
    cap(3, 12, 1);                                        // GH2
    cal(3, 13, K_MAJ, x_(8), x_(9), x_(12)); cap(3, 13, 2); // I4, I3
    cap(3, 14, 4);                                        // J2
    cap(3, 16, 1);                                        // IJ1
    cal(3, 17, K_MAJ, x_(13), x_(14), x_(16));            // IJ2
    // LP4
    cap(4, 1, 8);
    cal(4, 2, K_AND, x_(0), x_(1));                       // D2
    cal(4, 3, K_BUF, i_(2));             cap(4, 3, 9);    // E2, B1
    cal(4, 4, K_AND, x_(0), x_(3));      cap(4, 4, 2);    // F2, F1
    cap(4, 5, 3);                                         // EF0
    cal(4, 6, K_XOR3, i_(3), x_(4), x_(5)); cap(4, 6, 10); // G1, B2
    cal(4, 9, K_AND, x_(0), x_(6));      cap(4, 9, 0);    // H2, H0
    cal(4, 10, K_XOR2, i_(6), x_(9));    cap(4, 10, 11);  // I0, B3
    cap(4, 13, 3);                                        // I4
    cal(4, 14, K_AND, x_(0), x_(10));    cap(4, 14, 6);   // J2, J3
    cap(4, 17, 3);                                        // IJ2
    cal(4, 18, K_XOR3, x_(13), x_(14), x_(17));           // K3
    // LP5
    cap(5, 3, 4);                                         // E2
    cap(5, 4, 2);                                         // F1
    cap(5, 5, 3);                                         // EF0
    cal(5, 6, K_MAJ, x_(3), x_(4), x_(5)); cap(5, 6, 4);  // EF1, G1
    cap(5, 9, 0);                                         // H0
    cal(5, 10, K_AND, x_(6), x_(9));                      // GH0
    cap(5, 13, 3);                                        // I4
    cap(5, 14, 6);                                        // J3
    cap(5, 17, 3);                                        // IJ2
    cal(5, 18, K_MAJ, x_(13), x_(14), x_(17));            // K4
    // LP6
    cap(6, 1, 8);
    cal(6, 2, K_AND, x_(0), x_(1));                       // D3
    cal(6, 3, K_BUF, i_(2));             cap(6, 3, 9);    // E3, B1
    cal(6, 4, K_AND, x_(0), x_(3));      cap(6, 4, 4);    // F3, F2
    cap(6, 6, 5);                                         // EF1
    cal(6, 7, K_XOR3, i_(3), x_(4), x_(6)); cap(6, 7, 10); // G2, B2
    cal(6, 9, K_AND, x_(0), x_(7));      cap(6, 9, 2);    // H3, H1
    cap(6, 10, 5);                                        // GH0
    cal(6, 11, K_XOR3, i_(7), x_(9), x_(10)); cap(6, 11, 11); // I1, B3
    cal(6, 14, K_AND, x_(0), x_(11));    cap(6, 14, 0);   // J3, J0
    cal(6, 15, K_XOR2, i_(11), x_(14));                   // K0
    // LP7
    cap(7, 3, 6);                                         // E3
    cap(7, 4, 4);                                         // F2
    cap(7, 6, 5);                                         // EF1
    cal(7, 7, K_MAJ, x_(3), x_(4), x_(6)); cap(7, 7, 6);  // EF2, G2
    cap(7, 9, 2);                                         // H1
    cap(7, 10, 5);                                        // GH0
    cal(7, 11, K_MAJ, x_(7), x_(9), x_(10)); cap(7, 11, 6); // GH1, I1
    cap(7, 14, 0);                                        // J0
    cal(7, 15, K_AND, x_(11), x_(14));                    // IJ0
    // Memory processors idle on a fixed read address.
    for (int m = 0; m < T; m++)
      for (int q = 0; q < S; q++)
        for (int s = 0; s < N; s++) mpw[m][q][s] = {7'd0, 1'b0, 48'h0};
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
    for (int s = 0; s < N; s++)
      for (int e = 0; e < NE; e++) begin
        @(posedge clk); #1;
        fill_addr = 7'(s); fill_route_idx = 8'(e);
        fill_route_sel = route_sel_t'(rte[s][e]); fill_route_we = 1'b1;
      end
    @(posedge clk); #1; fill_route_we = 1'b0;
  endtask

  task automatic set_inputs(logic [3:0] a, logic [3:0] b);
    for (int k = 0; k < 4; k++) begin
      ext_in[2*k]     = a[k];
      ext_in[2*k + 1] = !a[k];   // decoy on the "input j+1" pin
      ext_in[8 + k]   = b[k];
    end
  endtask

  task automatic design_cycle(int ls, logic [3:0] a, logic [3:0] b, int li);
    int clocks;
    logic [7:0] pr;
    pr = 8'(a * b);
    clocks = 0;
    for (int n = 0; n <= ls; n++) begin
      @(negedge clk); #1;
      clocks++;
      @(posedge clk); #1;
      for (int k = 0; k < 8; k++)
        if (pbit_step[k] == n) begin
          checks++;
          if (ext_out[pbit_lp[k]] !== pr[k]) begin
            failures++;
            $display("%0d*%0d: product bit %0d from LP%0d in step %0d is %b",
                     a, b, k, pbit_lp[k], n, ext_out[pbit_lp[k]]);
          end else n_products++;
        end
    end
    checks++;
    if (clocks != ls + 1) failures++;
    n_cycles[li]++;
  endtask

  initial begin
    automatic int ls_list [2] = '{LAST, 127};
    fill_route_sel = '0;
    n_cycles = '{0, 0};
    compile();
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    load();
    for (int li = 0; li < 2; li++) begin
      int first, last;
      last_step = 7'(ls_list[li]);
      first = (li == 0) ? 0 : 240;
      last  = 256;
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
            for (int n = 0; n < ls_list[li]; n++) @(negedge clk);
            @(posedge clk); #2;
            if (v + 1 < last) set_inputs(4'(v + 1), 4'((v + 1) >> 4));
          end
        join
      end
    end
    $display("mechanisms: int_opnd=%0d ext_opnd=%0d captures=%0d pin_captures=%0d product_bits=%0d cycles19=%0d cycles128=%0d",
             n_int, n_ext, n_cap, n_pin, n_products, n_cycles[0], n_cycles[1]);
    if (n_int == 0 || n_ext == 0 || n_cap == 0 || n_pin == 0) failures++;
    if (n_products == 0) failures++;
    foreach (n_cycles[i]) if (n_cycles[i] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
