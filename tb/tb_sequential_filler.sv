// tb_sequential_filler: every combination of selects and write strobes must
// give exactly the one-hot write enable expected, and none while the module
// is not selected.
module tb_sequential_filler;
  localparam int R = 32, S = 4;
  logic mod_en, lp_we, mp_cs_we, mp_ms_we;
  logic [4:0] lp_sel;
  logic [1:0] mp_sel;
  logic [R-1:0] lp_cs_we;
  logic [S-1:0] mp_cs_we_o, mp_ms_we_o;
  int checks = 0, failures = 0;

  sequential_filler #(.R(R), .S(S)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int w = 0; w < 8; w++)
        for (int l = 0; l < R; l++)
          for (int m = 0; m < S; m++) begin
            logic [R-1:0] wl;
            logic [S-1:0] wc, wm;
            mod_en = 1'(e); lp_we = w[0]; mp_cs_we = w[1]; mp_ms_we = w[2];
            lp_sel = 5'(l); mp_sel = 2'(m);
            wl = (e == 1 && w[0]) ? (R'(1) << l) : '0;
            wc = (e == 1 && w[1]) ? (S'(1) << m) : '0;
            wm = (e == 1 && w[2]) ? (S'(1) << m) : '0;
            #1;
            checks++;
            if (lp_cs_we !== wl || mp_cs_we_o !== wc || mp_ms_we_o !== wm) begin
              failures++;
              $display("en %0d we %0d lp %0d mp %0d: %h %h %h", e, w, l, m, lp_cs_we, mp_cs_we_o, mp_ms_we_o);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
