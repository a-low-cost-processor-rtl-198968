// tb_chip_switch: loads a random select for every entry of every step, then
// steps through two design cycles. In each step, after the rising edge, it
// drives several random module-output and external-input patterns and checks
// every module input slot, use_ext bit and external output against the
// option table: module slot options = next module, module after next,
// external input j, external input j+1; external output options = module
// 0, 1, 2, external input j.
module tb_chip_switch;
  import emu_pkg::*;
  localparam int T = 3, P = 64, N = 128, NE = T * P + P;
  logic clk = 1'b1;
  logic [6:0] step = '0, fill_step = '0;
  logic [P-1:0] mod_out [T], mod_ext_in [T], use_ext [T];
  logic [P-1:0] ext_in, ext_out;
  logic fill_we = 1'b0;
  logic [7:0] fill_idx = '0;
  route_sel_t fill_sel;
  logic [2:0] tbl [N][NE];
  int checks = 0, failures = 0;

  chip_switch #(.T(T), .P(P), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fill_sel = '0;
    for (int t = 0; t < T; t++) mod_out[t] = '0;
    ext_in = '0;
    for (int n = 0; n < N; n++)
      for (int e = 0; e < NE; e++) begin
        @(posedge clk); #1;
        tbl[n][e] = 3'($urandom);
        fill_we = 1'b1; fill_step = 7'(n); fill_idx = 8'(e);
        fill_sel = route_sel_t'(tbl[n][e]);
      end
    @(posedge clk); #1; fill_we = 1'b0;
    for (int c = 0; c < 2; c++)
      for (int n = 0; n < N; n++) begin
        step = 7'(n);
        @(negedge clk);
        @(posedge clk); #1;
        for (int r = 0; r < 3; r++) begin
          for (int t = 0; t < T; t++) mod_out[t] = {$urandom, $urandom};
          ext_in = {$urandom, $urandom};
          #1;
          for (int t = 0; t < T; t++)
            for (int j = 0; j < P; j++) begin
              logic [2:0] e;
              logic want;
              e = tbl[n][t*P + j];
              case (e[1:0])
                2'd0: want = mod_out[(t+1) % T][j];
                2'd1: want = mod_out[(t+2) % T][j];
                2'd2: want = ext_in[j];
                default: want = ext_in[(j+1) % P];
              endcase
              checks++;
              if (mod_ext_in[t][j] !== want || use_ext[t][j] !== e[2]) begin
                failures++;
                if (failures < 10) $display("step %0d mod %0d slot %0d wrong", n, t, j);
              end
            end
          for (int j = 0; j < P; j++) begin
            logic [1:0] o;
            logic want;
            o = tbl[n][T*P + j][1:0];
            want = (o == 2'd3) ? ext_in[j] : mod_out[o][j];
            checks++;
            if (ext_out[j] !== want) begin
              failures++;
              if (failures < 10) $display("step %0d ext out %0d wrong", n, j);
            end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
