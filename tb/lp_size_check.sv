// lp_size_check: drives one logic processor of arbitrary size (M, N, P)
// through random programs against a reference model, like tb_logic_processor
// but with the control word packed generically: ChooseInput, then the 2^M
// LUT bits, then {Sel, RA} for operands A..M, from the most significant bit
// down. Reports its check and failure counts and raises done when finished.
module lp_size_check #(
  parameter int M = 4,
  parameter int N = 128,
  parameter int P = 64
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int SW = $clog2(N), PW = $clog2(P);
  localparam int CW = PW + M + (1 << M) + M * SW;

  logic run = 1'b0, ext_in = 1'b0, fill_we = 1'b0;
  logic [SW-1:0] step = '0, fill_addr = '0;
  logic [CW-1:0] fill_data = '0;
  logic [PW-1:0] choose_input;
  logic logic_out;

  logic [PW-1:0]     ci_m  [N];
  logic [(1<<M)-1:0] lut_m [N];
  logic [M-1:0]      sel_m [N];
  logic [SW-1:0]     ra_m  [N][M];
  logic [N-1:0] int_m, ext_m;

  logic_processor #(.M(M), .N(N), .P(P)) dut (
    .clk(clk), .run(run), .step(step), .ext_in(ext_in),
    .choose_input(choose_input), .logic_out(logic_out),
    .fill_we(fill_we), .fill_addr(fill_addr), .fill_data(fill_data)
  );

  function automatic logic [CW-1:0] pack(int n);
    logic [CW-1:0] w;
    int pos;
    pos = CW;
    pos -= PW;       w[pos +: PW] = ci_m[n];
    pos -= (1 << M); w[pos +: (1 << M)] = lut_m[n];
    for (int k = 0; k < M; k++) begin
      pos -= 1;  w[pos] = sel_m[n][k];
      pos -= SW; w[pos +: SW] = ra_m[n][k];
    end
    return w;
  endfunction

  task automatic load_program(bit zero_lut);
    for (int n = 0; n < N; n++) begin
      ci_m[n] = PW'($urandom);
      for (int i = 0; i < (1 << M); i++) lut_m[n][i] = zero_lut ? 1'b0 : 1'($urandom);
      sel_m[n] = M'($urandom);
      for (int k = 0; k < M; k++) ra_m[n][k] = SW'($urandom);
    end
    run = 1'b0;
    for (int n = 0; n < N; n++) begin
      @(posedge clk); #1;
      fill_we = 1'b1; fill_addr = SW'(n); fill_data = pack(n);
    end
    @(posedge clk); #1; fill_we = 1'b0;
  endtask

  task automatic run_cycles(int cycles, bit check);
    @(posedge clk); #1;
    run = 1'b1;
    for (int c = 0; c < cycles; c++)
      for (int n = 0; n < N; n++) begin
        logic [M-1:0] idx;
        step = SW'(n);
        @(negedge clk);
        @(posedge clk); #1;
        for (int k = 0; k < M; k++)
          idx[k] = sel_m[n][k] ? ext_m[ra_m[n][k]] : int_m[ra_m[n][k]];
        if (check) begin
          checks++;
          if (logic_out !== lut_m[n][idx]) failures++;
          checks++;
          if (choose_input !== ci_m[n]) failures++;
        end
        ext_in = 1'($urandom);
        int_m[n] = lut_m[n][idx];
        ext_m[n] = ext_in;
        step = SW'((n + 1) % N);
      end
    @(negedge clk);
    #1 run = 1'b0;
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    int_m = '0; ext_m = '0;
    load_program(1'b1);
    run_cycles(1, 1'b0);
    for (int p = 0; p < 2; p++) begin
      load_program(1'b0);
      run_cycles(2, 1'b1);
    end
    done = 1'b1;
  end
endmodule
