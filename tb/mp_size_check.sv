// mp_size_check: drives one memory processor of arbitrary size (Q, N, P)
// through random read/write programs against a reference model. The
// testbench plays the network: capture bit q is the bit of a random P-bit
// network state named by the processor's CI(q+1) output. The control word is
// packed generically: MWA, W/R, CI1..CIQ from the most significant bit down.
module mp_size_check #(
  parameter int Q = 8,
  parameter int N = 128,
  parameter int P = 64
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int SW = $clog2(N), PW = $clog2(P);
  localparam int CW = SW + 1 + Q * PW;

  logic run = 1'b0, fill_cs_we = 1'b0, fill_ms_we = 1'b0;
  logic [SW-1:0] step = '0, fill_addr = '0;
  logic [CW-1:0] fill_data = '0;
  logic [Q-1:0] cap_in, mem_out;
  logic [PW-1:0] choose [Q];
  logic [P-1:0] net = '0;

  logic [SW-1:0] mwa_m [N];
  logic          wr_m  [N];
  logic [PW-1:0] ci_m  [N][Q];
  logic [Q-1:0]  mem_m [N];

  memory_processor #(.Q(Q), .N(N), .P(P)) dut (
    .clk(clk), .run(run), .step(step), .cap_in(cap_in), .choose(choose),
    .mem_out(mem_out), .fill_cs_we(fill_cs_we), .fill_ms_we(fill_ms_we),
    .fill_addr(fill_addr), .fill_data(fill_data)
  );

  always_comb for (int q = 0; q < Q; q++) cap_in[q] = net[choose[q]];

  function automatic logic [CW-1:0] pack(int n);
    logic [CW-1:0] w;
    int pos;
    pos = CW;
    pos -= SW; w[pos +: SW] = mwa_m[n];
    pos -= 1;  w[pos] = wr_m[n];
    for (int q = 0; q < Q; q++) begin
      pos -= PW; w[pos +: PW] = ci_m[n][q];
    end
    return w;
  endfunction

  initial begin
    logic [Q-1:0] held;
    bit have;
    checks = 0; failures = 0; done = 1'b0;
    for (int a = 0; a < N; a++) begin
      @(posedge clk); #1;
      fill_ms_we = 1'b1; fill_addr = SW'(a);
      mem_m[a] = Q'($urandom);
      fill_data = '0;
      fill_data[Q-1:0] = mem_m[a];
    end
    @(posedge clk); #1; fill_ms_we = 1'b0;
    have = 0; held = '0;
    for (int p = 0; p < 3; p++) begin
      run = 1'b0;
      for (int n = 0; n < N; n++) begin
        mwa_m[n] = SW'($urandom);
        wr_m[n] = 1'($urandom);
        for (int q = 0; q < Q; q++) ci_m[n][q] = PW'($urandom);
        @(posedge clk); #1;
        fill_cs_we = 1'b1; fill_addr = SW'(n); fill_data = pack(n);
      end
      @(posedge clk); #1; fill_cs_we = 1'b0;
      run = 1'b1;
      for (int n = 0; n < N; n++) begin
        step = SW'(n);
        @(negedge clk);
        @(posedge clk); #1;
        if (!wr_m[n]) begin held = mem_m[mwa_m[n]]; have = 1; end
        if (have) begin
          checks++;
          if (mem_out !== held) failures++;
        end
        for (int q = 0; q < Q; q++) begin
          checks++;
          if (choose[q] !== ci_m[n][q]) failures++;
        end
        for (int i = 0; i < P; i++) net[i] = 1'($urandom);
        #1;
        if (wr_m[n])
          for (int q = 0; q < Q; q++) mem_m[mwa_m[n]][q] = net[ci_m[n][q]];
      end
      @(negedge clk); #1;
    end
    done = 1'b1;
  end
endmodule
