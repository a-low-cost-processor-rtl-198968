// tb_processor_sizes: the logic and memory processors at other points of the
// architecture exploration (lookup table size M = 2..8, steps N = 64..512,
// network outputs P = 32..256, memory word Q = 1..16), each against its
// reference model, to show that the RTL is correct at every size, not only
// at the default M = 4, N = 128, P = 64, Q = 8.
module tb_processor_sizes;
  logic clk = 1'b1;
  always #5 clk = ~clk;

  localparam int NC = 7;
  int   c [NC], f [NC];
  logic d [NC];

  lp_size_check #(.M(2), .N(64),  .P(32))  u_lp0 (.clk(clk), .checks(c[0]), .failures(f[0]), .done(d[0]));
  lp_size_check #(.M(8), .N(128), .P(64))  u_lp1 (.clk(clk), .checks(c[1]), .failures(f[1]), .done(d[1]));
  lp_size_check #(.M(4), .N(512), .P(256)) u_lp2 (.clk(clk), .checks(c[2]), .failures(f[2]), .done(d[2]));
  mp_size_check #(.Q(1),  .N(64),  .P(32))  u_mp0 (.clk(clk), .checks(c[3]), .failures(f[3]), .done(d[3]));
  mp_size_check #(.Q(16), .N(128), .P(64))  u_mp1 (.clk(clk), .checks(c[4]), .failures(f[4]), .done(d[4]));
  mp_size_check #(.Q(8),  .N(512), .P(256)) u_mp2 (.clk(clk), .checks(c[5]), .failures(f[5]), .done(d[5]));
  lp_size_check #(.M(6), .N(256), .P(128)) u_lp3 (.clk(clk), .checks(c[6]), .failures(f[6]), .done(d[6]));

  initial begin
    #20000000;
    begin
      int checks = 0, failures = 1;
      for (int i = 0; i < NC; i++) begin checks += c[i]; failures += f[i]; end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end

  initial begin
    int checks, failures;
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NC; i++) if (!d[i]) all = 0;
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < NC; i++) begin
      $display("size point %0d: checks=%0d failures=%0d", i, c[i], f[i]);
      checks += c[i]; failures += f[i];
      if (c[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
