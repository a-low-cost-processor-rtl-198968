// tb_step_sequencer: counts falling edges per design cycle for several
// last_step values (a design cycle must take last_step+1 emulation clocks),
// checks the step sequence seen at each falling edge, the design clock duty
// and that run = 0 holds the step at 0.
module tb_step_sequencer;
  localparam int N = 128;
  logic clk = 1'b1, rst = 1'b1, run = 1'b0;
  logic [6:0] last_step = 7'd127, step;
  logic cycle_end, design_clk;
  int checks = 0, failures = 0;

  step_sequencer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ls_list [4] = '{127, 63, 18, 0};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    #1; checks++; if (step !== 0) failures++;
    foreach (ls_list[i]) begin
      int expect_step, clocks, ends, highs;
      @(posedge clk); #1;
      run = 1'b0; last_step = 7'(ls_list[i]);
      @(negedge clk); #1;
      run = 1'b1; #1;
      expect_step = 0; clocks = 0; ends = 0; highs = 0;
      // Three design cycles.
      for (int c = 0; c < 3 * (ls_list[i] + 1); c++) begin
        // The value that the next falling edge opens.
        checks++;
        if (step !== 7'(expect_step)) begin
          failures++;
          $display("ls %0d clock %0d: step %0d want %0d", ls_list[i], c, step, expect_step);
        end
        if (cycle_end) ends++;
        if (design_clk) highs++;
        @(negedge clk); #1;
        clocks++;
        expect_step = (expect_step == ls_list[i]) ? 0 : expect_step + 1;
      end
      checks++;
      if (ends != 3) begin failures++; $display("ls %0d: %0d cycle ends", ls_list[i], ends); end
      checks++;
      if (highs != 3 * (ls_list[i] / 2 + 1)) begin failures++; $display("ls %0d: %0d design clock highs", ls_list[i], highs); end
    end
    run = 1'b0;
    @(negedge clk); #1;
    checks++; if (step !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
