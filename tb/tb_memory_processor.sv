// tb_memory_processor: preloads the memory store, then runs random programs
// of reads and writes against a reference model. Control words are packed
// here from the field table (MWA[55:49] W/R[48] CI1[47:42] ... CI8[5:0]).
// The testbench plays the interconnection network: each step it draws a
// random 64-bit network state and returns to the processor the bits its CI
// outputs select, so a write must store, as bit q, the network bit named by
// CI(q+1). A read must show the word on the outputs in the same emulation
// step and hold it through the following write steps.
module tb_memory_processor;
  localparam int N = 128;
  logic clk = 1'b1, run = 1'b0, fill_cs_we = 1'b0, fill_ms_we = 1'b0;
  logic [6:0] step = '0, fill_addr = '0;
  logic [55:0] fill_data = '0;
  logic [7:0] cap_in, mem_out;
  logic [5:0] choose [8];
  int checks = 0, failures = 0, reads = 0, writes = 0;

  logic [55:0] prog [N];
  logic [7:0] mem_m [N];
  logic [63:0] net;

  memory_processor dut (.*);

  always #5 clk = ~clk;

  // The network: each capture bit is the network bit its CI field selects.
  always_comb for (int q = 0; q < 8; q++) cap_in[q] = net[choose[q]];

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    bit have;
    net = '0;
    // Preload the memory store.
    for (int a = 0; a < N; a++) begin
      @(posedge clk); #1;
      fill_ms_we = 1'b1; fill_addr = 7'(a); fill_data = 56'($urandom);
      mem_m[a] = fill_data[7:0];
    end
    @(posedge clk); #1; fill_ms_we = 1'b0;
    have = 0; held = '0;
    for (int p = 0; p < 4; p++) begin
      run = 1'b0;
      for (int n = 0; n < N; n++) begin
        logic [47:0] ci;
        ci = {$urandom, $urandom};
        prog[n] = {7'($urandom), 1'($urandom), ci};
        @(posedge clk); #1;
        fill_cs_we = 1'b1; fill_addr = 7'(n); fill_data = prog[n];
      end
      @(posedge clk); #1; fill_cs_we = 1'b0;
      run = 1'b1;
      for (int c = 0; c < 2; c++)
        for (int n = 0; n < N; n++) begin
          logic [6:0] mwa;
          logic wr;
          mwa = prog[n][55:49];
          wr = prog[n][48];
          step = 7'(n);
          @(negedge clk);
          @(posedge clk); #1;
          for (int q = 0; q < 8; q++) begin
            checks++;
            if (choose[q] !== prog[n][47 - 6*q -: 6]) failures++;
          end
          if (!wr) begin
            held = mem_m[mwa]; have = 1; reads++;
          end
          if (have) begin
            checks++;
            if (mem_out !== held) begin
              failures++;
              $display("step %0d: out %h want %h", n, mem_out, held);
            end
          end
          net = {$urandom, $urandom};
          #1;
          if (wr) begin
            for (int q = 0; q < 8; q++) mem_m[mwa][q] = net[prog[n][47 - 6*q -: 6]];
            writes++;
          end
        end
      @(negedge clk); #1;
    end
    // Read back the whole store.
    run = 1'b0;
    for (int n = 0; n < N; n++) begin
      @(posedge clk); #1;
      fill_cs_we = 1'b1; fill_addr = 7'(n); fill_data = {7'(n), 1'b0, 48'h0};
    end
    @(posedge clk); #1; fill_cs_we = 1'b0; run = 1'b1;
    for (int n = 0; n < N; n++) begin
      step = 7'(n);
      @(negedge clk);
      @(posedge clk); #1;
      checks++;
      if (mem_out !== mem_m[n]) begin
        failures++;
        $display("readback %0d: %h want %h", n, mem_out, mem_m[n]);
      end
    end
    checks++;
    if (reads == 0 || writes == 0) failures++;
    $display("reads=%0d writes=%0d", reads, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
