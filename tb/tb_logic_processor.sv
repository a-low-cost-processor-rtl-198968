// tb_logic_processor: runs a logic processor against a cycle-level reference
// model. The control words are packed here by hand from the field table
// (ChooseInput[53:48] LUT[47:32] SelA RAA[31:24] SelB RAB[23:16]
// SelC RAC[15:8] SelD RAD[7:0]). A first design cycle with an all-zero LUT
// clears the internal stack and fills the external stack; then random
// programs run for several design cycles with random external inputs. In
// every step the output must be the LUT entry of the operands the model
// predicts, available in the same emulation clock (one operation per step),
// and ChooseInput must match the word. Values written in step n are used by
// later steps and, as stored state, by earlier steps of the next cycle.
module tb_logic_processor;
  localparam int N = 128;
  logic clk = 1'b1, run = 1'b0, ext_in = 1'b0, fill_we = 1'b0;
  logic [6:0] step = '0, fill_addr = '0;
  logic [53:0] fill_data = '0;
  logic [5:0] choose_input;
  logic logic_out;
  int checks = 0, failures = 0;

  logic [53:0] prog [N];
  logic [N-1:0] int_m, ext_m;

  logic_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [53:0] pack(logic [5:0] ci, logic [15:0] lut,
                                       logic [3:0] sel, logic [6:0] ra [4]);
    return {ci, lut, sel[0], ra[0], sel[1], ra[1], sel[2], ra[2], sel[3], ra[3]};
  endfunction

  task automatic load();
    run = 1'b0;
    for (int a = 0; a < N; a++) begin
      @(posedge clk); #1;
      fill_we = 1'b1; fill_addr = 7'(a); fill_data = prog[a];
    end
    @(posedge clk); #1; fill_we = 1'b0;
  endtask

  task automatic run_cycles(int cycles, bit check_out);
    @(posedge clk); #1;
    run = 1'b1;
    for (int c = 0; c < cycles; c++)
      for (int n = 0; n < N; n++) begin
        logic [53:0] w;
        logic [3:0] idx;
        logic want;
        w = prog[n];
        step = 7'(n);
        @(negedge clk);          // opens step n
        @(posedge clk); #1;      // operands read
        for (int k = 0; k < 4; k++) begin
          logic s;
          logic [6:0] a;
          s = w[31 - 8*k];
          a = w[30 - 8*k -: 7];
          idx[k] = s ? ext_m[a] : int_m[a];
        end
        want = w[32 + idx];
        if (check_out) begin
          checks++;
          if (logic_out !== want) begin
            failures++;
            $display("cycle %0d step %0d: out %b want %b", c, n, logic_out, want);
          end
          checks++;
          if (choose_input !== w[53:48]) failures++;
        end
        ext_in = 1'($urandom);
        int_m[n] = want;
        ext_m[n] = ext_in;
        step = 7'((n + 1) % N);
      end
    @(negedge clk);   // closes the last step
    #1 run = 1'b0;
  endtask

  initial begin
    logic [6:0] ra [4];
    // Cycle 1: constant-zero function everywhere.
    for (int n = 0; n < N; n++) begin
      for (int k = 0; k < 4; k++) ra[k] = 7'($urandom);
      prog[n] = pack(6'($urandom), 16'h0000, 4'($urandom), ra);
    end
    load();
    int_m = '0; ext_m = '0;
    run_cycles(1, 1'b0);
    // Random programs.
    for (int p = 0; p < 4; p++) begin
      for (int n = 0; n < N; n++) begin
        for (int k = 0; k < 4; k++) ra[k] = 7'($urandom);
        prog[n] = pack(6'($urandom), 16'($urandom), 4'($urandom), ra);
      end
      load();
      run_cycles(3, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
