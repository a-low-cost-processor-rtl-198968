// tb_module_switch: random processor outputs, selects and external bits;
// every slot must carry the chosen processor output, or its external bit
// when use_ext is set.
module tb_module_switch;
  localparam int P = 64;
  logic [P-1:0] proc_out, mod_ext_in, use_ext, proc_in;
  logic [5:0] choose [P];
  int checks = 0, failures = 0;

  module_switch #(.P(P)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      proc_out = {$urandom, $urandom};
      mod_ext_in = {$urandom, $urandom};
      use_ext = (i % 3 == 0) ? '0 : {$urandom, $urandom};
      for (int j = 0; j < P; j++) choose[j] = 6'($urandom);
      #1;
      for (int j = 0; j < P; j++) begin
        logic want;
        want = use_ext[j] ? mod_ext_in[j] : proc_out[choose[j]];
        checks++;
        if (proc_in[j] !== want) begin
          failures++;
          $display("slot %0d: got %b want %b", j, proc_in[j], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
