// tb_emulation_module: a full-size module (32 logic and 4 memory processors)
// running a short program that exercises the sequential filler, the module
// routing switch, the external-input path and the memory processors:
//   step 0  every LP r captures module input r (use_ext set for all slots).
//   step 1  LP r outputs NOT of that bit and captures LP (r+1) mod 32's output.
//   step 2  LP r outputs x[r] XOR x[r+1] (internal operand from step 1, XOR
//           the external one), and MP s writes LPs 8s..8s+7 as word 9.
//   step 3  MP s reads word 9: its outputs show those 8 bits.
//   step 4  MP s reads word 100, preloaded with 8'h3C + s.
// Every LP and MP gets its own control word through the filler (the
// ChooseInput fields differ per LP), so a wrong decode shows. Checked for 40
// design cycles of 6 steps with random inputs.
module tb_emulation_module;
  localparam int N = 128, R = 32, S = 4, P = 64, LS = 5;
  logic clk = 1'b1, run = 1'b0;
  logic [6:0] step = '0, fill_addr = '0;
  logic [P-1:0] mod_ext_in = '0, use_ext = '0, mod_out;
  logic fill_mod_en = 1'b0, fill_lp_we = 1'b0, fill_mp_cs_we = 1'b0, fill_mp_ms_we = 1'b0;
  logic [4:0] fill_lp_sel = '0;
  logic [1:0] fill_mp_sel = '0;
  logic [55:0] fill_data = '0;
  int checks = 0, failures = 0;

  emulation_module dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [53:0] lp_word(int r, int s);
    // {ChooseInput, LUT, SelA RAA, SelB RAB, SelC RAC, SelD RAD}
    case (s)
      0: return {6'd0, 16'h0000, 8'h00, 8'h00, 8'h00, 8'h00};
      1: return {6'((r + 1) % R), 16'h5555, {1'b1, 7'd0}, 8'h00, 8'h00, 8'h00};
      2: return {6'd0, 16'h6666, {1'b0, 7'd1}, {1'b1, 7'd1}, 8'h00, 8'h00};
      default: return '0;
    endcase
  endfunction

  function automatic logic [55:0] mp_word(int m, int s);
    logic [47:0] ci;
    for (int q = 0; q < 8; q++) ci[47 - 6*q -: 6] = 6'(8*m + q);
    case (s)
      2: return {7'd9, 1'b1, ci};
      3: return {7'd9, 1'b0, 48'h0};
      default: return {7'd100, 1'b0, 48'h0};
    endcase
  endfunction

  initial begin
    logic [31:0] x;
    // Load through the filler; a write with the module disabled must not land.
    for (int r = 0; r < R; r++)
      for (int s = 0; s <= LS; s++) begin
        @(posedge clk); #1;
        fill_mod_en = 1'b1; fill_lp_we = 1'b1; fill_lp_sel = 5'(r);
        fill_addr = 7'(s); fill_data = {2'b00, lp_word(r, s)};
      end
    @(posedge clk); #1;
    fill_mod_en = 1'b0; fill_lp_sel = 5'd3; fill_addr = 7'd2; fill_data = '0;
    @(posedge clk); #1; fill_lp_we = 1'b0;
    for (int m = 0; m < S; m++) begin
      for (int s = 0; s <= LS; s++) begin
        @(posedge clk); #1;
        fill_mod_en = 1'b1; fill_mp_cs_we = 1'b1; fill_mp_sel = 2'(m);
        fill_addr = 7'(s); fill_data = mp_word(m, s);
      end
      @(posedge clk); #1;
      fill_mp_cs_we = 1'b0; fill_mp_ms_we = 1'b1;
      fill_addr = 7'd100; fill_data = 56'(8'h3C + m);
      @(posedge clk); #1; fill_mp_ms_we = 1'b0;
    end
    fill_mod_en = 1'b0;
    run = 1'b1;
    for (int c = 0; c < 40; c++) begin
      x = $urandom;
      for (int n = 0; n <= LS; n++) begin
        step = 7'(n);
        @(negedge clk);
        @(posedge clk); #1;
        use_ext = (n == 0) ? '1 : '0;
        mod_ext_in = (n == 0) ? {32'($urandom), x} : {$urandom, $urandom};
        #1;
        if (n == 1) begin
          checks++;
          if (mod_out[31:0] !== ~x) begin failures++; $display("step 1: %h", mod_out[31:0]); end
        end
        if (n == 2) begin
          checks++;
          if (mod_out[31:0] !== (x ^ {x[0], x[31:1]})) begin
            failures++; $display("step 2: %h want %h", mod_out[31:0], x ^ {x[0], x[31:1]});
          end
        end
        if (n == 3) begin
          checks++;
          if (mod_out[63:32] !== (x ^ {x[0], x[31:1]})) begin
            failures++; $display("step 3: %h", mod_out[63:32]);
          end
        end
        if (n == 4) begin
          for (int m = 0; m < S; m++) begin
            checks++;
            if (mod_out[32 + 8*m +: 8] !== 8'(8'h3C + m)) failures++;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
