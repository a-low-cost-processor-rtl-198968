// tb_logic_element: exhaustive over operands and selects for a set of random
// and named truth tables (AND, XOR, majority); the expected output is worked
// out from the truth table independently of the RTL's structure.
module tb_logic_element;
  localparam int M = 4;
  logic [M-1:0] int_opnd, ext_opnd, sel;
  logic [15:0] lut;
  logic out;
  int checks = 0, failures = 0;

  logic_element #(.M(M)) dut (.*);

  function automatic logic ref_fn(int kind, logic [3:0] v, logic [15:0] t);
    case (kind)
      0: return v[0] & v[1] & v[2] & v[3];
      1: return ^v;
      2: return (v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2]);
      default: return t[{v[3], v[2], v[1], v[0]}];
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int kind = 0; kind < 8; kind++) begin
      logic [15:0] t;
      t = 16'($urandom);
      for (int i = 0; i < 16; i++) lut[i] = ref_fn(kind, 4'(i), t);
      for (int s = 0; s < 16; s++)
        for (int a = 0; a < 16; a++)
          for (int b = 0; b < 16; b += 5) begin
            logic [3:0] v;
            sel = 4'(s); int_opnd = 4'(a); ext_opnd = 4'(b);
            for (int k = 0; k < 4; k++) v[k] = s[k] ? b[k] : a[k];
            #1;
            checks++;
            if (out !== ref_fn(kind, v, t)) begin
              failures++;
              $display("kind %0d sel %h int %h ext %h: got %b", kind, s, a, b, out);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
