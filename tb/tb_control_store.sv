// tb_control_store: loads random words through the fill port, then reads
// every address and compares with a testbench copy; also checks that a read
// returns the word on the same falling edge it is addressed and holds it.
module tb_control_store;
  localparam int DEPTH = 128, WIDTH = 54;
  logic clk = 1'b1;
  logic [6:0] raddr = '0, fill_addr = '0;
  logic [WIDTH-1:0] rdata, fill_data = '0, model [DEPTH];
  logic fill_we = 1'b0;
  int checks = 0, failures = 0;

  control_store #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(posedge clk);
      fill_we = 1'b1; fill_addr = 7'(a);
      fill_data = {$urandom, $urandom};
      model[a] = fill_data;
    end
    @(posedge clk); fill_we = 1'b0;
    for (int i = 0; i < 2 * DEPTH; i++) begin
      int a;
      a = (i * 37) % DEPTH;
      @(posedge clk); raddr = 7'(a);
      @(negedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("mismatch addr %0d: %h vs %h", a, rdata, model[a]);
      end
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
