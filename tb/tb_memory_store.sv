// tb_memory_store: random word writes (falling edge) and reads (rising edge)
// against a model; checks that a read result holds while re is low.
module tb_memory_store;
  localparam int DEPTH = 128, WIDTH = 8;
  logic clk = 1'b1;
  logic re = 1'b0, we = 1'b0;
  logic [6:0] raddr = '0, waddr = '0;
  logic [WIDTH-1:0] rdata, wdata = '0, model [DEPTH], last;
  int checks = 0, failures = 0;

  memory_store #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(posedge clk); #1;
      we = 1'b1; waddr = 7'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    @(posedge clk); #1; we = 1'b0;
    last = '0;
    for (int i = 0; i < 3000; i++) begin
      re = 1'($urandom); raddr = 7'($urandom);
      @(posedge clk); #1;
      if (re) last = model[raddr];
      if (i > 0 || re) begin
        checks++;
        if (rdata !== last) begin
          failures++;
          $display("read %0d: got %h want %h", raddr, rdata, last);
        end
      end
      we = 1'($urandom); waddr = 7'($urandom); wdata = 8'($urandom);
      @(negedge clk); #1;
      if (we) model[waddr] = wdata;
      we = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
