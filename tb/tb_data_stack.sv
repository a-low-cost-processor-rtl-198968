// tb_data_stack: writes random bits on falling edges and reads them back on
// the four read ports at the next rising edge; checks write-enable gating and
// that every port reads independently.
module tb_data_stack;
  localparam int DEPTH = 128, NRD = 4;
  logic clk = 1'b1;
  logic [6:0] raddr [NRD];
  logic [NRD-1:0] rdata;
  logic we = 1'b0, wdata = 1'b0;
  logic [6:0] waddr = '0;
  logic [DEPTH-1:0] model;
  int checks = 0, failures = 0;

  data_stack #(.DEPTH(DEPTH), .NRD(NRD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NRD; k++) raddr[k] = '0;
    // Fill every address.
    for (int a = 0; a < DEPTH; a++) begin
      @(posedge clk); #1;
      we = 1'b1; waddr = 7'(a); wdata = 1'($urandom); model[a] = wdata;
    end
    @(posedge clk); #1; we = 1'b0;
    // Random reads, and random writes that are then read back.
    for (int i = 0; i < 2000; i++) begin
      logic [6:0] a [NRD];
      for (int k = 0; k < NRD; k++) begin a[k] = 7'($urandom); raddr[k] = a[k]; end
      @(posedge clk); #1;
      for (int k = 0; k < NRD; k++) begin
        checks++;
        if (rdata[k] !== model[a[k]]) begin
          failures++;
          $display("port %0d addr %0d: got %b want %b", k, a[k], rdata[k], model[a[k]]);
        end
      end
      we = 1'($urandom); waddr = 7'($urandom); wdata = 1'($urandom);
      @(negedge clk); #1;
      if (we) model[waddr] = wdata;
      we = 1'b0;
      for (int k = 0; k < NRD; k++) raddr[k] = waddr;
      @(posedge clk); #1;
      checks++;
      if (rdata[NRD-1] !== model[waddr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
