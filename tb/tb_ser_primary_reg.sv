// tb_ser_primary_reg: random test of the serial crossbar's Primary Register.
// A reference copy of the address is built here bit by bit from the stream
// (first bit most significant) and compared with the double-railed bus, both
// during a shift (look-ahead value) and while holding.
module tb_ser_primary_reg;
  localparam int AW = 4;
  logic clk = 0, rst_n = 0, s1, ctrl, data;
  logic [2*AW-1:0] bus;
  int checks = 0, failures = 0;
  logic [AW-1:0] model;

  ser_primary_reg #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [AW-1:0] nxt;
    s1 = 0; ctrl = 0; data = 0; model = '0;
    #12 rst_n = 1;
    // A complete address, MSB first, then held.
    for (int k = AW - 1; k >= 0; k--) begin
      @(negedge clk); s1 = 1; ctrl = 1; data = 1'(4'b1011 >> k);
    end
    @(negedge clk); s1 = 0; ctrl = 1; data = 0;
    #1 check(bus == {4'b1011, ~4'b1011}, "complete address on bus");
    @(negedge clk); check(bus == {4'b1011, ~4'b1011}, "address held without S1");
    model = 4'b1011;
    // Random stimulus.
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      {s1, ctrl, data} = 3'($urandom);
      nxt = (s1 && ctrl) ? {model[AW-2:0], data} : model;
      #1 check(bus == {nxt, ~nxt}, "bus shows register next value");
      @(posedge clk); model = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
