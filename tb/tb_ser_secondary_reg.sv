// tb_ser_secondary_reg: random test of the serial crossbar's Secondary
// Register against a first-in first-out queue model: the bit under the pointer
// must be the oldest bit not yet sent, ZERO must mark the last buffered bit
// with nothing arriving, and sending while filling must keep the order.
module tb_ser_secondary_reg;
  localparam int L = 8;
  logic clk = 0, rst_n = 0, s2, ctrl, data_in, dec, data_out, zero, occ;
  int checks = 0, failures = 0;
  bit q[$];

  ser_secondary_reg #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s (size %0d)", $time, what, q.size()); end
  endtask

  initial begin
    bit push, pop;
    s2 = 0; ctrl = 0; data_in = 0; dec = 0;
    #12 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      s2 = 1'($urandom); ctrl = 1'($urandom); data_in = 1'($urandom); dec = 1'($urandom);
      if (q.size() == L && !dec) ctrl = 0;          // stay within capacity
      push = s2 && ctrl;
      pop  = dec && q.size() > 0;
      #1;
      check(occ == (q.size() > 0), "occupancy");
      if (q.size() > 0) check(data_out == q[0], "oldest bit under pointer");
      check(zero == (q.size() <= 1 && !push), "ZERO");
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(data_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
