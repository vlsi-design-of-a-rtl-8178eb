// tb_par_row_ctrl: directed test of the parallel crossbar's row control.
// Checks every arc of the row FSM's state diagram with its LOAD, REQ and
// CONNECT outputs, the two-edge setup time from REQIN to CONNECT on a free
// column, and that the address latch follows the pins only while LOAD is high.
module tb_par_row_ctrl;
  import xbar_pkg::*;
  localparam int AW = 5;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] addr_pin;
  logic reqin, busy, pin, load, req, connect;
  logic [2*AW-1:0] bus;
  par_state_e state;
  int checks = 0, failures = 0;

  par_row_ctrl #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s (state %s)", $time, what, state.name()); end
  endtask

  task automatic step(input logic r, b, p, input par_state_e exp);
    reqin = r; busy = b; pin = p;
    @(negedge clk);
    check(state == exp, $sformatf("expected %s", exp.name()));
    check(load == (exp == P_LOAD) && req == (exp == P_REQ || exp == P_CONN) && connect == (exp == P_CONN), "outputs");
  endtask

  initial begin
    int t0;
    addr_pin = 5'd9; reqin = 0; busy = 0; pin = 0;
    #12 rst_n = 1;
    @(negedge clk);
    step(0, 0, 0, P_LOAD);
    addr_pin = 5'd17; #1 check(bus == {5'd17, ~5'd17}, "latch transparent in LOAD");
    // free column: REQIN -> REQ -> CONN in two edges
    step(1, 0, 0, P_REQ);
    addr_pin = 5'd3; #1 check(bus == {5'd17, ~5'd17}, "latch closed after LOAD");
    step(1, 1, 1, P_CONN);
    step(1, 1, 0, P_CONN);
    step(0, 1, 0, P_LOAD);
    // busy column: wait, then request, lose, wait, request, win
    step(1, 1, 0, P_WAIT);
    step(1, 1, 0, P_WAIT);
    step(1, 0, 0, P_REQ);
    step(1, 1, 0, P_WAIT);
    step(1, 0, 0, P_REQ);
    step(1, 1, 1, P_CONN);
    check(bus == {5'd3, ~5'd3}, "address latched at REQIN");
    step(0, 1, 0, P_LOAD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
