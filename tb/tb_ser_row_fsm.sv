// tb_ser_row_fsm: directed test of the serial crossbar's row FSM.  Walks the
// machine through every arc of its state diagram (address shift, free and
// busy column, lost and won priority, address forwarding with and without
// bits, read/write toggling and termination) and compares state and Moore
// outputs with the expected sequence written out here, cycle by cycle.
// A second instance with ACK_PLANE = 1 runs on the same inputs: it must follow
// the same states and differ only by asserting SWMODE in LINK, so that an
// acknowledge-plane path turns to read mode by itself.
module tb_ser_row_fsm;
  import xbar_pkg::*;
  localparam int AW = 3;
  logic clk = 0, rst_n = 0, ctrl, busy, pin, zero;
  ser_ctl_t ctl;
  ser_state_e state;
  int checks = 0, failures = 0;

  ser_row_fsm #(.AW(AW)) dut (.*);
  ser_ctl_t ack_ctl;
  ser_state_e ack_state;
  int ack_links = 0;
  ser_row_fsm #(.AW(AW), .ACK_PLANE(1)) dut_ack (
    .clk, .rst_n, .ctrl, .busy, .pin, .zero, .ctl(ack_ctl), .state(ack_state)
  );
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

  // Apply inputs for one cycle, then expect the state after the edge.
  task automatic step(input logic c, b, p, z, input ser_state_e exp);
    ctrl = c; busy = b; pin = p; zero = z;
    @(negedge clk); check(state == exp, $sformatf("expected %s", exp.name()));
  endtask

  function automatic ser_ctl_t outs(input ser_state_e s);
    ser_ctl_t o = '0;
    case (s)
      S_IDLE:   begin o.s1 = 1; o.wrmode = 1; end
      S_SHIFT:  o.s1 = 1;
      S_WAIT:   o.s2 = 1;
      S_REQ:    begin o.s2 = 1; o.req = 1; end
      S_SEND:   begin o.s2 = 1; o.req = 1; o.dec = 1; o.conout = 1; end
      S_CONN0:  begin o.req = 1; o.conout = 1; o.endata = 1; end
      S_LINK:   begin o.req = 1; o.endata = 1; end
      S_CONN, S_CTL1: begin o.req = 1; o.conprop = 1; o.endata = 1; end
      S_SWITCH: begin o.req = 1; o.conprop = 1; o.endata = 1; o.swmode = 1; end
      default: ;
    endcase
    return o;
  endfunction

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (ctl !== outs(state)) begin failures++; $display("FAIL: outputs in %s", state.name()); end
    checks++;
    if (ack_state != state || ack_ctl.swmode != (ctl.swmode || state == S_LINK)) begin
      failures++; $display("FAIL: acknowledge variant in %s", state.name());
    end
    if (state == S_LINK) ack_links++;
  end

  initial begin
    ctrl = 0; busy = 0; pin = 0; zero = 1;
    #12 rst_n = 1;
    @(negedge clk);
    step(0, 0, 0, 1, S_IDLE);
    // free column, won, address to forward
    step(1, 0, 0, 1, S_SHIFT);
    step(1, 0, 0, 1, S_SHIFT);
    step(1, 0, 0, 1, S_REQ);
    step(1, 1, 1, 0, S_SEND);
    step(1, 1, 1, 0, S_SEND);
    step(0, 1, 1, 1, S_LINK);
    step(0, 1, 0, 1, S_CONN);
    step(0, 1, 0, 1, S_CONN);
    // two-cycle CONTROL: switch direction, held high stays in SWITCH
    step(1, 1, 0, 1, S_CTL1);
    step(1, 1, 0, 1, S_SWITCH);
    step(1, 1, 0, 1, S_SWITCH);
    step(0, 1, 0, 1, S_CONN);
    // one-cycle CONTROL: end the connection
    step(1, 1, 0, 1, S_CTL1);
    step(0, 1, 0, 1, S_IDLE);
    // busy column: wait, then lose priority, wait, win with nothing to forward
    step(1, 1, 0, 1, S_SHIFT);
    step(1, 1, 0, 1, S_SHIFT);
    step(1, 1, 0, 1, S_WAIT);
    step(0, 1, 0, 1, S_WAIT);
    step(0, 0, 0, 1, S_REQ);
    step(0, 1, 0, 1, S_WAIT);
    step(0, 0, 0, 1, S_REQ);
    step(0, 1, 1, 1, S_CONN0);
    step(0, 1, 0, 1, S_LINK);
    step(0, 1, 0, 1, S_CONN);
    step(1, 1, 0, 1, S_CTL1);
    step(0, 1, 0, 1, S_IDLE);
    // reset returns to IDLE from anywhere
    step(1, 0, 0, 1, S_SHIFT);
    @(negedge clk); rst_n = 0; #1 check(state == S_IDLE, "reset");
    check(ack_links > 0, "acknowledge variant passed through LINK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
