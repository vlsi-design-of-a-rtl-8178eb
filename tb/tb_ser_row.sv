// tb_ser_row: test of one serial crossbar row (registers, FSM and output
// logic) with the column side played by the testbench.  Checks the decoded
// address on the row bus, the next-stage address bits on Row Data framed by
// Row Control and Connect, write-mode data and control propagation, the
// Row R/W toggle on a two-cycle CONTROL pulse, and its clearing on release.
module tb_ser_row;
  import xbar_pkg::*;
  localparam int AW = 3, L = 6, B = 1;
  logic clk = 0, rst_n = 0;
  logic [B-1:0] data_pin, row_data;
  logic ctrl_pin, row_req, connect, row_ctrl, row_rw, row_busy, row_pin;
  logic [2*AW-1:0] pri_bus;
  ser_state_e state;
  int checks = 0, failures = 0;

  ser_row #(.AW(AW), .L(L), .B(B)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // column model: grants whenever requested
  assign row_busy = 1'b0;
  assign row_pin  = 1'b1;

  logic [7:0] got; int ngot;
  always @(posedge clk) if (row_ctrl && connect && !row_rw && state == S_SEND) begin
    got[ngot] = row_data[0]; ngot++;
  end

  initial begin
    logic [7:0] a = 8'b101_11001;        // output 5, then 5 next-stage bits
    ngot = 0; got = 0;
    data_pin = 0; ctrl_pin = 0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int k = 7; k >= 0; k--) begin
      ctrl_pin = 1; data_pin = a[k];
      @(negedge clk);
      if (k == 5) check(pri_bus == {3'b101, ~3'b101}, "address on row bus");
    end
    ctrl_pin = 0; data_pin = 0;
    repeat (4) @(negedge clk);
    check(ngot == 5, $sformatf("five bits forwarded (%0d)", ngot));
    check(got[4:0] == 5'b10011, "forwarded bits in arrival order");
    check(state == S_CONN && connect && row_req, "connected");
    for (int k = 0; k < 6; k++) begin
      data_pin = 1'($urandom); ctrl_pin = 0;
      #1 check(row_data == data_pin && row_ctrl == 0 && !row_rw, "write data on row");
      @(negedge clk);
    end
    // two-cycle pulse: read mode; CONTROL propagates meanwhile
    ctrl_pin = 1; #1 check(row_ctrl, "CONTROL propagated"); @(negedge clk);
    @(negedge clk); ctrl_pin = 0;
    @(negedge clk);
    check(row_rw, "read mode after two-cycle pulse");
    ctrl_pin = 1; @(negedge clk); @(negedge clk); ctrl_pin = 0; @(negedge clk);
    check(!row_rw, "write mode after second two-cycle pulse");
    ctrl_pin = 1; @(negedge clk); @(negedge clk); ctrl_pin = 0; @(negedge clk);
    check(row_rw, "read mode again");
    ctrl_pin = 1; @(negedge clk); ctrl_pin = 0; @(negedge clk);
    check(state == S_IDLE && !row_req && !connect, "released");
    @(negedge clk);
    check(!row_rw, "WRMODE clears direction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
