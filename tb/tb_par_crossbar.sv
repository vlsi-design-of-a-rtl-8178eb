// tb_par_crossbar: self-checking test of the parallel addressed crossbar chip
// at 4-4 with a 2-bit data path.
//
// Checks the two-clock setup time (data reaches the output two edges after
// REQIN rises on a free column), write and read data transfer steered by R/W,
// low outputs when nothing is connected, waiting on a busy column, the
// diagonal-headed wrapping priority chain on simultaneous requests, and
// release when REQIN falls.
module tb_par_crossbar;
  import xbar_pkg::*;
  localparam int N = 4, M = 4, B = 2, AW = 2;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] addr_i [N];
  logic reqin_i [N], rw_i [N], din_oe [N], dout_oe [M];
  logic [B-1:0] din_i [N], din_o [N], dout_i [M], dout_o [M];
  par_state_e row_state [N];
  int checks = 0, failures = 0;

  par_crossbar #(.N(N), .M(M), .B(B)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic all_idle_low(input int except);
    for (int j = 0; j < M; j++) if (j != except) check(dout_o[j] == 0 && dout_oe[j], "idle output low");
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin addr_i[i] = 0; reqin_i[i] = 0; rw_i[i] = 0; din_i[i] = 0; end
    for (int j = 0; j < M; j++) dout_i[j] = 0;
    #12 rst_n = 1;
    @(negedge clk);

    // Setup time: port 1 -> output 2.
    din_i[1] = 2'b11;
    addr_i[1] = 2; reqin_i[1] = 1;
    #1 check(dout_o[2] == 0, "no path at REQIN");
    @(negedge clk); check(dout_o[2] == 0, "no path after one edge");
    @(negedge clk); check(dout_o[2] == 2'b11, "path after two edges");
    addr_i[1] = 0;                          // address pins may change now
    for (int k = 0; k < 6; k++) begin
      din_i[1] = B'($urandom);
      #1 check(dout_o[2] == din_i[1] && dout_oe[2] && !din_oe[1], "write data");
      all_idle_low(2);
      @(negedge clk);
    end
    rw_i[1] = 1;
    for (int k = 0; k < 6; k++) begin
      dout_i[2] = B'($urandom);
      #1 check(din_o[1] == dout_i[2] && din_oe[1] && !dout_oe[2], "read data");
      @(negedge clk);
    end
    rw_i[1] = 0;

    // Busy column: port 3 waits for output 2.
    addr_i[3] = 2; reqin_i[3] = 1; din_i[3] = 2'b01;
    repeat (3) @(negedge clk);
    check(row_state[3] == P_WAIT, "busy column: wait");
    check(dout_o[2] == din_i[1], "holder keeps the column");
    reqin_i[1] = 0;
    @(negedge clk); check(row_state[1] == P_LOAD, "release on REQIN low");
    repeat (2) @(negedge clk);
    check(row_state[3] == P_CONN && dout_o[2] == 2'b01, "waiting row served");
    reqin_i[3] = 0;
    @(negedge clk);

    // Simultaneous: ports 0 and 1 -> output 1 (row 1 heads);
    // then rows 0 and 2 -> output 3 (head 3, chain 3,0,1,2).
    addr_i[0] = 1; addr_i[1] = 1; reqin_i[0] = 1; reqin_i[1] = 1;
    @(negedge clk); @(negedge clk);
    check(row_state[1] == P_CONN && row_state[0] == P_WAIT, "diagonal wins");
    // a waiting row is only left through the column, so row 0 passes
    // through CONN once row 1 lets go
    reqin_i[1] = 0; reqin_i[0] = 0;
    repeat (5) @(negedge clk);
    check(row_state[0] == P_LOAD, "waiting row drained");
    addr_i[0] = 3; addr_i[2] = 3; reqin_i[0] = 1; reqin_i[2] = 1;
    @(negedge clk); @(negedge clk);
    check(row_state[0] == P_CONN && row_state[2] == P_WAIT, "wrapped chain order");
    reqin_i[0] = 0; reqin_i[2] = 0;
    @(negedge clk); @(negedge clk);
    all_idle_low(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
