// tb_par_delta_net_sizes: runs the bit-plane Delta network of parallel
// addressed chips at the size of the 8 x 8 Delta network example: 2-2 chips,
// 3 stages, with 4 data planes (the data width is this testbench's choice).
// It checks the two-edges-per-stage setup time (6 edges) and random traffic
// with the data checked at both ends (see par_delta_traffic).  The default
// network (16 x 16 of 4-4 chips) is covered by tb_par_delta_net.
module tb_par_delta_net_sizes;
  logic clk = 0, rst_n = 0;
  logic done8;
  int checks8, failures8;

  par_delta_traffic #(.C(2), .K(3), .W(4), .ACCESSES(8)) u_8x8 (
    .clk, .rst_n, .done(done8), .checks(checks8), .failures(failures8)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks8, failures8 + 1);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    wait (done8);
    $display("TB_RESULT checks=%0d failures=%0d", checks8, failures8);
    $finish;
  end
endmodule
