// tb_par_rc_cell: exhaustive-by-random test of the parallel addressed
// row-column cell.  Every output is compared with the cell's connection rules
// written out independently here: decode of the double-railed address,
// request onto column BUSY, BUSY and priority back to the row, the priority
// chain cut, and the CONNECT-gated direction and data paths.
module tb_par_rc_cell;
  localparam int AW = 3, B = 2, COL = 5;
  logic [2*AW-1:0] bus;
  logic row_req, connect, row_rw, col_busy, pin_in;
  logic [B-1:0] row_data, col_data;
  logic pin_out, sel, col_busy_drv, row_busy_drv, row_pin_drv, col_rw_drv;
  logic [B-1:0] col_data_drv, row_data_drv;
  int checks = 0, failures = 0;

  par_rc_cell #(.AW(AW), .B(B), .COL(COL)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [AW-1:0] a;
    logic s;
    for (int t = 0; t < 2000; t++) begin
      a = AW'($urandom);
      bus = {a, ~a};
      {row_req, connect, row_rw, col_busy, pin_in} = 5'($urandom);
      row_data = B'($urandom); col_data = B'($urandom);
      #1;
      s = (a == AW'(COL));
      check(sel == s, "decode");
      check(col_busy_drv == (s && row_req), "request onto column busy");
      check(row_busy_drv == (s && col_busy), "column busy onto row");
      check(row_pin_drv == (s && pin_in), "priority grant onto row");
      check(pin_out == (pin_in && !(s && row_req)), "priority chain cut");
      check(col_rw_drv == (s && connect && row_rw), "direction path");
      check(col_data_drv == ((s && connect && !row_rw) ? row_data : '0), "write data path");
      check(row_data_drv == ((s && connect && row_rw) ? col_data : '0), "read data path");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
