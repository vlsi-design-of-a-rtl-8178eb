// tb_ser_crossbar: self-checking test of the serial addressed crossbar chip at
// 4-4 with a 6-bit secondary register.
//
// Drives address streams on the DATA/CONTROL pins and checks, against values
// worked out here from the protocol: the forwarded next-stage address on the
// output port (bits and framing), its latency (the first forwarded bit leaves
// log2(m)+1 clocks after the first address bit enters), write-mode data
// transfer, the two-cycle CONTROL pulse that turns the path to read mode, the
// one-cycle pulse that ends it, waiting on a busy column with the address
// buffered, the diagonal-headed wrapping priority chain, and the one-cycle
// CONTROL pulse of a path with no address to forward.
module tb_ser_crossbar;
  import xbar_pkg::*;

  localparam int N = 4, M = 4, L = 6, B = 1, AW = 2;

  logic clk = 0, rst_n = 0;
  logic [B-1:0] in_data_i [N], in_data_o [N], out_data_i [M], out_data_o [M];
  logic in_data_oe [N], in_ctrl_i [N], out_data_oe [M], out_ctrl_o [M];
  ser_state_e row_state [N];

  int checks = 0, failures = 0, cyc = 0;

  ser_crossbar #(.N(N), .M(M), .L(L), .B(B)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // Capture of each output port's CONTROL-framed bit stream.
  logic [31:0] cap_bits [M];
  int          cap_len  [M];
  int          cap_first[M];
  always @(posedge clk) begin
    for (int j = 0; j < M; j++)
      if (out_ctrl_o[j]) begin
        if (cap_len[j] == 0) cap_first[j] = cyc;
        cap_bits[j][cap_len[j]] = out_data_o[j][0];
        cap_len[j]++;
      end
  end
  task automatic clear_cap(); for (int j = 0; j < M; j++) begin cap_len[j] = 0; cap_bits[j] = 0; end endtask

  // Stream an address of nb bits (bit nb-1 first) into port p, starting at
  // the next cycle; returns the cycle count at which the first bit is sampled.
  task automatic send_addr(input int p, input logic [31:0] a, input int nb, output int t0);
    @(negedge clk);
    t0 = cyc;
    for (int k = nb - 1; k >= 0; k--) begin
      in_ctrl_i[p] = 1'b1; in_data_i[p][0] = a[k];
      @(negedge clk);
    end
    in_ctrl_i[p] = 1'b0; in_data_i[p] = '0;
  endtask

  task automatic pulse_ctrl(input int p, input int n);
    @(negedge clk);
    in_ctrl_i[p] = 1'b1;
    repeat (n) @(negedge clk);
    in_ctrl_i[p] = 1'b0;
    @(negedge clk);
  endtask

  function automatic logic [31:0] rev_low(input logic [31:0] a, input int nb);
    // expected stream order: the forwarded bits, first sent first
    logic [31:0] r = 0;
    for (int k = 0; k < nb; k++) r[k] = a[nb - 1 - k];
    return r;
  endfunction

  int t0, t1;
  logic [31:0] fwd;

  initial begin
    for (int i = 0; i < N; i++) begin in_data_i[i] = '0; in_ctrl_i[i] = 0; end
    for (int j = 0; j < M; j++) out_data_i[j] = '0;
    clear_cap();
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // A: port 0 -> output 2, forwarding 5 next-stage bits 10110.
    fwd = 32'b10110;
    send_addr(0, 32'({2'd2, 5'b10110}), AW + 5, t0);
    repeat (4) @(negedge clk);
    check(cap_len[2] == 5, "A: five forwarded bits framed by CONTROL");
    check(32'(cap_bits[2][4:0]) == rev_low(fwd, 5), "A: forwarded bits in order");
    check(cap_first[2] - t0 == AW + 1, $sformatf("A: forward latency %0d", cap_first[2] - t0));
    for (int j = 0; j < M; j++) if (j != 2) check(cap_len[j] == 0 && out_data_o[j] == 0, "A: idle outputs low");
    check(row_state[0] == S_CONN, "A: row 0 connected");
    // write-mode data
    for (int k = 0; k < 8; k++) begin
      in_data_i[0] = B'($urandom);
      #1 check(out_data_o[2] == in_data_i[0] && out_data_oe[2] && !in_data_oe[0], "A: write data reaches output 2");
      @(negedge clk);
    end

    // B: port 1 asks for output 2 (busy) and buffers 3 bits 011.
    clear_cap();
    send_addr(1, 32'({2'd2, 3'b011}), AW + 3, t1);
    @(negedge clk);
    check(row_state[1] == S_WAIT, "B: row 1 waits on busy column");
    check(cap_len[2] == 0, "B: nothing leaks onto output 2");
    // port 0 turns to read mode
    pulse_ctrl(0, 2);
    repeat (2) @(negedge clk);
    check(in_data_oe[0] && !out_data_oe[2], "B: read mode pad directions");
    for (int k = 0; k < 8; k++) begin
      out_data_i[2] = B'($urandom);
      #1 check(in_data_o[0] == out_data_i[2], "B: read data reaches input 0");
      @(negedge clk);
    end
    out_data_i[2] = '0;
    // back to write mode and then end the connection
    pulse_ctrl(0, 2);
    @(negedge clk);
    check(!in_data_oe[0] && out_data_oe[2], "B: back to write mode");
    clear_cap();
    pulse_ctrl(0, 1);
    check(row_state[0] == S_IDLE, "B: row 0 released");
    repeat (8) @(negedge clk);
    check(row_state[1] == S_CONN, "B: row 1 took output 2");
    // the released CONTROL pulse (1 bit) then the buffered 3 bits
    check(cap_len[2] == 4 && 32'(cap_bits[2][3:1]) == rev_low(32'b011, 3), "B: buffered address forwarded");
    pulse_ctrl(1, 1);
    repeat (2) @(negedge clk);

    // C: simultaneous requests. Ports 1 and 3 -> output 3 (row 3 heads it);
    // ports 0 and 2 -> output 1 (row 1 heads, chain 1,2,3,0: row 2 wins).
    fork
      send_addr(1, 32'({2'd3, 2'b11}), AW + 2, t0);
      send_addr(3, 32'({2'd3, 2'b11}), AW + 2, t0);
      send_addr(0, 32'({2'd1, 2'b01}), AW + 2, t0);
      send_addr(2, 32'({2'd1, 2'b01}), AW + 2, t0);
    join
    repeat (4) @(negedge clk);
    check(row_state[3] == S_CONN && row_state[1] == S_WAIT, "C: diagonal row wins its column");
    check(row_state[2] == S_CONN && row_state[0] == S_WAIT, "C: chain order wraps below the head");
    // A waiting row cannot be withdrawn: release the winners first.
    fork pulse_ctrl(3, 1); pulse_ctrl(2, 1); join
    repeat (8) @(negedge clk);
    check(row_state[1] == S_CONN && row_state[0] == S_CONN, "C: waiting rows served after release");
    fork pulse_ctrl(1, 1); pulse_ctrl(0, 1); join
    repeat (2) @(negedge clk);
    for (int i = 0; i < N; i++) check(row_state[i] == S_IDLE, "C: all rows released");

    // D: last-stage path, no address to forward: one-cycle CONTROL pulse.
    clear_cap();
    send_addr(2, {30'd0, 2'd0}, AW, t0);
    repeat (4) @(negedge clk);
    check(cap_len[0] == 1, "D: single connect pulse on output 0");
    check(row_state[2] == S_CONN, "D: row 2 connected");
    pulse_ctrl(2, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
