// tb_xbar_top: end-to-end test of both crossbar chips at their default sizes
// (serial 16-16, parallel 32-32) and of the 16 x 16 Delta network of 4-4
// parallel chips, with no parameter overrides.
//
// Serial chip: output port 5 is looped back into input port 7 so that one
// chip acts as two network stages.  Port 0 streams the 8-bit address
// {5, 9}: the first stage takes 5, forwards 9 under CONTROL to the second
// stage, which connects to output 9 and emits its connect pulse.  The test
// checks that pulse's latency against the network setup bound of the
// document (log2 M + 2l - 1 clocks for l stages), then write data through
// both stages, a two-cycle CONTROL pulse turning the whole path to read mode
// and back, a competing request that waits on the busy column, priority on
// simultaneous requests, and a one-cycle pulse releasing the whole path.
// Parallel chip: two-clock setup, write and read transfer, busy wait,
// priority, release.
// Network: a write path whose acknowledge must arrive after two stages of
// two-edge setup, internal blocking of two processors needing the same
// inter-stage link, read data returned from the memory side, and release.
// Each mechanism is counted; one never seen is a failure.
module tb_xbar_top;
  import xbar_pkg::*;
  localparam int SN = 16, SM = 16, PN = 32, PM = 32;
  logic clk = 0, rst_n = 0;

  logic [0:0] ser_in_data_i [SN], ser_in_data_o [SN], ser_out_data_i [SM], ser_out_data_o [SM];
  logic ser_in_data_oe [SN], ser_in_ctrl_i [SN], ser_out_data_oe [SM], ser_out_ctrl_o [SM];
  ser_state_e ser_row_state [SN];
  logic [4:0] par_addr_i [PN];
  logic par_reqin_i [PN], par_rw_i [PN], par_din_oe [PN], par_dout_oe [PM];
  logic [0:0] par_din_i [PN], par_din_o [PN], par_dout_i [PM], par_dout_o [PM];
  par_state_e par_row_state [PN];
  localparam int NN = 16, NW = 8;
  logic [3:0] net_p_addr [NN];
  logic net_p_req [NN], net_p_rw [NN], net_p_ack [NN], net_m_req [NN], net_m_rw [NN], net_m_data_oe [NN];
  logic [NW-1:0] net_p_data_i [NN], net_p_data_o [NN], net_m_data_o [NN], net_m_data_i [NN];

  // testbench-driven pins; the loop-back overrides input 7 and output 5
  logic tb_data [SN], tb_ctrl [SN], tb_odata [SM];

  xbar_top dut (.*);

  always_comb begin
    for (int i = 0; i < SN; i++) begin ser_in_data_i[i][0] = tb_data[i]; ser_in_ctrl_i[i] = tb_ctrl[i]; end
    for (int j = 0; j < SM; j++) ser_out_data_i[j][0] = tb_odata[j];
    ser_in_data_i[7][0] = ser_out_data_o[5][0];
    ser_in_ctrl_i[7]    = ser_out_ctrl_o[5];
    ser_out_data_i[5][0] = ser_in_data_o[7][0];
  end

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int n_forward = 0, n_conn0 = 0, n_wait = 0, n_prio_loss = 0, n_read = 0, n_write_back = 0, n_release = 0;
  int q_setup = 0, q_block = 0, q_read = 0, q_write = 0, q_release = 0;
  int p_setup = 0, p_wait = 0, p_prio_loss = 0, p_read = 0, p_release = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // network memory side: a fixed word per memory bus
  always_comb for (int j = 0; j < NN; j++) net_m_data_i[j] = NW'(j * 29 + 3);

  // network monitor: every acknowledged path is checked end to end
  always @(negedge clk) if (rst_n)
    for (int i = 0; i < NN; i++)
      if (net_p_req[i] && net_p_ack[i]) begin
        check(net_m_req[net_p_addr[i]] && net_m_rw[net_p_addr[i]] == net_p_rw[i], "network path selects memory");
        if (net_p_rw[i]) begin
          check(net_p_data_o[i] == NW'(32'(net_p_addr[i]) * 29 + 3), "network read data");
          q_read++;
        end else begin
          check(net_m_data_o[net_p_addr[i]] == net_p_data_i[i] && net_m_data_oe[net_p_addr[i]],
                "network write data");
          q_write++;
        end
      end

  // mechanism monitors
  ser_state_e sprev [SN];
  par_state_e pprev [PN];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < SN; i++) begin
      if (ser_row_state[i] == S_SEND && sprev[i] != S_SEND) n_forward++;
      if (ser_row_state[i] == S_CONN0) n_conn0++;
      if (ser_row_state[i] == S_WAIT && sprev[i] inside {S_SHIFT, S_IDLE}) n_wait++;
      if (ser_row_state[i] == S_WAIT && sprev[i] == S_REQ) n_prio_loss++;
      if (ser_row_state[i] == S_IDLE && sprev[i] == S_CTL1) n_release++;
      sprev[i] = ser_row_state[i];
    end
    for (int i = 0; i < PN; i++) begin
      if (par_row_state[i] == P_WAIT && pprev[i] == P_LOAD) p_wait++;
      if (par_row_state[i] == P_WAIT && pprev[i] == P_REQ) p_prio_loss++;
      if (par_row_state[i] == P_LOAD && pprev[i] == P_CONN) p_release++;
      pprev[i] = par_row_state[i];
    end
  end

  int pulse9_cyc = -1, pulse9_len = 0;
  always @(posedge clk) if (ser_out_ctrl_o[9]) begin
    if (pulse9_cyc < 0) pulse9_cyc = cyc;
    pulse9_len++;
  end

  task automatic send_addr(input int p, input logic [31:0] a, input int nb);
    for (int k = nb - 1; k >= 0; k--) begin
      tb_ctrl[p] = 1'b1; tb_data[p] = a[k];
      @(negedge clk);
    end
    tb_ctrl[p] = 1'b0; tb_data[p] = 1'b0;
  endtask

  task automatic pulse(input int p, input int n);
    tb_ctrl[p] = 1'b1; repeat (n) @(negedge clk);
    tb_ctrl[p] = 1'b0; @(negedge clk);
  endtask

  initial begin
    int t0;
    for (int i = 0; i < SN; i++) begin tb_data[i] = 0; tb_ctrl[i] = 0; sprev[i] = S_IDLE; end
    for (int j = 0; j < SM; j++) tb_odata[j] = 0;
    for (int i = 0; i < PN; i++) begin par_addr_i[i] = 0; par_reqin_i[i] = 0; par_rw_i[i] = 0; par_din_i[i] = 0; pprev[i] = P_LOAD; end
    for (int i = 0; i < NN; i++) begin net_p_addr[i] = 0; net_p_req[i] = 0; net_p_rw[i] = 0; net_p_data_i[i] = 0; end
    for (int j = 0; j < PM; j++) par_dout_i[j] = 0;
    #12 rst_n = 1;
    @(negedge clk);

    // ---- serial chip: two stages through the loop-back ----
    t0 = cyc;
    send_addr(0, 32'({4'd5, 4'd9}), 8);
    repeat (6) @(negedge clk);
    check(ser_row_state[0] == S_CONN && ser_row_state[7] == S_CONN, "two-stage path made");
    check(pulse9_len == 1, "one connect pulse at the last stage");
    check(pulse9_cyc - t0 <= 8 + 2 * 2 - 1,
          $sformatf("setup %0d clocks within log2 M + 2l - 1 = 11", pulse9_cyc - t0));
    $display("serial two-stage setup: connect pulse %0d clocks after the first address bit", pulse9_cyc - t0);
    for (int k = 0; k < 8; k++) begin
      tb_data[0] = 1'($urandom);
      #1 check(ser_out_data_o[9][0] == tb_data[0] && ser_out_data_oe[9], "write through two stages");
      @(negedge clk);
    end
    // competing request for output 9 from port 3 waits
    send_addr(3, 32'(4'd9), 4);
    @(negedge clk);
    check(ser_row_state[3] == S_WAIT, "port 3 waits on busy output 9");
    // turn the path to read mode
    pulse(0, 2); @(negedge clk);
    check(ser_in_data_oe[0] && !ser_out_data_oe[9], "read mode pad directions");
    for (int k = 0; k < 8; k++) begin
      tb_odata[9] = 1'($urandom);
      #1 check(ser_in_data_o[0][0] == tb_odata[9], "read through two stages");
      if (ser_in_data_o[0][0] == tb_odata[9]) n_read++;
      @(negedge clk);
    end
    tb_odata[9] = 0;
    pulse(0, 2); @(negedge clk);
    check(!ser_in_data_oe[0] && ser_out_data_oe[9], "back to write mode");
    if (!ser_in_data_oe[0]) n_write_back++;
    // release the whole path; port 3 then takes output 9
    pulse(0, 1);
    check(ser_row_state[0] == S_IDLE && ser_row_state[7] == S_IDLE, "both stages released");
    repeat (4) @(negedge clk);
    check(ser_row_state[3] == S_CONN, "port 3 served after release");
    pulse(3, 1);
    // simultaneous requests for output 12: rows 12 (head) and 2
    fork
      send_addr(12, 32'(4'd12), 4);
      send_addr(2, 32'(4'd12), 4);
    join
    repeat (4) @(negedge clk);
    check(ser_row_state[12] == S_CONN && ser_row_state[2] == S_WAIT, "diagonal row wins output 12");
    pulse(12, 1);
    repeat (4) @(negedge clk);
    check(ser_row_state[2] == S_CONN, "row 2 served next");
    pulse(2, 1);

    // ---- parallel chip ----
    par_din_i[4] = 1'b1; par_addr_i[4] = 5'd20; par_reqin_i[4] = 1;
    @(negedge clk); check(par_dout_o[20] == 0, "parallel: no path after one edge");
    @(negedge clk); check(par_dout_o[20] == 1, "parallel: path after two edges");
    if (par_dout_o[20] == 1) p_setup++;
    par_addr_i[9] = 5'd20; par_reqin_i[9] = 1;
    repeat (2) @(negedge clk);
    check(par_row_state[9] == P_WAIT, "parallel: busy column wait");
    par_rw_i[4] = 1;
    for (int k = 0; k < 6; k++) begin
      par_dout_i[20] = 1'($urandom);
      #1 check(par_din_o[4] == par_dout_i[20] && par_din_oe[4], "parallel: read data");
      if (par_din_o[4] == par_dout_i[20]) p_read++;
      @(negedge clk);
    end
    par_rw_i[4] = 0; par_reqin_i[4] = 0;
    repeat (3) @(negedge clk);
    check(par_row_state[9] == P_CONN, "parallel: waiting row served");
    par_reqin_i[9] = 0;
    @(negedge clk);
    // simultaneous: rows 30 and 31 -> output 31 (row 31 heads)
    par_addr_i[30] = 5'd31; par_addr_i[31] = 5'd31; par_reqin_i[30] = 1; par_reqin_i[31] = 1;
    repeat (2) @(negedge clk);
    check(par_row_state[31] == P_CONN && par_row_state[30] == P_WAIT, "parallel: diagonal wins");
    par_reqin_i[31] = 0;
    repeat (3) @(negedge clk);
    par_reqin_i[30] = 0;
    repeat (2) @(negedge clk);

    // ---- Delta network of parallel chips ----
    net_p_addr[3] = 4'd13; net_p_rw[3] = 0; net_p_data_i[3] = 8'hA5; net_p_req[3] = 1;
    begin
      int t = 0;
      while (!net_p_ack[3] && t < 20) begin @(negedge clk); t++; end
      check(t == 4, $sformatf("network acknowledge after %0d edges, expected 4", t));
      if (t == 4) q_setup++;
    end
    repeat (2) @(negedge clk);
    net_p_req[3] = 0;
    @(negedge clk);
    check(!net_p_ack[3] && !net_m_req[13], "network release");
    if (!net_p_ack[3] && !net_m_req[13]) q_release++;
    // processors 0 and 1 share a first-stage chip; memory buses 4 and 6 share
    // the top address digit, so both paths need the same inter-stage link
    net_p_addr[0] = 4'd4; net_p_rw[0] = 0; net_p_data_i[0] = 8'h3C; net_p_req[0] = 1;
    net_p_addr[1] = 4'd6; net_p_rw[1] = 1; net_p_req[1] = 1;
    repeat (5) @(negedge clk);
    check(net_p_ack[0] != net_p_ack[1], "network internal blocking");
    if (net_p_ack[0] != net_p_ack[1]) q_block++;
    if (net_p_ack[0]) net_p_req[0] = 0; else net_p_req[1] = 0;
    repeat (6) @(negedge clk);
    check(net_p_ack[0] || net_p_ack[1], "blocked processor served after release");
    net_p_req[0] = 0; net_p_req[1] = 0;
    repeat (2) @(negedge clk);

    check(q_setup > 0 && q_block > 0 && q_read > 0 && q_write > 0 && q_release > 0,
          $sformatf("network mechanisms setup %0d block %0d read %0d write %0d release %0d",
                    q_setup, q_block, q_read, q_write, q_release));
    check(n_forward > 0,    $sformatf("address forwarding seen %0d", n_forward));
    check(n_conn0 > 0,      $sformatf("last-stage connect seen %0d", n_conn0));
    check(n_wait > 0,       $sformatf("busy wait seen %0d", n_wait));
    check(n_prio_loss > 0,  $sformatf("priority loss seen %0d", n_prio_loss));
    check(n_read > 0,       $sformatf("read mode seen %0d", n_read));
    check(n_write_back > 0, $sformatf("write mode return seen %0d", n_write_back));
    check(n_release > 0,    $sformatf("release seen %0d", n_release));
    check(p_setup > 0 && p_wait > 0 && p_prio_loss > 0 && p_read > 0 && p_release > 0,
          $sformatf("parallel mechanisms setup %0d wait %0d prio %0d read %0d release %0d",
                    p_setup, p_wait, p_prio_loss, p_read, p_release));
    $display("serial: forward %0d conn0 %0d wait %0d prio_loss %0d read %0d write_back %0d release %0d",
             n_forward, n_conn0, n_wait, n_prio_loss, n_read, n_write_back, n_release);
    $display("network: setup %0d block %0d read %0d write %0d release %0d",
             q_setup, q_block, q_read, q_write, q_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
