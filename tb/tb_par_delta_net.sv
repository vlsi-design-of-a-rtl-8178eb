// tb_par_delta_net: self-checking test of the bit-plane Delta network of
// parallel addressed chips, at its defaults (16 x 16 from 4-4 chips, 2 stages,
// 8 data planes).
//
// Checks: the acknowledge reaches the processor only once the last stage has
// connected (four clock edges for two stages of two-edge setup), write data
// and direction reach the addressed memory bus, read data returns from it,
// two processors asking for one memory bus are served one after the other,
// two processors whose paths share an inter-stage link (internal blocking)
// are served one after the other, release when the request falls, and a
// random traffic run in which every processor in turn reads or writes a random
// memory bus until it is acknowledged, with the data checked at both ends.
// The memory is modelled as a fixed pattern on the memory-side data lines.
module tb_par_delta_net;
  localparam int C = 4, K = 2, W = 8, N = 16, AT = 4;
  logic clk = 0, rst_n = 0;
  logic [AT-1:0] p_addr [N];
  logic p_req [N], p_rw [N], p_ack [N];
  logic [W-1:0] p_data_i [N], p_data_o [N];
  logic m_req [N], m_rw [N], m_data_oe [N];
  logic [W-1:0] m_data_o [N], m_data_i [N];
  int checks = 0, failures = 0;

  par_delta_net dut (.*);
  always #5 clk = ~clk;

  function automatic logic [W-1:0] mem_word(input int j);
    return W'(j * 37 + 5);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic request(input int p, input int mem, input bit rd);
    p_addr[p] = AT'(mem); p_rw[p] = rd; p_req[p] = 1;
    p_data_i[p] = W'($urandom);
  endtask

  // the acknowledged path of processor p to memory bus mem carries data
  task automatic check_path(input int p, input int mem);
    check(p_ack[p] && m_req[mem], "path acknowledged and memory selected");
    check(m_rw[mem] == p_rw[p], "direction reaches memory");
    if (p_rw[p]) check(p_data_o[p] == mem_word(mem) && !m_data_oe[mem], "read data");
    else check(m_data_o[mem] == p_data_i[p] && m_data_oe[mem], "write data");
  endtask

  int t, a, b;
  initial begin
    for (int i = 0; i < N; i++) begin
      p_addr[i] = 0; p_req[i] = 0; p_rw[i] = 0; p_data_i[i] = 0;
      m_data_i[i] = mem_word(i);
    end
    #12 rst_n = 1;
    @(negedge clk);

    // setup time through two stages, then write
    request(3, 13, 0);
    t = 0;
    while (!p_ack[3] && t < 20) begin @(negedge clk); t++; end
    check(t == 2 * K, $sformatf("ack after %0d edges, expected %0d", t, 2 * K));
    check_path(3, 13);
    for (int k = 0; k < 4; k++) begin
      p_data_i[3] = W'($urandom); #1 check_path(3, 13); @(negedge clk);
    end
    for (int j = 0; j < N; j++) if (j != 13) check(!m_req[j], "other memory buses idle");
    // turn to read on the same path
    p_rw[3] = 1; #1 check_path(3, 13);
    p_req[3] = 0; @(negedge clk); #1;
    check(!p_ack[3] && !m_req[13], "release");
    @(negedge clk);

    // two processors for one memory bus (same first-stage chip)
    request(4, 9, 1); request(6, 9, 0);
    repeat (2 * K + 1) @(negedge clk);
    check(p_ack[4] != p_ack[6], "one of two served");
    a = p_ack[4] ? 4 : 6; b = p_ack[4] ? 6 : 4;
    check_path(a, 9);
    p_req[a] = 0;
    t = 0;
    while (!p_ack[b] && t < 20) begin @(negedge clk); t++; end
    check(p_ack[b], "second served after release");
    check_path(b, 9);
    p_req[b] = 0; repeat (3) @(negedge clk);

    // internal blocking: processors 0 and 1 share first-stage chip 0 and
    // memories 4 and 6 share the top digit, so both need the same link
    request(0, 4, 0); request(1, 6, 0);
    repeat (2 * K + 1) @(negedge clk);
    check(p_ack[0] != p_ack[1], "shared link: one served");
    a = p_ack[0] ? 0 : 1; b = p_ack[0] ? 1 : 0;
    check(!m_req[a == 0 ? 6 : 4], "blocked memory bus idle");
    p_req[a] = 0;
    t = 0;
    while (!p_ack[b] && t < 20) begin @(negedge clk); t++; end
    check_path(b, b == 0 ? 4 : 6);
    p_req[b] = 0; repeat (3) @(negedge clk);

    // random traffic: every processor makes 6 accesses
    begin
      int left [N], dest [N], served;
      served = 0;
      for (int i = 0; i < N; i++) begin
        left[i] = 6; dest[i] = $urandom_range(N - 1);
        request(i, dest[i], 1'($urandom));
      end
      while (served < N * 6) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          if (p_req[i] && p_ack[i]) begin
            check_path(i, dest[i]);
            p_req[i] = 0; left[i]--; served++;
          end else if (!p_req[i] && left[i] > 0 && $urandom_range(2) == 0) begin
            dest[i] = $urandom_range(N - 1);
            request(i, dest[i], 1'($urandom));
          end
        end
      end
    end
    repeat (3) @(negedge clk);
    for (int j = 0; j < N; j++) check(!m_req[j], "all released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
