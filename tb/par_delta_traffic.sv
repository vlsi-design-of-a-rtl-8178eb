// par_delta_traffic: traffic generator and checker around one par_delta_net,
// used to run the network at several sizes from one testbench.
//
// After reset it first times one request on an idle network (the acknowledge
// must come 2 clock edges per stage after the request), then lets every
// processor make ACCESSES reads or writes to random memory buses.  A
// processor holds its request until acknowledged; at that point the path is
// checked end to end (memory bus selected, direction, write data at the
// memory or read data at the processor) and the request is dropped.  The
// memory side returns a fixed word per memory bus.  done rises when all
// accesses are complete; checks and failures count as in a testbench.
module par_delta_traffic #(
  parameter int unsigned C = 2,
  parameter int unsigned K = 3,
  parameter int unsigned W = 4,
  parameter int unsigned ACCESSES = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = C ** K, AT = K * $clog2(C);
  logic [AT-1:0] p_addr [N];
  logic p_req [N], p_rw [N], p_ack [N];
  logic [W-1:0] p_data_i [N], p_data_o [N];
  logic m_req [N], m_rw [N], m_data_oe [N];
  logic [W-1:0] m_data_o [N], m_data_i [N];

  par_delta_net #(.C(C), .K(K), .W(W)) dut (.*);

  function automatic logic [W-1:0] mem_word(input int j);
    logic [W-1:0] v = '0;
    for (int k = 0; k < W; k += 8) v = v | (W'(j * 37 + 5 + k) << k);
    return v;
  endfunction

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v = '0;
    for (int k = 0; k < W; k += 32) v = v | (W'($urandom) << k);
    return v;
  endfunction

  always_comb for (int j = 0; j < N; j++) m_data_i[j] = mem_word(j);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0dx%0d @%0t: %s", N, N, $time, what); end
  endtask

  task automatic check_path(input int p);
    int mem = int'(p_addr[p]);
    check(m_req[mem] && m_rw[mem] == p_rw[p], "memory bus selected with direction");
    if (p_rw[p]) check(p_data_o[p] == mem_word(mem), "read data");
    else check(m_data_o[mem] == p_data_i[p] && m_data_oe[mem], "write data");
  endtask

  initial begin
    int left [N], served, t;
    done = 0; checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      p_addr[i] = '0; p_req[i] = 0; p_rw[i] = 0; p_data_i[i] = '0;
    end
    @(posedge rst_n);
    @(negedge clk);
    // setup time on an idle network
    p_addr[N-1] = AT'(1); p_data_i[N-1] = rand_word(); p_req[N-1] = 1;
    t = 0;
    while (!p_ack[N-1] && t < 8 * K) begin @(negedge clk); t++; end
    check(t == 2 * K, $sformatf("acknowledge after %0d edges, expected %0d", t, 2 * K));
    check_path(N - 1);
    p_req[N-1] = 0;
    @(negedge clk);
    // random traffic
    served = 0;
    for (int i = 0; i < N; i++) left[i] = ACCESSES;
    while (served < N * ACCESSES) begin
      for (int i = 0; i < N; i++) begin
        if (p_req[i] && p_ack[i]) begin
          check_path(i);
          p_req[i] = 0; left[i]--; served++;
        end else if (!p_req[i] && left[i] > 0 && $urandom_range(2) == 0) begin
          p_addr[i] = AT'($urandom_range(N - 1)); p_rw[i] = 1'($urandom);
          p_data_i[i] = rand_word(); p_req[i] = 1;
        end
      end
      @(negedge clk);
    end
    repeat (2) @(negedge clk);
    for (int j = 0; j < N; j++) check(!m_req[j], "all released");
    done = 1;
  end
endmodule
