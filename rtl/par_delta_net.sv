// par_delta_net: an N x N circuit-switched Delta network built from
// parallel addressed c-c crossbar chips with a 1-bit data path, organised in
// bit planes.
//
// N = C**K processor buses connect to N memory buses through K stages of
// N/C chips per plane.  Every bus has, per stage, one chip in each of:
//   the Request plane   carries the request forward (write mode);
//   the R/W plane       carries the direction bit forward (write mode);
//   the Acknowledge plane, hardwired to read mode, carries the acknowledge
//                       back toward the processor;
//   W data planes       carry the W-bit data word, in the direction set by
//                       the R/W plane output of the previous stage;
//   address planes      carry, as data, the address digits of later stages,
//                       (K-1-s)*log2(C) of them at stage s, so the network
//                       narrows by log2(C) planes per stage.
// At stage s every chip of a bus takes the same log2(C)-bit address digit on
// its address pins (digit K-1-s, most significant first) and the same REQIN:
// from the processor at stage 0, from the previous stage's address planes and
// Request plane afterwards.  At the last stage the Request plane output is
// tied to the Acknowledge plane output, so when the whole path exists the
// request returns to the processor as its acknowledge.
//
// Stage-to-stage wiring is the c-ary perfect shuffle (rotate the log2(N)-bit
// line number left by log2(C)), which gives destination-digit routing; the
// document names the Delta network but does not print its wiring, so this
// choice is this design's.  Each stage needs two clock edges; the
// acknowledge arrives combinationally once the last stage connects.
// Defaults: 16 x 16 from 4-4 chips as in the document's appendix example;
// the data width W = 8 is this design's choice.
module par_delta_net #(
  parameter int unsigned C = 4,            // crossbar size (c-c)
  parameter int unsigned K = 2,            // stages
  parameter int unsigned W = 8,            // data planes
  localparam int unsigned N  = C ** K,
  localparam int unsigned AC = $clog2(C),  // address bits per stage
  localparam int unsigned AT = K * AC      // full memory-bus address
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side, one bus per processor
  input  logic [AT-1:0] p_addr [N],        // memory bus number
  input  logic          p_req  [N],
  input  logic          p_rw   [N],        // 1: read
  input  logic [W-1:0]  p_data_i [N],
  output logic [W-1:0]  p_data_o [N],      // read data (valid when p_rw)
  output logic          p_ack  [N],
  // memory side, one bus per memory module
  output logic          m_req  [N],        // a processor holds this bus
  output logic          m_rw   [N],
  output logic [W-1:0]  m_data_o [N],      // write data
  output logic          m_data_oe [N],     // network drives the data lines
  input  logic [W-1:0]  m_data_i [N]       // read data from the memory
);

  localparam int unsigned LB = $clog2(N);  // line number width

  function automatic int unsigned shuffle(input int unsigned l);
    logic [LB-1:0] v = LB'(l);
    return int'({v[LB-AC-1:0], v[LB-1:LB-AC]});
  endfunction

  for (genvar s = 0; s < K; s++) begin : g_st
    localparam int unsigned NA = (K - 1 - s) * AC;   // address planes here

    // forward signals on this stage's input lines
    logic          req_in  [N];
    logic          rw_in   [N];
    logic [AT-1:0] addr_in [N];
    logic [W-1:0]  data_in [N];
    // backward signals on the input lines (chip DATAIN driven in read mode)
    logic [W-1:0]  data_back [N];
    logic          ack_back  [N];
    // forward signals on this stage's output lines
    logic          req_out  [N];
    logic          rw_out   [N];
    logic [AT-1:0] addr_out [N];
    logic [W-1:0]  data_out [N];
    logic          data_oe  [N];
    // backward signals arriving on the output lines
    logic [W-1:0]  data_ret [N];
    logic          ack_ret  [N];

    // inputs of this stage
    if (s == 0) begin : g_first
      for (genvar l = 0; l < N; l++) begin : g_l
        assign req_in[l]  = p_req[l];
        assign rw_in[l]   = p_rw[l];
        assign addr_in[l] = p_addr[l];
        assign data_in[l] = p_data_i[l];
        assign p_data_o[l] = data_back[l];
        assign p_ack[l]    = ack_back[l];
      end
    end else begin : g_next
      for (genvar l = 0; l < N; l++) begin : g_l
        assign req_in[shuffle(l)]  = g_st[s-1].req_out[l];
        assign rw_in[shuffle(l)]   = g_st[s-1].rw_out[l];
        assign addr_in[shuffle(l)] = g_st[s-1].addr_out[l];
        assign data_in[shuffle(l)] = g_st[s-1].data_out[l];
      end
    end

    // returns into this stage's outputs
    if (s == K - 1) begin : g_last
      for (genvar l = 0; l < N; l++) begin : g_l
        assign data_ret[l]  = m_data_i[l];
        assign ack_ret[l]   = req_out[l];      // Request plane -> Acknowledge plane
        assign m_req[l]     = req_out[l];
        assign m_rw[l]      = rw_out[l];
        assign m_data_o[l]  = data_out[l];
        assign m_data_oe[l] = data_oe[l];
      end
    end else begin : g_mid
      for (genvar l = 0; l < N; l++) begin : g_l
        assign data_ret[l] = g_st[s+1].data_back[shuffle(l)];
        assign ack_ret[l]  = g_st[s+1].ack_back[shuffle(l)];
      end
    end

    for (genvar q = 0; q < N / C; q++) begin : g_sw
      // shared pins of the bus at each chip input port
      logic [AC-1:0] digit [C];
      logic          reqin [C];
      logic          zero_rw [C];
      logic          one_rw  [C];
      logic          rw_data [C];
      for (genvar p = 0; p < C; p++) begin : g_p
        assign digit[p]   = addr_in[q*C+p][(K-s)*AC-1 -: AC];
        assign reqin[p]   = req_in[q*C+p];
        assign zero_rw[p] = 1'b0;
        assign one_rw[p]  = 1'b1;
        assign rw_data[p] = rw_in[q*C+p];
      end

      // Request plane (write only)
      logic [0:0] rq_din [C], rq_dout [C], rq_unused_din [C], rq_dout_i [C];
      logic       rq_din_oe [C], rq_dout_oe [C];
      for (genvar p = 0; p < C; p++) begin : g_rq
        assign rq_din[p]    = req_in[q*C+p];
        assign rq_dout_i[p] = 1'b0;
        assign req_out[q*C+p] = rq_dout[p][0];
      end
      par_crossbar #(.N(C), .M(C), .B(1)) u_req (
        .clk, .rst_n, .addr_i(digit), .reqin_i(reqin), .rw_i(zero_rw),
        .din_i(rq_din), .din_o(rq_unused_din), .din_oe(rq_din_oe),
        .dout_i(rq_dout_i), .dout_o(rq_dout), .dout_oe(rq_dout_oe), .row_state()
      );

      // R/W plane (write only)
      logic [0:0] rw_din [C], rw_dout [C], rw_unused_din [C], rw_dout_i [C];
      logic       rw_din_oe [C], rw_dout_oe [C];
      for (genvar p = 0; p < C; p++) begin : g_rw
        assign rw_din[p]    = rw_in[q*C+p];
        assign rw_dout_i[p] = 1'b0;
        assign rw_out[q*C+p] = rw_dout[p][0];
      end
      par_crossbar #(.N(C), .M(C), .B(1)) u_rw (
        .clk, .rst_n, .addr_i(digit), .reqin_i(reqin), .rw_i(zero_rw),
        .din_i(rw_din), .din_o(rw_unused_din), .din_oe(rw_din_oe),
        .dout_i(rw_dout_i), .dout_o(rw_dout), .dout_oe(rw_dout_oe), .row_state()
      );

      // Acknowledge plane (read only)
      logic [0:0] ak_din [C], ak_din_o [C], ak_dout [C], ak_dout_i [C];
      logic       ak_din_oe [C], ak_dout_oe [C];
      for (genvar p = 0; p < C; p++) begin : g_ak
        assign ak_din[p]    = 1'b0;
        assign ak_dout_i[p] = ack_ret[q*C+p];
        assign ack_back[q*C+p] = ak_din_o[p][0];
      end
      par_crossbar #(.N(C), .M(C), .B(1)) u_ack (
        .clk, .rst_n, .addr_i(digit), .reqin_i(reqin), .rw_i(one_rw),
        .din_i(ak_din), .din_o(ak_din_o), .din_oe(ak_din_oe),
        .dout_i(ak_dout_i), .dout_o(ak_dout), .dout_oe(ak_dout_oe), .row_state()
      );

      // Data planes (bidirectional, direction from the R/W plane)
      for (genvar w = 0; w < W; w++) begin : g_dp
        logic [0:0] d_din [C], d_din_o [C], d_dout [C], d_dout_i [C];
        logic       d_din_oe [C], d_dout_oe [C];
        for (genvar p = 0; p < C; p++) begin : g_p
          assign d_din[p]    = data_in[q*C+p][w];
          assign d_dout_i[p] = data_ret[q*C+p][w];
          assign data_back[q*C+p][w] = d_din_o[p][0];
          assign data_out[q*C+p][w]  = d_dout[p][0];
          if (w == 0) begin : g_oe
            assign data_oe[q*C+p] = d_dout_oe[p];
          end
        end
        par_crossbar #(.N(C), .M(C), .B(1)) u_data (
          .clk, .rst_n, .addr_i(digit), .reqin_i(reqin), .rw_i(rw_data),
          .din_i(d_din), .din_o(d_din_o), .din_oe(d_din_oe),
          .dout_i(d_dout_i), .dout_o(d_dout), .dout_oe(d_dout_oe), .row_state()
        );
      end

      // Address planes: address bits of later stages, carried as data
      for (genvar t = 0; t < AT; t++) begin : g_ap
        if (t < NA) begin : g_plane
          logic [0:0] a_din [C], a_dout [C], a_unused_din [C], a_dout_i [C];
          logic       a_din_oe [C], a_dout_oe [C];
          for (genvar p = 0; p < C; p++) begin : g_p
            assign a_din[p]    = addr_in[q*C+p][t];
            assign a_dout_i[p] = 1'b0;
            assign addr_out[q*C+p][t] = a_dout[p][0];
          end
          par_crossbar #(.N(C), .M(C), .B(1)) u_addr (
            .clk, .rst_n, .addr_i(digit), .reqin_i(reqin), .rw_i(zero_rw),
            .din_i(a_din), .din_o(a_unused_din), .din_oe(a_din_oe),
            .dout_i(a_dout_i), .dout_o(a_dout), .dout_oe(a_dout_oe), .row_state()
          );
        end else begin : g_none
          for (genvar p = 0; p < C; p++) begin : g_p
            assign addr_out[q*C+p][t] = 1'b0;
          end
        end
      end
    end
  end

endmodule
