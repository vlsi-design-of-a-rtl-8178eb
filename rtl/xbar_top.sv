// xbar_top: the two monolithic n-m crossbar switch chips, side by side, and
// a multistage Delta network built from parallel addressed chips.
//
// ser_*: the serial addressed chip, 16-16 with a 1-bit data path by default.
//   Each input port has a DATA and a CONTROL pin; a routing address enters bit
//   serially, most significant bit first, framed by CONTROL, and the address
//   bits beyond this chip's own log2(m) are forwarded out of the selected
//   output port, framed by its CONTROL pin, for the next network stage.
// par_*: the parallel addressed chip, 32-32 with a 1-bit data path by default.
//   Each input port has log2(m) address pins, REQIN, R/W and a data pin.
// net_*: a 16 x 16 Delta network of 4-4 parallel addressed chips in bit
//   planes (Request, R/W, Acknowledge, 8 data planes, address planes); a
//   processor bus presents the memory bus number, request, R/W and data and
//   receives an acknowledge once its path through all stages exists.
//
// The three parts share only the clock and the active-low master reset; they
// are independent uses of the same building block.  All pads are modelled
// as in / out / output-enable triples.
module xbar_top
  import xbar_pkg::*;
#(
  parameter int unsigned SER_N = 16,
  parameter int unsigned SER_M = 16,
  parameter int unsigned SER_L = 12,
  parameter int unsigned SER_B = 1,
  parameter int unsigned PAR_N = 32,
  parameter int unsigned PAR_M = 32,
  parameter int unsigned PAR_B = 1,
  parameter int unsigned NET_C = 4,
  parameter int unsigned NET_K = 2,
  parameter int unsigned NET_W = 8,
  localparam int unsigned NET_N  = NET_C ** NET_K,
  localparam int unsigned NET_AT = NET_K * $clog2(NET_C)
) (
  input  logic             clk,
  input  logic             rst_n,
  // serial addressed chip
  input  logic [SER_B-1:0] ser_in_data_i   [SER_N],
  output logic [SER_B-1:0] ser_in_data_o   [SER_N],
  output logic             ser_in_data_oe  [SER_N],
  input  logic             ser_in_ctrl_i   [SER_N],
  input  logic [SER_B-1:0] ser_out_data_i  [SER_M],
  output logic [SER_B-1:0] ser_out_data_o  [SER_M],
  output logic             ser_out_data_oe [SER_M],
  output logic             ser_out_ctrl_o  [SER_M],
  output ser_state_e       ser_row_state   [SER_N],
  // parallel addressed chip
  input  logic [$clog2(PAR_M > 1 ? PAR_M : 2)-1:0] par_addr_i [PAR_N],
  input  logic             par_reqin_i     [PAR_N],
  input  logic             par_rw_i        [PAR_N],
  input  logic [PAR_B-1:0] par_din_i       [PAR_N],
  output logic [PAR_B-1:0] par_din_o       [PAR_N],
  output logic             par_din_oe      [PAR_N],
  input  logic [PAR_B-1:0] par_dout_i      [PAR_M],
  output logic [PAR_B-1:0] par_dout_o      [PAR_M],
  output logic             par_dout_oe     [PAR_M],
  output par_state_e       par_row_state   [PAR_N],
  // Delta network of parallel addressed chips
  input  logic [NET_AT-1:0] net_p_addr    [NET_N],
  input  logic              net_p_req     [NET_N],
  input  logic              net_p_rw      [NET_N],
  input  logic [NET_W-1:0]  net_p_data_i  [NET_N],
  output logic [NET_W-1:0]  net_p_data_o  [NET_N],
  output logic              net_p_ack     [NET_N],
  output logic              net_m_req     [NET_N],
  output logic              net_m_rw      [NET_N],
  output logic [NET_W-1:0]  net_m_data_o  [NET_N],
  output logic              net_m_data_oe [NET_N],
  input  logic [NET_W-1:0]  net_m_data_i  [NET_N]
);

  ser_crossbar #(.N(SER_N), .M(SER_M), .L(SER_L), .B(SER_B)) u_ser (
    .clk, .rst_n,
    .in_data_i(ser_in_data_i), .in_data_o(ser_in_data_o),
    .in_data_oe(ser_in_data_oe), .in_ctrl_i(ser_in_ctrl_i),
    .out_data_i(ser_out_data_i), .out_data_o(ser_out_data_o),
    .out_data_oe(ser_out_data_oe), .out_ctrl_o(ser_out_ctrl_o),
    .row_state(ser_row_state)
  );

  par_crossbar #(.N(PAR_N), .M(PAR_M), .B(PAR_B)) u_par (
    .clk, .rst_n,
    .addr_i(par_addr_i), .reqin_i(par_reqin_i), .rw_i(par_rw_i),
    .din_i(par_din_i), .din_o(par_din_o), .din_oe(par_din_oe),
    .dout_i(par_dout_i), .dout_o(par_dout_o), .dout_oe(par_dout_oe),
    .row_state(par_row_state)
  );

  par_delta_net #(.C(NET_C), .K(NET_K), .W(NET_W)) u_net (
    .clk, .rst_n,
    .p_addr(net_p_addr), .p_req(net_p_req), .p_rw(net_p_rw),
    .p_data_i(net_p_data_i), .p_data_o(net_p_data_o), .p_ack(net_p_ack),
    .m_req(net_m_req), .m_rw(net_m_rw), .m_data_o(net_m_data_o),
    .m_data_oe(net_m_data_oe), .m_data_i(net_m_data_i)
  );

endmodule
