// par_crossbar: parallel addressed n-m crossbar chip.
//
// Each input port presents the log2(M)-bit output port address in parallel,
// a REQIN request pin, an R/W direction pin and a B-bit bidirectional data
// port; each output port has a B-bit bidirectional data port.  Raising REQIN
// latches the address and, if the column is free and this row wins its
// priority chain, connects the row to the column two clock edges later; the
// path stays until REQIN falls.  R/W steers the data: low (write) drives the
// output pin from the input pin, high (read) drives the input pin from the
// output pin.  Column conflicts use the same diagonal-headed, wrapping daisy
// chain as the serial chip (row j mod N heads column j).  An output port with
// no connection, and an input port in read mode with no connection, output 0,
// as the document requires for clean request/acknowledge propagation.
//
// Pins are modelled as in / out / output-enable signals.  The default size,
// 32-32 with a 1-bit data path, is the document's worked example for this
// chip.  Inverting pad buffers of the document are not modelled; all signals
// are active high.
module par_crossbar
  import xbar_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned M = 32,
  parameter int unsigned B = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // input ports
  input  logic [$clog2(M > 1 ? M : 2)-1:0] addr_i [N],
  input  logic                      reqin_i [N],
  input  logic                      rw_i    [N],    // 1: read mode
  input  logic [B-1:0]              din_i   [N],
  output logic [B-1:0]              din_o   [N],
  output logic                      din_oe  [N],    // chip drives DATAIN
  // output ports
  input  logic [B-1:0]              dout_i  [M],
  output logic [B-1:0]              dout_o  [M],
  output logic                      dout_oe [M],    // chip drives DATAOUT
  // status
  output par_state_e                row_state [N]
);

  localparam int unsigned AW = $clog2(M > 1 ? M : 2);

  logic [2*AW-1:0] bus      [N];
  logic            load     [N], row_req [N], connect [N];
  logic            row_busy [N], row_pin [N];

  logic            sel          [N][M];
  logic            col_busy_drv [N][M];
  logic            row_busy_drv [N][M];
  logic            row_pin_drv  [N][M];
  logic            col_rw_drv   [N][M];
  logic [B-1:0]    col_data_drv [N][M];
  logic [B-1:0]    row_data_drv [N][M];

  logic            col_busy [M], col_rw [M];
  logic [B-1:0]    col_data [M];

  for (genvar i = 0; i < N; i++) begin : g_row
    par_row_ctrl #(.AW(AW)) u_ctrl (
      .clk, .rst_n, .addr_pin(addr_i[i]), .reqin(reqin_i[i]),
      .busy(row_busy[i]), .pin(row_pin[i]), .bus(bus[i]),
      .load(load[i]), .req(row_req[i]), .connect(connect[i]),
      .state(row_state[i])
    );

    for (genvar j = 0; j < M; j++) begin : g_col
      logic pin_i, pin_o;
      if (i == (j % N)) begin : g_head
        assign pin_i = 1'b1;
      end else begin : g_link
        assign pin_i = g_row[(i + N - 1) % N].g_col[j].pin_o;
      end

      par_rc_cell #(.AW(AW), .B(B), .COL(j)) u_cell (
        .bus(bus[i]), .row_req(row_req[i]), .connect(connect[i]),
        .row_rw(rw_i[i]), .row_data(din_i[i]),
        .col_busy(col_busy[j]), .col_data(dout_i[j]),
        .pin_in(pin_i), .pin_out(pin_o), .sel(sel[i][j]),
        .col_busy_drv(col_busy_drv[i][j]), .row_busy_drv(row_busy_drv[i][j]),
        .row_pin_drv(row_pin_drv[i][j]), .col_rw_drv(col_rw_drv[i][j]),
        .col_data_drv(col_data_drv[i][j]), .row_data_drv(row_data_drv[i][j])
      );
    end
  end

  always_comb begin
    for (int j = 0; j < M; j++) begin
      col_busy[j] = 1'b0;
      col_rw[j]   = 1'b0;
      col_data[j] = '0;
      for (int i = 0; i < N; i++) begin
        col_busy[j] |= col_busy_drv[i][j];
        col_rw[j]   |= col_rw_drv[i][j];
        col_data[j] |= col_data_drv[i][j];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      row_busy[i] = 1'b0;
      row_pin[i]  = 1'b0;
      din_o[i]    = '0;
      for (int j = 0; j < M; j++) begin
        row_busy[i] |= row_busy_drv[i][j];
        row_pin[i]  |= row_pin_drv[i][j];
        din_o[i]    |= row_data_drv[i][j];
      end
      din_oe[i] = rw_i[i];
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_out
    assign dout_o[j]  = col_data[j];
    assign dout_oe[j] = ~col_rw[j];

    logic [N-1:0] holders;
    for (genvar i = 0; i < N; i++) begin : g_h
      assign holders[i] = sel[i][j] & connect[i];
    end
    a_one_holder: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(holders));
  end

endmodule
