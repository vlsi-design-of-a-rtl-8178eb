// ser_crossbar: serial addressed n-m crossbar chip.
//
// N identical rows (one per input port), each with a Primary Register, a
// Secondary Register, a row FSM and M row-column cells; M columns, one per
// output port.  An input port has two pins, DATA and CONTROL.  Raising CONTROL
// starts an address stream on DATA, most significant bit first: the first
// log2(M) bits pick this chip's output port, the rest are buffered and sent on
// to the next stage, framed by the output port's CONTROL pin, once the column
// is won.  The column is then held until the processor ends the connection
// with a one-cycle CONTROL pulse; a two-cycle pulse toggles the data direction
// (write: input to output pin; read: output to input pin).  Column conflicts
// are settled by a per-column daisy chain whose highest priority cell lies on
// the forward diagonal (row j mod N heads column j) and which wraps around.
//
// Pins are modelled as separate in / out / output-enable signals in place of
// the document's bidirectional pads.  An output port that no row drives
// outputs 0, which the document relies on for clean acknowledge signalling.
// Default size is the document's laid-out chip: 16-16 with a 1-bit data path;
// the secondary register length L = 12 is this design's choice (it serves the
// four-stage 16-16 network of the document's timing diagram).
// ACK_PLANE selects the acknowledge-plane chip variant, whose rows turn to
// read mode as soon as their path is made.
module ser_crossbar
  import xbar_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter int unsigned M         = 16,
  parameter int unsigned L         = 12,
  parameter int unsigned B         = 1,
  parameter bit          ACK_PLANE = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  // input ports
  input  logic [B-1:0] in_data_i  [N],
  output logic [B-1:0] in_data_o  [N],
  output logic         in_data_oe [N],     // chip drives DATA (read mode)
  input  logic         in_ctrl_i  [N],
  // output ports
  input  logic [B-1:0] out_data_i  [M],
  output logic [B-1:0] out_data_o  [M],
  output logic         out_data_oe [M],    // chip drives DATA (not read mode)
  output logic         out_ctrl_o  [M],
  // status, one entry per row
  output ser_state_e   row_state [N]
);

  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1;

  logic [2*AW-1:0] pri_bus [N];
  logic            row_req [N], connect [N], row_ctrl [N], row_rw [N];
  logic [B-1:0]    row_data [N];
  logic            row_busy [N], row_pin [N];

  logic            col_busy_drv [N][M];
  logic            row_busy_drv [N][M];
  logic            row_pin_drv  [N][M];
  logic            col_ctrl_drv [N][M];
  logic            col_rw_drv   [N][M];
  logic [B-1:0]    col_data_drv [N][M];
  logic [B-1:0]    row_data_drv [N][M];
  logic            sel          [N][M];

  logic            col_busy [M], col_ctrl [M], col_rw [M];
  logic [B-1:0]    col_data [M];

  for (genvar i = 0; i < N; i++) begin : g_row
    ser_row #(.AW(AW), .L(L), .B(B), .ACK_PLANE(ACK_PLANE)) u_row (
      .clk, .rst_n,
      .data_pin(in_data_i[i]), .ctrl_pin(in_ctrl_i[i]),
      .pri_bus(pri_bus[i]),
      .row_req(row_req[i]), .connect(connect[i]), .row_ctrl(row_ctrl[i]),
      .row_rw(row_rw[i]), .row_data(row_data[i]),
      .row_busy(row_busy[i]), .row_pin(row_pin[i]),
      .state(row_state[i])
    );

    for (genvar j = 0; j < M; j++) begin : g_col
      logic pin_i, pin_o;
      // Priority chain: row (j mod N) heads column j, the chain runs down the
      // rows and wraps from the last row to the first.
      if (i == (j % N)) begin : g_head
        assign pin_i = 1'b1;
      end else begin : g_link
        assign pin_i = g_row[(i + N - 1) % N].g_col[j].pin_o;
      end

      ser_rc_cell #(.AW(AW), .B(B), .COL(j)) u_cell (
        .pri_bus(pri_bus[i]), .row_req(row_req[i]), .connect(connect[i]),
        .row_ctrl(row_ctrl[i]), .row_rw(row_rw[i]), .row_data(row_data[i]),
        .col_busy(col_busy[j]), .col_data(out_data_i[j]),
        .pin_in(pin_i), .pin_out(pin_o), .sel(sel[i][j]),
        .col_busy_drv(col_busy_drv[i][j]), .row_busy_drv(row_busy_drv[i][j]),
        .row_pin_drv(row_pin_drv[i][j]), .col_ctrl_drv(col_ctrl_drv[i][j]),
        .col_rw_drv(col_rw_drv[i][j]), .col_data_drv(col_data_drv[i][j]),
        .row_data_drv(row_data_drv[i][j])
      );
    end
  end

  // Wired-OR row and column lines.
  always_comb begin
    for (int j = 0; j < M; j++) begin
      col_busy[j] = 1'b0;
      col_ctrl[j] = 1'b0;
      col_rw[j]   = 1'b0;
      col_data[j] = '0;
      for (int i = 0; i < N; i++) begin
        col_busy[j] |= col_busy_drv[i][j];
        col_ctrl[j] |= col_ctrl_drv[i][j];
        col_rw[j]   |= col_rw_drv[i][j];
        col_data[j] |= col_data_drv[i][j];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      row_busy[i]  = 1'b0;
      row_pin[i]   = 1'b0;
      in_data_o[i] = '0;
      for (int j = 0; j < M; j++) begin
        row_busy[i]  |= row_busy_drv[i][j];
        row_pin[i]   |= row_pin_drv[i][j];
        in_data_o[i] |= row_data_drv[i][j];
      end
      in_data_oe[i] = row_rw[i];
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_out
    assign out_data_o[j]  = col_data[j];
    assign out_data_oe[j] = ~col_rw[j];
    assign out_ctrl_o[j]  = col_ctrl[j];
  end

  // At most one row may hold a column's data path.
  for (genvar j = 0; j < M; j++) begin : g_chk
    logic [N-1:0] holders;
    for (genvar i = 0; i < N; i++) begin : g_h
      assign holders[i] = sel[i][j] & connect[i];
    end
    a_one_holder: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(holders));
  end

endmodule
