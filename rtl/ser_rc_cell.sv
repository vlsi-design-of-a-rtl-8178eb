// ser_rc_cell: row-column connection cell of the serial addressed crossbar.
//
// Each cell decodes its own column number from the double-railed address on
// the row bus (Select).  When selected it makes three connections at once:
// Row Request onto the column BUSY line, the column BUSY line back onto Row
// BUSY, and the column priority chain input onto Row PIN.  A requesting
// selected cell also cuts the priority chain below it (PIN' = PIN and not
// (Select and Row Request)), so only the highest priority requester sees PIN.
// Only when Connect is also high are Row Control, Row R/W and Row Data switched
// onto the column; data flows row to column in write mode and column to row in
// read mode.
//
// The document draws the column lines as wired, pulled-up, active-low buses;
// here every cell drives an active-high contribution that the array ORs
// together, which is the same logic function without tri-state nets.
// Interface: purely combinational; COL is the column number the cell decodes.
module ser_rc_cell #(
  parameter int unsigned AW  = 4,
  parameter int unsigned B   = 1,
  parameter int unsigned COL = 0
) (
  input  logic [2*AW-1:0] pri_bus,         // {true rails, complement rails}
  input  logic            row_req,
  input  logic            connect,
  input  logic            row_ctrl,
  input  logic            row_rw,          // 1: read mode
  input  logic [B-1:0]    row_data,
  input  logic            col_busy,        // wired-OR column BUSY
  input  logic [B-1:0]    col_data,        // column data from the output pin
  input  logic            pin_in,          // column priority chain in
  output logic            pin_out,         // column priority chain out (PIN')
  output logic            sel,
  output logic            col_busy_drv,
  output logic            row_busy_drv,
  output logic            row_pin_drv,
  output logic            col_ctrl_drv,
  output logic            col_rw_drv,
  output logic [B-1:0]    col_data_drv,
  output logic [B-1:0]    row_data_drv
);

  localparam logic [AW-1:0] CODE = AW'(COL);

  logic con;

  // Distributed decoder: pick the true or the complement rail of each bit.
  always_comb begin
    sel = 1'b1;
    for (int k = 0; k < AW; k++)
      sel &= CODE[k] ? pri_bus[AW+k] : pri_bus[k];
  end

  assign col_busy_drv = sel & row_req;
  assign row_busy_drv = sel & col_busy;
  assign row_pin_drv  = sel & pin_in;
  assign pin_out      = pin_in & ~(sel & row_req);

  assign con          = sel & connect;
  assign col_ctrl_drv = con & row_ctrl;
  assign col_rw_drv   = con & row_rw;
  assign col_data_drv = (con & ~row_rw) ? row_data : '0;
  assign row_data_drv = (con &  row_rw) ? col_data : '0;

endmodule
