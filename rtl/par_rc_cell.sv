// par_rc_cell: row-column connection cell of the parallel addressed crossbar.
//
// Same structure as the serial design's cell without the control line: the
// cell decodes its column number from the double-railed latch bus (Select);
// when selected it puts Row Request on the column BUSY line, returns the
// column BUSY line and the column priority chain input to the row, and cuts
// the chain below it while requesting.  CONNECT switches Row R/W and the data
// path onto the column; data flows row to column in write mode (R/W low) and
// column to row in read mode (R/W high).
//
// The document's column lines are wired, pulled-up, active-low buses and its
// data pads are inverting; here each cell drives an active-high contribution
// that the array ORs together, the same logic function in true polarity.
// Interface: purely combinational; COL is the column number the cell decodes.
module par_rc_cell #(
  parameter int unsigned AW  = 5,
  parameter int unsigned B   = 1,
  parameter int unsigned COL = 0
) (
  input  logic [2*AW-1:0] bus,
  input  logic            row_req,
  input  logic            connect,
  input  logic            row_rw,          // 1: read mode
  input  logic [B-1:0]    row_data,
  input  logic            col_busy,
  input  logic [B-1:0]    col_data,        // data arriving at the output pin
  input  logic            pin_in,
  output logic            pin_out,
  output logic            sel,
  output logic            col_busy_drv,
  output logic            row_busy_drv,
  output logic            row_pin_drv,
  output logic            col_rw_drv,
  output logic [B-1:0]    col_data_drv,
  output logic [B-1:0]    row_data_drv
);

  localparam logic [AW-1:0] CODE = AW'(COL);

  logic con;

  always_comb begin
    sel = 1'b1;
    for (int k = 0; k < AW; k++)
      sel &= CODE[k] ? bus[AW+k] : bus[k];
  end

  assign col_busy_drv = sel & row_req;
  assign row_busy_drv = sel & col_busy;
  assign row_pin_drv  = sel & pin_in;
  assign pin_out      = pin_in & ~(sel & row_req);

  assign con          = sel & connect;
  assign col_rw_drv   = con & row_rw;
  assign col_data_drv = (con & ~row_rw) ? row_data : '0;
  assign row_data_drv = (con &  row_rw) ? col_data : '0;

endmodule
