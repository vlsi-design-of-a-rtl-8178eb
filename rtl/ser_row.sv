// ser_row: one input-port row of the serial addressed crossbar, without its
// row-column cells: Primary Register, Secondary Register, row FSM and the
// FSM's output logic.
//
// The output logic follows the document's figure of it: Row Data selects the
// DATA pin when ENDATA is high and the secondary register's outgoing address
// bit otherwise; Connect is ENDATA or CONOUT; Row Control selects the CONTROL
// pin when CONPROP is high and CONOUT otherwise; Row R/W is a toggle flip-flop
// advanced by a rising SWMODE and cleared by WRMODE.  Here the toggle flip-flop
// is clocked by the chip clock and toggles in the cycle after SWMODE rises,
// instead of being clocked by SWMODE itself, and WRMODE clears it
// synchronously (both this design's choices, to keep a single clock).
//
// Interface: the row bus toward the cells carries the double-railed primary
// address, Row Request, Connect, Row Control, Row R/W and Row Data; the cells
// return the selected column's BUSY and priority grant.  rw = 1 is read mode.
module ser_row
  import xbar_pkg::*;
#(
  parameter int unsigned AW        = 4,    // log2(m)
  parameter int unsigned L         = 12,   // secondary register length
  parameter int unsigned B         = 1,    // data path width per port
  parameter bit          ACK_PLANE = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  // input port pins
  input  logic [B-1:0]    data_pin,        // DATA pin, bit 0 carries addresses
  input  logic            ctrl_pin,        // CONTROL pin
  // row bus
  output logic [2*AW-1:0] pri_bus,         // double-railed output port address
  output logic            row_req,
  output logic            connect,
  output logic            row_ctrl,
  output logic            row_rw,          // 1: read mode
  output logic [B-1:0]    row_data,
  input  logic            row_busy,
  input  logic            row_pin,
  // status
  output ser_state_e      state
);

  ser_ctl_t ctl;
  logic     sec_data;
  logic     zero;
  logic     occ;
  logic     swmode_q;
  logic     rw_q;

  ser_primary_reg #(.AW(AW)) u_pri (
    .clk, .rst_n, .s1(ctl.s1), .ctrl(ctrl_pin), .data(data_pin[0]),
    .bus(pri_bus)
  );

  ser_secondary_reg #(.L(L)) u_sec (
    .clk, .rst_n, .s2(ctl.s2), .ctrl(ctrl_pin), .data_in(data_pin[0]),
    .dec(ctl.dec), .data_out(sec_data), .zero, .occ
  );

  ser_row_fsm #(.AW(AW), .ACK_PLANE(ACK_PLANE)) u_fsm (
    .clk, .rst_n, .ctrl(ctrl_pin), .busy(row_busy), .pin(row_pin), .zero,
    .ctl, .state
  );

  // FSM output logic
  always_comb begin
    row_data    = ctl.endata ? data_pin : '0;
    row_data[0] = ctl.endata ? data_pin[0] : sec_data;
  end
  assign connect  = ctl.endata | ctl.conout;
  assign row_ctrl = ctl.conprop ? ctrl_pin : ctl.conout;
  assign row_req  = ctl.req;
  assign row_rw   = rw_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      swmode_q <= 1'b0;
      rw_q     <= 1'b0;
    end else begin
      swmode_q <= ctl.swmode;
      if (ctl.wrmode)                  rw_q <= 1'b0;
      else if (ctl.swmode & ~swmode_q) rw_q <= ~rw_q;
    end
  end

  // The FSM only streams address bits the buffer actually holds.
  a_send_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 ctl.dec |-> occ);

endmodule
