// ser_primary_reg: Primary Register of one row of the serial addressed
// crossbar.
//
// While the row FSM holds S1 and the input port CONTROL pin is high, the
// register shifts one address bit in from the DATA pin per clock.  After
// AW = log2(m) such clocks it holds the output port address, most significant
// bit first on the wire.  The register content drives the row's address bus
// in double-railed form (true rails in the upper half, complement rails in the
// lower half) so that each row-column cell decodes its own column number.
//
// Timing: the bus shows the register's next value while a shift is under way,
// so that the bit arriving in the last shift cycle is already decoded when the
// FSM looks at the addressed column's BUSY line in that cycle.  The document
// has the FSM test BUSY in its last shift state; this look-ahead is this
// design's way of making that test see the whole address.  Shifting toward the
// least significant end as bits arrive, and the double-railed bus, follow the
// document.
module ser_primary_reg #(
  parameter int unsigned AW = 4            // log2(m) address bits
) (
  input  logic            clk,
  input  logic            rst_n,           // master reset, clears the register
  input  logic            s1,              // FSM: primary register may shift
  input  logic            ctrl,            // input port CONTROL pin
  input  logic            data,            // input port DATA pin
  output logic [2*AW-1:0] bus              // {true rails, complement rails}
);

  logic [AW-1:0] q;
  logic [AW-1:0] q_next;
  logic          shift;

  // Random logic of the row: shift while S1 and CONTROL are both active.
  assign shift = s1 & ctrl;

  if (AW == 1) begin : g_one
    assign q_next = shift ? data : q;
  end else begin : g_many
    assign q_next = shift ? {q[AW-2:0], data} : q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end

  assign bus  = {q_next, ~q_next};

endmodule
