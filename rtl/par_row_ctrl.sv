// par_row_ctrl: row control of the parallel addressed crossbar: the output
// port address latch and the row FSM.
//
// The FSM follows the published state diagram.  LOAD (latch open) waits for
// REQIN; with REQIN high a free addressed column leads to REQ and a busy one
// to WAIT.  REQ asserts Row REQ; PIN high wins the column (CONN), PIN low (a
// higher priority row asked in the same cycle) goes to WAIT.  WAIT holds until
// BUSY falls, then REQ.  CONN asserts REQ and CONNECT for as long as REQIN
// stays high and returns to LOAD when it falls.  A path is therefore made two
// clock edges after REQIN is first seen with a free column.
//
// The document's address latch is level sensitive and transparent while LOAD
// is high.  Here it is a register plus a bypass: while LOAD is high the bus
// shows the address pins directly and the register follows them, otherwise the
// bus shows the register.  That keeps the latch behaviour with one clock and
// no inferred latch (this design's choice).  The bus is double-railed, as in
// the document.  Asynchronous active-low reset enters LOAD.
module par_row_ctrl
  import xbar_pkg::*;
#(
  parameter int unsigned AW = 5            // log2(m)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   addr_pin,        // parallel address pins
  input  logic            reqin,           // REQIN pin
  input  logic            busy,            // addressed column busy
  input  logic            pin,             // priority chain grant
  output logic [2*AW-1:0] bus,             // {true rails, complement rails}
  output logic            load,
  output logic            req,
  output logic            connect,
  output par_state_e      state
);

  par_state_e    state_n;
  logic [AW-1:0] addr_q;
  logic [AW-1:0] addr;

  always_comb begin
    state_n = state;
    unique case (state)
      P_LOAD: if (reqin) state_n = busy ? P_WAIT : P_REQ;
      P_REQ:  state_n = pin ? P_CONN : P_WAIT;
      P_WAIT: if (!busy) state_n = P_REQ;
      P_CONN: if (!reqin) state_n = P_LOAD;
      default: state_n = P_LOAD;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= P_LOAD;
      addr_q <= '0;
    end else begin
      state <= state_n;
      if (load) addr_q <= addr_pin;
    end
  end

  assign load    = (state == P_LOAD);
  assign req     = (state == P_REQ) || (state == P_CONN);
  assign connect = (state == P_CONN);
  assign addr    = load ? addr_pin : addr_q;
  assign bus     = {addr, ~addr};

endmodule
