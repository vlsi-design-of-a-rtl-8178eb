// ser_row_fsm: row controller of the serial addressed crossbar.
//
// A Moore machine whose states and outputs follow the published state diagram
// for an n-8 crossbar, generalised to AW = log2(m) address-shift states:
//   IDLE (S1, WRMODE) waits for CONTROL; the first address bit shifts in.
//   SHIFT (S1) takes the remaining primary-register bits; in the last one the
//     addressed column's BUSY line decides between REQ and WAIT.
//   WAIT (S2) holds until BUSY falls, then REQ.
//   REQ (S2, REQ) asks for the column; PIN low (a higher priority row asked in
//     the same cycle) sends it back to WAIT; PIN with next-stage address bits
//     to forward goes to SEND, PIN without goes to CONN0.
//   SEND (S2, REQ, DEC, CONOUT) streams the secondary register out until ZERO.
//   CONN0 (REQ, CONOUT, ENDATA) and LINK (REQ, ENDATA) complete the path.
//   CONN (REQ, CONPROP, ENDATA) passes CONTROL through.  CONTROL high for one
//     cycle then low ends the connection (CTL1 -> IDLE); high for two cycles
//     toggles the direction (CTL1 -> SWITCH, SWMODE) and returns to CONN when
//     CONTROL falls.
// Next-state decisions follow the document's text where its diagram's BUSY
// labels on the branches out of the last shift state read the other way round
// (a free column is requested, a busy one is waited for, as in the parallel
// design's diagram).  SWITCH staying put while CONTROL is held high, and the
// ACK_PLANE variant asserting SWMODE in LINK so the path turns to read mode by
// itself, are this design's choices.
//
// Interface: ctl carries the Moore outputs; all inputs are sampled at the
// rising clock edge.  Asynchronous active-low master reset enters IDLE.
module ser_row_fsm
  import xbar_pkg::*;
#(
  parameter int unsigned AW        = 4,    // log2(m): number of S1 states
  parameter bit          ACK_PLANE = 1'b0  // acknowledge-plane chip variant
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ctrl,                 // input port CONTROL pin
  input  logic       busy,                 // addressed column busy
  input  logic       pin,                  // priority chain grant
  input  logic       zero,                 // secondary register: last bit
  output ser_ctl_t   ctl,
  output ser_state_e state
);

  localparam int unsigned CW = (AW > 1) ? $clog2(AW) : 1;

  ser_state_e      state_n;
  logic [CW-1:0]   cnt, cnt_n;
  logic            last_shift;

  // The bit shifted in this cycle completes the primary register.
  assign last_shift = (state == S_IDLE) ? (AW == 1) : (cnt == CW'(AW - 1));

  always_comb begin
    state_n = state;
    cnt_n   = cnt;
    unique case (state)
      S_IDLE: if (ctrl) begin
        cnt_n = CW'(1);
        if (last_shift) state_n = busy ? S_WAIT : S_REQ;
        else            state_n = S_SHIFT;
      end
      S_SHIFT: begin
        cnt_n = cnt + CW'(1);
        if (last_shift) state_n = busy ? S_WAIT : S_REQ;
      end
      S_WAIT:   if (!busy) state_n = S_REQ;
      S_REQ: begin
        if (!pin)      state_n = S_WAIT;
        else if (zero) state_n = S_CONN0;
        else           state_n = S_SEND;
      end
      S_SEND:   if (zero) state_n = S_LINK;
      S_CONN0:  state_n = S_LINK;
      S_LINK:   state_n = S_CONN;
      S_CONN:   if (ctrl) state_n = S_CTL1;
      S_CTL1:   state_n = ctrl ? S_SWITCH : S_IDLE;
      S_SWITCH: if (!ctrl) state_n = S_CONN;
      default:  state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      state <= state_n;
      cnt   <= cnt_n;
    end
  end

  always_comb begin
    ctl = '0;
    unique case (state)
      S_IDLE:   begin ctl.s1 = 1'b1; ctl.wrmode = 1'b1; end
      S_SHIFT:  ctl.s1 = 1'b1;
      S_WAIT:   ctl.s2 = 1'b1;
      S_REQ:    begin ctl.s2 = 1'b1; ctl.req = 1'b1; end
      S_SEND:   begin ctl.s2 = 1'b1; ctl.req = 1'b1; ctl.dec = 1'b1; ctl.conout = 1'b1; end
      S_CONN0:  begin ctl.req = 1'b1; ctl.conout = 1'b1; ctl.endata = 1'b1; end
      S_LINK:   begin ctl.req = 1'b1; ctl.endata = 1'b1; ctl.swmode = ACK_PLANE; end
      S_CONN,
      S_CTL1:   begin ctl.req = 1'b1; ctl.conprop = 1'b1; ctl.endata = 1'b1; end
      S_SWITCH: begin ctl.req = 1'b1; ctl.conprop = 1'b1; ctl.endata = 1'b1; ctl.swmode = 1'b1; end
      default:  ;
    endcase
  end

endmodule
