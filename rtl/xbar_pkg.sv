// xbar_pkg: types shared by the serial addressed and the parallel addressed
// n-m crossbar chips.
//
// ser_state_e names the states of the serial addressed row FSM; their order
// and outputs follow the published state diagram (idle, address shift, wait
// for a free column, request, stream out the next-stage address, link, and the
// connected states that watch the CONTROL pin).  par_state_e names the four
// states of the parallel addressed row FSM.  ser_ctl_t bundles the Moore
// outputs of the serial FSM under the signal names of the document.
package xbar_pkg;

  typedef enum logic [3:0] {
    S_IDLE,    // S1, WRMODE: waiting for CONTROL, first address bit shifts in
    S_SHIFT,   // S1: further primary-register address bits
    S_WAIT,    // S2: addressed column busy, wait for it to clear
    S_REQ,     // S2, REQ: request the column, look at the priority chain
    S_SEND,    // S2, REQ, DEC, CONOUT: stream the next-stage address out
    S_CONN0,   // REQ, CONOUT, ENDATA: granted with no address to forward
    S_LINK,    // REQ, ENDATA: data path made, control still low
    S_CONN,    // REQ, CONPROP, ENDATA: connected, CONTROL pin propagated
    S_CTL1,    // REQ, CONPROP, ENDATA: CONTROL seen high for one cycle
    S_SWITCH   // REQ, CONPROP, ENDATA, SWMODE: toggle read/write direction
  } ser_state_e;

  typedef struct packed {
    logic s1;
    logic s2;
    logic dec;
    logic req;
    logic conout;
    logic conprop;
    logic endata;
    logic swmode;
    logic wrmode;
  } ser_ctl_t;

  typedef enum logic [1:0] {
    P_LOAD,    // LOAD: address latch transparent, waiting for REQIN
    P_REQ,     // REQ: request the column, look at the priority chain
    P_WAIT,    // column busy, wait for it to clear
    P_CONN     // REQ, CONNECT: path made until REQIN falls
  } par_state_e;

endpackage
