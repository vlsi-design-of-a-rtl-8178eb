// ser_secondary_reg: Secondary Register of one row of the serial addressed
// crossbar: an address stream buffer, a one-hot pointer register and the
// selector that reads the buffer bit under the pointer.
//
// Bits that arrive on the DATA pin after the primary register is full (S2 and
// CONTROL high) shift into the left end of the buffer (index 0) and move one
// place right per arrival, so the oldest bit sits furthest right.  The pointer
// marks the oldest bit still to be sent.  DEC from the FSM sends that bit:
// with no bit arriving the pointer moves one place left; with a bit arriving at
// the same time the pointer stays, as the document describes.  ZERO reports the
// pointer at its leftmost position, i.e. the bit being sent is the last one.
//
// Own choices where the document is silent: an `occ` flag tells an empty
// buffer from a buffer holding one bit (both have the pointer at the left
// end); ZERO is held low while a bit is still arriving so that the FSM does not
// finish an address that is still streaming in; a buffer that is full keeps
// its pointer at the right end (the excess bit is lost; L sets the largest
// network the chip can serve).
//
// Timing: data_out and zero are combinational from the register state; the
// buffer and pointer update at the rising clock edge.
module ser_secondary_reg #(
  parameter int unsigned L = 12            // buffer length in bits
) (
  input  logic clk,
  input  logic rst_n,                      // master reset: pointer to leftmost
  input  logic s2,                         // FSM: buffer may fill
  input  logic ctrl,                       // input port CONTROL pin
  input  logic data_in,                    // input port DATA pin
  input  logic dec,                        // FSM: send the bit under the pointer
  output logic data_out,                   // bit under the pointer
  output logic zero,                       // pointer at leftmost position
  output logic occ                         // buffer holds at least one bit
);

  logic [L-1:0] buffer;
  logic [L-1:0] ptr;
  logic         push;
  logic         pop;

  assign push = s2 & ctrl;                 // "Shift Right"
  assign pop  = dec & occ;

  assign data_out = |(buffer & ptr);
  assign zero     = ptr[0] & ~push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buffer <= '0;
      ptr    <= L'(1);
      occ    <= 1'b0;
    end else begin
      if (push) buffer <= {buffer[L-2:0], data_in};
      unique case ({push, pop})
        2'b10: begin
          if (!occ)           occ <= 1'b1;
          else if (!ptr[L-1]) ptr <= ptr << 1;
        end
        2'b01: begin
          if (ptr[0]) occ <= 1'b0;
          else        ptr <= ptr >> 1;
        end
        default: ;                         // idle, or send and fill together
      endcase
    end
  end

  // The pointer register always has exactly one bit set.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ptr));

endmodule
