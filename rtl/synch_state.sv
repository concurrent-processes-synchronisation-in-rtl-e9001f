// UML synch state between two concurrent regions.
//
// A fork transition in the source region puts a token in (put); a join
// transition in the target region may fire only while a token is
// present (full) and takes it out (take). This makes the target region
// wait until the source region has left a given state, without any
// broadcast event. The bound of the synch state is one token, held in a
// single flip-flop; put and take in the same cycle leave it unchanged
// only if it was already full, otherwise the new token is kept. clr
// empties it when the enclosing composite state is left.
//
// Timing: full rises on the clock edge at which the fork fires, so the
// join can fire one clock later at the earliest.
// The one-token bound, clr and the synchronous active-high reset are
// choices of this implementation.
module synch_state (
  input  logic clk,
  input  logic rst,
  input  logic clr,    // enclosing state left: drop any token
  input  logic put,    // fork transition of the source region fired
  input  logic take,   // join transition of the target region fired
  output logic full    // a token is waiting
);

  always_ff @(posedge clk) begin
    if (rst || clr) full <= 1'b0;
    else            full <= (full & ~take) | put;
  end

  // A join may only consume a token that is there.
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) take |-> full)
    else $error("join fired on an empty synch state");

  // With a bound of one, a second fork must not come before the join.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    (put && !clr) |-> (!full || take))
    else $error("synch state overflow");

endmodule
