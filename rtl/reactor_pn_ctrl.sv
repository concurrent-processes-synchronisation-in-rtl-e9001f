// Reactor logic controller taken directly from the Petri net of the
// reactor (16 places, 13 transitions).
//
// Every place is one flip-flop that holds its token. A transition is
// enabled when all its input places are marked and its predicate over
// the sensors is true; every enabled transition fires at the same clock
// edge, taking the tokens from its input places and putting one into each
// output place. The net is safe and conflict-free, so firing all enabled
// transitions together is the same as firing them one after another.
// Each actuator is the marking of the place it is attached to (Moore
// outputs straight from the flip-flops).
//
// Net (places -> transitions), as the reactor net gives them:
//   t1  1 & x0        -> 2, 3, 6       t8  10 & !x4        -> 12
//   t2  2 & x1        -> 4             t9  6 & x7          -> 13
//   t3  3 & x3        -> 5             t10 11 & 12 & 13    -> 14
//   t4  4 & 5         -> 8, 9, 10      t11 8 & 14 & !x6    -> 15
//   t5  8 & x5 & x6   -> 7             t12 15 & x8         -> 16
//   t6  7 & !x5       -> 8             t13 16 & !x9        -> 1
//   t7  9 & !x2       -> 11
//   outputs: y1=2 y2=3 y3=9 y4=10 y5=14 y6=16 y7=7 y8=15 y9=6
// The initial marking is place 1 alone.
//
// Design choices not fixed by the net: one clock edge per firing step;
// synchronous, active-high reset to the initial marking; sensors are
// assumed already synchronised to clk.
//
// Interface: clk, rst, x (sensors) -> y (actuators), marking (one bit per
// place) and fired (one bit per transition, high in the cycle whose
// closing edge fires it).
module reactor_pn_ctrl
  import reactor_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  sensors_t   x,
  output actuators_t y,
  output marking_t   marking,
  output logic [13:1] fired
);

  marking_t m, m_next;
  logic [13:1] t;

  // Enabling of each transition: input places marked and predicate true.
  always_comb begin
    t[1]  = m[1]  & x.x0;
    t[2]  = m[2]  & x.x1;
    t[3]  = m[3]  & x.x3;
    t[4]  = m[4]  & m[5];
    t[5]  = m[8]  & x.x5 & x.x6;
    t[6]  = m[7]  & ~x.x5;
    t[7]  = m[9]  & ~x.x2;
    t[8]  = m[10] & ~x.x4;
    t[9]  = m[6]  & x.x7;
    t[10] = m[11] & m[12] & m[13];
    t[11] = m[8]  & m[14] & ~x.x6;
    t[12] = m[15] & x.x8;
    t[13] = m[16] & ~x.x9;
  end

  // Token game: a place keeps its token unless an output transition
  // fires, and gains one when an input transition fires.
  always_comb begin
    m_next[1]  = (m[1]  & ~t[1])          | t[13];
    m_next[2]  = (m[2]  & ~t[2])          | t[1];
    m_next[3]  = (m[3]  & ~t[3])          | t[1];
    m_next[4]  = (m[4]  & ~t[4])          | t[2];
    m_next[5]  = (m[5]  & ~t[4])          | t[3];
    m_next[6]  = (m[6]  & ~t[9])          | t[1];
    m_next[7]  = (m[7]  & ~t[6])          | t[5];
    m_next[8]  = (m[8]  & ~t[5] & ~t[11]) | t[4] | t[6];
    m_next[9]  = (m[9]  & ~t[7])          | t[4];
    m_next[10] = (m[10] & ~t[8])          | t[4];
    m_next[11] = (m[11] & ~t[10])         | t[7];
    m_next[12] = (m[12] & ~t[10])         | t[8];
    m_next[13] = (m[13] & ~t[10])         | t[9];
    m_next[14] = (m[14] & ~t[11])         | t[10];
    m_next[15] = (m[15] & ~t[12])         | t[11];
    m_next[16] = (m[16] & ~t[13])         | t[12];
  end

  always_ff @(posedge clk) begin
    if (rst) m <= marking_t'(1);   // place 1 only (bit 1 is the LSB)
    else     m <= m_next;
  end

  always_comb begin
    y.y1 = m[2];
    y.y2 = m[3];
    y.y3 = m[9];
    y.y4 = m[10];
    y.y5 = m[14];
    y.y6 = m[16];
    y.y7 = m[7];
    y.y8 = m[15];
    y.y9 = m[6];
  end

  assign marking = m;
  assign fired   = t;

  // The net is safe: no transition may put a token into a marked place
  // that it does not also empty.
  property p_safe;
    @(posedge clk) disable iff (rst)
      ((t[1] & (m[2] | m[3] | m[6])) == 1'b0) &&
      ((t[4] & (m[8] | m[9] | m[10])) == 1'b0) &&
      ((t[10] & m[14]) == 1'b0) && ((t[11] & m[15]) == 1'b0);
  endproperty
  a_safe: assert property (p_safe) else $error("Petri net marking became unsafe");

  // t5 and t11 share place 8 but are never enabled together (t5 needs
  // x6, t11 needs !x6).
  a_no_conflict: assert property (@(posedge clk) disable iff (rst) !(t[5] && t[11]))
    else $error("conflict between t5 and t11");

endmodule
