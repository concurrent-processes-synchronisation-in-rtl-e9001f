// Reactor logic controller taken from the hierarchical, concurrent
// statechart in which the overlapping processes are synchronised by a
// global variable, z1.
//
// Hierarchy (regions separated by "|"):
//   WaitingForStart -t1:x0-> Process -t11-> WagonRight -t12:x8->
//   EmptyingWagon -t13:!x9-> WaitingForStart
//   Process = Substrates | WagonReturn
//     Substrates : Preparations -t4-> Reaction -t15:!x6-> (final)
//       Preparations = FillingMV1 (y1) -t2:x1-> (final)
//                    | FillingMV2 (y2) -t3:x3-> (final)
//       Reaction = StirringControl | AgentsDispensing
//         StirringControl : Waiting -t5:x5*x6-> Stirring (y7)
//                           Stirring -t6:!x5*x6-> Waiting
//         AgentsDispensing : EmptyingScales -t10:z1-> EmptyingReactor (y5)
//                            -t14:!x6-> (final)
//           EmptyingScales = EmptyingMV1 (y3) -t7:!x2-> (final)
//                          | EmptyingMV2 (y4) -t8:!x4-> (final)
//     WagonReturn : WagonLeft (y9) -t9:x7-> WagonWaiting (do z1)
// z1 is broadcast for as long as WagonWaiting is active, so emptying of
// the reactor (t10) cannot start before the wagon stands at the left end.
//
// Implementation: one flip-flop per state, compound and final states
// included (22 flip-flops). Entering a compound state also enters the
// default state of each of its regions. A transition that leaves a
// compound state clears every state inside it. The transitions that
// leave a compound state (t4 and t11 without a predicate, t10 guarded by
// z1, t15 guarded by !x6) are enabled only when the final states inside
// are active, which follows the rule that a final state blocks
// exception transitions until it is reached. All enabled transitions fire at the
// same clock edge (the diagram is conflict-free). Actuators are the
// do-activities of the active states, decoded straight from the
// flip-flops. z1 is likewise decoded from the WagonWaiting flip-flop, so
// t10 can fire one clock after t9 at the earliest.
//
// Choices of this implementation, not given by the diagram: the one-hot
// state encoding, one clock edge per step, the synchronous active-high
// reset into WaitingForStart, and sensors assumed synchronised to clk.
//
// Interface: clk, rst, x (sensors) -> y (actuators), z1, state (active
// states), fired (one bit per transition t1..t15).
module reactor_gv_ctrl
  import reactor_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  sensors_t    x,
  output actuators_t  y,
  output logic        z1,
  output gv_state_t   state,
  output logic [15:1] fired
);

  gv_state_t s, n;
  logic [15:1] t;

  // Global variable: broadcast while WagonWaiting is active (do / z1).
  assign z1 = s.wagon_waiting;

  always_comb begin
    t[1]  = s.waiting_for_start & x.x0;
    t[2]  = s.filling_mv1 & x.x1;
    t[3]  = s.filling_mv2 & x.x3;
    t[4]  = s.preparations & s.filling_mv1_done & s.filling_mv2_done;
    t[5]  = s.waiting & x.x5 & x.x6;
    t[6]  = s.stirring & ~x.x5 & x.x6;
    t[7]  = s.emptying_mv1 & ~x.x2;
    t[8]  = s.emptying_mv2 & ~x.x4;
    t[9]  = s.wagon_left & x.x7;
    t[10] = s.emptying_scales & s.emptying_mv1_done & s.emptying_mv2_done & z1;
    t[11] = s.process & s.substrates_done;
    t[12] = s.wagon_right & x.x8;
    t[13] = s.emptying_wagon & ~x.x9;
    t[14] = s.emptying_reactor & ~x.x6;
    t[15] = s.reaction & s.dispensing_done & ~x.x6;
  end

  always_comb begin
    // top level
    n.waiting_for_start = (s.waiting_for_start & ~t[1]) | t[13];
    n.process           = (s.process & ~t[11]) | t[1];
    n.wagon_right       = (s.wagon_right & ~t[12]) | t[11];
    n.emptying_wagon    = (s.emptying_wagon & ~t[13]) | t[12];
    // Substrates region
    n.preparations      = ((s.preparations & ~t[4]) | t[1]) & ~t[11];
    n.filling_mv1       = ((s.filling_mv1 & ~t[2]) | t[1]) & ~t[4] & ~t[11];
    n.filling_mv1_done  = (s.filling_mv1_done | t[2]) & ~t[4] & ~t[11];
    n.filling_mv2       = ((s.filling_mv2 & ~t[3]) | t[1]) & ~t[4] & ~t[11];
    n.filling_mv2_done  = (s.filling_mv2_done | t[3]) & ~t[4] & ~t[11];
    n.reaction          = ((s.reaction & ~t[15]) | t[4]) & ~t[11];
    n.waiting           = ((s.waiting & ~t[5]) | t[6] | t[4]) & ~t[15] & ~t[11];
    n.stirring          = ((s.stirring & ~t[6]) | t[5]) & ~t[15] & ~t[11];
    n.emptying_scales   = ((s.emptying_scales & ~t[10]) | t[4]) & ~t[15] & ~t[11];
    n.emptying_mv1      = ((s.emptying_mv1 & ~t[7]) | t[4]) & ~t[10] & ~t[15] & ~t[11];
    n.emptying_mv1_done = (s.emptying_mv1_done | t[7]) & ~t[10] & ~t[15] & ~t[11];
    n.emptying_mv2      = ((s.emptying_mv2 & ~t[8]) | t[4]) & ~t[10] & ~t[15] & ~t[11];
    n.emptying_mv2_done = (s.emptying_mv2_done | t[8]) & ~t[10] & ~t[15] & ~t[11];
    n.emptying_reactor  = ((s.emptying_reactor & ~t[14]) | t[10]) & ~t[15] & ~t[11];
    n.dispensing_done   = (s.dispensing_done | t[14]) & ~t[15] & ~t[11];
    n.substrates_done   = (s.substrates_done | t[15]) & ~t[11];
    // WagonReturn region
    n.wagon_left        = ((s.wagon_left & ~t[9]) | t[1]) & ~t[11];
    n.wagon_waiting     = (s.wagon_waiting | t[9]) & ~t[11];
  end

  always_ff @(posedge clk) begin
    if (rst) s <= GV_RESET;
    else     s <= n;
  end

  always_comb begin
    y.y1 = s.filling_mv1;
    y.y2 = s.filling_mv2;
    y.y3 = s.emptying_mv1;
    y.y4 = s.emptying_mv2;
    y.y5 = s.emptying_reactor;
    y.y6 = s.emptying_wagon;
    y.y7 = s.stirring;
    y.y8 = s.wagon_right;
    y.y9 = s.wagon_left;
  end

  assign state = s;
  assign fired = t;

  // Exactly one top-level state is active.
  a_top_onehot: assert property (@(posedge clk) disable iff (rst)
    $onehot({s.waiting_for_start, s.process, s.wagon_right, s.emptying_wagon}))
    else $error("top level of the statechart is not one-hot");

  // Inside Process, the Substrates region holds exactly one state.
  a_substrates_onehot: assert property (@(posedge clk) disable iff (rst)
    s.process |-> $onehot({s.preparations, s.reaction, s.substrates_done}))
    else $error("Substrates region is not one-hot");

  // t9 and t11 look conflicting but are never enabled together.
  a_t9_t11: assert property (@(posedge clk) disable iff (rst) !(t[9] && t[11]))
    else $error("t9 and t11 enabled together");

endmodule
