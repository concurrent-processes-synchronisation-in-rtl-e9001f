// Reactor logic controller taken from the hierarchical, concurrent
// statechart in which the overlapping processes are synchronised by two
// UML synch states instead of a global variable.
//
// Hierarchy (regions separated by "|"):
//   WaitingForStart -t1:x0-> Process -t15-> WaitingForStart
//   Process = Substrates | Wagon
//     Substrates : Preparations -t4-> Reaction
//       Preparations = FillingMV1 (y1) -t2:x1-> (final)
//                    | FillingMV2 (y2) -t3:x3-> (final)
//       Reaction = StirringControl | AgentsDispensing
//         StirringControl : Waiting -t5:x5*x6-> Stirring (y7)
//                           Stirring -t6:!x5*x6-> Waiting
//         AgentsDispensing : EmptyingScales -t10 (join S1)->
//                            EmptyingReactor (y5) -t11:!x6 (fork S2)-> (final)
//           EmptyingScales = EmptyingMV1 (y3) -t7:!x2-> (final)
//                          | EmptyingMV2 (y4) -t8:!x4-> (final)
//     Wagon : WagonLeft (y9) -t9:x7 (fork S1)-> WagonWaiting
//             -t12 (join S2)-> WagonRight (y8) -t13:x8-> EmptyingWagon (y6)
//             -t14:!x9-> (final)
// S1 lets the reactor be emptied only after the wagon has reached the
// left end; S2 lets the wagon move right only after the reactor is
// empty.
//
// Implementation: one flip-flop per state (22), plus one per synch state
// (synch_state). Entering a compound state enters the default state of
// each region; leaving one clears all states inside it. The completion
// transitions t4, t10 (of EmptyingScales) and t15 (of Process) wait for
// the final states inside; t15 therefore needs both the Wagon final
// state and the AgentsDispensing final state and ends StirringControl
// wherever it is. All enabled transitions fire at the same clock edge.
// Actuators are decoded straight from the state flip-flops.
//
// Choices of this implementation, not given by the diagram: the one-hot
// state encoding, one clock edge per step, synch states bounded to one
// token and emptied when Process is left, the synchronous active-high
// reset into WaitingForStart, and sensors assumed synchronised to clk.
//
// Interface: clk, rst, x (sensors) -> y (actuators), state (active
// states), s1/s2 (synch states holding a token), fired (t1..t15).
module reactor_ss_ctrl
  import reactor_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  sensors_t    x,
  output actuators_t  y,
  output ss_state_t   state,
  output logic        s1,
  output logic        s2,
  output logic [15:1] fired
);

  ss_state_t s, n;
  logic [15:1] t;

  // S1: fork t9 (Wagon) -> join t10 (AgentsDispensing).
  synch_state u_s1 (
    .clk (clk), .rst (rst), .clr (t[15]),
    .put (t[9]), .take (t[10]), .full (s1)
  );

  // S2: fork t11 (AgentsDispensing) -> join t12 (Wagon).
  synch_state u_s2 (
    .clk (clk), .rst (rst), .clr (t[15]),
    .put (t[11]), .take (t[12]), .full (s2)
  );

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
    t[10] = s.emptying_scales & s.emptying_mv1_done & s.emptying_mv2_done & s1;
    t[11] = s.emptying_reactor & ~x.x6;
    t[12] = s.wagon_waiting & s2;
    t[13] = s.wagon_right & x.x8;
    t[14] = s.emptying_wagon & ~x.x9;
    t[15] = s.process & s.wagon_done & s.dispensing_done;
  end

  always_comb begin
    // top level
    n.waiting_for_start = (s.waiting_for_start & ~t[1]) | t[15];
    n.process           = (s.process & ~t[15]) | t[1];
    // Substrates region
    n.preparations      = ((s.preparations & ~t[4]) | t[1]) & ~t[15];
    n.filling_mv1       = ((s.filling_mv1 & ~t[2]) | t[1]) & ~t[4] & ~t[15];
    n.filling_mv1_done  = (s.filling_mv1_done | t[2]) & ~t[4] & ~t[15];
    n.filling_mv2       = ((s.filling_mv2 & ~t[3]) | t[1]) & ~t[4] & ~t[15];
    n.filling_mv2_done  = (s.filling_mv2_done | t[3]) & ~t[4] & ~t[15];
    n.reaction          = (s.reaction | t[4]) & ~t[15];
    n.waiting           = ((s.waiting & ~t[5]) | t[6] | t[4]) & ~t[15];
    n.stirring          = ((s.stirring & ~t[6]) | t[5]) & ~t[15];
    n.emptying_scales   = ((s.emptying_scales & ~t[10]) | t[4]) & ~t[15];
    n.emptying_mv1      = ((s.emptying_mv1 & ~t[7]) | t[4]) & ~t[10] & ~t[15];
    n.emptying_mv1_done = (s.emptying_mv1_done | t[7]) & ~t[10] & ~t[15];
    n.emptying_mv2      = ((s.emptying_mv2 & ~t[8]) | t[4]) & ~t[10] & ~t[15];
    n.emptying_mv2_done = (s.emptying_mv2_done | t[8]) & ~t[10] & ~t[15];
    n.emptying_reactor  = ((s.emptying_reactor & ~t[11]) | t[10]) & ~t[15];
    n.dispensing_done   = (s.dispensing_done | t[11]) & ~t[15];
    // Wagon region
    n.wagon_left        = ((s.wagon_left & ~t[9]) | t[1]) & ~t[15];
    n.wagon_waiting     = ((s.wagon_waiting & ~t[12]) | t[9]) & ~t[15];
    n.wagon_right       = ((s.wagon_right & ~t[13]) | t[12]) & ~t[15];
    n.emptying_wagon    = ((s.emptying_wagon & ~t[14]) | t[13]) & ~t[15];
    n.wagon_done        = (s.wagon_done | t[14]) & ~t[15];
  end

  always_ff @(posedge clk) begin
    if (rst) s <= SS_RESET;
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

  a_top_onehot: assert property (@(posedge clk) disable iff (rst)
    $onehot({s.waiting_for_start, s.process}))
    else $error("top level of the statechart is not one-hot");

  a_wagon_onehot: assert property (@(posedge clk) disable iff (rst)
    s.process |-> $onehot({s.wagon_left, s.wagon_waiting, s.wagon_right,
                           s.emptying_wagon, s.wagon_done}))
    else $error("Wagon region is not one-hot");

endmodule
