// Chemical-reactor logic controller, co-simulation top.
//
// The same discrete controller is given in three equivalent forms, all
// built here and all fed by the same sensor bus x:
//   u_pn  the Petri net (16 places, one flip-flop each),
//   u_gv  the hierarchical statechart whose overlapping regions are
//         synchronised by the global variable z1,
//   u_ss  the same statechart synchronised by two synch states.
// Each form drives its own actuator bus (y_pn, y_gv, y_ss). The input sel
// picks which of them drives the plant outputs y; the two others run
// alongside on the same sensors, so their behaviour can be compared with
// the one in control. Running the forms side by side follows the idea of
// co-simulating the Petri net and statechart views of one controller;
// the selector itself is a choice of this design.
//
// Timing: all three are synchronous Moore machines; an actuator changes
// one clock edge after the sensor change that causes it. Reset is
// synchronous and active high and puts every form in its start state
// (place 1 / WaitingForStart).
module reactor_top
  import reactor_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  ctrl_sel_e   sel,
  input  sensors_t    x,
  output actuators_t  y,
  output actuators_t  y_pn,
  output actuators_t  y_gv,
  output actuators_t  y_ss,
  output marking_t    pn_marking,
  output gv_state_t   gv_state,
  output logic        gv_z1,
  output ss_state_t   ss_state,
  output logic        ss_s1,
  output logic        ss_s2,
  output logic [13:1] pn_fired,
  output logic [15:1] gv_fired,
  output logic [15:1] ss_fired
);

  reactor_pn_ctrl u_pn (
    .clk, .rst, .x, .y (y_pn), .marking (pn_marking), .fired (pn_fired)
  );

  reactor_gv_ctrl u_gv (
    .clk, .rst, .x, .y (y_gv), .z1 (gv_z1), .state (gv_state), .fired (gv_fired)
  );

  reactor_ss_ctrl u_ss (
    .clk, .rst, .x, .y (y_ss), .state (ss_state), .s1 (ss_s1), .s2 (ss_s2),
    .fired (ss_fired)
  );

  always_comb begin
    unique case (sel)
      SEL_PN:  y = y_pn;
      SEL_GV:  y = y_gv;
      SEL_SS:  y = y_ss;
      default: y = '0;   // unused code: all actuators off
    endcase
  end

endmodule
