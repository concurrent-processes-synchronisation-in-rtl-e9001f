// Shared types of the chemical-reactor logic controller.
//
// The plant has one start button (x0), nine binary sensors (x1..x9) and
// nine binary actuators (y1..y9). Sensor and actuator names, and their
// meaning, follow the reactor description:
//   x0 start, x1/x3 scale MV1/MV2 full, x2/x4 scale MV1/MV2 not empty,
//   x5 reactor level above the agitator sensor, x6 reactor not empty,
//   x7 wagon at the left end, x8 wagon at the right end, x9 wagon not empty;
//   y1/y2 fill MV1/MV2, y3/y4 empty MV1/MV2 into the reactor,
//   y5 empty the reactor into the wagon, y6 empty the wagon,
//   y7 agitator on, y8 wagon moves right, y9 wagon moves left.
// The state vectors of the two statechart controllers are one-hot per
// state (simple, compound and final states alike), so that a reader can
// see the active configuration directly.
package reactor_pkg;

  typedef struct packed {
    logic x9;
    logic x8;
    logic x7;
    logic x6;
    logic x5;
    logic x4;
    logic x3;
    logic x2;
    logic x1;
    logic x0;
  } sensors_t;

  typedef struct packed {
    logic y9;
    logic y8;
    logic y7;
    logic y6;
    logic y5;
    logic y4;
    logic y3;
    logic y2;
    logic y1;
  } actuators_t;

  // Which controller form drives the plant in the co-simulation top.
  typedef enum logic [1:0] {
    SEL_PN = 2'd0,   // Petri net
    SEL_GV = 2'd1,   // statechart with global variable
    SEL_SS = 2'd2    // statechart with synch states
  } ctrl_sel_e;

  // Petri net marking: bit p is place p (places 1..16, bit 0 unused).
  localparam int unsigned NUM_PLACES = 16;
  typedef logic [NUM_PLACES:1] marking_t;

  // Active-state flags of the statechart with a global variable.
  typedef struct packed {
    logic waiting_for_start;
    logic process;
    logic preparations;
    logic filling_mv1;
    logic filling_mv1_done;     // final state of the FillingMV1 region
    logic filling_mv2;
    logic filling_mv2_done;     // final state of the FillingMV2 region
    logic reaction;
    logic waiting;              // StirringControl: agitator ready
    logic stirring;
    logic emptying_scales;
    logic emptying_mv1;
    logic emptying_mv1_done;
    logic emptying_mv2;
    logic emptying_mv2_done;
    logic emptying_reactor;
    logic dispensing_done;      // final state of AgentsDispensing
    logic substrates_done;      // final state of Substrates
    logic wagon_left;
    logic wagon_waiting;
    logic wagon_right;
    logic emptying_wagon;
  } gv_state_t;

  // Active-state flags of the statechart with synch states.
  typedef struct packed {
    logic waiting_for_start;
    logic process;
    logic preparations;
    logic filling_mv1;
    logic filling_mv1_done;
    logic filling_mv2;
    logic filling_mv2_done;
    logic reaction;
    logic waiting;
    logic stirring;
    logic emptying_scales;
    logic emptying_mv1;
    logic emptying_mv1_done;
    logic emptying_mv2;
    logic emptying_mv2_done;
    logic emptying_reactor;
    logic dispensing_done;      // final state of AgentsDispensing
    logic wagon_left;
    logic wagon_waiting;
    logic wagon_right;
    logic emptying_wagon;
    logic wagon_done;           // final state of the Wagon region
  } ss_state_t;

  localparam gv_state_t GV_RESET = '{waiting_for_start: 1'b1, default: 1'b0};
  localparam ss_state_t SS_RESET = '{waiting_for_start: 1'b1, default: 1'b0};

endpackage
