// End-to-end testbench of reactor_top, at its default (and only) size.
//
// One behavioural plant is closed around the top's selected actuator bus
// y. For each of the three controller forms in turn (sel = PN, GV, SS)
// the plant is run through six technological cycles whose scale sizes,
// agitator threshold and wagon travel differ, so that the wagon sometimes
// reaches the left end before the scales are empty and sometimes after.
// The two forms not in control follow on the same sensors.
// Checks, for the form in control: one-clock response to x0; no pouring
// into the wagon away from the left end; the wagon starts right only
// after the reactor is empty; every cycle returns to the start state;
// all substance reaches the wagon. For all three forms: each is back in
// its start state after each cycle. Every mechanism of the design is
// counted and must occur at least once: the fork t1, the joins t4 and
// t10, agitator on (t5) and off (t6), both orders of the wagon/scales
// synchronisation, the z1 broadcast, tokens waiting in S1 and S2, the
// exit of Reaction by t15 while StirringControl is active (global
// variable form), the completion t15 of Process (synch state form), and
// each selector setting.
module reactor_top_tb;
  import reactor_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  ctrl_sel_e sel = SEL_PN;
  sensors_t x;
  actuators_t y, y_pn, y_gv, y_ss;
  marking_t pn_marking;
  gv_state_t gv_state;
  ss_state_t ss_state;
  logic gv_z1, ss_s1, ss_s2;
  logic [13:1] pn_fired;
  logic [15:1] gv_fired, ss_fired;

  always #5 clk = ~clk;

  reactor_top dut (
    .clk, .rst, .sel, .x, .y, .y_pn, .y_gv, .y_ss,
    .pn_marking, .gv_state, .gv_z1, .ss_state, .ss_s1, .ss_s2,
    .pn_fired, .gv_fired, .ss_fired
  );

  logic start = 1'b0;
  int cap1, cap2, hi, travel;
  int spills, rlevel, delivered;
  reactor_plant_model plant (.clk, .rst, .start, .y, .cap1, .cap2, .hi, .travel,
                             .x, .spills, .reactor_level(rlevel), .delivered);

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // mechanism counters
  typedef enum int {
    M_FORK, M_JOIN_T4, M_JOIN_T10, M_AGIT_ON, M_AGIT_OFF, M_WAGON_FIRST,
    M_SCALES_FIRST, M_Z1, M_S1_WAIT, M_S2_WAIT, M_T15_EXIT, M_SS_DONE,
    M_SEL_PN, M_SEL_GV, M_SEL_SS, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"fork t1", "join t4", "join t10", "agitator on t5",
    "agitator off t6", "wagon waits for scales", "scales wait for wagon", "z1 broadcast",
    "token waits in S1", "token waits in S2", "t15 leaves Reaction while stirring control active",
    "t15 completes Process", "PN in control", "GV in control", "SS in control"};

  always @(negedge clk) if (!rst) begin
    logic scales_done_pn, scales_done_gv;
    if (pn_fired[1] | gv_fired[1] | ss_fired[1]) mech[M_FORK]++;
    if (pn_fired[4] | gv_fired[4] | ss_fired[4]) mech[M_JOIN_T4]++;
    if (pn_fired[10] | gv_fired[10] | ss_fired[10]) mech[M_JOIN_T10]++;
    if (pn_fired[5] | gv_fired[5] | ss_fired[5]) mech[M_AGIT_ON]++;
    if (pn_fired[6] | gv_fired[6] | ss_fired[6]) mech[M_AGIT_OFF]++;
    scales_done_pn = pn_marking[11] & pn_marking[12];
    scales_done_gv = gv_state.emptying_mv1_done & gv_state.emptying_mv2_done;
    if ((pn_marking[13] & (pn_marking[9] | pn_marking[10])) ||
        (gv_state.wagon_waiting & (gv_state.emptying_mv1 | gv_state.emptying_mv2)))
      mech[M_WAGON_FIRST]++;
    if ((scales_done_pn & ~pn_marking[13]) || (scales_done_gv & ~gv_z1))
      mech[M_SCALES_FIRST]++;
    if (gv_z1) mech[M_Z1]++;
    if (ss_s1) mech[M_S1_WAIT]++;
    if (ss_s2) mech[M_S2_WAIT]++;
    if (gv_fired[15] && (gv_state.waiting | gv_state.stirring)) mech[M_T15_EXIT]++;
    if (ss_fired[15]) mech[M_SS_DONE]++;
  end

  function automatic logic in_control_idle();
    case (sel)
      SEL_PN:  return pn_marking == marking_t'(1);
      SEL_GV:  return gv_state == GV_RESET;
      default: return ss_state == SS_RESET;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    cap1 = 3; cap2 = 3; hi = 2; travel = 2;
    for (int form = 0; form < 3; form++) begin
      sel = ctrl_sel_e'(form);
      rst = 1'b1;
      repeat (2) @(negedge clk);
      rst = 1'b0;
      mech[M_SEL_PN + form]++;
      for (int run = 0; run < 6; run++) begin
        int n, n0;
        cap1 = 2 + run; cap2 = 7 - run; hi = 3 + (run % 3); travel = 1 + 12 * (run % 3);
        n0 = delivered;
        check(in_control_idle(), "form in control not idle before start");
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        check(y.y1 && y.y2 && y.y9, "filling and wagon motion did not start one clock after x0");
        n = 0;
        while (!in_control_idle() && n < 500) begin
          @(negedge clk);
          n++;
          if (y.y5) check(x.x7, "reactor emptied with the wagon away from the left end");
          if (y.y8) check(!x.x6, "wagon moves right before the reactor is empty");
          if (y.y1 || y.y2) check(!(y.y3 || y.y4), "scales filled and emptied together");
        end
        check(n < 500, "technological cycle did not end");
        check(spills == 0, "substance spilled");
        check(delivered - n0 == cap1 + cap2,
              $sformatf("wagon delivered %0d units, expected %0d", delivered - n0, cap1 + cap2));
        repeat (4) @(negedge clk);
        check(pn_marking == marking_t'(1), "Petri net form not back in place 1");
        check(gv_state == GV_RESET, "global-variable form not back in WaitingForStart");
        check(ss_state == SS_RESET && !ss_s1 && !ss_s2,
              "synch-state form not back in WaitingForStart");
      end
    end
    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-50s occurred %0d times", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism '%s' never occurred", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
