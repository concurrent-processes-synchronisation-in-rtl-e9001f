// Testbench of reactor_gv_ctrl.
//
// Part 1 drives random sensor values and compares, every clock, the
// active states, the actuators and z1 with a reference model written
// region by region with one enumerated variable per region (a different
// structure from the one-hot equations of the controller). Every
// transition t1..t15 must fire at least once, and exactly 32 distinct
// global states (active configurations) must be reached, the size of the
// reachable state set of this statechart.
// Part 2 runs the controller against the behavioural plant for several
// technological cycles of different timing, so that the wagon sometimes
// reaches the left end before the scales are empty and sometimes after.
// It checks the one-clock response to x0, that the reactor is never
// emptied away from the left end, that every cycle returns to
// WaitingForStart and that all substance reaches the wagon, and it
// counts how often each synchronisation case occurred.
module reactor_gv_ctrl_tb;
  import reactor_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  sensors_t x, x_rand, x_plant;
  logic use_plant = 1'b0;
  actuators_t y;
  logic z1;
  gv_state_t state;
  logic [15:1] fired;
  int checks = 0, failures = 0;
  int fire_count [15:1];

  always #5 clk = ~clk;

  reactor_gv_ctrl dut (.clk, .rst, .x, .y, .z1, .state, .fired);

  // ---------------- reference model ----------------
  typedef enum {TOP_WAIT, TOP_PROCESS, TOP_RIGHT, TOP_EMPTY} top_e;
  typedef enum {SUB_PREP, SUB_REACT, SUB_DONE} sub_e;
  typedef enum {AD_SCALES, AD_REACTOR, AD_DONE} ad_e;
  typedef enum {WG_LEFT, WG_WAIT} wag_e;
  typedef struct {
    top_e top; sub_e sub; logic f1, f2; logic stir; ad_e ad; logic e1, e2; wag_e wag;
  } ref_t;
  ref_t r;

  function automatic ref_t ref_reset();
    ref_t v;
    v.top = TOP_WAIT; v.sub = SUB_PREP; v.f1 = 0; v.f2 = 0; v.stir = 0;
    v.ad = AD_SCALES; v.e1 = 0; v.e2 = 0; v.wag = WG_LEFT;
    return v;
  endfunction

  function automatic ref_t ref_step(input ref_t c, input sensors_t s);
    ref_t v = c;
    logic zz = (c.top == TOP_PROCESS) && (c.wag == WG_WAIT);
    case (c.top)
      TOP_WAIT: if (s.x0) begin
        v.top = TOP_PROCESS; v.sub = SUB_PREP; v.f1 = 0; v.f2 = 0; v.wag = WG_LEFT;
      end
      TOP_PROCESS: if (c.sub == SUB_DONE) v.top = TOP_RIGHT;
      else begin
        if (c.sub == SUB_PREP) begin
          if (c.f1 && c.f2) begin
            v.sub = SUB_REACT; v.stir = 0; v.ad = AD_SCALES; v.e1 = 0; v.e2 = 0;
          end else begin
            if (s.x1) v.f1 = 1;
            if (s.x3) v.f2 = 1;
          end
        end else begin
          if (c.ad == AD_DONE && !s.x6) v.sub = SUB_DONE;
          else begin
            if (!c.stir && s.x5 && s.x6) v.stir = 1;
            if (c.stir && !s.x5 && s.x6) v.stir = 0;
            case (c.ad)
              AD_SCALES: if (c.e1 && c.e2 && zz) v.ad = AD_REACTOR;
                         else begin
                           if (!s.x2) v.e1 = 1;
                           if (!s.x4) v.e2 = 1;
                         end
              AD_REACTOR: if (!s.x6) v.ad = AD_DONE;
              default: ;
            endcase
          end
        end
        if (c.wag == WG_LEFT && s.x7) v.wag = WG_WAIT;
      end
      TOP_RIGHT: if (s.x8) v.top = TOP_EMPTY;
      TOP_EMPTY: if (!s.x9) v.top = TOP_WAIT;
    endcase
    return v;
  endfunction

  function automatic gv_state_t ref_state(input ref_t c);
    gv_state_t g = '0;
    logic p = c.top == TOP_PROCESS;
    logic prep = p && c.sub == SUB_PREP;
    logic react = p && c.sub == SUB_REACT;
    logic esc = react && c.ad == AD_SCALES;
    g.waiting_for_start = c.top == TOP_WAIT;
    g.process           = p;
    g.preparations      = prep;
    g.filling_mv1       = prep && !c.f1;
    g.filling_mv1_done  = prep && c.f1;
    g.filling_mv2       = prep && !c.f2;
    g.filling_mv2_done  = prep && c.f2;
    g.reaction          = react;
    g.waiting           = react && !c.stir;
    g.stirring          = react && c.stir;
    g.emptying_scales   = esc;
    g.emptying_mv1      = esc && !c.e1;
    g.emptying_mv1_done = esc && c.e1;
    g.emptying_mv2      = esc && !c.e2;
    g.emptying_mv2_done = esc && c.e2;
    g.emptying_reactor  = react && c.ad == AD_REACTOR;
    g.dispensing_done   = react && c.ad == AD_DONE;
    g.substrates_done   = p && c.sub == SUB_DONE;
    g.wagon_left        = p && c.wag == WG_LEFT;
    g.wagon_waiting     = p && c.wag == WG_WAIT;
    g.wagon_right       = c.top == TOP_RIGHT;
    g.emptying_wagon    = c.top == TOP_EMPTY;
    return g;
  endfunction

  function automatic actuators_t ref_y(input gv_state_t g);
    actuators_t a;
    a.y1 = g.filling_mv1;  a.y2 = g.filling_mv2;  a.y3 = g.emptying_mv1;
    a.y4 = g.emptying_mv2; a.y5 = g.emptying_reactor; a.y6 = g.emptying_wagon;
    a.y7 = g.stirring;     a.y8 = g.wagon_right;  a.y9 = g.wagon_left;
    return a;
  endfunction

  assign x = use_plant ? x_plant : x_rand;

  // ---------------- plant for part 2 ----------------
  logic start = 1'b0;
  int cap1 = 3, cap2 = 5, hi = 4, travel = 6;
  int spills, rlevel, delivered;
  reactor_plant_model plant (.clk, .rst, .start, .y, .cap1, .cap2, .hi, .travel,
                             .x(x_plant), .spills, .reactor_level(rlevel), .delivered);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  int wagon_first = 0, scales_first = 0;
  // distinct active configurations (global states) seen in part 1
  int seen [gv_state_t];

  initial begin
    gv_state_t g;
    for (int i = 1; i <= 15; i++) fire_count[i] = 0;
    x_rand = '0;
    r = ref_reset();
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // ---- part 1: random sensors against the reference ----
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      x_rand = sensors_t'($urandom_range(0, 1023));
      #1;
      g = ref_state(r);
      check(state == g, $sformatf("state %h, expected %h", state, g));
      check(y == ref_y(g), $sformatf("y %b, expected %b", y, ref_y(g)));
      check(z1 == g.wagon_waiting, "z1 wrong");
      seen[state] = 1;
      for (int i = 1; i <= 15; i++) if (fired[i]) fire_count[i]++;
      r = ref_step(r, x_rand);
    end
    for (int i = 1; i <= 15; i++)
      check(fire_count[i] > 0, $sformatf("t%0d never fired", i));
    // The statechart has 32 reachable global states.
    check(seen.num() == 32, $sformatf("%0d global states reached, expected 32", seen.num()));
    $display("global states reached: %0d", seen.num());

    // ---- part 2: closed loop with the plant ----
    @(negedge clk);
    rst = 1'b1; use_plant = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 6; run++) begin
      int n, n0;
      cap1 = 2 + run; cap2 = 7 - run; hi = 3 + (run % 3); travel = 1 + 12 * (run % 3);
      n0 = delivered;
      check(state == GV_RESET, "not in WaitingForStart before start");
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(y.y1 && y.y2 && y.y9 && state.process, "t1 did not fire one clock after x0");
      n = 0;
      while (!state.waiting_for_start && n < 500) begin
        @(negedge clk);
        n++;
        if (y.y5) check(x.x7, "reactor emptied with the wagon away from the left end");
        if (y.y8) check(!x.x6, "wagon moves right before the reactor is empty");
        if (state.emptying_scales && state.emptying_mv1_done && state.emptying_mv2_done && !z1)
          scales_first++;
        if (state.wagon_waiting && state.emptying_scales &&
            !(state.emptying_mv1_done && state.emptying_mv2_done))
          wagon_first++;
      end
      check(state == GV_RESET, "cycle did not return to WaitingForStart");
      check(spills == 0, "substance spilled");
      check(delivered - n0 == cap1 + cap2, $sformatf("wagon delivered %0d units, expected %0d",
                                                     delivered - n0, cap1 + cap2));
      repeat (3) @(negedge clk);
    end
    check(scales_first > 0, "scales never waited for z1");
    check(wagon_first > 0, "wagon never waited at the left end for the scales");
    $display("scales waited %0d clocks for z1, z1 waited %0d clocks for the scales",
             scales_first, wagon_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
