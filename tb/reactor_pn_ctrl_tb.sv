// Testbench of reactor_pn_ctrl.
//
// Part 1 drives random sensor values and compares, every clock, the
// marking, the fired transitions and the actuators with a table-driven
// Petri net interpreter (input and output place sets per transition),
// written separately from the hand-written next-state equations of the
// controller. Every transition must fire at least once, and the 29
// markings reachable with synchronous firing must all be visited.
// Part 2 runs the controller against the behavioural plant for several
// technological cycles of different timing and checks: the first
// response to x0 comes one clock later, the reactor is emptied only with
// the wagon at the left end, every cycle returns to place 1, and the
// wagon receives all the substance poured in.
module reactor_pn_ctrl_tb;
  import reactor_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  sensors_t x, x_rand, x_plant;
  logic use_plant = 1'b0;
  actuators_t y;
  marking_t marking;
  logic [13:1] fired;
  int checks = 0, failures = 0;
  int fire_count [13:1];
  int seen [marking_t];   // distinct markings reached in part 1

  always #5 clk = ~clk;

  reactor_pn_ctrl dut (.clk, .rst, .x, .y, .marking, .fired);

  // ---------------- reference interpreter ----------------
  // pre/post sets per transition, bit p = place p
  marking_t pre  [13:1];
  marking_t post [13:1];
  marking_t ref_m;

  function automatic marking_t pl(input int a, input int b = 0, input int c = 0);
    marking_t v = '0;
    v[a] = 1'b1;
    if (b != 0) v[b] = 1'b1;
    if (c != 0) v[c] = 1'b1;
    return v;
  endfunction

  initial begin
    pre[1]  = pl(1);         post[1]  = pl(2, 3, 6);
    pre[2]  = pl(2);         post[2]  = pl(4);
    pre[3]  = pl(3);         post[3]  = pl(5);
    pre[4]  = pl(4, 5);      post[4]  = pl(8, 9, 10);
    pre[5]  = pl(8);         post[5]  = pl(7);
    pre[6]  = pl(7);         post[6]  = pl(8);
    pre[7]  = pl(9);         post[7]  = pl(11);
    pre[8]  = pl(10);        post[8]  = pl(12);
    pre[9]  = pl(6);         post[9]  = pl(13);
    pre[10] = pl(11, 12, 13); post[10] = pl(14);
    pre[11] = pl(8, 14);     post[11] = pl(15);
    pre[12] = pl(15);        post[12] = pl(16);
    pre[13] = pl(16);        post[13] = pl(1);
  end

  function automatic logic guard(input int tr, input sensors_t s);
    case (tr)
      1: return s.x0;   2: return s.x1;   3: return s.x3;   4: return 1'b1;
      5: return s.x5 && s.x6;             6: return !s.x5;
      7: return !s.x2;  8: return !s.x4;  9: return s.x7;  10: return 1'b1;
      11: return !s.x6; 12: return s.x8;  13: return !s.x9;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic [13:1] ref_enabled(input marking_t m, input sensors_t s);
    logic [13:1] e;
    for (int i = 1; i <= 13; i++) e[i] = ((m & pre[i]) == pre[i]) && guard(i, s);
    return e;
  endfunction

  // place attached to each actuator y1..y9
  int out_place [1:9] = '{2, 3, 9, 10, 14, 16, 7, 15, 6};

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

  initial begin
    logic [13:1] e;
    marking_t nm;
    for (int i = 1; i <= 13; i++) fire_count[i] = 0;
    x_rand = '0;
    ref_m = pl(1);
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // ---- part 1: random sensors against the interpreter ----
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      x_rand = sensors_t'($urandom_range(0, 1023));
      #1;
      e = ref_enabled(ref_m, x_rand);
      check(marking == ref_m, $sformatf("marking %h, expected %h", marking, ref_m));
      seen[marking] = 1;
      check(fired == e, $sformatf("fired %b, expected %b", fired, e));
      for (int k = 1; k <= 9; k++)
        check(y[k-1] == ref_m[out_place[k]], $sformatf("y%0d wrong", k));
      nm = ref_m;
      for (int i = 1; i <= 13; i++) if (e[i]) begin
        nm = nm & ~pre[i];
        fire_count[i]++;
      end
      for (int i = 1; i <= 13; i++) if (e[i]) nm = nm | post[i];
      ref_m = nm;
    end
    for (int i = 1; i <= 13; i++)
      check(fire_count[i] > 0, $sformatf("t%0d never fired", i));
    // With every enabled transition firing at each step, 29 markings are
    // reachable from place 1 (found by exhaustive search over all sensor
    // values, outside this testbench).
    check(seen.num() == 29, $sformatf("%0d markings reached, expected 29", seen.num()));
    $display("markings reached: %0d", seen.num());

    // ---- part 2: closed loop with the plant ----
    @(negedge clk);
    rst = 1'b1; use_plant = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 6; run++) begin
      int poured, n, n0;
      cap1 = 2 + run; cap2 = 7 - run; hi = 3 + (run % 3); travel = 1 + 3 * (run % 4);
      poured = cap1 + cap2;
      n0 = delivered;
      check(marking == pl(1), "not in place 1 before start");
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(y.y1 && y.y2 && y.y9 && !marking[1], "t1 did not fire one clock after x0");
      n = 0;
      while (!marking[1] && n < 500) begin
        @(negedge clk);
        n++;
        if (y.y5) check(x.x7, "reactor emptied with the wagon away from the left end");
        if (y.y8) check(!x.x6, "wagon moves right before the reactor is empty");
      end
      check(marking == pl(1), "cycle did not return to place 1");
      check(spills == 0, "substance spilled");
      check(delivered - n0 == poured, $sformatf("wagon delivered %0d units, expected %0d",
                                                delivered - n0, poured));
      repeat (3) @(negedge clk);
    end
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
