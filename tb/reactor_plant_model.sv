// Behavioural model of the chemical reactor plant, for testbenches only.
//
// It turns the controller's actuators into sensor readings with simple
// integer levels that move by one unit per clock:
//   scales MV1/MV2 fill while y1/y2 is on, up to cap1/cap2 (x1/x3 = full,
//   x2/x4 = not empty); y3/y4 pour one unit per clock from a scale into
//   the reactor R; x5 = R at or above hi, x6 = R not empty; y5 pours one
//   unit per clock from R into the wagon while the wagon stands at the
//   left end; the wagon moves one step per clock left (y9) or right (y8)
//   over travel steps (x7 = left end, x8 = right end); y6 empties the wagon
//   one unit per clock (x9 = wagon not empty). x0 is the start button and
//   comes from the testbench. The sizes are inputs so that a testbench
//   can vary them between technological cycles.
// It also records violations of the plant's safety rules: pouring into
// the wagon when it is not at the left end, or moving the wagon while it
// is being filled.
module reactor_plant_model
  import reactor_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  actuators_t y,
  input  int         cap1,
  input  int         cap2,
  input  int         hi,
  input  int         travel,
  output sensors_t   x,
  output int         spills,
  output int         reactor_level,
  output int         delivered
);

  int mv1, mv2, r, pos, load;

  always_ff @(posedge clk) begin
    if (rst) begin
      mv1 <= 0; mv2 <= 0; r <= 0; pos <= 0; load <= 0;
      spills <= 0; delivered <= 0;
    end else begin
      int d1, d2, d5;
      d1 = (y.y3 && mv1 > 0) ? 1 : 0;
      d2 = (y.y4 && mv2 > 0) ? 1 : 0;
      d5 = (y.y5 && r > 0) ? 1 : 0;
      mv1 <= mv1 - d1 + ((y.y1 && mv1 < cap1) ? 1 : 0);
      mv2 <= mv2 - d2 + ((y.y2 && mv2 < cap2) ? 1 : 0);
      r   <= r + d1 + d2 - d5;
      if (d5 != 0 && pos != travel) spills <= spills + 1;
      if (d5 != 0 && (y.y8 || y.y9)) spills <= spills + 1;
      load <= load + d5 - ((y.y6 && load > 0) ? 1 : 0);
      if (y.y6 && load > 0) delivered <= delivered + 1;
      if (y.y9 && !y.y8 && pos < travel) pos <= pos + 1;
      else if (y.y8 && !y.y9 && pos > 0) pos <= pos - 1;
    end
  end

  always_comb begin
    x.x0 = start;
    x.x1 = mv1 >= cap1;
    x.x2 = mv1 > 0;
    x.x3 = mv2 >= cap2;
    x.x4 = mv2 > 0;
    x.x5 = r >= hi;
    x.x6 = r > 0;
    x.x7 = pos == travel;
    x.x8 = pos == 0;
    x.x9 = load > 0;
  end

  assign reactor_level = r;

endmodule
