// lfsr_top_tb: end-to-end testbench of lfsr_top at its default (and only)
// configuration: the 4, 8, 16, 32 and 64 bit generators side by side.
//
// All five registers start from zero after reset and are run for 70,000
// clocks against a reference model built from the generator polynomials,
// so the 16-bit generator completes a full period of 65,535 states and the
// 4- and 8-bit ones many. Along the way each width sees its enable dropped
// at random (stalls), seeds loaded at random moments, and the done flag
// rising when the state returns to the seed; the 4-bit register is also
// loaded with its lock-up state and a mid-run reset is applied. Each of
// these mechanisms is counted and must have happened at least once.
module lfsr_top_tb;
  import lfsr_ref_pkg::*;

  localparam int unsigned NW = 5;
  localparam int unsigned W[NW] = '{4, 8, 16, 32, 64};
  localparam int unsigned RUN_CLOCKS = 70000;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic clk = 1'b0;
  logic rst;
  logic [NW-1:0] enable, seed_dv, pn, done;
  logic [63:0] seed  [NW];
  logic [63:0] data  [NW];
  logic [63:0] model [NW];

  always #5 clk = ~clk;

  lfsr_top u_top (
    .clk, .rst,
    .enable4 (enable[0]), .seed_dv4 (seed_dv[0]), .seed4 (seed[0][3:0]),
    .data4 (data[0][3:0]),  .pn4 (pn[0]), .done4 (done[0]),
    .enable8 (enable[1]), .seed_dv8 (seed_dv[1]), .seed8 (seed[1][7:0]),
    .data8 (data[1][7:0]),  .pn8 (pn[1]), .done8 (done[1]),
    .enable16(enable[2]), .seed_dv16(seed_dv[2]), .seed16(seed[2][15:0]),
    .data16(data[2][15:0]), .pn16(pn[2]), .done16(done[2]),
    .enable32(enable[3]), .seed_dv32(seed_dv[3]), .seed32(seed[3][31:0]),
    .data32(data[3][31:0]), .pn32(pn[3]), .done32(done[3]),
    .enable64(enable[4]), .seed_dv64(seed_dv[4]), .seed64(seed[4]),
    .data64(data[4]),       .pn64(pn[4]), .done64(done[4])
  );

  assign data[0][63:4]  = '0;
  assign data[1][63:8]  = '0;
  assign data[2][63:16] = '0;
  assign data[3][63:32] = '0;

  // Mechanism counters.
  int unsigned n_stall [NW];
  int unsigned n_load  [NW];
  int unsigned n_done  [NW];
  int unsigned n_lockup_hold = 0;
  int unsigned n_reset = 0;
  int unsigned n_full_period16 = 0;

  function automatic logic [63:0] mask_of(int unsigned n);
    return (n == 64) ? '1 : ((64'd1 << n) - 64'd1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare_all(input string what);
    for (int i = 0; i < NW; i++) begin
      check(data[i] == model[i], $sformatf("%s: %0d-bit state %h, expected %h",
                                           what, W[i], data[i], model[i]));
      check(pn[i] == model[i][W[i]-1], $sformatf("%s: %0d-bit pn", what, W[i]));
      check(done[i] == (model[i] == seed[i]), $sformatf("%s: %0d-bit done", what, W[i]));
    end
  endtask

  // Apply the current controls for one clock and advance the model as the
  // register should: hold, load or shift.
  task automatic clock_once();
    @(posedge clk);
    if (rst) begin
      for (int i = 0; i < NW; i++) model[i] = '0;
    end else begin
      for (int i = 0; i < NW; i++)
        if (enable[i]) model[i] = seed_dv[i] ? seed[i] : ref_next(model[i], W[i], 1'b1);
    end
    #1;
  endtask

  initial begin : watchdog
    repeat (RUN_CLOCKS + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned since_zero16;
    rst = 1'b1; enable = '0; seed_dv = '0;
    for (int i = 0; i < NW; i++) seed[i] = '0;
    clock_once();
    clock_once();
    rst = 1'b0;
    compare_all("after reset");
    for (int i = 0; i < NW; i++) check(data[i] == 64'd0, "reset state is zero");

    // Phase 1: 16-bit register runs without interruption for one full
    // period from zero; the others are stalled and reseeded at random.
    since_zero16 = 0;
    for (int t = 0; t < RUN_CLOCKS; t++) begin
      enable[2] = 1'b1;
      seed_dv[2] = 1'b0;
      for (int i = 0; i < NW; i++) begin
        if (i == 2) continue;
        enable[i]  = ($urandom_range(0, 9) != 0);
        seed_dv[i] = ($urandom_range(0, 999) == 0);
        if (seed_dv[i]) begin
          seed[i] = {$urandom, $urandom} & mask_of(W[i]);
          if (seed[i] == mask_of(W[i])) seed[i] = 64'd1;
        end
        if (!enable[i]) n_stall[i]++;
        if (enable[i] && seed_dv[i]) n_load[i]++;
      end
      // The 16-bit register is stalled only after its full period.
      if (t >= 65600 && $urandom_range(0, 3) == 0) begin
        enable[2] = 1'b0;
        n_stall[2]++;
      end
      if (t == 66000) begin
        seed[2] = 64'h1234;
        seed_dv[2] = 1'b1;
        n_load[2]++;
      end
      clock_once();
      compare_all("run");
      for (int i = 0; i < NW; i++) if (done[i]) n_done[i]++;
      if (t < 65535) begin
        since_zero16++;
        if (data[2] == 64'd0) begin
          check(since_zero16 == 65535, $sformatf("16-bit period %0d", since_zero16));
          n_full_period16++;
        end
      end
    end
    seed_dv = '0;

    // Phase 2: the 4-bit lock-up state holds under enable.
    seed[0] = 64'hF; seed_dv[0] = 1'b1; enable[0] = 1'b1;
    clock_once();
    seed_dv[0] = 1'b0;
    repeat (10) begin
      clock_once();
      compare_all("lock-up");
      check(data[0] == 64'hF, "4-bit lock-up state held");
      n_lockup_hold++;
    end

    // Phase 3: reset mid-run clears every register.
    enable = '1;
    rst = 1'b1;
    clock_once();
    rst = 1'b0;
    n_reset++;
    compare_all("mid-run reset");
    for (int i = 0; i < NW; i++) check(data[i] == 64'd0, "state zero after mid-run reset");
    clock_once();
    compare_all("first state after reset");
    for (int i = 0; i < NW; i++) check(data[i] == 64'd1, "state one after first clock");

    // Every mechanism must have occurred.
    for (int i = 0; i < NW; i++) begin
      $display("%0d-bit: stalls=%0d seed loads=%0d done=%0d", W[i], n_stall[i], n_load[i], n_done[i]);
      check(n_stall[i] > 0, $sformatf("%0d-bit stall never happened", W[i]));
      check(n_load[i] > 0,  $sformatf("%0d-bit seed load never happened", W[i]));
      check(n_done[i] > 0,  $sformatf("%0d-bit done never happened", W[i]));
    end
    $display("16-bit full periods=%0d lock-up holds=%0d resets=%0d",
             n_full_period16, n_lockup_hold, n_reset);
    check(n_full_period16 == 1, "16-bit full period never completed");
    check(n_lockup_hold > 0, "lock-up hold never happened");
    check(n_reset > 0, "mid-run reset never happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
