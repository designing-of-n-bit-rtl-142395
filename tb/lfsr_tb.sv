// lfsr_tb: self-checking testbench for the lfsr module.
//
// Runs six instances side by side: the default (32 bit, XNOR) and the 4, 8,
// 16 and 64 bit widths, plus an 8-bit XOR variant. Every cycle each state
// is compared with a reference model built from the polynomial exponents,
// and the serial output with the last stage. On top of that it checks the
// published start of each sequence, the exact period of the 4, 8 and 16
// bit registers (15, 255, 65535 clocks, every state visited once), that
// enable low holds the state, that a seed load takes effect on the next
// clock and raises done, that done returns exactly one period later, and
// that the lock-up state (all ones for XNOR, zero for XOR) holds.
module lfsr_tb;
  import lfsr_pkg::*;
  import lfsr_ref_pkg::*;

  localparam int unsigned NI = 6;       // number of instances
  localparam int unsigned W[NI] = '{32, 4, 8, 16, 64, 8};
  localparam bit          XN[NI] = '{1, 1, 1, 1, 1, 0};

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic clk = 1'b0;
  logic rst, enable, seed_dv;
  logic [63:0] seed [NI];
  logic [63:0] data [NI];
  logic [NI-1:0] pn, done;

  always #5 clk = ~clk;

  lfsr u_dut32 (.clk, .rst, .enable, .seed_dv, .seed_data(seed[0][31:0]),
                .lfsr_data(data[0][31:0]), .pn_out(pn[0]), .done(done[0]));
  lfsr #(.NUM_BITS(4)) u_dut4 (.clk, .rst, .enable, .seed_dv, .seed_data(seed[1][3:0]),
                .lfsr_data(data[1][3:0]), .pn_out(pn[1]), .done(done[1]));
  lfsr #(.NUM_BITS(8)) u_dut8 (.clk, .rst, .enable, .seed_dv, .seed_data(seed[2][7:0]),
                .lfsr_data(data[2][7:0]), .pn_out(pn[2]), .done(done[2]));
  lfsr #(.NUM_BITS(16)) u_dut16 (.clk, .rst, .enable, .seed_dv, .seed_data(seed[3][15:0]),
                .lfsr_data(data[3][15:0]), .pn_out(pn[3]), .done(done[3]));
  lfsr #(.NUM_BITS(64)) u_dut64 (.clk, .rst, .enable, .seed_dv, .seed_data(seed[4]),
                .lfsr_data(data[4]), .pn_out(pn[4]), .done(done[4]));
  lfsr #(.NUM_BITS(8), .FEEDBACK(FB_XOR)) u_dut8x (.clk, .rst, .enable, .seed_dv,
                .seed_data(seed[5][7:0]), .lfsr_data(data[5][7:0]), .pn_out(pn[5]),
                .done(done[5]));

  // Upper bits of the narrower instances are unused.
  assign data[0][63:32] = '0;
  assign data[1][63:4]  = '0;
  assign data[2][63:8]  = '0;
  assign data[3][63:16] = '0;
  assign data[5][63:8]  = '0;

  logic [63:0] model [NI];

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

  // Compare every instance with the model, including serial output and done.
  task automatic compare_all(input string what);
    for (int i = 0; i < NI; i++) begin
      check(data[i] == model[i], $sformatf("%s: state of instance %0d (%0d bit) %h != %h",
                                           what, i, W[i], data[i], model[i]));
      check(pn[i] == model[i][W[i]-1], $sformatf("%s: pn_out of instance %0d", what, i));
      check(done[i] == (model[i] == (seed[i] & mask_of(W[i]))),
            $sformatf("%s: done of instance %0d", what, i));
    end
  endtask

  // One enabled shift clock, model advanced alongside.
  task automatic step();
    @(posedge clk);
    for (int i = 0; i < NI; i++) model[i] = ref_next(model[i], W[i], XN[i]);
    #1;
  endtask

  bit seen4[16];
  bit seen8[256];
  bit seen16[65536];
  int unsigned first_done [NI];
  int unsigned n_done [NI];

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    rst = 1'b1; enable = 1'b0; seed_dv = 1'b0;
    for (int i = 0; i < NI; i++) seed[i] = XN[i] ? 64'd0 : 64'd1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < NI; i++) model[i] = XN[i] ? 64'd0 : 64'd1;
    compare_all("after reset");

    // Published sequence starts, from the zero state.
    check(data[1] == 64'(PAT4[0]), "4-bit published start state");
    enable = 1'b1;
    for (int t = 1; t <= 65535; t++) begin
      step();
      compare_all("free run");
      if (t < 16) check(data[1] == 64'(PAT4[t]), $sformatf("4-bit published pattern %0d", t));
      if (t <= 32) check(data[2] == 64'(PAT8[t-1]), $sformatf("8-bit published pattern %0d", t));
      if (t <= 16) check(data[3] == 64'(PAT16[t-1]), $sformatf("16-bit published pattern %0d", t));
      if (t <= 16) check(data[0] == 64'(PAT32[t-1]), $sformatf("32-bit published pattern %0d", t));
      // Every state of a period is new; done marks the end of the period.
      if (t <= 15) begin
        check(!seen4[data[1][3:0]], "4-bit state repeated within a period");
        seen4[data[1][3:0]] = 1'b1;
      end
      if (t <= 255) begin
        check(!seen8[data[2][7:0]], "8-bit state repeated within a period");
        seen8[data[2][7:0]] = 1'b1;
      end
      if (!seen16[data[3][15:0]]) seen16[data[3][15:0]] = 1'b1;
      else if (t <= 65535) check(1'b0, "16-bit state repeated within a period");
      for (int i = 0; i < NI; i++)
        if (done[i]) begin
          n_done[i]++;
          if (first_done[i] == 0) first_done[i] = t;
        end
    end
    check(first_done[1] == 15,    $sformatf("4-bit period %0d", first_done[1]));
    check(first_done[2] == 255,   $sformatf("8-bit period %0d", first_done[2]));
    check(first_done[3] == 65535, $sformatf("16-bit period %0d", first_done[3]));
    check(first_done[5] == 255,   $sformatf("8-bit XOR period %0d", first_done[5]));
    check(n_done[1] == 65535 / 15, "4-bit done count");
    check(n_done[2] == 65535 / 255, "8-bit done count");
    check(n_done[0] == 0 && n_done[4] == 0, "32/64-bit done stays low");
    check(!seen16[16'hFFFF], "16-bit lock-up state never reached");

    // Enable low holds every register.
    enable = 1'b0;
    repeat (10) begin
      @(posedge clk); #1;
      compare_all("hold");
    end

    // Seed load: the seed appears on the next clock and done goes high.
    for (int i = 0; i < NI; i++) begin
      logic [63:0] s;
      s = {$urandom, $urandom} & mask_of(W[i]);
      if (s == (XN[i] ? mask_of(W[i]) : 64'd0)) s = 64'd5;
      seed[i] = s;
    end
    enable = 1'b1; seed_dv = 1'b1;
    @(posedge clk); #1;
    seed_dv = 1'b0;
    for (int i = 0; i < NI; i++) model[i] = seed[i];
    compare_all("seed load");
    for (int i = 0; i < NI; i++) check(done[i], $sformatf("done after seed load, instance %0d", i));
    // Seed ignored while enable is low.
    enable = 1'b0; seed_dv = 1'b1;
    @(posedge clk); #1;
    compare_all("seed load while disabled");
    seed_dv = 1'b0; enable = 1'b1;
    // done returns after exactly one period from an arbitrary seed.
    for (int i = 0; i < NI; i++) first_done[i] = 0;
    for (int t = 1; t <= 300; t++) begin
      step();
      compare_all("run from seed");
      for (int i = 0; i < NI; i++)
        if (done[i] && first_done[i] == 0) first_done[i] = t;
    end
    check(first_done[1] == 15,  "4-bit period from a seed");
    check(first_done[2] == 255, "8-bit period from a seed");
    check(first_done[5] == 255, "8-bit XOR period from a seed");

    // Lock-up states hold: all ones (XNOR) and zero (XOR).
    for (int i = 0; i < NI; i++) seed[i] = XN[i] ? mask_of(W[i]) : 64'd0;
    seed_dv = 1'b1;
    @(posedge clk); #1;
    seed_dv = 1'b0;
    for (int i = 0; i < NI; i++) model[i] = seed[i];
    repeat (20) begin
      step();
      compare_all("lock-up");
      for (int i = 0; i < NI; i++)
        check(data[i] == seed[i], $sformatf("lock-up state held, instance %0d", i));
    end

    // Reset mid-run returns to the start state.
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < NI; i++) model[i] = XN[i] ? 64'd0 : 64'd1;
    compare_all("reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
