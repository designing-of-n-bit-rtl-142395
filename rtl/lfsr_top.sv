// lfsr_top: the PN-sequence generator in every width it is specified for,
// 4, 8, 16, 32 and 64 bits, side by side.
//
// Each width is an independent lfsr instance with its own tabulated
// maximal-length polynomial (see lfsr_pkg), so the five produce sequences of
// period 15, 255, 65535, 2^32 - 1 and 2^64 - 1 states. They share the clock
// and the synchronous reset; each has its own enable, seed load, seed value,
// parallel state output, serial PN chip and done flag, with the meaning
// and timing described in lfsr.sv. All instances use XNOR feedback, so after
// reset every register is zero and the first enabled clock moves it to 1.
//
// The set of widths follows the document; instantiating them together in
// one top, and the shared reset, are this design's own choices.
module lfsr_top (
  input  logic        clk,
  input  logic        rst,

  input  logic        enable4,
  input  logic        seed_dv4,
  input  logic [3:0]  seed4,
  output logic [3:0]  data4,
  output logic        pn4,
  output logic        done4,

  input  logic        enable8,
  input  logic        seed_dv8,
  input  logic [7:0]  seed8,
  output logic [7:0]  data8,
  output logic        pn8,
  output logic        done8,

  input  logic        enable16,
  input  logic        seed_dv16,
  input  logic [15:0] seed16,
  output logic [15:0] data16,
  output logic        pn16,
  output logic        done16,

  input  logic        enable32,
  input  logic        seed_dv32,
  input  logic [31:0] seed32,
  output logic [31:0] data32,
  output logic        pn32,
  output logic        done32,

  input  logic        enable64,
  input  logic        seed_dv64,
  input  logic [63:0] seed64,
  output logic [63:0] data64,
  output logic        pn64,
  output logic        done64
);

  lfsr #(.NUM_BITS(4)) u_lfsr4 (
    .clk, .rst, .enable(enable4), .seed_dv(seed_dv4), .seed_data(seed4),
    .lfsr_data(data4), .pn_out(pn4), .done(done4)
  );

  lfsr #(.NUM_BITS(8)) u_lfsr8 (
    .clk, .rst, .enable(enable8), .seed_dv(seed_dv8), .seed_data(seed8),
    .lfsr_data(data8), .pn_out(pn8), .done(done8)
  );

  lfsr #(.NUM_BITS(16)) u_lfsr16 (
    .clk, .rst, .enable(enable16), .seed_dv(seed_dv16), .seed_data(seed16),
    .lfsr_data(data16), .pn_out(pn16), .done(done16)
  );

  lfsr #(.NUM_BITS(32)) u_lfsr32 (
    .clk, .rst, .enable(enable32), .seed_dv(seed_dv32), .seed_data(seed32),
    .lfsr_data(data32), .pn_out(pn32), .done(done32)
  );

  lfsr #(.NUM_BITS(64)) u_lfsr64 (
    .clk, .rst, .enable(enable64), .seed_dv(seed_dv64), .seed_data(seed64),
    .lfsr_data(data64), .pn_out(pn64), .done(done64)
  );

endmodule
