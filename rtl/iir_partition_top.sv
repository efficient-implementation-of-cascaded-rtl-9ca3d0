// Top level: the configurable cascaded IIR filter and the partition
// multiplier, side by side.
//
// The two are independent designs of the same work: the filter (cascaded_iir)
// computes a 6th-order, a 4th-plus-2nd-order or three 2nd-order IIR filters
// with three time-shared biquad MAC units; the partition multiplier
// (partition_mult) is an N x N unsigned multiplier built from R x R
// component multipliers with no carries between segments. The filter's MAC
// units use their own multipliers; putting the partition multiplier into
// them is left open, as in the published design. Each has its own ports.
//
// Filter ports, timing and number format: see cascaded_iir. Multiplier:
// mul_a, mul_b -> mul_p, combinational.
module iir_partition_top
  import iir_pkg::*;
#(
  parameter int unsigned DATA_W = 4,    // filter sample width
  parameter int unsigned COEF_W = 4,    // filter coefficient width
  parameter int unsigned FRAC   = 2,    // coefficient fraction bits
  parameter int unsigned R      = 8,    // multiplier segment width
  parameter int unsigned S      = 4     // multiplier segments per operand
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // filter
  input  iir_mode_e                mode,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [DATA_W-1:0] z1,
  input  logic signed [DATA_W-1:0] z2,
  input  logic signed [COEF_W-1:0] c1 [5],
  input  logic signed [COEF_W-1:0] c2 [5],
  input  logic signed [COEF_W-1:0] c3 [5],
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] y1,
  output logic signed [DATA_W-1:0] y2,
  output logic signed [DATA_W-1:0] y3,
  // partition multiplier
  input  logic [R*S-1:0]           mul_a,
  input  logic [R*S-1:0]           mul_b,
  output logic [2*R*S-1:0]         mul_p
);

  cascaded_iir #(.DATA_W(DATA_W), .COEF_W(COEF_W), .FRAC(FRAC)) u_iir (
    .clk, .rst_n, .mode, .in_valid, .in_ready, .x, .z1, .z2,
    .c1, .c2, .c3, .out_valid, .y1, .y2, .y3
  );

  partition_mult #(.R(R), .S(S)) u_pmul (
    .a(mul_a), .b(mul_b), .p(mul_p)
  );

endmodule
