// Configurable cascaded IIR filter: three biquad MAC units (F1, F2, F3) and
// two six-stage delay lines that, by their multiplexer select lines, act as
//   MODE_6TH   one 6th-order filter on x:
//              y(n) = sum_{k=0..6} b_k x(n-k) + sum_{k=1..6} a_k y(n-k)
//   MODE_4_2   one 4th-order filter on x (F1 + F2) and a biquad on z2 (F3)
//   MODE_2_2_2 three independent biquads on x (F1), z1 (F2) and z2 (F3).
//
// How it works. The input line holds x(n-1)..x(n-6), the output line
// y(n-1)..y(n-6). In the 6th-order mode F1 sums b0 x(n) + b1 x(n-1) +
// b2 x(n-2) + a1 y(n-1) + a2 y(n-2), F2 adds b3 x(n-3) + b4 x(n-4) +
// a3 y(n-3) + a4 y(n-4) to F1's sum, and F3 adds the k = 5, 6 terms to F2's,
// giving y(n). Split up, stage 3 of each line (s3, s9) and stage 5 (s5, s11)
// stop continuing the line and instead take the new input z1(n) / z2(n) and
// the output of F2 / F3, so that registers 3-4 and 5-6 become the history of
// a biquad of their own, whose b0 term is then b02 z1(n) or b03 z2(n). Each
// MAC unit reads its samples straight from the taps of the lines and its
// coefficients from its own port. The split into sections, the tap
// assignment, the two- and three-input stages, the four-input stage s7 and
// the mode table follow the published structure; the sequencing is in
// iir_ctrl.
//
// Number format (this design's own, the published design gives only 4-bit
// sample ports): samples and outputs are DATA_W-bit signed integers,
// coefficients COEF_W-bit signed with FRAC fraction bits. Products and
// partial sums keep full precision (ACC_W bits) and pass between sections
// unrounded; a section's output is the sum shifted right by FRAC (rounding
// toward minus infinity) and saturated to DATA_W bits. That output is what
// enters the output delay line.
//
// Interface: a valid/ready handshake takes x, z1, z2 and the mode, which
// holds for that sample. Coefficients c1 = {b0, b1, b2, a1, a2},
// c2 = {b02, b3, b4, a3, a4}, c3 = {b03, b5, b6, a5, a6} must be stable
// while a sample is processed. Results: y1 = y(n-1) register (6th-order,
// 4th-order or F1 output), y2 = y(n-3) register (F2 output in MODE_2_2_2),
// y3 = y(n-5) register (F3 output in MODE_4_2 and MODE_2_2_2).
// Timing: out_valid pulses 9, 8 or 7 cycles (MODE_6TH, MODE_4_2,
// MODE_2_2_2) after the cycle that accepted the sample, and a new sample
// can be accepted in that cycle. Delay lines clear on reset; after a mode
// change the lines still hold the samples of the old mode.
module cascaded_iir
  import iir_pkg::*;
#(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned COEF_W = 4,
  parameter int unsigned FRAC   = 2,
  parameter int unsigned ACC_W  = DATA_W + COEF_W + 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
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
  output logic signed [DATA_W-1:0] y3
);

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((64'sd1 <<< (DATA_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(64'sd1 <<< (DATA_W - 1));

  iir_sel_t  sel;
  logic      load_in;

  iir_ctrl u_ctrl (
    .clk, .rst_n, .mode, .in_valid, .in_ready, .load_in,
    .sel, .out_valid
  );

  // Input registers: x(n), z1(n), z2(n) of the sample being processed.
  logic signed [DATA_W-1:0] xn, z1n, z2n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xn <= '0; z1n <= '0; z2n <= '0;
    end else if (load_in) begin
      xn <= x; z1n <= z1; z2n <= z2;
    end
  end

  // Delay-line taps: xd[k] = x(n-k), yd[k] = y(n-k), k = 1..6.
  logic signed [DATA_W-1:0] xd [1:6];
  logic signed [DATA_W-1:0] yd [1:6];

  // Section outputs: full sums and quantised results.
  logic signed [ACC_W-1:0]  acc1, acc2, acc3;
  logic signed [DATA_W-1:0] q1, q2, q3;

  function automatic logic signed [DATA_W-1:0] quantise(input logic signed [ACC_W-1:0] a);
    logic signed [ACC_W-1:0] s;
    s = a >>> FRAC;
    if (s > MAXV)      return MAXV[DATA_W-1:0];
    else if (s < MINV) return MINV[DATA_W-1:0];
    else               return s[DATA_W-1:0];
  endfunction

  assign q1 = quantise(acc1);
  assign q2 = quantise(acc2);
  assign q3 = quantise(acc3);

  // ---- input delay line ----
  delay_stage #(.W(DATA_W), .N(2)) u_s1 (.clk, .rst_n, .d('{xn,    xd[1]}),        .sel(sel.s1),  .q(xd[1]));
  delay_stage #(.W(DATA_W), .N(2)) u_s2 (.clk, .rst_n, .d('{xd[1], xd[2]}),        .sel(sel.s2),  .q(xd[2]));
  delay_stage #(.W(DATA_W), .N(3)) u_s3 (.clk, .rst_n, .d('{z1n,   xd[2], xd[3]}), .sel(sel.s3),  .q(xd[3]));
  delay_stage #(.W(DATA_W), .N(2)) u_s4 (.clk, .rst_n, .d('{xd[3], xd[4]}),        .sel(sel.s4),  .q(xd[4]));
  delay_stage #(.W(DATA_W), .N(3)) u_s5 (.clk, .rst_n, .d('{z2n,   xd[4], xd[5]}), .sel(sel.s5),  .q(xd[5]));
  delay_stage #(.W(DATA_W), .N(2)) u_s6 (.clk, .rst_n, .d('{xd[5], xd[6]}),        .sel(sel.s6),  .q(xd[6]));

  // ---- output delay line ----
  delay_stage #(.W(DATA_W), .N(4)) u_s7  (.clk, .rst_n, .d('{q1, q2, q3, yd[1]}),   .sel(sel.s7),  .q(yd[1]));
  delay_stage #(.W(DATA_W), .N(2)) u_s8  (.clk, .rst_n, .d('{yd[1], yd[2]}),        .sel(sel.s8),  .q(yd[2]));
  delay_stage #(.W(DATA_W), .N(3)) u_s9  (.clk, .rst_n, .d('{q2, yd[2], yd[3]}),    .sel(sel.s9),  .q(yd[3]));
  delay_stage #(.W(DATA_W), .N(2)) u_s10 (.clk, .rst_n, .d('{yd[3], yd[4]}),        .sel(sel.s10), .q(yd[4]));
  delay_stage #(.W(DATA_W), .N(3)) u_s11 (.clk, .rst_n, .d('{q3, yd[4], yd[5]}),    .sel(sel.s11), .q(yd[5]));
  delay_stage #(.W(DATA_W), .N(2)) u_s12 (.clk, .rst_n, .d('{yd[5], yd[6]}),        .sel(sel.s12), .q(yd[6]));

  // ---- the three biquad MAC units ----
  // F2's and F3's sample-multiplexer input 0 is the new input of their own
  // section (z1(n), z2(n)); it is read only when the section is not chained.
  biquad_mac #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_f1 (
    .clk, .rst_n, .coef(c1), .data('{xn, xd[1], xd[2], yd[1], yd[2]}),
    .se1(sel.f1.se1), .se2(sel.f1.se2), .res1(sel.f1.res1), .mac_en(sel.f1.mac_en),
    .chain_en(sel.f1.chain_en), .chain_in('0), .acc(acc1)
  );

  biquad_mac #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_f2 (
    .clk, .rst_n, .coef(c2), .data('{z1n, xd[3], xd[4], yd[3], yd[4]}),
    .se1(sel.f2.se1), .se2(sel.f2.se2), .res1(sel.f2.res1), .mac_en(sel.f2.mac_en),
    .chain_en(sel.f2.chain_en), .chain_in(acc1), .acc(acc2)
  );

  biquad_mac #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_f3 (
    .clk, .rst_n, .coef(c3), .data('{z2n, xd[5], xd[6], yd[5], yd[6]}),
    .se1(sel.f3.se1), .se2(sel.f3.se2), .res1(sel.f3.res1), .mac_en(sel.f3.mac_en),
    .chain_en(sel.f3.chain_en), .chain_in(acc2), .acc(acc3)
  );

  assign y1 = yd[1];
  assign y2 = yd[3];
  assign y3 = yd[5];

  // A sample must come with one of the three defined modes.
  a_mode_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 load_in |-> mode inside {MODE_6TH, MODE_4_2, MODE_2_2_2})
    else $error("cascaded_iir: undefined mode %0d", mode);

endmodule
