// Biquad MAC unit: one multiplier-accumulator shared by the five terms of a
// second-order IIR section,
//   y(n) = b0 x(n) + b1 x(n-1) + b2 x(n-2) + a1 y(n-1) + a2 y(n-2),
// computed one term per clock cycle.
//
// A 5-to-1 coefficient multiplexer (select se1: b0, b1, b2, a1, a2) and a
// 5-to-1 sample multiplexer (select se2: x(n), x(n-1), x(n-2), y(n-1),
// y(n-2)) feed a signed multiplier, whose product is added to the
// accumulator register. res1 starts a new sum: the accumulator then loads the
// addend alone instead of adding it to the old value. This structure and the
// order of the multiplexer inputs follow the published biquad. When the unit
// is one section of a cascade, chain_en replaces the product with the
// previous section's partial sum (chain_in), so that the sections' terms add
// up to one higher-order sum; this chaining input is this design's reading
// of how the sections' outputs pass from one to the next.
//
// Interface: coef[0:4] = {b0, b1, b2, a1, a2} (COEF_W bits, signed),
// data[0:4] = {x(n), x(n-1), x(n-2), y(n-1), y(n-2)} (DATA_W bits, signed),
// acc is the full-precision sum (ACC_W bits, signed), with the coefficients'
// binary point as set by the instantiating module.
// Timing: acc is updated on the rising edge of every cycle with mac_en = 1;
// the five terms of a section take five cycles.
module biquad_mac #(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned COEF_W = 4,
  parameter int unsigned ACC_W  = DATA_W + COEF_W + 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [COEF_W-1:0] coef [5],
  input  logic signed [DATA_W-1:0] data [5],
  input  logic [2:0]               se1,
  input  logic [2:0]               se2,
  input  logic                     res1,
  input  logic                     mac_en,
  input  logic                     chain_en,
  input  logic signed [ACC_W-1:0]  chain_in,
  output logic signed [ACC_W-1:0]  acc
);

  logic signed [COEF_W-1:0]        c_sel;
  logic signed [DATA_W-1:0]        d_sel;
  logic signed [DATA_W+COEF_W-1:0] prod;
  logic signed [ACC_W-1:0]         addend;

  // 5-to-1 multiplexers; codes 5..7 select 0.
  always_comb begin
    c_sel = (se1 < 3'd5) ? coef[se1] : '0;
    d_sel = (se2 < 3'd5) ? data[se2] : '0;
  end

  assign prod   = c_sel * d_sel;
  assign addend = chain_en ? chain_in : ACC_W'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (mac_en) acc <= (res1 ? '0 : acc) + addend;
  end

endmodule
