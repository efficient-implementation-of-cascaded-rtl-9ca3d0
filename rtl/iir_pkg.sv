// Shared types of the configurable cascaded IIR filter.
//
// The filter is built from three biquad MAC units (F1, F2, F3), a six-stage
// input delay line and a six-stage output delay line. Every stage of the
// delay lines is a multiplexer in front of a register; the multiplexer
// select lines s1..s12 decide whether a stage holds, shifts, or loads a new
// value, and in that way choose one of three operating modes. The select
// numbering of the three-input stages (s3, s5, s9, s11) follows the
// mode table: 0 loads a new input of an independent section, 1 continues the
// cascade, 2 holds. Which wire feeds which input number of the other
// multiplexers is this design's own choice and is documented per field.
package iir_pkg;

  // Operating mode, set by the select lines (see iir_ctrl).
  typedef enum logic [1:0] {
    MODE_6TH   = 2'd0,  // F1, F2, F3 form one 6th-order filter on x
    MODE_4_2   = 2'd1,  // F1+F2 form a 4th-order filter on x, F3 a biquad on z2
    MODE_2_2_2 = 2'd2   // three independent biquads on x, z1 and z2
  } iir_mode_e;

  // Select codes of the two-input stages (s1, s2, s4, s6, s8, s10, s12).
  localparam logic       SEL2_LOAD  = 1'b0;  // take the stage's input
  localparam logic       SEL2_HOLD  = 1'b1;  // feed the register back
  // Select codes of the three-input stages (s3, s5, s9, s11).
  localparam logic [1:0] SEL3_NEW   = 2'd0;  // new input of an independent section
  localparam logic [1:0] SEL3_CHAIN = 2'd1;  // continue the cascade
  localparam logic [1:0] SEL3_HOLD  = 2'd2;  // feed the register back
  // Select codes of the four-input stage s7 (register y(n-1)).
  localparam logic [1:0] SEL7_F1    = 2'd0;
  localparam logic [1:0] SEL7_F2    = 2'd1;
  localparam logic [1:0] SEL7_F3    = 2'd2;
  localparam logic [1:0] SEL7_HOLD  = 2'd3;

  // Control of one biquad MAC unit for one clock cycle.
  typedef struct packed {
    logic [2:0] se1;       // coefficient multiplexer: 0 b0, 1 b1, 2 b2, 3 a1, 4 a2
    logic [2:0] se2;       // sample multiplexer: 0 x(n), 1 x(n-1), 2 x(n-2), 3 y(n-1), 4 y(n-2)
    logic       res1;      // start a new sum (accumulator restarts from 0)
    logic       mac_en;    // accumulate this cycle
    logic       chain_en;  // add the previous section's partial sum instead of a product
  } mac_ctl_t;

  // All select lines of the cascade for one clock cycle.
  typedef struct packed {
    mac_ctl_t   f1, f2, f3;
    logic       s1, s2;        // x(n-1), x(n-2)
    logic [1:0] s3;            // x(n-3): z1(n) / x(n-2) / hold
    logic       s4;            // x(n-4)
    logic [1:0] s5;            // x(n-5): z2(n) / x(n-4) / hold
    logic       s6;            // x(n-6)
    logic [1:0] s7;            // y(n-1): F1 / F2 / F3 output / hold
    logic       s8;            // y(n-2)
    logic [1:0] s9;            // y(n-3): F2 output / y(n-2) / hold
    logic       s10;           // y(n-4)
    logic [1:0] s11;           // y(n-5): F3 output / y(n-4) / hold
    logic       s12;           // y(n-6)
  } iir_sel_t;

endpackage
