// Select-line controller of the configurable cascaded IIR filter.
//
// It drives, cycle by cycle, the multiplexer selects of the three biquad MAC
// units (se1, se2, res1 and the accumulate/chain enables) and of the twelve
// delay-line stages (s1..s12). The mode decides how the stages are linked:
//
//   mode        s3 / s9 (stage 3)   s5 / s11 (stage 5)   y(n-1) takes (s7)
//   MODE_6TH    chain (1) or hold   chain (1) or hold    F3 output
//   MODE_4_2    chain (1) or hold   new (0) or hold      F2 output
//   MODE_2_2_2  new (0) or hold     new (0) or hold      F1 output
//
// The s3/s5 codes are those of the published mode table; s9/s11 mirror them
// on the output line. A sample is processed in a frame:
//   IDLE  in_ready = 1; an in_valid sample is accepted (load_in pulses) and
//         the mode is latched for the frame.
//   RUN   count c = 0..LAST. Every section computes its term k in cycle k
//         (k = 1..4). Term 0 (b0 times the section's new input) is done in
//         cycle 0 by a section that starts a filter; a section that continues
//         a cascade instead adds the previous section's partial sum, F2 in
//         cycle 5 and F3 in cycle 6, once that sum is complete. LAST is 4, 5
//         or 6 for MODE_2_2_2, MODE_4_2 and MODE_6TH.
//   UPD   all delay-line stages shift or load once (every other cycle they
//         hold); out_valid pulses in the following cycle.
// A frame therefore takes LAST + 3 cycles from acceptance to out_valid:
// 7, 8 or 9 cycles. The published text says only that the multiplexers pick
// operands and coefficients every clock cycle; the term order, the frame
// and the handshake are this design's own.
module iir_ctrl
  import iir_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  iir_mode_e mode,       // sampled when a sample is accepted
  input  logic      in_valid,
  output logic      in_ready,
  output logic      load_in,    // capture x(n), z1(n), z2(n)
  output iir_sel_t  sel,
  output logic      out_valid
);

  typedef enum logic [1:0] {ST_IDLE, ST_RUN, ST_UPD} state_e;

  state_e     state;
  iir_mode_e  mode_q;           // mode of the current frame
  logic [2:0] cnt;
  logic [2:0] last;
  logic       chain2, chain3;   // F2 / F3 continue a cascade

  always_comb begin
    chain2 = (mode_q != MODE_2_2_2);
    chain3 = (mode_q == MODE_6TH);
    unique case (mode_q)
      MODE_6TH: last = 3'd6;
      MODE_4_2: last = 3'd5;
      default:  last = 3'd4;
    endcase
  end

  assign in_ready = (state == ST_IDLE);
  assign load_in  = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      cnt       <= '0;
      mode_q    <= MODE_6TH;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        ST_IDLE: if (load_in) begin
          state  <= ST_RUN;
          cnt    <= '0;
          mode_q <= mode;
        end
        ST_RUN: begin
          if (cnt == last) state <= ST_UPD;
          cnt <= cnt + 3'd1;
        end
        ST_UPD: begin
          state     <= ST_IDLE;
          out_valid <= 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // One section's controls in cycle c: terms 1..4 in cycles 1..4; term 0 in
  // cycle 0, or, when chained, the partial-sum addition in cycle chain_cyc.
  function automatic mac_ctl_t sec_ctl(input logic [2:0] c, input logic chained,
                                       input logic [2:0] chain_cyc);
    mac_ctl_t m;
    m = '0;
    if (c >= 3'd1 && c <= 3'd4) begin
      m.se1    = c;
      m.se2    = c;
      m.mac_en = 1'b1;
      m.res1   = chained && (c == 3'd1);
    end else if (c == 3'd0 && !chained) begin
      m.mac_en = 1'b1;
      m.res1   = 1'b1;
    end else if (chained && c == chain_cyc) begin
      m.mac_en   = 1'b1;
      m.chain_en = 1'b1;
    end
    return m;
  endfunction

  always_comb begin
    sel = '0;
    // Delay lines hold by default.
    sel.s1  = SEL2_HOLD;  sel.s2  = SEL2_HOLD;  sel.s3  = SEL3_HOLD;
    sel.s4  = SEL2_HOLD;  sel.s5  = SEL3_HOLD;  sel.s6  = SEL2_HOLD;
    sel.s7  = SEL7_HOLD;  sel.s8  = SEL2_HOLD;  sel.s9  = SEL3_HOLD;
    sel.s10 = SEL2_HOLD;  sel.s11 = SEL3_HOLD;  sel.s12 = SEL2_HOLD;
    if (state == ST_RUN) begin
      sel.f1 = sec_ctl(cnt, 1'b0,   3'd0);
      sel.f2 = sec_ctl(cnt, chain2, 3'd5);
      sel.f3 = sec_ctl(cnt, chain3, 3'd6);
    end else if (state == ST_UPD) begin
      sel.s1  = SEL2_LOAD;  sel.s2  = SEL2_LOAD;
      sel.s3  = chain2 ? SEL3_CHAIN : SEL3_NEW;
      sel.s4  = SEL2_LOAD;
      sel.s5  = chain3 ? SEL3_CHAIN : SEL3_NEW;
      sel.s6  = SEL2_LOAD;
      sel.s7  = chain3 ? SEL7_F3 : (chain2 ? SEL7_F2 : SEL7_F1);
      sel.s8  = SEL2_LOAD;
      sel.s9  = chain2 ? SEL3_CHAIN : SEL3_NEW;
      sel.s10 = SEL2_LOAD;
      sel.s11 = chain3 ? SEL3_CHAIN : SEL3_NEW;
      sel.s12 = SEL2_LOAD;
    end
  end

endmodule
