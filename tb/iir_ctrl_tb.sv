// Test of the select-line controller. For each mode it accepts one sample
// and records every cycle's selects until out_valid, then checks: the frame
// length (7, 8, 9 cycles for MODE_2_2_2, MODE_4_2, MODE_6TH); that each
// MAC unit does its terms 0..4 exactly once in the right cycles, starts
// one new sum, and adds a partial sum only when chained (F2 in cycle 5,
// F3 in cycle 6); that the delay lines update exactly once, with the
// stage codes of the mode table, and hold otherwise; and that in_ready is
// low while a frame runs. Last, back-to-back samples check the throughput.
module iir_ctrl_tb;
  import iir_pkg::*;
  logic clk = 0, rst_n = 0;
  iir_mode_e mode;
  logic in_valid, in_ready, load_in, out_valid;
  iir_sel_t sel;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  iir_ctrl dut (.clk, .rst_n, .mode, .in_valid, .in_ready, .load_in, .sel, .out_valid);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: expected %0d got %0d", what, exp, got);
    end
  endtask

  // Check one section's controls for cycle t (t = cycles after acceptance - 1).
  task automatic check_sec(input string nm, input mac_ctl_t m, input int t,
                           input bit chained, input int chain_cyc);
    bit   exp_en, exp_res, exp_ch;
    int   exp_se;
    exp_en = 0; exp_res = 0; exp_ch = 0; exp_se = 0;
    if (t >= 1 && t <= 4) begin exp_en = 1; exp_se = t; exp_res = chained && t == 1; end
    else if (t == 0 && !chained) begin exp_en = 1; exp_res = 1; end
    else if (chained && t == chain_cyc) begin exp_en = 1; exp_ch = 1; end
    expect_eq($sformatf("%s mac_en t=%0d", nm, t), int'(m.mac_en), int'(exp_en));
    if (exp_en) begin
      expect_eq($sformatf("%s res1 t=%0d", nm, t), int'(m.res1), int'(exp_res));
      expect_eq($sformatf("%s chain t=%0d", nm, t), int'(m.chain_en), int'(exp_ch));
      if (!exp_ch) begin
        expect_eq($sformatf("%s se1 t=%0d", nm, t), int'(m.se1), exp_se);
        expect_eq($sformatf("%s se2 t=%0d", nm, t), int'(m.se2), exp_se);
      end
    end
  endtask

  task automatic check_hold(input int t);
    expect_eq($sformatf("hold t=%0d", t),
              int'({sel.s1, sel.s2, sel.s3, sel.s4, sel.s5, sel.s6,
                    sel.s7, sel.s8, sel.s9, sel.s10, sel.s11, sel.s12}),
              int'({SEL2_HOLD, SEL2_HOLD, SEL3_HOLD, SEL2_HOLD, SEL3_HOLD, SEL2_HOLD,
                    SEL7_HOLD, SEL2_HOLD, SEL3_HOLD, SEL2_HOLD, SEL3_HOLD, SEL2_HOLD}));
  endtask

  task automatic run_mode(input iir_mode_e m);
    int  t, last, c0, updates;
    bit  ch2, ch3;
    ch2 = (m != MODE_2_2_2);
    ch3 = (m == MODE_6TH);
    last = (m == MODE_6TH) ? 6 : (m == MODE_4_2) ? 5 : 4;
    @(negedge clk);
    expect_eq("in_ready idle", int'(in_ready), 1);
    check_hold(-1);
    mode = m; in_valid = 1;
    c0 = cyc;
    @(negedge clk);
    in_valid = 0;
    mode = iir_mode_e'(MODE_2_2_2 - m);   // a different mode must not disturb the frame
    updates = 0;
    t = 0;
    while (!out_valid && t < 20) begin
      expect_eq($sformatf("in_ready busy t=%0d", t), int'(in_ready), 0);
      check_sec("F1", sel.f1, t, 1'b0, 0);
      check_sec("F2", sel.f2, t, ch2, 5);
      check_sec("F3", sel.f3, t, ch3, 6);
      if (sel.s1 == SEL2_LOAD) begin
        updates++;
        expect_eq("update cycle", t, last + 1);
        expect_eq("s2", int'(sel.s2), int'(SEL2_LOAD));
        expect_eq("s3", int'(sel.s3), ch2 ? int'(SEL3_CHAIN) : int'(SEL3_NEW));
        expect_eq("s4", int'(sel.s4), int'(SEL2_LOAD));
        expect_eq("s5", int'(sel.s5), ch3 ? int'(SEL3_CHAIN) : int'(SEL3_NEW));
        expect_eq("s6", int'(sel.s6), int'(SEL2_LOAD));
        expect_eq("s7", int'(sel.s7), ch3 ? int'(SEL7_F3) : ch2 ? int'(SEL7_F2) : int'(SEL7_F1));
        expect_eq("s8", int'(sel.s8), int'(SEL2_LOAD));
        expect_eq("s9", int'(sel.s9), ch2 ? int'(SEL3_CHAIN) : int'(SEL3_NEW));
        expect_eq("s10", int'(sel.s10), int'(SEL2_LOAD));
        expect_eq("s11", int'(sel.s11), ch3 ? int'(SEL3_CHAIN) : int'(SEL3_NEW));
        expect_eq("s12", int'(sel.s12), int'(SEL2_LOAD));
      end else begin
        check_hold(t);
      end
      @(negedge clk);
      t++;
    end
    expect_eq("updates", updates, 1);
    expect_eq($sformatf("frame length mode %0d", m), cyc - c0, last + 3);
    expect_eq("in_ready with out_valid", int'(in_ready), 1);
  endtask

  initial begin
    int n, c0;
    mode = MODE_6TH; in_valid = 0;
    #12 rst_n = 1;
    run_mode(MODE_6TH);
    run_mode(MODE_4_2);
    run_mode(MODE_2_2_2);
    run_mode(MODE_6TH);
    // Throughput: in_valid held high, 10 samples in MODE_4_2 take 10 * 8 cycles.
    @(negedge clk);
    mode = MODE_4_2; in_valid = 1;
    c0 = cyc; n = 0;
    while (n < 10) begin
      @(negedge clk);
      if (out_valid) n++;
    end
    expect_eq("throughput", cyc - c0, 10 * 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
