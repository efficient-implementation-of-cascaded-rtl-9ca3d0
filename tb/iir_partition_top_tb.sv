// End-to-end test of the top level at its default sizes (4-bit samples and
// coefficients with 2 fraction bits; 32 x 32 partition multiplier).
//
// Filter: for each of the three modes, and then each once more in a second
// round, the filter is reset, given random coefficients and fed random
// samples with random gaps and with in_valid sometimes held high while the
// filter is busy; every output is compared with direct-form reference
// filters (order 6, order 4 + 2, or three of order 2), and every frame's
// length is checked. Multiplier: the published 32-bit example and random
// operands, checked against 64-bit multiplication, while the filter runs.
// Mechanisms counted, each must occur: every mode, the F2 and F3
// partial-sum (cascade) additions, stalled input (in_valid while busy),
// back-to-back samples, and saturated outputs.
module iir_partition_top_tb;
  import iir_pkg::*;
  import iir_ref_pkg::*;
  localparam int DW = 4, FR = 2;
  logic clk = 0, rst_n = 0;
  iir_mode_e mode;
  logic in_valid, in_ready, out_valid;
  logic signed [DW-1:0] x, z1, z2, y1, y2, y3;
  logic signed [3:0] c1 [5], c2 [5], c3 [5];
  logic [31:0] mul_a, mul_b;
  logic [63:0] mul_p;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_mode [3];
  int n_chain2 = 0, n_chain3 = 0, n_stall = 0, n_b2b = 0, n_sat = 0, n_mul = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  iir_partition_top dut (
    .clk, .rst_n, .mode, .in_valid, .in_ready, .x, .z1, .z2,
    .c1, .c2, .c3, .out_valid, .y1, .y2, .y3, .mul_a, .mul_b, .mul_p
  );

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, observed on the filter's control lines.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_iir.sel.f2.chain_en) n_chain2++;
    if (dut.u_iir.sel.f3.chain_en) n_chain3++;
    if (in_valid && !in_ready)     n_stall++;
    if (in_valid && in_ready && out_valid) n_b2b++;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: expected %0d got %0d", what, exp, got);
    end
  endtask

  // The multiplier is checked on every clock edge with new random operands.
  always @(negedge clk) begin
    expect_eq("partition multiplier", mul_p, 64'(mul_a) * 64'(mul_b));
    n_mul++;
    mul_a <= $urandom;
    mul_b <= $urandom;
  end

  function automatic void sat_count(input longint v);
    if (v == 7 || v == -8) n_sat++;
  endfunction

  task automatic run_mode(input iir_mode_e m, input int n);
    iir_ref r6, r4, ra, rb, rc;
    longint e1, e2, e3;
    int c0;
    bit b2b;
    for (int k = 0; k < 5; k++) begin
      c1[k] = 4'($urandom); c2[k] = 4'($urandom); c3[k] = 4'($urandom);
    end
    r6 = new(6, DW, FR); r4 = new(4, DW, FR);
    ra = new(2, DW, FR); rb = new(2, DW, FR); rc = new(2, DW, FR);
    r6.b[0] = c1[0]; r6.b[1] = c1[1]; r6.b[2] = c1[2]; r6.b[3] = c2[1]; r6.b[4] = c2[2];
    r6.b[5] = c3[1]; r6.b[6] = c3[2];
    r6.a[1] = c1[3]; r6.a[2] = c1[4]; r6.a[3] = c2[3]; r6.a[4] = c2[4];
    r6.a[5] = c3[3]; r6.a[6] = c3[4];
    for (int k = 0; k <= 4; k++) r4.b[k] = r6.b[k];
    for (int k = 1; k <= 4; k++) r4.a[k] = r6.a[k];
    ra.b[0] = c1[0]; ra.b[1] = c1[1]; ra.b[2] = c1[2]; ra.a[1] = c1[3]; ra.a[2] = c1[4];
    rb.b[0] = c2[0]; rb.b[1] = c2[1]; rb.b[2] = c2[2]; rb.a[1] = c2[3]; rb.a[2] = c2[4];
    rc.b[0] = c3[0]; rc.b[1] = c3[1]; rc.b[2] = c3[2]; rc.a[1] = c3[3]; rc.a[2] = c3[4];
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    n_mode[m]++;
    b2b = 0;
    for (int i = 0; i < n; i++) begin
      if (!b2b) begin
        @(negedge clk);
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      mode = m; in_valid = 1;
      x = 4'($urandom); z1 = 4'($urandom); z2 = 4'($urandom);
      c0 = cyc;
      @(negedge clk);
      // Sometimes keep in_valid high while busy (it must be ignored), and
      // sometimes present the next sample in the cycle of out_valid.
      b2b = ($urandom_range(0, 3) == 0);
      in_valid = ($urandom_range(0, 3) == 0);
      while (!out_valid && cyc - c0 < 30) @(negedge clk);
      expect_eq($sformatf("frame length mode %0d", m), cyc - c0,
                (m == MODE_6TH) ? 9 : (m == MODE_4_2) ? 8 : 7);
      case (m)
        MODE_6TH: begin
          e1 = r6.step(x);
          expect_eq($sformatf("6th y sample %0d", i), y1, e1);
          sat_count(e1);
        end
        MODE_4_2: begin
          e1 = r4.step(x); e3 = rc.step(z2);
          expect_eq($sformatf("4th y sample %0d", i), y1, e1);
          expect_eq($sformatf("2nd y sample %0d", i), y3, e3);
          sat_count(e1); sat_count(e3);
        end
        default: begin
          e1 = ra.step(x); e2 = rb.step(z1); e3 = rc.step(z2);
          expect_eq($sformatf("F1 y sample %0d", i), y1, e1);
          expect_eq($sformatf("F2 y sample %0d", i), y2, e2);
          expect_eq($sformatf("F3 y sample %0d", i), y3, e3);
          sat_count(e1); sat_count(e2); sat_count(e3);
        end
      endcase
      if (!b2b) in_valid = 0;
    end
    in_valid = 0;
  endtask

  initial begin
    mode = MODE_6TH; in_valid = 0; x = 0; z1 = 0; z2 = 0;
    for (int k = 0; k < 5; k++) begin c1[k] = 0; c2[k] = 0; c3[k] = 0; end
    // Published multiplier example first.
    mul_a = 32'd44742143; mul_b = 32'd179044224;
    #1;
    expect_eq("published multiplier example", mul_p, 64'd8010822273532032);
    #11 rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      run_mode(MODE_6TH,   300);
      run_mode(MODE_4_2,   300);
      run_mode(MODE_2_2_2, 300);
    end
    $display("mechanisms: 6th=%0d 4+2=%0d 2+2+2=%0d F2-chain=%0d F3-chain=%0d stall=%0d back-to-back=%0d saturated=%0d multiplies=%0d",
             n_mode[MODE_6TH], n_mode[MODE_4_2], n_mode[MODE_2_2_2], n_chain2, n_chain3,
             n_stall, n_b2b, n_sat, n_mul);
    expect_eq("6th-order mode used",   n_mode[MODE_6TH] > 0, 1);
    expect_eq("4th+2nd mode used",     n_mode[MODE_4_2] > 0, 1);
    expect_eq("2nd x3 mode used",      n_mode[MODE_2_2_2] > 0, 1);
    expect_eq("F2 cascade addition",   n_chain2 > 0, 1);
    expect_eq("F3 cascade addition",   n_chain3 > 0, 1);
    expect_eq("stalled input",         n_stall > 0, 1);
    expect_eq("back-to-back samples",  n_b2b > 0, 1);
    expect_eq("saturation",            n_sat > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
