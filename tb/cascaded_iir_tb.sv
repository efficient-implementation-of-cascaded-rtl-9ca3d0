// Test of the configurable cascaded IIR filter with 16-bit samples and
// coefficients (12 fraction bits). For each mode it resets the filter, sets
// random stable coefficients (every |a_k| below 0.15), feeds random samples
// and compares every output with direct-form reference filters: one of
// order 6 (MODE_6TH), one of order 4 and one of order 2 (MODE_4_2), or three
// of order 2 (MODE_2_2_2). It also checks the frame length of every sample,
// the throughput with in_valid held high, and a run with large
// coefficients that drives the outputs into saturation.
module cascaded_iir_tb;
  import iir_pkg::*;
  import iir_ref_pkg::*;
  localparam int DW = 16, CW = 16, FR = 12;
  logic clk = 0, rst_n = 0;
  iir_mode_e mode;
  logic in_valid, in_ready, out_valid;
  logic signed [DW-1:0] x, z1, z2, y1, y2, y3;
  logic signed [CW-1:0] c1 [5], c2 [5], c3 [5];
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_sat = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  cascaded_iir #(.DATA_W(DW), .COEF_W(CW), .FRAC(FR)) dut (
    .clk, .rst_n, .mode, .in_valid, .in_ready, .x, .z1, .z2,
    .c1, .c2, .c3, .out_valid, .y1, .y2, .y3
  );

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: expected %0d got %0d", what, exp, got);
    end
  endtask

  function automatic logic signed [CW-1:0] rnd_coef(input int maxabs);
    return CW'($urandom_range(0, 2 * maxabs) - maxabs);
  endfunction

  task automatic do_reset();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
  endtask

  // Runs n samples in mode m and checks them; bmax/amax bound the coefficients.
  task automatic run_mode(input iir_mode_e m, input int n, input int bmax, input int amax);
    iir_ref r6, r4, ra, rb, rc;
    longint e1, e2, e3;
    int c0, lat;
    for (int k = 0; k < 5; k++) begin
      c1[k] = rnd_coef(k < 3 ? bmax : amax);
      c2[k] = rnd_coef(k < 3 ? bmax : amax);
      c3[k] = rnd_coef(k < 3 ? bmax : amax);
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
    do_reset();
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      mode = m; in_valid = 1;
      x = DW'($urandom); z1 = DW'($urandom); z2 = DW'($urandom);
      if (i % 9 == 0) begin x = 16'sh7fff; z1 = -16'sh8000; z2 = 16'sh7fff; end
      c0 = cyc;
      @(negedge clk);
      in_valid = 0;
      while (!out_valid && cyc - c0 < 30) @(negedge clk);
      lat = cyc - c0;
      expect_eq($sformatf("frame length mode %0d", m), lat,
                (m == MODE_6TH) ? 9 : (m == MODE_4_2) ? 8 : 7);
      case (m)
        MODE_6TH: begin
          e1 = r6.step(x);
          expect_eq($sformatf("6th y sample %0d", i), y1, e1);
          if (e1 == 32767 || e1 == -32768) n_sat++;
        end
        MODE_4_2: begin
          e1 = r4.step(x); e3 = rc.step(z2);
          expect_eq($sformatf("4th y sample %0d", i), y1, e1);
          expect_eq($sformatf("2nd (F3) y sample %0d", i), y3, e3);
        end
        default: begin
          e1 = ra.step(x); e2 = rb.step(z1); e3 = rc.step(z2);
          expect_eq($sformatf("F1 y sample %0d", i), y1, e1);
          expect_eq($sformatf("F2 y sample %0d", i), y2, e2);
          expect_eq($sformatf("F3 y sample %0d", i), y3, e3);
        end
      endcase
    end
  endtask

  initial begin
    int c0, n;
    mode = MODE_6TH; in_valid = 0; x = 0; z1 = 0; z2 = 0;
    for (int k = 0; k < 5; k++) begin c1[k] = 0; c2[k] = 0; c3[k] = 0; end
    #12 rst_n = 1;
    // Stable filters: |b| < 1.0, |a| < 0.15 (coefficients scaled by 2^12).
    run_mode(MODE_6TH,   200, 4000, 600);
    run_mode(MODE_4_2,   200, 4000, 600);
    run_mode(MODE_2_2_2, 200, 4000, 600);
    // Large coefficients: outputs saturate.
    run_mode(MODE_6TH,   100, 32767, 32767);
    expect_eq("saturation reached", n_sat > 0, 1);
    // Throughput with in_valid held high in MODE_6TH: 9 cycles per sample.
    @(negedge clk);
    mode = MODE_6TH; in_valid = 1;
    c0 = cyc; n = 0;
    while (n < 10) begin
      @(negedge clk);
      if (out_valid) n++;
    end
    in_valid = 0;
    expect_eq("throughput", cyc - c0, 90);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
