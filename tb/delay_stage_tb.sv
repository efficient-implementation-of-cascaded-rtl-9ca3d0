// Test of the delay-line stage: a 3-input stage wired as in the filter
// (input 2 fed back for hold) and a 4-input stage with a select that can
// reach an unused code. Random inputs and selects; the expected register
// value is tracked separately.
module delay_stage_tb;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] a, b, c, q3, q2;
  logic [1:0] sel3;
  logic       sel2;
  logic signed [W-1:0] exp3, exp2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_stage #(.W(W), .N(3)) dut3 (.clk, .rst_n, .d('{a, b, q3}), .sel(sel3), .q(q3));
  delay_stage #(.W(W), .N(2)) dut2 (.clk, .rst_n, .d('{a, q2}),    .sel(sel2), .q(q2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; sel3 = 2; sel2 = 1;
    #12;
    checks += 2;
    if (q3 !== 0 || q2 !== 0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    exp3 = 0; exp2 = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a = W'($urandom); b = W'($urandom);
      sel3 = 2'($urandom); sel2 = 1'($urandom);
      case (sel3)
        2'd0: exp3 = a;
        2'd1: exp3 = b;
        default: ;   // 2 holds, 3 holds
      endcase
      if (sel2 == 1'b0) exp2 = a;
      @(posedge clk); #1;
      checks += 2;
      if (q3 !== exp3) begin failures++; $display("FAIL 3-input stage sel=%0d: exp %0d got %0d", sel3, exp3, q3); end
      if (q2 !== exp2) begin failures++; $display("FAIL 2-input stage sel=%0d: exp %0d got %0d", sel2, exp2, q2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
