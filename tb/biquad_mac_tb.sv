// Test of the biquad MAC unit with 8-bit samples and coefficients: first the
// five-term schedule of one biquad output (b0 x(n) first with res1, then
// b1 x(n-1), b2 x(n-2), a1 y(n-1), a2 y(n-2)), then random control
// sequences including chained additions and idle cycles. The expected sum
// is computed here from the same inputs.
module biquad_mac_tb;
  localparam int DW = 8, CW = 8, AW = DW + CW + 4;
  logic clk = 0, rst_n = 0;
  logic signed [CW-1:0] coef [5];
  logic signed [DW-1:0] data [5];
  logic [2:0] se1, se2;
  logic res1, mac_en, chain_en;
  logic signed [AW-1:0] chain_in, acc;
  logic signed [AW-1:0] exp_acc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  biquad_mac #(.DATA_W(DW), .COEF_W(CW), .ACC_W(AW)) dut (
    .clk, .rst_n, .coef, .data, .se1, .se2, .res1, .mac_en, .chain_en, .chain_in, .acc
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle with the given controls; the expected value is updated here.
  task automatic cycle(input logic [2:0] s1_, input logic [2:0] s2_, input logic r_,
                       input logic en_, input logic ch_, input logic signed [AW-1:0] cin);
    longint addend;
    @(negedge clk);
    se1 = s1_; se2 = s2_; res1 = r_; mac_en = en_; chain_en = ch_; chain_in = cin;
    if (ch_)             addend = longint'(cin);
    else if (s1_ < 5 && s2_ < 5) addend = longint'(coef[s1_]) * longint'(data[s2_]);
    else                 addend = 0;
    if (en_) exp_acc = AW'((r_ ? 64'sd0 : longint'(exp_acc)) + addend);
    @(posedge clk); #1;
    checks++;
    if (acc !== exp_acc) begin
      failures++;
      $display("FAIL se1=%0d se2=%0d res1=%0b en=%0b chain=%0b: exp %0d got %0d",
               s1_, s2_, r_, en_, ch_, exp_acc, acc);
    end
  endtask

  initial begin
    longint ref_y;
    se1 = 0; se2 = 0; res1 = 0; mac_en = 0; chain_en = 0; chain_in = 0;
    for (int k = 0; k < 5; k++) begin coef[k] = 0; data[k] = 0; end
    #12 rst_n = 1;
    exp_acc = 0;
    checks++;
    if (acc !== 0) begin failures++; $display("FAIL reset"); end

    // One biquad output: b = {3, -2, 5}, a = {7, -1}; x = {10, -4, 6}, y = {-20, 15}
    coef = '{8'sd3, -8'sd2, 8'sd5, 8'sd7, -8'sd1};
    data = '{8'sd10, -8'sd4, 8'sd6, -8'sd20, 8'sd15};
    for (int k = 0; k < 5; k++) cycle(3'(k), 3'(k), k == 0, 1'b1, 1'b0, '0);
    ref_y = 3*10 + (-2)*(-4) + 5*6 + 7*(-20) + (-1)*15;
    checks++;
    if (acc !== AW'(ref_y)) begin failures++; $display("FAIL biquad sum exp %0d got %0d", ref_y, acc); end
    // A second output must start from zero, not from the old sum.
    for (int k = 0; k < 5; k++) cycle(3'(k), 3'(k), k == 0, 1'b1, 1'b0, '0);
    checks++;
    if (acc !== AW'(ref_y)) begin failures++; $display("FAIL second sum exp %0d got %0d", ref_y, acc); end
    // Chained: terms 1..4 then add a partial sum of 1000.
    for (int k = 1; k < 5; k++) cycle(3'(k), 3'(k), k == 1, 1'b1, 1'b0, '0);
    cycle(3'd0, 3'd0, 1'b0, 1'b1, 1'b1, AW'(1000));
    checks++;
    if (acc !== AW'(ref_y - 30 + 1000)) begin failures++; $display("FAIL chained sum got %0d", acc); end

    // Random control.
    for (int i = 0; i < 3000; i++) begin
      if (i % 7 == 0)
        for (int k = 0; k < 5; k++) begin coef[k] = CW'($urandom); data[k] = DW'($urandom); end
      cycle(3'($urandom_range(0, 7)), 3'($urandom_range(0, 7)), ($urandom_range(0, 4) == 0),
            ($urandom_range(0, 3) != 0), ($urandom_range(0, 5) == 0), AW'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
