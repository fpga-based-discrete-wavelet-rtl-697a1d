// Self-checking test of da_rom: for every address checks the registered
// entry against the sum of the selected coefficients, worked out here from
// the 4-tap Daubechies low-pass and high-pass coefficients (scaled by 2^14),
// and checks the one-clock latency. A third table holds the upper half
// (taps 4..7) of an 8-coefficient list, as used when a long filter is split
// into several tables.
module tb_da_rom;
  localparam int TAPS = 4, COEF_W = 16, OUT_W = 18;
  localparam logic signed [COEF_W-1:0] HI [TAPS] = '{-16'sd7913, 16'sd13705, -16'sd3672, -16'sd2120};
  localparam int LO_I [TAPS] = '{-2120, 3672, 13705, 7913};
  localparam int HI_I [TAPS] = '{-7913, 13705, -3672, -2120};
  localparam logic signed [COEF_W-1:0] C8 [8] = '{-16'sd174, 16'sd539, 16'sd505, -16'sd3064,
                                                -16'sd458, 16'sd10336, 16'sd11712, 16'sd3775};
  localparam int UP_I [TAPS] = '{-458, 10336, 11712, 3775};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [TAPS-1:0] addr = '0;
  logic signed [OUT_W-1:0] data_lo, data_hi, data_up;
  int checks = 0, failures = 0;

  da_rom #(.TAPS(TAPS), .COEF_W(COEF_W), .OUT_W(OUT_W)) dut_lo (
    .clk(clk), .rst_n(rst_n), .addr(addr), .data(data_lo));
  da_rom #(.TAPS(TAPS), .COEF_W(COEF_W), .OUT_W(OUT_W), .COEFS(HI)) dut_hi (
    .clk(clk), .rst_n(rst_n), .addr(addr), .data(data_hi));

  da_rom #(.TAPS(TAPS), .COEF_W(COEF_W), .OUT_W(OUT_W), .N_COEFS(8), .FIRST(4), .COEFS(C8)) dut_up (
    .clk(clk), .rst_n(rst_n), .addr(addr), .data(data_up));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_sum(int unsigned a, int c[TAPS]);
    int s = 0;
    for (int i = 0; i < TAPS; i++) if ((a >> i) & 1) s += c[i];
    return s;
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int prev;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(int'(data_lo), 0, "reset value");
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < 2**TAPS; a++) begin
        int aa;
        aa = pass ? (2**TAPS - 1 - a) : a;
        @(negedge clk); addr = TAPS'(aa);
        prev = int'(data_lo);
        @(posedge clk); #1;
        check(int'(data_lo), expect_sum(aa, LO_I), $sformatf("lo addr %0d", aa));
        check(int'(data_hi), expect_sum(aa, HI_I), $sformatf("hi addr %0d", aa));
        check(int'(data_up), expect_sum(aa, UP_I), $sformatf("upper-half addr %0d", aa));
      end
    end
    // latency: the entry must not change before the clock edge
    @(negedge clk); addr = 4'b0001;
    @(posedge clk); #1;
    @(negedge clk); addr = 4'b1111;
    #1 check(int'(data_lo), -2120, "no change before edge");
    @(posedge clk); #1;
    check(int'(data_lo), 23170, "table end = sum of low-pass coefficients");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
