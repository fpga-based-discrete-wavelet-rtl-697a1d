// Self-checking test of da_fir. Four filters run side by side on the same
// samples: the 4-tap low-pass and high-pass Daubechies filters (the default
// build, one table each), the same low-pass filter with unsigned samples,
// and an 8-tap filter (Daubechies, 8 coefficients) split into two 4-input
// tables whose outputs are added. Random samples, including the extreme
// values -32768 and 32767, are offered as fast as `in_ready` allows and
// sometimes with gaps. Every result is compared with an integer-multiply FIR;
// the test also checks the DATA_W+4 = 20-clock latency and that back-to-back
// samples are accepted every DATA_W = 16 clocks.
module tb_da_fir;
  import dwt_ref_pkg::*;
  localparam int DATA_W = 16, LAT = DATA_W + 4;
  localparam logic signed [15:0] HI [4] = '{-16'sd7913, 16'sd13705, -16'sd3672, -16'sd2120};
  // round(2^14 * 8-tap Daubechies decomposition low-pass)
  localparam logic signed [15:0] C8 [8] = '{-16'sd174, 16'sd539, 16'sd505, -16'sd3064,
                                           -16'sd458, 16'sd10336, 16'sd11712, 16'sd3775};
  localparam longint C8_I [8] = '{-174, 539, 505, -3064, -458, 10336, 11712, 3775};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic ready_lo, ready_hi, ov_lo, ov_hi;
  logic signed [33:0] od_lo, od_hi, od_u;
  logic signed [34:0] od_8;
  logic ready_u, ready_8, ov_u, ov_8;
  longint hist_u [4] = '{0, 0, 0, 0};
  longint hist_8 [8] = '{0, 0, 0, 0, 0, 0, 0, 0};
  longint exp_u[$], exp_8[$];
  int checks = 0, failures = 0, cycle = 0;
  longint hist [4] = '{0, 0, 0, 0};
  longint exp_lo[$], exp_hi[$];
  int in_cycle[$];
  int last_in = -1000, n_b2b = 0, n_gap = 0, n_out = 0;

  da_fir dut_lo (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(ready_lo),
                 .in_data(in_data), .out_valid(ov_lo), .out_data(od_lo));
  da_fir #(.COEFS(HI)) dut_hi (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                 .in_ready(ready_hi), .in_data(in_data), .out_valid(ov_hi), .out_data(od_hi));

  da_fir #(.SIGNED_DATA(1'b0)) dut_u (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                 .in_ready(ready_u), .in_data(in_data), .out_valid(ov_u), .out_data(od_u));
  da_fir #(.TAPS(8), .COEFS(C8), .LUT_IN(4)) dut_8 (.clk(clk), .rst_n(rst_n),
                 .in_valid(in_valid), .in_ready(ready_8), .in_data(in_data),
                 .out_valid(ov_8), .out_data(od_8));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid) begin
        for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(in_data);
        exp_lo.push_back(fir(REF_LO, hist));
        exp_hi.push_back(fir(REF_HI, hist));
        for (int k = 3; k > 0; k--) hist_u[k] = hist_u[k-1];
        hist_u[0] = longint'(unsigned'(in_data));
        exp_u.push_back(fir(REF_LO, hist_u));
        for (int k = 7; k > 0; k--) hist_8[k] = hist_8[k-1];
        hist_8[0] = longint'(in_data);
        begin
          longint s8;
          s8 = 0;
          for (int k = 0; k < 8; k++) s8 += C8_I[k] * hist_8[k];
          exp_8.push_back(s8);
        end
        in_cycle.push_back(cycle);
        if (cycle - last_in == DATA_W) n_b2b++;
        else if (last_in >= 0)         n_gap++;
        if (last_in >= 0) chk(cycle - last_in >= DATA_W, "samples closer than DATA_W clocks");
        last_in = cycle;
      end
      chk(ov_lo == ov_hi && ov_lo == ov_u && ov_lo == ov_8, "all filters in step");
      if (ov_lo) begin
        n_out++;
        if (exp_lo.size() == 0) chk(0, "result without sample");
        else begin
          longint el, eh;
          int ic;
          el = exp_lo.pop_front(); eh = exp_hi.pop_front(); ic = in_cycle.pop_front();
          chk(longint'(od_lo) == el, $sformatf("low-pass %0d expected %0d", od_lo, el));
          chk(longint'(od_hi) == eh, $sformatf("high-pass %0d expected %0d", od_hi, eh));
          el = exp_u.pop_front(); eh = exp_8.pop_front();
          chk(longint'(od_u) == el, $sformatf("unsigned low-pass %0d expected %0d", od_u, el));
          chk(longint'(od_8) == eh, $sformatf("8-tap %0d expected %0d", od_8, eh));
          chk(cycle - ic == LAT, $sformatf("latency %0d expected %0d", cycle - ic, LAT));
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      int r;
      // wait for a slot
      @(negedge clk);
      while (!ready_lo) @(negedge clk);
      chk(ready_lo == ready_hi && ready_lo == ready_u && ready_lo == ready_8, "in_ready equal");
      if (n % 11 == 5) repeat ($urandom_range(1, 20)) @(negedge clk);
      r = $urandom_range(0, 9);
      in_data  = (r == 0) ? -16'sd32768 : (r == 1) ? 16'sd32767 : DATA_W'($urandom);
      in_valid = 1'b1;
      @(negedge clk) in_valid = 1'b0;
    end
    repeat (LAT + 4) @(negedge clk);
    chk(exp_lo.size() == 0, "all results delivered");
    chk(n_out == 1500, $sformatf("%0d results for 1500 samples", n_out));
    chk(n_b2b > 1000, $sformatf("only %0d back-to-back samples", n_b2b));
    chk(n_gap > 50, "gaps exercised");
    $display("back-to-back samples %0d, samples after a gap %0d", n_b2b, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
