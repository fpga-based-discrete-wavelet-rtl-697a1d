// Self-checking test of dwt_level, one scale of the filter bank. Random
// samples, with runs of full-scale values that make the low-pass result
// overflow 16 bits, are offered as fast as `in_ready` allows. The
// approximation and detail streams are compared with an integer-multiply
// model (filter, floor(y/2^14), clip, keep samples 0, 2, 4, ...), the kept
// outputs must appear DATA_W+5 = 21 clocks after their input, and the number
// of `sat` pulses must equal the number of clipped filter results.
module tb_dwt_level;
  import dwt_ref_pkg::*;
  localparam int DATA_W = 16, LAT = DATA_W + 5, N = 1200;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic in_ready, a_valid, d_valid, sat;
  logic signed [DATA_W-1:0] a_data, d_data;
  int checks = 0, failures = 0, cycle = 0;
  longint hist [4] = '{0, 0, 0, 0};
  longint exp_a[$], exp_d[$];
  int in_cycle[$];
  int n_in = 0, n_a = 0, n_d = 0, n_sat = 0, n_clip = 0;

  dwt_level dut (.*);

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
        bit cl, ch;
        longint ql, qh;
        for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(in_data);
        ql = requant(fir(REF_LO, hist), cl);
        qh = requant(fir(REF_HI, hist), ch);
        if (cl || ch) n_clip++;
        if (n_in % 2 == 0) begin
          exp_a.push_back(ql);
          exp_d.push_back(qh);
          in_cycle.push_back(cycle);
        end
        n_in++;
      end
      if (sat) n_sat++;
      chk(a_valid == d_valid, "approximation and detail in step");
      if (a_valid) begin
        n_a++;
        if (exp_a.size() == 0) chk(0, "output without sample");
        else begin
          longint ea, ed;
          int ic;
          ea = exp_a.pop_front(); ed = exp_d.pop_front(); ic = in_cycle.pop_front();
          chk(longint'(a_data) == ea, $sformatf("approximation %0d expected %0d", a_data, ea));
          chk(longint'(d_data) == ed, $sformatf("detail %0d expected %0d", d_data, ed));
          chk(cycle - ic == LAT, $sformatf("latency %0d expected %0d", cycle - ic, LAT));
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      if ((n / 40) % 4 == 3)      in_data = (n % 2) ? 16'sd32767 : 16'sd32700;   // DC at full scale
      else if ((n / 40) % 4 == 2) in_data = (n % 2) ? 16'sd32767 : -16'sd32768; // Nyquist at full scale
      else                        in_data = DATA_W'($urandom_range(0, 40000) - 20000);
      in_valid = 1'b1;
      @(negedge clk) in_valid = 1'b0;
    end
    repeat (LAT + 4) @(negedge clk);
    chk(exp_a.size() == 0, "all outputs delivered");
    chk(n_a == N / 2, $sformatf("%0d outputs for %0d samples", n_a, N));
    chk(n_sat == n_clip, $sformatf("%0d sat pulses, %0d clipped results", n_sat, n_clip));
    chk(n_sat > 0, "saturation exercised");
    $display("outputs %0d, saturation pulses %0d", n_a, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
