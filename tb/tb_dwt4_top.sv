// End-to-end test of the four-scale wavelet analyser at its default size
// (16-bit samples, four scales). A signal made of random noise, a slow
// triangle, full-scale DC and full-scale alternating runs is fed in, mostly
// back to back (one sample every 16 clocks, as fast as `in_ready` allows)
// and sometimes with idle gaps. A software model of the cascade (integer
// FIR, floor(y/2^14) with clipping, keep every second output, approximation
// passed to the next scale) predicts every D1..D4 and A4 sample; the test
// checks them in order, checks the D1 latency of 21 clocks, the output counts
// of every scale (halved per scale), and that each mechanism occurred:
// back-to-back input, gaps, saturation at the first and at a deeper scale,
// and output from every scale.
module tb_dwt4_top;
  import dwt_ref_pkg::*;
  localparam int L = 4, DATA_W = 16, N = 2048, LAT1 = DATA_W + 5;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic in_ready, a_valid;
  logic [L-1:0] d_valid, sat;
  logic signed [DATA_W-1:0] d_data [L];
  logic signed [DATA_W-1:0] a_data;
  int checks = 0, failures = 0, cycle = 0;

  // model state per scale
  longint hist [L][4];
  int     n_seen [L];
  longint exp_d [L][$];
  longint exp_a [$];
  int     d1_cycle [$];
  int     n_clip_lvl [L];
  // observed
  int n_d [L], n_sat [L], n_a = 0, n_b2b = 0, n_gap = 0, last_in = -1;

  dwt4_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // feed one sample to scale j of the model
  function automatic void model(int j, longint x);
    bit cl, ch;
    longint ql, qh;
    for (int k = 3; k > 0; k--) hist[j][k] = hist[j][k-1];
    hist[j][0] = x;
    ql = requant(fir(REF_LO, hist[j]), cl);
    qh = requant(fir(REF_HI, hist[j]), ch);
    if (cl || ch) n_clip_lvl[j]++;
    if (n_seen[j] % 2 == 0) begin
      exp_d[j].push_back(qh);
      if (j == L - 1) exp_a.push_back(ql);
      else            model(j + 1, ql);
    end
    n_seen[j]++;
  endfunction

  initial begin
    for (int j = 0; j < L; j++) begin
      n_seen[j] = 0; n_d[j] = 0; n_sat[j] = 0; n_clip_lvl[j] = 0;
      for (int k = 0; k < 4; k++) hist[j][k] = 0;
    end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid) begin
        if (n_seen[0] % 2 == 0) d1_cycle.push_back(cycle);
        model(0, longint'(in_data));
        if (last_in >= 0) begin
          if (cycle - last_in == DATA_W) n_b2b++; else n_gap++;
        end
        last_in = cycle;
      end
      for (int j = 0; j < L; j++) begin
        if (sat[j]) n_sat[j]++;
        if (d_valid[j]) begin
          n_d[j]++;
          if (exp_d[j].size() == 0) chk(0, $sformatf("D%0d output without input", j + 1));
          else begin
            longint e;
            e = exp_d[j].pop_front();
            chk(longint'(d_data[j]) == e,
                $sformatf("D%0d sample %0d: %0d expected %0d", j + 1, n_d[j] - 1, d_data[j], e));
          end
          if (j == 0) chk(cycle - d1_cycle.pop_front() == LAT1, "D1 latency");
        end
      end
      if (a_valid) begin
        n_a++;
        if (exp_a.size() == 0) chk(0, "A4 output without input");
        else begin
          longint e;
          e = exp_a.pop_front();
          chk(longint'(a_data) == e, $sformatf("A4 sample %0d: %0d expected %0d", n_a - 1, a_data, e));
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      int seg, tri_v;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      if (n % 97 == 13) repeat ($urandom_range(1, 40)) @(negedge clk);
      seg   = (n / 128) % 4;
      tri_v = ((n % 256) < 128) ? (n % 128) * 400 - 25600 : 25600 - (n % 128) * 400;
      case (seg)
        0: in_data = DATA_W'(tri_v + int'($urandom_range(0, 2000)) - 1000);
        1: in_data = DATA_W'($urandom);
        2: in_data = 16'sd32767;
        default: in_data = (n % 2) ? 16'sd32767 : -16'sd32768;
      endcase
      in_valid = 1'b1;
      @(negedge clk) in_valid = 1'b0;
    end
    // let the deepest scale finish
    repeat (16 * DATA_W + 40) @(negedge clk);
    for (int j = 0; j < L; j++) begin
      chk(exp_d[j].size() == 0, $sformatf("D%0d: %0d samples missing", j + 1, exp_d[j].size()));
      chk(n_d[j] == (N >> (j + 1)), $sformatf("D%0d count %0d", j + 1, n_d[j]));
      chk(n_sat[j] == n_clip_lvl[j], $sformatf("scale %0d: %0d sat pulses, %0d clipped", j + 1, n_sat[j], n_clip_lvl[j]));
      $display("scale %0d: %0d detail samples, %0d saturations", j + 1, n_d[j], n_sat[j]);
    end
    chk(n_a == (N >> L), $sformatf("A4 count %0d", n_a));
    chk(exp_a.size() == 0, "A4 samples missing");
    // every mechanism must have happened
    chk(n_b2b > N / 2, $sformatf("back-to-back input only %0d times", n_b2b));
    chk(n_gap > 0, "input gaps never happened");
    chk(n_sat[0] > 0, "saturation at scale 1 never happened");
    chk(n_sat[1] + n_sat[2] + n_sat[3] > 0, "saturation at a deeper scale never happened");
    for (int j = 0; j < L; j++) chk(n_d[j] > 0, $sformatf("scale %0d produced nothing", j + 1));
    $display("back-to-back inputs %0d, inputs after a gap %0d, A4 samples %0d", n_b2b, n_gap, n_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
