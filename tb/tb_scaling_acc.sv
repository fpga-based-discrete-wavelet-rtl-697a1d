// Self-checking test of scaling_acc: feeds random sequences of NBITS table
// words, most significant first, back to back and with gaps, and checks the
// finished sum against -w[0]*2^(NBITS-1) + sum w[i]*2^(NBITS-1-i) (word 0
// belongs to the sign bit), and that it appears two clocks after the last
// word.
module tb_scaling_acc;
  localparam int IN_W = 18, NBITS = 16, ACC_W = IN_W + NBITS;
  logic clk = 1'b0, rst_n = 1'b0;
  logic word_valid = 1'b0, first = 1'b0, last = 1'b0;
  logic signed [IN_W-1:0] word = '0;
  logic signed [ACC_W-1:0] result;
  logic result_valid;
  int checks = 0, failures = 0;
  longint expq[$];
  int last_cycle[$];
  int cycle = 0;

  scaling_acc #(.IN_W(IN_W), .NBITS(NBITS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && result_valid) begin
      longint e;
      int lc;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        e  = expq.pop_front();
        lc = last_cycle.pop_front();
        if (longint'(result) != e) begin
          failures++;
          $display("FAIL result %0d expected %0d", result, e);
        end
        checks++;
        if (cycle - lc != 2) begin
          failures++;
          $display("FAIL result latency %0d clocks after last word, expected 2", cycle - lc);
        end
      end
    end
  end

  initial begin
    longint e;
    int lim;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      e = 0;
      lim = (n % 3 == 0) ? 131071 : 30000;
      for (int b = 0; b < NBITS; b++) begin
        logic signed [IN_W-1:0] w;
        w = IN_W'($urandom_range(0, 2 * lim) - lim);
        if (n % 7 == 0 && b == 0) w = -IN_W'(131072);
        if (b == 0) e = -longint'(w);
        else        e = 2 * e + longint'(w);
        @(negedge clk);
        word_valid = 1'b1; word = w; first = (b == 0); last = (b == NBITS - 1);
        if (b == NBITS - 1) begin
          expq.push_back(e);
          last_cycle.push_back(cycle);
        end
        // occasionally pause mid-word
        if (n % 5 == 1 && b == 4) begin
          @(negedge clk); word_valid = 1'b0; first = 1'b0; last = 1'b0;
        end
      end
      // back to back unless a gap is inserted here
      if (n % 4 == 0) begin
        @(negedge clk); word_valid = 1'b0; first = 1'b0; last = 1'b0;
        repeat (2) @(negedge clk);
      end
    end
    @(negedge clk); word_valid = 1'b0; first = 1'b0; last = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
