// Self-checking test of downsample2: drives a stream with random gaps and
// checks that samples 0, 2, 4, ... are passed one clock after they arrive
// and that the others are dropped.
module tb_downsample2;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [W-1:0] in_data = '0;
  logic out_valid;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] expq[$];
  int n_in = 0, n_out = 0;
  logic expect_now = 1'b0;
  logic [W-1:0] expect_val;

  downsample2 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every clock: out_valid must be high exactly one clock after a kept sample
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== expect_now) begin
        failures++;
        $display("FAIL out_valid=%0b expected %0b", out_valid, expect_now);
      end else if (out_valid) begin
        checks++;
        n_out++;
        if (out_data !== expect_val) begin
          failures++;
          $display("FAIL out_data %h expected %h", out_data, expect_val);
        end
      end
      expect_now <= in_valid && (n_in % 2 == 0);
      expect_val <= in_data;
      if (in_valid) n_in <= n_in + 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      in_data  = W'($urandom);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_out != (n_in + 1) / 2) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", n_out, n_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
