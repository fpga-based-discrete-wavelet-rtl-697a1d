// Self-checking test of p2s_reg: loads random words and checks that they come
// out most significant bit first, one bit per shifting clock, that a clock
// without `shift` holds the bit, and that `load` overrides `shift`.
module tb_p2s_reg;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [W-1:0] pdata = '0;
  logic sbit;
  int checks = 0, failures = 0;

  p2s_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] word;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      word = W'($urandom);
      @(negedge clk); load = 1'b1; shift = 1'b1; pdata = word;
      @(negedge clk); load = 1'b0;
      for (int b = W - 1; b >= 0; b--) begin
        check(sbit, word[b], $sformatf("word %0d bit %0d", n, b));
        if (b == W / 2) begin          // one idle clock mid-word
          shift = 1'b0;
          @(negedge clk);
          check(sbit, word[b], "hold without shift");
          shift = 1'b1;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
