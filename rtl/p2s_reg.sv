// Parallel-to-serial register of the distributed-arithmetic FIR.
//
// A W-bit word is captured on `load` and presented one bit per clock on
// `sbit`, most significant bit first: `sbit` shows bit W-1 in the cycle after
// the load, and each cycle with `shift` high moves the next lower bit up.
// `load` wins over `shift`. Most-significant-first order is what the
// accumulator's shift-left-and-add needs; the load priority is this design's
// choice.
module p2s_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] pdata,
  output logic         sbit
);

  logic [W-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sreg <= '0;
    else if (load)  sreg <= pdata;
    else if (shift) sreg <= {sreg[W-2:0], 1'b0};
  end

  assign sbit = sreg[W-1];

endmodule
