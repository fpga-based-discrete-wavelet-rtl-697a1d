// Scaling accumulator of the distributed-arithmetic FIR.
//
// Receives one table word per bit-time, most significant bit first, and forms
//     acc = 2*acc + word
// (an adder, the accumulator register and a shift-left-by-one on the feedback).
// On the word marked `first` the fed-back value is replaced by zero, which
// starts a new sum without losing a bit-time. With SIGNED_DATA the word of the
// first bit (the two's-complement sign bit) is subtracted instead of added, so
// after NBITS words
//     acc = -w[NBITS-1]*2^(NBITS-1) + sum_{b<NBITS-1} w[b]*2^b .
// The start-of-word clearing and the sign-bit subtraction are this design's
// choices; the adder/register/shift structure and the separate output
// register follow the filter as published.
//
// Timing: a word presented with `word_valid` in cycle t is in the accumulator
// from cycle t+1. The cycle after the word marked `last`, the output register
// copies the accumulator, so `result`/`result_valid` appear two clocks after
// the last word. `result` holds its value until the next sum completes.
module scaling_acc #(
  parameter int unsigned IN_W        = 18,
  parameter int unsigned NBITS       = 16,
  parameter int unsigned ACC_W       = IN_W + NBITS,
  parameter bit          SIGNED_DATA = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    word_valid,
  input  logic                    first,
  input  logic                    last,
  input  logic signed [IN_W-1:0]  word,
  output logic signed [ACC_W-1:0] result,
  output logic                    result_valid
);

  logic signed [ACC_W-1:0] acc;       // accumulator register
  logic signed [ACC_W-1:0] fb;        // shifted feedback
  logic signed [ACC_W-1:0] word_x;    // sign-extended word
  logic                    done;      // last word has been accumulated

  assign word_x = ACC_W'(word);
  assign fb     = first ? '0 : (acc <<< 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      done <= 1'b0;
    end else begin
      done <= word_valid && last;
      if (word_valid) begin
        if (SIGNED_DATA && first) acc <= fb - word_x;
        else                      acc <= fb + word_x;
      end
    end
  end

  // Output register: enabled once per word, takes the finished accumulator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= done;
      if (done) result <= acc;
    end
  end

endmodule
