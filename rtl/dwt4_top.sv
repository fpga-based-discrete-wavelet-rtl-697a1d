// Four-scale discrete wavelet analyser built from distributed-arithmetic FIR
// filters.
//
// The input signal is split by a low-pass/high-pass filter pair (4-tap
// Daubechies filters) and both halves are decimated by two. The high-pass
// half is kept as the detail signal of scale 1; the low-pass half, the
// approximation, is split again by the next scale. After LEVELS scales the
// outputs are the details D1..D_LEVELS and the approximation A_LEVELS:
//
//   x -> [lo|hi] -> D1
//          lo -> [lo|hi] -> D2
//                  lo -> [lo|hi] -> D3
//                          lo -> [lo|hi] -> D4
//                                  lo   ->   A4
//
// Every filter multiplies with a table of coefficient sums rather than with
// multipliers and needs DATA_W clocks per sample, so the input accepts one
// sample every DATA_W clocks (watch `in_ready`); scale j sees a sample every
// 2^(j-1)*DATA_W clocks. All scales share one clock.
//
// Ports: `d_valid[j]`/`d_data[j]` is the detail stream of scale j+1,
// `a_valid`/`a_data` the final approximation, `sat[j]` pulses when scale j+1
// clipped a result to DATA_W bits. All samples are two's complement and at
// the input's scale. The cascade, the filter pair and the decimators follow
// the published design; the strobe interface, the rescaling with saturation
// and separate output ports are this design's choices.
module dwt4_top #(
  parameter int unsigned LEVELS = dwt_pkg::LEVELS,
  parameter int unsigned DATA_W = dwt_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  output logic [LEVELS-1:0]        d_valid,
  output logic signed [DATA_W-1:0] d_data [LEVELS],
  output logic                     a_valid,
  output logic signed [DATA_W-1:0] a_data,
  output logic [LEVELS-1:0]        sat
);

  // samples entering each scale; index LEVELS is the final approximation
  logic                     s_valid [LEVELS+1];
  logic signed [DATA_W-1:0] s_data  [LEVELS+1];
  logic                     s_ready [LEVELS];

  assign s_valid[0] = in_valid;
  assign s_data[0]  = in_data;
  assign in_ready   = s_ready[0];

  for (genvar j = 0; j < LEVELS; j++) begin : g_level
    dwt_level #(.DATA_W(DATA_W)) u_level (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (s_valid[j]),
      .in_ready (s_ready[j]),
      .in_data  (s_data[j]),
      .a_valid  (s_valid[j+1]),
      .a_data   (s_data[j+1]),
      .d_valid  (d_valid[j]),
      .d_data   (d_data[j]),
      .sat      (sat[j])
    );
  end

  assign a_valid = s_valid[LEVELS];
  assign a_data  = s_data[LEVELS];

endmodule
