// One scale of the wavelet analysis filter bank.
//
// The samples of this scale go to a low-pass and a high-pass distributed-
// arithmetic FIR at the same time. Each filter result is brought back to the
// sample format (arithmetic shift right by COEF_FRAC, then saturation to
// DATA_W bits) and decimated by two. The low-pass branch gives the
// approximation, which the next scale takes as its input; the high-pass
// branch gives the detail, which is an output of the analyser.
//
// The rescaling is this design's choice: it keeps every scale at the input's
// scale so that the scales can be cascaded with one sample width. The
// low-pass filter has a DC gain of sqrt(2), so a large input can exceed
// DATA_W bits after a few scales; such values are clipped to the largest or
// smallest sample and `sat` pulses for one clock.
//
// Timing: a sample accepted in cycle t produces its (kept) outputs at t+DATA_W+5
// (filter latency DATA_W+4, plus the registered decimator). `in_ready`
// follows the filters' rule: one sample every DATA_W clocks at most.
module dwt_level #(
  parameter int unsigned DATA_W    = dwt_pkg::DATA_W,
  parameter int unsigned COEF_W    = dwt_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = dwt_pkg::COEF_FRAC,
  parameter int unsigned TAPS      = dwt_pkg::TAPS,
  parameter logic signed [COEF_W-1:0] LO_COEFS [TAPS] = dwt_pkg::LO_D,
  parameter logic signed [COEF_W-1:0] HI_COEFS [TAPS] = dwt_pkg::HI_D
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     a_valid,
  output logic signed [DATA_W-1:0] a_data,
  output logic                     d_valid,
  output logic signed [DATA_W-1:0] d_data,
  output logic                     sat
);

  localparam int unsigned ROM_W = COEF_W + $clog2(TAPS);
  localparam int unsigned FIR_W = ROM_W + DATA_W;

  logic                    lo_valid, hi_valid, lo_ready, hi_ready;
  logic signed [FIR_W-1:0] lo_full, hi_full;

  da_fir #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .COEFS(LO_COEFS)
  ) u_lowpass (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(lo_ready), .in_data(in_data),
    .out_valid(lo_valid), .out_data(lo_full)
  );

  da_fir #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .COEFS(HI_COEFS)
  ) u_highpass (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(hi_ready), .in_data(in_data),
    .out_valid(hi_valid), .out_data(hi_full)
  );

  assign in_ready = lo_ready && hi_ready;

  // ---- rescale to the sample format -------------------------------------
  localparam logic signed [FIR_W-1:0] MAX_S = FIR_W'({1'b0, {(DATA_W-1){1'b1}}});
  localparam logic signed [FIR_W-1:0] MIN_S = -MAX_S - 1;

  logic signed [FIR_W-1:0]  lo_shr, hi_shr;
  logic signed [DATA_W-1:0] lo_q, hi_q;
  logic                     lo_clip, hi_clip;

  always_comb begin
    lo_shr  = lo_full >>> COEF_FRAC;
    hi_shr  = hi_full >>> COEF_FRAC;
    lo_clip = (lo_shr > MAX_S) || (lo_shr < MIN_S);
    hi_clip = (hi_shr > MAX_S) || (hi_shr < MIN_S);
    lo_q    = (lo_shr > MAX_S) ? MAX_S[DATA_W-1:0] :
              (lo_shr < MIN_S) ? MIN_S[DATA_W-1:0] : lo_shr[DATA_W-1:0];
    hi_q    = (hi_shr > MAX_S) ? MAX_S[DATA_W-1:0] :
              (hi_shr < MIN_S) ? MIN_S[DATA_W-1:0] : hi_shr[DATA_W-1:0];
  end

  assign sat = (lo_valid && lo_clip) || (hi_valid && hi_clip);

  // ---- decimation by two ------------------------------------------------
  downsample2 #(.W(DATA_W)) u_down_lo (
    .clk(clk), .rst_n(rst_n),
    .in_valid(lo_valid), .in_data(lo_q),
    .out_valid(a_valid), .out_data(a_data)
  );

  downsample2 #(.W(DATA_W)) u_down_hi (
    .clk(clk), .rst_n(rst_n),
    .in_valid(hi_valid), .in_data(hi_q),
    .out_valid(d_valid), .out_data(d_data)
  );

  a_filters_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    lo_valid == hi_valid)
    else $error("dwt_level: low-pass and high-pass filters out of step");

endmodule
