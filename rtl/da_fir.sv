// TAPS-tap FIR filter built with distributed arithmetic (DA).
//
//     y[n] = sum_{k=0}^{TAPS-1} COEFS[k] * x[n-k]
//
// Instead of TAPS multipliers the filter walks through the DATA_W bits of the
// samples, most significant first. In each bit-time one bit of every tap forms
// a TAPS-bit address into a table of coefficient sums (da_rom), and the
// scaling accumulator adds the looked-up word to twice its running sum. One
// output therefore takes DATA_W clocks and costs one table, one adder and a
// few registers.
//
// Structure (as published): a delay line of TAPS sample registers; one
// parallel-to-serial register per tap, loaded from the delay line; the tap
// bits concatenated with the oldest tap at the top of the address; the
// registered table; a bit counter compared with DATA_W-1, delayed by one
// clock to line up with the table, that closes each word; the scaling
// accumulator with its output register.
//
// Longer filters: a table has 2^inputs entries, so rather than one huge
// table the taps are split into groups of LUT_IN (the natural LUT size, 4 by
// default) with one table each, and the table outputs are added before the
// accumulator. With the default TAPS = LUT_IN = 4 there is a single table and
// no adder, exactly the published filter.
//
// Interface and timing (this design's choice of handshake):
//  * `in_valid` offers a sample; it must only be high while `in_ready` is.
//    Samples may follow each other every DATA_W clocks.
//  * `out_valid` pulses DATA_W+4 clocks after the `in_valid` of sample n,
//    with `out_data` = y[n] at full precision (scale 2^-COEF_FRAC for the
//    coefficients of dwt_pkg). `out_data` holds until the next result.
//  * The delay line starts at zero after reset.
module da_fir #(
  parameter int unsigned TAPS        = dwt_pkg::TAPS,
  parameter int unsigned DATA_W      = dwt_pkg::DATA_W,
  parameter int unsigned COEF_W      = dwt_pkg::COEF_W,
  parameter logic signed [COEF_W-1:0] COEFS [TAPS] = dwt_pkg::LO_D,
  parameter bit          SIGNED_DATA = 1'b1,
  parameter int unsigned LUT_IN      = 4,
  parameter int unsigned ROM_W       = COEF_W + $clog2(TAPS),
  parameter int unsigned OUT_W       = ROM_W + DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data
);

  localparam int unsigned CNT_W = $clog2(DATA_W);
  localparam int unsigned NLUT  = (TAPS + LUT_IN - 1) / LUT_IN;

  // ---- delay line (sample registers) ------------------------------------
  logic signed [DATA_W-1:0] taps_q [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(TAPS); k++) taps_q[k] <= '0;
    end else if (in_valid) begin
      taps_q[0] <= in_data;
      for (int k = 1; k < int'(TAPS); k++) taps_q[k] <= taps_q[k-1];
    end
  end

  // ---- bit counter --------------------------------------------------------
  // load: the cycle after a sample entered the delay line the
  // parallel-to-serial registers take the taps and the count restarts.
  logic             load;
  logic             active;     // a bit-time is being presented
  logic [CNT_W-1:0] bit_cnt;    // 0 = most significant bit
  logic             cnt_last;

  assign cnt_last = (bit_cnt == CNT_W'(DATA_W-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load    <= 1'b0;
      active  <= 1'b0;
      bit_cnt <= '0;
    end else begin
      load <= in_valid;
      if (load) begin
        active  <= 1'b1;
        bit_cnt <= '0;
      end else if (active) begin
        if (cnt_last) active <= 1'b0;
        else          bit_cnt <= bit_cnt + 1'b1;
      end
    end
  end

  // A sample offered now is loaded next cycle; that cycle must be idle or the
  // last bit-time of the word in flight.
  assign in_ready = !load && (!active || bit_cnt >= CNT_W'(DATA_W-2));

  // ---- parallel-to-serial registers and table address -------------------
  logic [NLUT*LUT_IN-1:0] addr;   // taps beyond TAPS stay 0

  if (NLUT * LUT_IN > TAPS) begin : g_pad
    assign addr[NLUT*LUT_IN-1:TAPS] = '0;
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_p2s
    p2s_reg #(.W(DATA_W)) u_p2s (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (load),
      .shift (active),
      .pdata (taps_q[k]),
      .sbit  (addr[k])
    );
  end

  // ---- coefficient-sum tables (one clock) and their adder tree ----------
  logic signed [ROM_W-1:0] lut_word [NLUT];
  logic signed [ROM_W-1:0] rom_word;

  for (genvar g = 0; g < NLUT; g++) begin : g_lut
    da_rom #(
      .TAPS    (LUT_IN),
      .COEF_W  (COEF_W),
      .OUT_W   (ROM_W),
      .N_COEFS (TAPS),
      .FIRST   (g * LUT_IN),
      .COEFS   (COEFS)
    ) u_rom (
      .clk   (clk),
      .rst_n (rst_n),
      .addr  (addr[g*LUT_IN +: LUT_IN]),
      .data  (lut_word[g])
    );
  end

  always_comb begin
    rom_word = '0;
    for (int g = 0; g < int'(NLUT); g++) rom_word = rom_word + lut_word[g];
  end

  // word framing delayed by one clock to line up with the table output
  logic word_valid, word_first, word_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_valid <= 1'b0;
      word_first <= 1'b0;
      word_last  <= 1'b0;
    end else begin
      word_valid <= active;
      word_first <= active && (bit_cnt == '0);
      word_last  <= active && cnt_last;
    end
  end

  // ---- scaling accumulator ----------------------------------------------
  scaling_acc #(
    .IN_W        (ROM_W),
    .NBITS       (DATA_W),
    .ACC_W       (OUT_W),
    .SIGNED_DATA (SIGNED_DATA)
  ) u_acc (
    .clk          (clk),
    .rst_n        (rst_n),
    .word_valid   (word_valid),
    .first        (word_first),
    .last         (word_last),
    .word         (rom_word),
    .result       (out_data),
    .result_valid (out_valid)
  );

  // ---- rules of the sample interface ------------------------------------
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_ready)
    else $error("da_fir: sample offered while in_ready is low");

endmodule
