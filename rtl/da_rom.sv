// Distributed-arithmetic look-up table (coefficient-sum ROM).
//
// The table replaces the multipliers and adder tree of a TAPS-input
// multiply-accumulate: its address holds one bit of every tap (tap 0, the
// newest sample, in address bit 0), and the entry at address a is the sum of
// COEFS[FIRST+i] over every bit i that is set in a. Address 0 gives 0,
// address 1 gives COEFS[FIRST], address all-ones the sum of all its
// coefficients. The table is computed at elaboration from the COEFS
// parameter, so changing the filter only means changing the parameter.
//
// A filter with more taps than one table should serve is split into several
// tables: each gets the whole coefficient list (N_COEFS entries) and the
// index FIRST of its first tap; taps beyond the end of the list count as 0.
//
// Timing: registered output, `data` holds the entry of the address presented
// one clock earlier.
module da_rom #(
  parameter int unsigned TAPS   = dwt_pkg::TAPS,
  parameter int unsigned COEF_W = dwt_pkg::COEF_W,
  parameter int unsigned OUT_W  = COEF_W + $clog2(TAPS),
  parameter int unsigned N_COEFS = TAPS,
  parameter int unsigned FIRST   = 0,
  parameter logic signed [COEF_W-1:0] COEFS [N_COEFS] = dwt_pkg::LO_D
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [TAPS-1:0]         addr,
  output logic signed [OUT_W-1:0] data
);

  typedef logic signed [OUT_W-1:0] entry_t;
  typedef entry_t table_t [2**TAPS];

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < 2**TAPS; a++) begin
      t[a] = '0;
      for (int i = 0; i < int'(TAPS); i++)
        if (a[i] && (FIRST + i < N_COEFS)) t[a] = t[a] + OUT_W'(COEFS[FIRST + i]);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data <= '0;
    else        data <= TABLE[addr];
  end

endmodule
