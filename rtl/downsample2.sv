// Decimation by two of a strobed sample stream.
//
// Every sample that arrives with `in_valid` toggles a phase bit; samples that
// arrive while the phase equals KEEP_PHASE are passed on, the others are
// dropped. With KEEP_PHASE = 0 the first sample after reset and every second
// one after it are kept (sample indices 0, 2, 4, ...); which phase to keep is
// this design's choice. Output is registered: `out_valid` pulses one clock
// after the kept `in_valid`, and `out_data` holds until the next kept sample.
module downsample2 #(
  parameter int unsigned W          = 16,
  parameter bit          KEEP_PHASE = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  logic phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && (phase == KEEP_PHASE);
      if (in_valid) begin
        phase <= ~phase;
        if (phase == KEEP_PHASE) out_data <= in_data;
      end
    end
  end

endmodule
