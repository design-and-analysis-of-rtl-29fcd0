// sample_shift_reg: the shared received-sample shift register.
//
// Every accepted ADC sample is shifted in at tap 0; tap k holds the sample
// received k samples earlier. All taps are visible at once, so the OFDM
// autocorrelator (delay taps 8 and 16), the Barker correlator (taps 0..10)
// and the long-preamble correlator of the symbol timing estimator (taps
// 0..31) read the same storage, as in the synchronizer's block diagram
// where the three units share one 32-element register.
//
// Interface: in_valid/in_sample shift one sample per strobe; clear empties
// the register (used when the sampling rate changes, since samples taken at
// the old rate must not be mixed with new ones). taps[k] is registered and
// valid one clock after the strobe; fill counts held samples, saturating at
// DEPTH. Reset and clear set the contents to zero.
module sample_shift_reg
  import sync_pkg::*;
#(
  parameter int unsigned DEPTH = SREG_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          in_valid,
  input  cplx_t                         in_sample,
  output cplx_t                         taps [DEPTH],
  output logic [$clog2(DEPTH+1)-1:0]    fill
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) taps[k] <= '0;
      fill <= '0;
    end else if (clear) begin
      for (int k = 0; k < DEPTH; k++) taps[k] <= '0;
      fill <= '0;
    end else if (in_valid) begin
      taps[0] <= in_sample;
      for (int k = 1; k < DEPTH; k++) taps[k] <= taps[k-1];
      if (fill != DEPTH[$clog2(DEPTH+1)-1:0]) fill <= fill + 1'b1;
    end
  end

endmodule
