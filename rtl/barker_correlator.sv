// barker_correlator: DSSS de-spreader producing the correlation power d(t).
//
//     d(t) = | sum_{k=0}^{10} r(t+k) b(k) |^2,  b = {+ - + + - + + + - - -}
//
// The 11 newest samples of the shared shift register are multiplied by the
// +/-1 Barker chips (an add or a subtract, no multiplier) for I and Q, and
// the squared magnitudes of the two sums are added. The oldest sample of
// the window, tap 10, meets chip b(0). At the 10 MHz detection rate the
// 11-chip code does not line up with the samples exactly, so the peaks
// vary in height from symbol to symbol; the DSSS peak/valley test that
// follows is built to tolerate that.
//
// Interface: in_valid marks new taps; one clock later out_valid pulses
// with d for that window. Full precision throughout.
module barker_correlator
  import sync_pkg::*;
#(
  localparam int unsigned AW = SAMPLE_W + 4,       // 11-term sum
  localparam int unsigned DW = 2*AW                // |sum|^2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  cplx_t           taps [SREG_DEPTH],
  output logic            out_valid,
  output logic [DW-1:0]   d
);

  localparam int unsigned LB = 11;

  logic signed [AW-1:0] acc_re, acc_im;

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int k = 0; k < LB; k++) begin
      if (BARKER_NEG[k]) begin
        acc_re = acc_re - AW'(taps[LB-1-k].re);
        acc_im = acc_im - AW'(taps[LB-1-k].im);
      end else begin
        acc_re = acc_re + AW'(taps[LB-1-k].re);
        acc_im = acc_im + AW'(taps[LB-1-k].im);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      d         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) d <= DW'(acc_re * acc_re) + DW'(acc_im * acc_im);
    end
  end

endmodule
