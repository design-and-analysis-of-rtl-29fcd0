// ofdm_symbol_timing: OFDM symbol timing (FFT window) estimator.
//
// After an OFDM packet is declared the receiver must find where the guard
// interval in front of the first long training symbol ends. The estimator
// works in two steps:
//   1. end of the short preamble: while the ten short symbols last, the
//      delayed autocorrelation stays above its threshold; once the OFDM
//      detector's criterion has failed N_END times in a row, the short
//      preamble is taken to be over and the search starts (tau_s);
//   2. dynamic search window: the newest 32 samples are cross-correlated
//      with the first half (32 samples) of the known long training symbol,
//          xi(t) = | sum_{k=0}^{31} r(t+k) LT*(k) |^2,
//      a running maximum xi_max is kept, and a counter lambda counts the
//      samples since xi_max last grew (it restarts at 0 when xi exceeds
//      xi_max, and keeps counting on ties). When lambda exceeds P the
//      maximum is accepted: the window length adapts to where the peak is
//      instead of being fixed in advance.
// The reference is quantised to the signs of the long training symbol's I
// and Q (+-1 +- j), so the correlator needs only adders; this and the word
// lengths are this design's choice.
//
// Interface: start (one clock) arms the estimator; in_valid marks new taps
// of the shared shift register; ac_valid/ac_above are the OFDM detector's
// per-sample criterion results. At the declaration, tau_valid pulses for one
// clock and tau_back gives how many samples before the newest one the last
// guard-interval sample lies (lambda + 32), i.e. the FFT window of the first
// long symbol starts tau_back - 1 samples before the newest sample. busy is
// high from start until tau_valid. xi is registered one clock after
// in_valid. N_END = 8 and P = 48 are this design's choices.
module ofdm_symbol_timing
  import sync_pkg::*;
#(
  parameter int unsigned N_END = 8,
  parameter int unsigned P     = 48,
  localparam int unsigned AW   = SAMPLE_W + 7,     // 32 terms of +-(re +- im)
  localparam int unsigned XW   = 2*AW,
  localparam int unsigned LW   = $clog2(P + 2) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             in_valid,
  input  cplx_t            taps [SREG_DEPTH],
  input  logic             ac_valid,
  input  logic             ac_above,
  output logic             busy,
  output logic             searching,
  output logic             tau_valid,
  output logic [LW:0]      tau_back,
  output logic [XW-1:0]    xi,
  output logic [XW-1:0]    xi_max
);

  localparam int unsigned LL = 32;

  typedef enum logic [1:0] {IDLE, WAIT_END, SEARCH} state_t;
  state_t state;

  // ---- cross-correlation with the sign-quantised long training symbol ----
  logic signed [AW-1:0] x_re, x_im;
  always_comb begin
    x_re = '0;
    x_im = '0;
    for (int k = 0; k < LL; k++) begin
      // r * conj(sr + j si) = (a sr + b si) + j (b sr - a si)
      automatic logic signed [AW-1:0] a = AW'(taps[LL-1-k].re);
      automatic logic signed [AW-1:0] b = AW'(taps[LL-1-k].im);
      x_re = x_re + (LTS_RE_NEG[k] ? -a : a) + (LTS_IM_NEG[k] ? -b : b);
      x_im = x_im + (LTS_RE_NEG[k] ? -b : b) - (LTS_IM_NEG[k] ? -a : a);
    end
  end

  logic xi_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xi <= '0; xi_valid <= 1'b0;
    end else begin
      xi_valid <= in_valid;
      if (in_valid) xi <= XW'(x_re * x_re) + XW'(x_im * x_im);
    end
  end

  // ---- control: end of short preamble, then dynamic search window -------
  logic [$clog2(N_END+1)-1:0] low_run;
  logic [LW-1:0]              lambda;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; low_run <= '0; lambda <= '0; xi_max <= '0;
      tau_valid <= 1'b0; tau_back <= '0;
    end else begin
      tau_valid <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= WAIT_END; low_run <= '0;
        end
        WAIT_END: if (ac_valid) begin
          if (ac_above) low_run <= '0;
          else if (low_run == ($clog2(N_END+1))'(N_END - 1)) begin
            state  <= SEARCH;
            xi_max <= '0;
            lambda <= '0;
          end else low_run <= low_run + 1'b1;
        end
        SEARCH: if (xi_valid) begin
          if (xi > xi_max) begin
            xi_max <= xi;
            lambda <= '0;
          end else if (lambda == LW'(P)) begin
            // lambda becomes P+1 > P: accept the maximum
            tau_valid <= 1'b1;
            tau_back  <= (LW+1)'(lambda) + (LW+1)'(LL + 1);
            state     <= IDLE;
          end else begin
            lambda <= lambda + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy      = (state != IDLE);
  assign searching = (state == SEARCH);

endmodule
