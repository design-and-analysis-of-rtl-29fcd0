// ofdm_autocorr: OFDM packet-detection datapath (delay-and-correlate).
//
// Computes, for the short training symbols of an OFDM preamble, the
// autocorrelation between the newest window of La samples and the window L
// samples earlier,
//     c(t) = sum_{k=0}^{La-1} r(t+k) r*(t+k+L),
// the power of the earlier window p(t) = sum |r(t+k)|^2, and the detection
// criterion |c(t)|^2 > Gamma * p(t)^2 (the division of the timing metric is
// avoided). The sums are updated recursively: each new sample gives one
// product r(n-L) r*(n) from one complex multiplier and one power value
// |r(n-L)|^2 from a square look-up table; the products and powers are kept
// in Corr_FIFO and Power_FIFO, and the accumulators add the newest entry
// and subtract the one that leaves the window. One short training symbol
// is L = La = 16 samples at 20 MHz and 8 at 10 MHz; sel_10m picks the
// 8-sample window.
//
// Interface: taps come from the shared shift register and are new when
// in_valid is high. clear empties both FIFOs and accumulators (a rate
// change). One clock after in_valid the accumulators c_re/c_im/p hold the
// new sums; one clock later out_valid pulses with above = (|c|^2 * 2^GF >
// GAMMA * p^2) for that sample. above is only produced once La products
// have been accumulated. Gamma is unsigned fixed point with GF fraction
// bits; its default 0.5 (128/256) with an alpha of 10 consecutive hits is
// the low-threshold/high-count operating point; the exact fixed-point word
// lengths are this design's choice (full precision, no truncation).
module ofdm_autocorr
  import sync_pkg::*;
#(
  parameter int unsigned GF    = 8,
  parameter int unsigned GAMMA = 128,
  localparam int unsigned PW   = 2*SAMPLE_W + 1,   // product component
  localparam int unsigned CW   = PW + 4,           // 16-term sum
  localparam int unsigned SW   = 2*SAMPLE_W,       // sample power
  localparam int unsigned PSW  = SW + 4            // 16-term power sum
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   sel_10m,
  input  logic                   in_valid,
  input  cplx_t                  taps [SREG_DEPTH],
  output logic signed [CW-1:0]   c_re,
  output logic signed [CW-1:0]   c_im,
  output logic [PSW-1:0]         p,
  output logic                   out_valid,
  output logic                   above
);

  localparam int unsigned FD = 16;

  // ---- one complex multiplier: q = r(n-L) * conj(r(n)) -------------------
  cplx_t r_old, r_new;
  logic signed [PW-1:0] q_re, q_im;
  logic [SW-1:0]        pw;
  logic [SW-2:0]        sq_re, sq_im;
  logic [4:0]           win;

  always_comb begin
    win   = sel_10m ? 5'd8 : 5'd16;
    r_new = taps[0];
    r_old = sel_10m ? taps[8] : taps[16];
    q_re  = PW'(r_old.re * r_new.re) + PW'(r_old.im * r_new.im);
    q_im  = PW'(r_old.im * r_new.re) - PW'(r_old.re * r_new.im);
    pw    = SW'(sq_re) + SW'(sq_im);
  end

  square_lut #(.W(SAMPLE_W)) u_sq_re (.x(r_old.re), .x_sq(sq_re));
  square_lut #(.W(SAMPLE_W)) u_sq_im (.x(r_old.im), .x_sq(sq_im));

  // ---- Corr_FIFO / Power_FIFO and the recursive sums ----------------------
  logic signed [PW-1:0] cf_re [FD];
  logic signed [PW-1:0] cf_im [FD];
  logic [SW-1:0]        pf    [FD];
  logic [5:0]           nprod;
  logic                 stage2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < FD; k++) begin
        cf_re[k] <= '0; cf_im[k] <= '0; pf[k] <= '0;
      end
      c_re <= '0; c_im <= '0; p <= '0; nprod <= '0; stage2 <= 1'b0;
    end else if (clear) begin
      for (int k = 0; k < FD; k++) begin
        cf_re[k] <= '0; cf_im[k] <= '0; pf[k] <= '0;
      end
      c_re <= '0; c_im <= '0; p <= '0; nprod <= '0; stage2 <= 1'b0;
    end else begin
      stage2 <= 1'b0;
      if (in_valid) begin
        // the entry leaving the La-sample window sits at index win-1
        c_re <= c_re + CW'(q_re) - CW'(cf_re[win-1]);
        c_im <= c_im + CW'(q_im) - CW'(cf_im[win-1]);
        p    <= p + PSW'(pw) - PSW'(pf[win-1]);
        cf_re[0] <= q_re; cf_im[0] <= q_im; pf[0] <= pw;
        for (int k = 1; k < FD; k++) begin
          cf_re[k] <= cf_re[k-1]; cf_im[k] <= cf_im[k-1]; pf[k] <= pf[k-1];
        end
        if (nprod != 6'd63) nprod <= nprod + 1'b1;
        // a product is meaningful only once r(n-L) is a received sample
        stage2 <= 1'b1;
      end
    end
  end

  // ---- threshold comparison |c|^2 * 2^GF > GAMMA * p^2 ---------------------
  localparam int unsigned MW = 2*CW + GF + 8;
  logic [MW-1:0] lhs, rhs;
  logic [CW-1:0] mag_re, mag_im;

  always_comb begin
    mag_re = c_re[CW-1] ? CW'(-c_re) : CW'(c_re);
    mag_im = c_im[CW-1] ? CW'(-c_im) : CW'(c_im);
    lhs = (MW'(mag_re) * MW'(mag_re) + MW'(mag_im) * MW'(mag_im)) << GF;
    rhs = MW'(GAMMA) * (MW'(p) * MW'(p));
  end

  // nprod counts products whose r(n-L) may still be zero padding; La + L
  // products guarantee both windows hold real samples.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      above     <= 1'b0;
    end else begin
      out_valid <= stage2 && (nprod >= 6'(2*win));
      above     <= stage2 && (nprod >= 6'(2*win)) && (lhs > rhs);
    end
  end

endmodule
