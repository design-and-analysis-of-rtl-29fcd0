// detection_stats_tb: detection statistics of the synchronizer over a
// fading channel, at its default parameters.
//
// Packets pass through a 3-path Rayleigh channel (paths at 0, 50 and 100 ns
// with powers 1, e^-1, e^-2, an exponential profile of about 50 ns rms
// spread, new complex Gaussian gains per packet), a 50 ppm carrier offset at
// 2.4 GHz (120 kHz) and Gaussian noise at a set SNR per sample. For each
// SNR the testbench sends OFDM packets (802.11a/g preamble + data) and DSSS
// packets (Barker-spread long preamble) and counts:
//   * OFDM loss (no OFDM declaration), DSSS loss, wrong-type declarations;
//   * OFDM symbol timing errors (last guard sample outside 177..192);
// and it runs pure noise to count false alarms. The rates are printed. The
// pass criteria are loose bounds that the algorithm must meet: at the
// highest SNR at most 10 % OFDM loss, 25 % DSSS loss (wrong-type
// declarations included; multipath spreads the Barker peak at the 10 MHz
// detection rate, so some channel draws defeat the peak/valley test) and
// 20 % timing errors, no false alarm in the noise-only run, and a loss rate
// at the highest SNR no larger than at the lowest.
module detection_stats_tb;
  import sync_pkg::*;
  import preamble_gen_pkg::*;

  localparam int N_PKT = 16;
  localparam int N_SNR = 4;
  localparam real SNR_DB [N_SNR] = '{0.0, 4.0, 8.0, 20.0};

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, restart = 1'b0, dsss_acq_done = 1'b0;
  cplx_t in_sample = '0;
  rate_t rate_req;
  pkt_t  mode;
  logic  sel_10m, locked, ofdm_detected, dsss_detected, tau_valid;
  logic [7:0] tau_back;
  logic  data_valid_ofdm, data_valid_dsss;
  cplx_t data_out;
  int checks = 0, failures = 0;

  packet_sync_top dut (.clk, .rst_n, .in_valid, .in_sample, .restart, .dsss_acq_done,
                       .rate_req, .sel_10m, .mode, .locked, .ofdm_detected, .dsss_detected,
                       .tau_valid, .tau_back, .data_valid_ofdm, .data_valid_dsss, .data_out);

  always #25 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- random numbers --------------------------------------------------------
  function automatic real urand();
    return (real'($urandom_range(0, 32'h7fff_fffe)) + 1.0) / 2147483648.0;
  endfunction
  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand())) * $cos(2.0 * PI * urand());
  endfunction

  // ---- channel and signal ------------------------------------------------------
  int  kind = 0, pkt_start = 0, t = 0;
  real sigma = 1.0;
  real h_re [3], h_im [3];
  bit  dsss_bits [200];
  real ofdm_re [320], ofdm_im [320];   // unquantised preamble
  localparam real OFDM_SCALE = 10.0, DSSS_AMP = 40.0;
  localparam real CFO_RAD = 2.0 * PI * 120.0e3 / 20.0e6;

  function automatic void tx(int idx, output real re, output real im);
    re = 0.0; im = 0.0;
    if (idx < 0) return;
    if (kind == 1) begin
      if (idx < 320) begin re = ofdm_re[idx]; im = ofdm_im[idx]; end
      else begin re = 40.0 * gauss(); im = 40.0 * gauss(); end
    end else if (kind == 2) begin
      int c = (idx * 11) / 20;
      re = DSSS_AMP * (dsss_bits[(c / 11) % 200] ? 1.0 : -1.0) * (barker_neg(c % 11) ? -1.0 : 1.0);
    end
  endfunction

  function automatic void rx(int tt, output int qre, output int qim);
    real yr = 0.0, yi = 0.0, xr, xi, ph;
    for (int l = 0; l < 3; l++) begin
      tx(tt - pkt_start - l, xr, xi);
      yr += h_re[l]*xr - h_im[l]*xi;
      yi += h_re[l]*xi + h_im[l]*xr;
    end
    ph = CFO_RAD * tt;
    xr = yr*$cos(ph) - yi*$sin(ph) + sigma * gauss();
    xi = yr*$sin(ph) + yi*$cos(ph) + sigma * gauss();
    qre = sat8(xr);
    qim = sat8(xi);
  endfunction

  function automatic void new_channel();
    real pw [3] = '{1.0, 0.3679, 0.1353}, norm = 0.0;
    foreach (pw[l]) norm += pw[l];
    for (int l = 0; l < 3; l++) begin
      h_re[l] = gauss() * $sqrt(pw[l] / norm / 2.0);
      h_im[l] = gauss() * $sqrt(pw[l] / norm / 2.0);
    end
  endfunction

  // ---- monitors --------------------------------------------------------------------
  int cyc = 0, det_ofdm = -1, det_dsss = -1, gi = -1;
  int tick_at [int];
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ofdm_detected) det_ofdm = t - pkt_start;
    if (dsss_detected) det_dsss = t - pkt_start;
    if (tau_valid) gi = tick_at[cyc - 3] - int'(tau_back) - pkt_start;
  end

  task automatic advance(int n);
    int re, im;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = (rate_req == RATE_10M) ? (t % 2 == 0) : 1'b1;
      rx(t, re, im);
      in_sample.re = 8'(re);
      in_sample.im = 8'(im);
      if (in_valid) tick_at[cyc] = t;
      t++;
    end
    @(negedge clk); in_valid = 1'b0;
  endtask

  task automatic do_restart();
    @(negedge clk); restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    tick_at.delete();
  endtask

  initial begin
    real ps_ofdm = 0.0, ps_dsss, snr;
    int  o_loss [N_SNR], d_loss [N_SNR], wrong [N_SNR], terr [N_SNR], fa;
    real re, im;
    for (int n = 0; n < 320; n++) begin
      if (n < 160)      st_sample(n % 16, re, im);
      else if (n < 192) lt_sample(n - 160 + 32, re, im);
      else              lt_sample((n - 192) % 64, re, im);
      ofdm_re[n] = OFDM_SCALE * re; ofdm_im[n] = OFDM_SCALE * im;
      ps_ofdm += (ofdm_re[n]**2 + ofdm_im[n]**2) / 320.0;
    end
    ps_dsss = DSSS_AMP ** 2;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // false alarms on noise only (the metrics do not depend on the noise level)
    kind = 0; sigma = 20.0; h_re = '{1.0, 0.0, 0.0}; h_im = '{0.0, 0.0, 0.0};
    det_ofdm = -1; det_dsss = -1; fa = 0;
    for (int r = 0; r < 20; r++) begin
      advance(2000);
      if (det_ofdm != -1 || det_dsss != -1) begin
        fa++; det_ofdm = -1; det_dsss = -1; do_restart();
      end
    end
    $display("noise only: %0d false alarms in 40000 samples at 20 MHz", fa);

    for (int s = 0; s < N_SNR; s++) begin
      snr = 10.0 ** (SNR_DB[s] / 10.0);
      o_loss[s] = 0; d_loss[s] = 0; wrong[s] = 0; terr[s] = 0;
      for (int p = 0; p < N_PKT; p++) begin
        // OFDM packet
        kind = 1; new_channel(); sigma = $sqrt(ps_ofdm / snr / 2.0);
        pkt_start = t + 200 + $urandom_range(0, 7);
        det_ofdm = -1; det_dsss = -1; gi = -1;
        advance(1000);
        if (det_dsss != -1 && det_ofdm == -1) wrong[s]++;
        if (det_ofdm < 0 || det_ofdm >= 320) o_loss[s]++;
        else if (gi < 177 || gi > 192) terr[s]++;
        do_restart();
        // DSSS packet
        kind = 2; new_channel(); sigma = $sqrt(ps_dsss / snr / 2.0);
        foreach (dsss_bits[i]) dsss_bits[i] = 1'($urandom);
        pkt_start = t + 200 + $urandom_range(0, 19);
        det_ofdm = -1; det_dsss = -1;
        advance(2000);
        if (det_ofdm != -1 && det_dsss == -1) wrong[s]++;
        if (det_dsss < 0) d_loss[s]++;
        do_restart();
      end
      $display("SNR %4.1f dB: OFDM loss %0d/%0d, timing errors %0d/%0d, DSSS loss %0d/%0d, wrong type %0d",
               SNR_DB[s], o_loss[s], N_PKT, terr[s], N_PKT - o_loss[s], d_loss[s], N_PKT, wrong[s]);
    end

    checks += 5;
    if (fa != 0) begin failures++; $display("false alarms on noise"); end
    if (o_loss[N_SNR-1] * 10 > N_PKT) begin failures++; $display("OFDM loss too high at top SNR"); end
    if (d_loss[N_SNR-1] * 4 > N_PKT)  begin failures++; $display("DSSS loss too high at top SNR"); end
    if (terr[N_SNR-1] * 5 > N_PKT)    begin failures++; $display("timing errors too frequent at top SNR"); end
    if (o_loss[N_SNR-1] > o_loss[0] || d_loss[N_SNR-1] > d_loss[0]) begin
      failures++; $display("loss grows with SNR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
