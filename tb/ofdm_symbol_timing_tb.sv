// ofdm_symbol_timing_tb: self-checking test of the symbol timing estimator.
// An 802.11a/g preamble is generated on the 20 MHz grid (short symbols at
// indices 0..159, guard 160..191, long symbols from 192) and followed by
// random data. The OFDM detector's per-sample result is modelled as "above
// threshold" up to index END_IDX. Checks:
//   * xi for every sample against a correlation computed here with the long
//     training symbol's signs derived from its defining sum (not the RTL's
//     constant);
//   * the search starts at the N_END-th low result, and tau_valid pulses
//     exactly P+1 samples after the (first) maximum of xi over the search;
//   * the declared last guard sample is index 191 for a clean preamble and
//     lies in 177..192 with noise added.
module ofdm_symbol_timing_tb;
  import sync_pkg::*;
  import preamble_gen_pkg::*;

  localparam int N_END = 8, P = 48, END_IDX = 166, LEAD = 40;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_valid = 1'b0;
  logic  ac_valid = 1'b0, ac_above = 1'b0;
  cplx_t taps [SREG_DEPTH];
  logic  busy, searching, tau_valid;
  logic [7:0]  tau_back;
  logic [29:0] xi, xi_max;
  int checks = 0, failures = 0;

  ofdm_symbol_timing #(.N_END(N_END), .P(P)) dut (
    .clk, .rst_n, .start, .in_valid, .taps, .ac_valid, .ac_above,
    .busy, .searching, .tau_valid, .tau_back, .xi, .xi_max);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sre [SREG_DEPTH], sim [SREG_DEPTH];
  int lre [32], lim [32];

  function automatic longint ref_xi();
    longint a = 0, b = 0;
    for (int k = 0; k < 32; k++) begin
      // r(k) * conj(sign LT(k)); tap 31 is the oldest sample, k = 0
      a += sre[31-k]*lre[k] + sim[31-k]*lim[k];
      b += sim[31-k]*lre[k] - sre[31-k]*lim[k];
    end
    return a*a + b*b;
  endfunction

  task automatic run_packet(real scale, int noise, bit exact);
    int re, im, idx, low, s0, found_at, back, mx_idx;
    longint e_xi, mx;
    bit got;
    for (int k = 0; k < SREG_DEPTH; k++) begin sre[k] = 0; sim[k] = 0; end
    low = 0; s0 = -1; got = 0; mx = -1; mx_idx = -1; found_at = -1; back = 0;
    for (int n = 0; n < LEAD + 420; n++) begin
      idx = n - LEAD;
      if (idx < 0) begin re = 0; im = 0; end
      else if (idx < 320) ofdm_preamble(idx, scale, re, im);
      else begin re = $urandom_range(0, 160) - 80; im = $urandom_range(0, 160) - 80; end
      re += (noise > 0) ? $urandom_range(0, 2*noise) - noise : 0;
      im += (noise > 0) ? $urandom_range(0, 2*noise) - noise : 0;
      re = (re > 127) ? 127 : (re < -128 ? -128 : re);
      im = (im > 127) ? 127 : (im < -128 ? -128 : im);
      for (int k = SREG_DEPTH-1; k > 0; k--) begin sre[k] = sre[k-1]; sim[k] = sim[k-1]; end
      sre[0] = re; sim[0] = im;
      @(negedge clk);
      for (int k = 0; k < SREG_DEPTH; k++) begin taps[k].re = 8'(sre[k]); taps[k].im = 8'(sim[k]); end
      in_valid = 1'b1;
      start    = (idx == 60);
      ac_valid = (idx > 60);
      ac_above = (idx <= END_IDX);
      e_xi = ref_xi();
      // model of the search
      if (s0 >= 0 && !got && found_at < 0) begin
        if (e_xi > mx) begin mx = e_xi; mx_idx = idx; end
        else if (idx - mx_idx == P + 1) found_at = idx;
      end
      if (s0 < 0 && idx > 60) begin
        if (idx <= END_IDX) low = 0;
        else begin low++; if (low == N_END) s0 = idx; end
        if (s0 >= 0) begin mx = e_xi; mx_idx = idx; end
      end
      @(posedge clk); #1;
      checks++;
      if (longint'(xi) != e_xi) begin
        failures++; if (failures < 10) $display("xi mismatch idx %0d: %0d vs %0d", idx, xi, e_xi);
      end
      if (tau_valid) begin
        // tau_valid reports the sample one clock earlier (xi is registered)
        checks += 2;
        got  = 1;
        back = tau_back;
        if (idx - 1 != found_at) begin
          failures++; $display("tau_valid at idx %0d, model %0d", idx - 1, found_at);
        end
        if (longint'(xi_max) != mx) begin failures++; $display("xi_max %0d vs %0d", xi_max, mx); end
        $display("scale %0.1f noise %0d: search from %0d, max at %0d, last guard sample %0d",
                 scale, noise, s0, mx_idx, idx - 1 - back);
        checks++;
        if (exact ? (idx - 1 - back != 191) : (idx - 1 - back < 177 || idx - 1 - back > 192)) begin
          failures++; $display("symbol timing %0d out of range", idx - 1 - back);
        end
      end
    end
    @(negedge clk); in_valid = 1'b0; start = 1'b0; ac_valid = 1'b0;
    checks++;
    if (!got) begin failures++; $display("no symbol timing declared"); end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
  endtask

  initial begin
    real r, i;
    for (int k = 0; k < 32; k++) begin
      lt_sample(k, r, i);
      lre[k] = (r < 0.0) ? -1 : 1;
      lim[k] = (i < 0.0) ? -1 : 1;
    end
    for (int k = 0; k < SREG_DEPTH; k++) taps[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_packet(12.0, 0, 1'b1);
    run_packet(12.0, 20, 1'b0);
    run_packet(8.0, 30, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
