// ofdm_autocorr_tb: self-checking test of the OFDM delay-and-correlate
// datapath. Samples are random noise interleaved with periodic bursts
// (period 8 in the 10 MHz phase, period 16 in the 20 MHz phase, as the
// short training symbols are). For every sample the sums
//     c = sum_{k} r(n-L-k) r*(n-k),  p = sum_k |r(n-L-k)|^2   (La terms)
// are recomputed here directly from the sample history, not recursively,
// and compared with c_re/c_im/p one clock after in_valid; out_valid and
// above = |c|^2*256 > GAMMA*p^2 are checked two clocks after in_valid, and
// only once La+L samples have been received since the last clear.
module ofdm_autocorr_tb;
  import sync_pkg::*;

  localparam int GAMMA = 102;

  logic  clk = 1'b0, rst_n = 1'b0, clear = 1'b0, sel_10m = 1'b1, in_valid = 1'b0;
  cplx_t taps [SREG_DEPTH];
  logic signed [20:0] c_re, c_im;
  logic [19:0] p;
  logic out_valid, above;
  int checks = 0, failures = 0, n_above = 0, n_below = 0;

  ofdm_autocorr #(.GAMMA(GAMMA)) dut (.clk, .rst_n, .clear, .sel_10m, .in_valid, .taps,
                                      .c_re, .c_im, .p, .out_valid, .above);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hre [$], him [$];    // samples since the last clear, oldest first

  function automatic int sre(int j); return (j >= 0) ? hre[j] : 0; endfunction
  function automatic int sim(int j); return (j >= 0) ? him[j] : 0; endfunction

  longint e_cre, e_cim, e_p;
  bit     e_ok, e_above;
  // expectations two clocks deep
  bit     v1, v2, ok2, ab2;

  task automatic push(int re, int im, int L);
    int n;
    hre.push_back(re); him.push_back(im);
    n = hre.size() - 1;
    for (int k = 0; k < SREG_DEPTH; k++) begin
      taps[k].re = 8'(sre(n - k));
      taps[k].im = 8'(sim(n - k));
    end
    e_cre = 0; e_cim = 0; e_p = 0;
    for (int j = n - L + 1; j <= n; j++) begin
      if (j < 0) continue;
      // r(j-L) * conj(r(j))
      e_cre += sre(j-L)*sre(j) + sim(j-L)*sim(j);
      e_cim += sim(j-L)*sre(j) - sre(j-L)*sim(j);
      e_p   += sre(j-L)*sre(j-L) + sim(j-L)*sim(j-L);
    end
    e_ok    = (hre.size() >= 2*L);
    e_above = e_ok && ((e_cre*e_cre + e_cim*e_cim) * 256 > longint'(GAMMA) * e_p * e_p);
  endtask

  task automatic run_phase(bit ten, int nsamp, bit every_cycle);
    int L = ten ? 8 : 16;
    int per_re [16], per_im [16];
    for (int s = 0; s < nsamp; s++) begin
      @(negedge clk);
      in_valid = every_cycle ? 1'b1 : ($urandom_range(0, 1) == 1);
      if (in_valid) begin
        if ((s / 60) % 2 == 1) begin
          if (s % 60 == 0)
            for (int k = 0; k < 16; k++) begin
              per_re[k] = $urandom_range(0, 200) - 100;
              per_im[k] = $urandom_range(0, 200) - 100;
            end
          push(per_re[s % L] + $urandom_range(0, 6) - 3, per_im[s % L] + $urandom_range(0, 6) - 3, L);
        end else begin
          push($urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128, L);
        end
      end
      @(posedge clk); #1;
      // c/p one clock after in_valid
      if (in_valid) begin
        checks += 3;
        if (longint'(c_re) != e_cre || longint'(c_im) != e_cim || longint'(p) != e_p) begin
          failures++;
          if (failures < 10) $display("sum mismatch s=%0d: c=(%0d,%0d) p=%0d exp (%0d,%0d) %0d",
                                      s, c_re, c_im, p, e_cre, e_cim, e_p);
        end
      end
      // out_valid/above for the sample of the previous clock
      checks += 2;
      if (out_valid != (v2 && ok2)) begin failures++; $display("out_valid mismatch s=%0d", s); end
      if (above != (v2 && ab2)) begin failures++; $display("above mismatch s=%0d", s); end
      if (out_valid && above) n_above++;
      if (out_valid && !above) n_below++;
      v2 = in_valid; ok2 = e_ok; ab2 = e_above;
    end
  endtask

  initial begin
    for (int k = 0; k < SREG_DEPTH; k++) taps[k] = '0;
    v2 = 0; ok2 = 0; ab2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_phase(1'b1, 1500, 1'b0);
    // rate change: clear and switch to the 16-sample window at 20 MHz
    @(negedge clk);
    in_valid = 1'b0; clear = 1'b1; sel_10m = 1'b0;
    hre.delete(); him.delete();
    @(posedge clk); #1;
    @(negedge clk); clear = 1'b0;
    v2 = 0;
    @(posedge clk); #1;
    run_phase(1'b0, 1500, 1'b1);
    run_phase(1'b0, 500, 1'b0);
    checks++;
    if (n_above < 50 || n_below < 50) begin
      failures++; $display("poor coverage: above=%0d below=%0d", n_above, n_below);
    end
    $display("above=%0d below=%0d", n_above, n_below);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
