// packet_sync_top_tb: end-to-end test of the packet synchronizer at its
// default parameters.
//
// The testbench plays the ADC and the sampling-clock generator: a received
// signal is defined on a 20 MHz time grid, and the ADC takes every second
// grid point while the synchronizer requests 10 MHz and every point once it
// requests 20 MHz (the 22/11 MHz DSSS rates are only checked as requests;
// samples then keep arriving every clock for the output MUX). Scenarios:
//   1. noise only: no packet may be declared, although single threshold
//      crossings of the OFDM metric occur and must be rejected by the count;
//   2. OFDM packets (802.11a/g preamble + random data) at two noise levels:
//      OFDM must be declared during the short preamble at 10 MHz, the rate
//      must switch to 20 MHz, the end of the short preamble must be found,
//      and the declared last guard-interval sample must lie in 177..192 of
//      the packet (191 is exact); samples must then be routed to the OFDM
//      output;
//   3. DSSS packets (long-sync preamble, Barker spread, carrier phase):
//      DSSS must be declared, 22 MHz requested, 11 MHz after
//      dsss_acq_done, and samples routed to the DSSS output;
//   4. a simultaneous declaration: during one more OFDM packet the DSSS
//      FSM's declare line is forced to copy the OFDM one, so both detectors
//      declare in the same clock; OFDM must win and no DSSS declaration
//      may come out.
// restart ends each packet. Every mechanism is counted and a mechanism that
// never happened is a failure.
module packet_sync_top_tb;
  import sync_pkg::*;
  import preamble_gen_pkg::*;

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

  always #25 clk = ~clk;   // 20 MHz

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters -------------------------------------------------
  int cyc = 0;
  int m_ofdm_det = 0, m_dsss_det = 0, m_to20 = 0, m_to22 = 0, m_to11 = 0;
  int m_flush = 0, m_end_short = 0, m_tau = 0, m_restart = 0;
  int m_mux_ofdm = 0, m_mux_dsss = 0, m_reject_ofdm = 0, m_reject_dsss = 0, m_tie = 0;
  rate_t prev_rate = RATE_10M;
  logic  prev_search = 1'b0;
  int    ofdm_hit_run = 0;
  int    det_ofdm = -1, det_dsss = -1, gi = -1;   // per packet, grid samples

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ofdm_detected) begin m_ofdm_det++; det_ofdm = t - pkt_start; end
    if (dsss_detected) begin m_dsss_det++; det_dsss = t - pkt_start; end
    // the newest sample when tau_valid shows was sent 3 clocks earlier
    if (tau_valid) gi = tick_at[cyc - 3] - int'(tau_back) - pkt_start;
    if (rate_req != prev_rate) begin
      if (rate_req == RATE_20M) m_to20++;
      if (rate_req == RATE_22M) m_to22++;
      if (rate_req == RATE_11M) m_to11++;
    end
    prev_rate <= rate_req;
    if (dut.flush) m_flush++;
    if (dut.u_timing.searching && !prev_search) m_end_short++;
    prev_search <= dut.u_timing.searching;
    if (tau_valid) m_tau++;
    if (data_valid_ofdm) m_mux_ofdm++;
    if (data_valid_dsss) m_mux_dsss++;
    // OFDM metric above threshold but the run broken before alpha: rejected
    if (dut.ac_valid && dut.detect_en) begin
      if (dut.ac_above) ofdm_hit_run <= ofdm_hit_run + 1;
      else begin
        if (ofdm_hit_run > 0 && ofdm_hit_run < 10) m_reject_ofdm++;
        ofdm_hit_run <= 0;
      end
    end
    if (dut.sym_valid && dut.detect_en && !dut.sym_hit) m_reject_dsss++;
    if (dut.ofdm_decl && dut.dsss_decl && dut.detect_en) m_tie++;
  end

  // ---- received signal on the 20 MHz grid ------------------------------------
  // kind 0: noise, 1: OFDM packet starting at pkt_start, 2: DSSS packet
  int  kind = 0, pkt_start = 0, noise = 4;
  real scale = 12.0;
  bit  dsss_bits [200];

  function automatic void signal(int t, output int re, output int im);
    int idx = t - pkt_start;
    re = 0; im = 0;
    if (kind == 1 && idx >= 0) begin
      if (idx < 320) ofdm_preamble(idx, scale, re, im);
      else begin re = $urandom_range(0, 120) - 60; im = $urandom_range(0, 120) - 60; end
    end else if (kind == 2 && idx >= 0) begin
      int c = (idx * 11) / 20;              // chip index at 11 MHz
      int v = (dsss_bits[(c / 11) % 200] ? 1 : -1) * (barker_neg(c % 11) ? -1 : 1);
      re = $rtoi(v * 60.0 * 0.866);         // 30 degree carrier phase
      im = $rtoi(v * 60.0 * 0.5);
    end
    re += $urandom_range(0, 2*noise) - noise;
    im += $urandom_range(0, 2*noise) - noise;
    re = (re > 127) ? 127 : (re < -128 ? -128 : re);
    im = (im > 127) ? 127 : (im < -128 ? -128 : im);
  endfunction

  int tick_at [int];   // clock cycle -> grid index of the sample sent then
  int t = 0;

  // run the grid for n ticks, sampling at the requested rate
  task automatic advance(int n);
    int re, im;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = (rate_req == RATE_10M) ? (t % 2 == 0) : 1'b1;
      signal(t, re, im);
      in_sample.re = 8'(re);
      in_sample.im = 8'(im);
      if (in_valid) tick_at[cyc] = t;
      t++;
    end
    @(negedge clk); in_valid = 1'b0;
  endtask

  task automatic do_restart();
    m_restart++;
    @(negedge clk); restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (rate_req != RATE_10M || mode != PKT_NONE) begin failures++; $display("restart did not return to detection"); end
  endtask

  task automatic ofdm_packet(real sc, int nz, bit exact);
    int det_t, d0 = m_ofdm_det, dd0 = m_dsss_det;
    kind = 1; scale = sc; noise = nz; pkt_start = t + 300;
    det_ofdm = -1; gi = -1;
    advance(1100);
    #1;
    det_t = det_ofdm;
    checks += 5;
    if (m_ofdm_det != d0 + 1 || m_dsss_det != dd0) begin failures++; $display("OFDM: wrong declarations"); end
    if (det_t < 0 || det_t >= 160) begin failures++; $display("OFDM declared at %0d, not in the short preamble", det_t); end
    if (!locked || mode != PKT_OFDM || rate_req != RATE_20M) begin failures++; $display("OFDM: not locked at 20 MHz"); end
    if (exact ? (gi != 191) : (gi < 177 || gi > 192)) begin failures++; $display("OFDM: last guard sample %0d", gi); end
    if (!(m_mux_ofdm > 0)) begin failures++; $display("OFDM: no samples routed"); end
    $display("OFDM scale %0.1f noise %0d: declared at preamble sample %0d, last guard sample %0d",
             sc, nz, det_t, gi);
    do_restart();
    kind = 0;
    advance(200);
  endtask

  task automatic dsss_packet(int nz);
    int det_t, d0 = m_dsss_det, o0 = m_ofdm_det;
    foreach (dsss_bits[i]) dsss_bits[i] = 1'($urandom);
    kind = 2; noise = nz; pkt_start = t + 300;
    det_dsss = -1;
    advance(2900);
    #1;
    det_t = det_dsss;
    checks += 2;
    if (m_dsss_det != d0 + 1 || m_ofdm_det != o0) begin failures++; $display("DSSS: wrong declarations"); end
    if (rate_req != RATE_22M || mode != PKT_DSSS) begin failures++; $display("DSSS: no 22 MHz request"); end
    $display("DSSS noise %0d: declared %0d grid samples (%0d us) into the preamble", nz, det_t, det_t / 20);
    @(negedge clk); dsss_acq_done = 1'b1;
    @(negedge clk); dsss_acq_done = 1'b0;
    advance(100);
    checks++;
    if (rate_req != RATE_11M || !locked) begin failures++; $display("DSSS: not locked at 11 MHz"); end
    do_restart();
    kind = 0;
    advance(200);
  endtask

  initial begin
    int o0, d0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // 1. noise only, no declaration allowed
    kind = 0; noise = 40;
    o0 = m_ofdm_det; d0 = m_dsss_det;
    advance(8000);
    checks++;
    if (m_ofdm_det != o0 || m_dsss_det != d0) begin failures++; $display("false alarm on noise"); end
    // 2. OFDM packets
    ofdm_packet(12.0, 4, 1'b1);
    ofdm_packet(10.0, 25, 1'b0);
    // 3. DSSS packets
    dsss_packet(4);
    dsss_packet(40);
    // OFDM again after DSSS
    ofdm_packet(12.0, 10, 1'b0);
    // 4. both detectors declare in the same clock
    force dut.dsss_decl = dut.ofdm_decl;
    ofdm_packet(12.0, 10, 1'b0);
    release dut.dsss_decl;

    $display("mechanisms: ofdm_det=%0d dsss_det=%0d to20=%0d to22=%0d to11=%0d flush=%0d end_short=%0d tau=%0d restart=%0d mux_ofdm=%0d mux_dsss=%0d reject_ofdm=%0d reject_dsss=%0d tie=%0d",
             m_ofdm_det, m_dsss_det, m_to20, m_to22, m_to11, m_flush, m_end_short, m_tau,
             m_restart, m_mux_ofdm, m_mux_dsss, m_reject_ofdm, m_reject_dsss, m_tie);
    checks += 14;
    if (m_restart == 0)     begin failures++; $display("never: restart"); end
    if (m_ofdm_det == 0)    begin failures++; $display("never: OFDM detection"); end
    if (m_dsss_det == 0)    begin failures++; $display("never: DSSS detection"); end
    if (m_to20 == 0)        begin failures++; $display("never: switch to 20 MHz"); end
    if (m_to22 == 0)        begin failures++; $display("never: switch to 22 MHz"); end
    if (m_to11 == 0)        begin failures++; $display("never: switch to 11 MHz"); end
    if (m_flush == 0)       begin failures++; $display("never: flush"); end
    if (m_end_short == 0)   begin failures++; $display("never: end of short preamble"); end
    if (m_tau == 0)         begin failures++; $display("never: symbol timing"); end
    if (m_mux_ofdm == 0)    begin failures++; $display("never: OFDM routing"); end
    if (m_mux_dsss == 0)    begin failures++; $display("never: DSSS routing"); end
    if (m_reject_ofdm == 0) begin failures++; $display("never: rejected OFDM threshold crossing"); end
    if (m_reject_dsss == 0) begin failures++; $display("never: rejected DSSS symbol"); end
    if (m_tie == 0)         begin failures++; $display("never: simultaneous declaration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
