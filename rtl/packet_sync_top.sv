// packet_sync_top: low-sampling-rate packet synchronizer for a dual-mode
// OFDM/DSSS (IEEE 802.11g style) receiver.
//
// One I/Q ADC pair, clocked by an ADPLL whose rate this block requests,
// feeds both the OFDM and the DSSS packet detectors. While idle the ADC runs
// at 10 MHz. All received samples go through one shared 32-element shift
// register:
//   * ofdm_autocorr + an alpha-count consec_detect_fsm detect the repeated
//     OFDM short training symbols (8-sample symbols at 10 MHz);
//   * barker_correlator + dsss_peak_valley + a beta-count consec_detect_fsm
//     detect the Barker-spread DSSS preamble from its periodic peaks;
//   * detection_ctrl picks the packet type (OFDM on a tie), requests the
//     new sampling rate, flushes the pipeline and steers the output MUX;
//   * ofdm_symbol_timing, armed after an OFDM declaration at 20 MHz, finds
//     the end of the guard interval in front of the first long symbol.
//
// Clocking: clk is the 20 MHz system clock; in_valid marks a new ADC sample
// (every clock at 20 MHz, every second clock at 10 MHz). rate_req tells the
// sampling-clock generator which rate to deliver; the block assumes the
// new rate arrives at once. Outputs: one-clock pulses ofdm_detected,
// dsss_detected and tau_valid (with tau_back, see ofdm_symbol_timing),
// levels mode/locked, and the sample stream routed to the OFDM or DSSS
// demodulator (data_valid_ofdm / data_valid_dsss with data_out, one clock
// after the input). restart returns the synchronizer to 10 MHz detection;
// dsss_acq_done comes from the DSSS timing acquisition that follows.
module packet_sync_top
  import sync_pkg::*;
#(
  parameter int unsigned ALPHA = 10,    // consecutive OFDM metric hits
  parameter int unsigned BETA  = 8,     // consecutive DSSS symbol hits
  parameter int unsigned GAMMA = 128,   // OFDM threshold, Q0.8 (0.5)
  parameter int unsigned N_END = 8,     // low metrics marking end of short preamble
  parameter int unsigned P     = 48     // lambda limit of the timing search
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  cplx_t        in_sample,
  input  logic         restart,
  input  logic         dsss_acq_done,
  output rate_t        rate_req,
  output logic         sel_10m,
  output pkt_t         mode,
  output logic         locked,
  output logic         ofdm_detected,
  output logic         dsss_detected,
  output logic         tau_valid,
  output logic [7:0]   tau_back,
  output logic         data_valid_ofdm,
  output logic         data_valid_dsss,
  output cplx_t        data_out
);

  logic  flush, detect_en, st_start;
  logic  sr_valid;
  cplx_t taps [SREG_DEPTH];
  logic [$clog2(SREG_DEPTH+1)-1:0] sr_fill;

  // sample strobe for the datapaths: one clock after the ADC strobe, when
  // the shift register holds the new sample
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr_valid <= 1'b0;
    else        sr_valid <= in_valid && !flush;
  end

  sample_shift_reg #(.DEPTH(SREG_DEPTH)) u_sreg (
    .clk, .rst_n, .clear(flush), .in_valid(in_valid && !flush),
    .in_sample, .taps, .fill(sr_fill)
  );

  // ---- OFDM packet detection ----------------------------------------------
  logic signed [20:0] c_re, c_im;
  logic [19:0]        c_p;
  logic               ac_valid, ac_above;
  logic               ofdm_decl, ofdm_declared;
  logic [$clog2(ALPHA+1)-1:0] ofdm_run;

  ofdm_autocorr #(.GAMMA(GAMMA)) u_ofdm_ac (
    .clk, .rst_n, .clear(flush), .sel_10m, .in_valid(sr_valid), .taps,
    .c_re, .c_im, .p(c_p), .out_valid(ac_valid), .above(ac_above)
  );

  consec_detect_fsm #(.N(ALPHA)) u_ofdm_fsm (
    .clk, .rst_n, .clear(flush || !detect_en),
    .in_valid(ac_valid && detect_en), .hit(ac_above),
    .declare(ofdm_decl), .declared(ofdm_declared), .run(ofdm_run)
  );

  // ---- DSSS packet detection ----------------------------------------------
  logic        bk_valid;
  logic [23:0] bk_d;
  logic        sym_valid, sym_hit;
  logic [23:0] sym_peak;
  logic [26:0] sym_valley;
  logic        dsss_decl, dsss_declared;
  logic [$clog2(BETA+1)-1:0] dsss_run;

  barker_correlator u_barker (
    .clk, .rst_n, .in_valid(sr_valid && detect_en), .taps,
    .out_valid(bk_valid), .d(bk_d)
  );

  dsss_peak_valley #(.DW(24)) u_dsss_pv (
    .clk, .rst_n, .clear(flush || !detect_en),
    .in_valid(bk_valid && detect_en && !flush), .d(bk_d),
    .sym_valid, .sym_hit, .peak(sym_peak), .valley_sum(sym_valley)
  );

  consec_detect_fsm #(.N(BETA)) u_dsss_fsm (
    .clk, .rst_n, .clear(flush || !detect_en),
    .in_valid(sym_valid && detect_en), .hit(sym_hit),
    .declare(dsss_decl), .declared(dsss_declared), .run(dsss_run)
  );

  // ---- control unit ---------------------------------------------------------
  detection_ctrl u_ctrl (
    .clk, .rst_n, .restart,
    .ofdm_declare(ofdm_decl && detect_en), .dsss_declare(dsss_decl && detect_en),
    .tau_valid, .dsss_acq_done,
    .rate_req, .sel_10m, .mode, .locked, .detect_en, .flush, .st_start
  );

  assign ofdm_detected = ofdm_decl && detect_en;
  assign dsss_detected = dsss_decl && detect_en && !ofdm_decl;

  // ---- OFDM symbol timing -----------------------------------------------------
  logic        st_busy, st_searching;
  logic [29:0] st_xi, st_xi_max;

  ofdm_symbol_timing #(.N_END(N_END), .P(P)) u_timing (
    .clk, .rst_n, .start(st_start), .in_valid(sr_valid), .taps,
    .ac_valid, .ac_above, .busy(st_busy), .searching(st_searching),
    .tau_valid, .tau_back, .xi(st_xi), .xi_max(st_xi_max)
  );

  // ---- output MUX: route samples to the demodulator of the locked type -------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_valid_ofdm <= 1'b0;
      data_valid_dsss <= 1'b0;
      data_out        <= '0;
    end else begin
      data_valid_ofdm <= in_valid && mode == PKT_OFDM;
      data_valid_dsss <= in_valid && mode == PKT_DSSS;
      if (in_valid) data_out <= in_sample;
    end
  end

endmodule
