// detection_ctrl: control unit of the dual-mode packet synchronizer.
//
// The receiver has a single I/Q ADC pair whose clock comes from an ADPLL.
// While waiting for a packet the ADC runs at a low 10 MHz, half the OFDM
// sample rate, and both detectors watch the same samples (SEL_10M high).
// The control unit reacts to the two detection FSMs:
//   * OFDM declared: request 20 MHz, flush the sample pipeline (samples of
//     the old rate must not mix with the new), and start the symbol timing
//     estimator; when it reports the FFT window the OFDM path is locked.
//   * DSSS declared: request 22 MHz (two samples per 11 MHz chip) for
//     timing acquisition; when the DSSS back end reports acquisition done,
//     drop to 11 MHz (one sample per chip) and lock the DSSS path.
//   * both in the same clock: OFDM wins, since its preamble is much shorter
//     than the DSSS one and would be lost while the DSSS one would not.
// restart (end of packet or a false alarm found later in the receiver)
// returns to low-rate detection. The ADPLL is taken to switch at once;
// its settling time is outside this block.
//
// Interface: pulses in, levels out. rate_req and mode change on the clock
// after the triggering pulse; flush is a one-clock pulse on every rate
// change; st_start is a one-clock pulse that arms the symbol timing
// estimator in the same clock as the flush.
module detection_ctrl
  import sync_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   restart,
  input  logic   ofdm_declare,
  input  logic   dsss_declare,
  input  logic   tau_valid,
  input  logic   dsss_acq_done,
  output rate_t  rate_req,
  output logic   sel_10m,
  output pkt_t   mode,
  output logic   locked,
  output logic   detect_en,
  output logic   flush,
  output logic   st_start
);

  typedef enum logic [2:0] {
    DETECT, OFDM_TIMING, OFDM_LOCK, DSSS_ACQ, DSSS_LOCK
  } state_t;
  state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= DETECT;
      flush    <= 1'b1;
      st_start <= 1'b0;
    end else begin
      flush    <= 1'b0;
      st_start <= 1'b0;
      if (restart) begin
        state <= DETECT;
        flush <= (state != DETECT);
      end else begin
        unique case (state)
          DETECT: begin
            if (ofdm_declare) begin
              state    <= OFDM_TIMING;
              flush    <= 1'b1;
              st_start <= 1'b1;
            end else if (dsss_declare) begin
              state <= DSSS_ACQ;
              flush <= 1'b1;
            end
          end
          OFDM_TIMING: if (tau_valid) state <= OFDM_LOCK;
          OFDM_LOCK:   ;
          DSSS_ACQ: if (dsss_acq_done) begin
            state <= DSSS_LOCK;
            flush <= 1'b1;
          end
          DSSS_LOCK:   ;
          default:     state <= DETECT;
        endcase
      end
    end
  end

  always_comb begin
    unique case (state)
      OFDM_TIMING, OFDM_LOCK: begin rate_req = RATE_20M; mode = PKT_OFDM; end
      DSSS_ACQ:               begin rate_req = RATE_22M; mode = PKT_DSSS; end
      DSSS_LOCK:              begin rate_req = RATE_11M; mode = PKT_DSSS; end
      default:                begin rate_req = RATE_10M; mode = PKT_NONE; end
    endcase
    sel_10m   = (state == DETECT);
    detect_en = (state == DETECT);
    locked    = (state == OFDM_LOCK) || (state == DSSS_LOCK);
  end

  // a DSSS declaration that loses the tie must not be acted on
  property p_ofdm_wins;
    @(posedge clk) disable iff (!rst_n)
      (state == DETECT && !restart && ofdm_declare && dsss_declare) |=> (state == OFDM_TIMING);
  endproperty
  a_ofdm_wins: assert property (p_ofdm_wins);

endmodule
