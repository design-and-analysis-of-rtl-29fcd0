// sync_pkg: types and constants shared by the dual-mode OFDM/DSSS packet
// synchronizer.
//
// A received baseband sample is a complex pair of signed ADC words. The
// synchronizer runs on a 20 MHz system clock; a sample-valid strobe marks
// the cycles that carry a new ADC sample, which is every cycle at 20 MHz
// and every other cycle at the initial 10 MHz rate. The rate requested from
// the sampling-clock generator and the detected packet type are enums.
// The sample word length (8 bits) is this design's choice: the fixed-point
// word lengths used for the reference chip are not published.
package sync_pkg;

  // ADC word length for I and for Q.
  localparam int unsigned SAMPLE_W = 8;
  // Depth of the shared sample shift register (Sec. "32-element shift registers").
  localparam int unsigned SREG_DEPTH = 32;

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx_t;

  // Sampling rate requested from the ADPLL.
  typedef enum logic [1:0] {
    RATE_10M = 2'd0,   // initial low-rate packet detection
    RATE_20M = 2'd1,   // OFDM: symbol timing and demodulation
    RATE_22M = 2'd2,   // DSSS: two samples per chip for timing acquisition
    RATE_11M = 2'd3    // DSSS: one sample per chip after acquisition
  } rate_t;

  // Packet type the control unit has locked onto (drives the output MUX).
  typedef enum logic [1:0] {
    PKT_NONE = 2'd0,
    PKT_OFDM = 2'd1,
    PKT_DSSS = 2'd2
  } pkt_t;

  // 11-chip Barker sequence {+ - + + - + + + - - -}, bit k = 1 means chip k is -1.
  localparam logic [10:0] BARKER_NEG = 11'b111_0001_0010;

  // Sign pattern of the first 32 samples of the 802.11a/g long training
  // symbol, LT(n) = sum_{k=-26..26} L_k exp(j*2*pi*k*n/64), n = 0..31.
  // Bit n is 1 where Re{LT(n)} < 0 (LTS_RE_NEG) or Im{LT(n)} < 0 (LTS_IM_NEG).
  localparam logic [31:0] LTS_RE_NEG = 32'h37cc_48c2;
  localparam logic [31:0] LTS_IM_NEG = 32'h0f81_bde6;

endpackage
