// consec_detect_fsm: the small self-running packet-declaration FSM.
//
// A packet type is declared only when its per-sample (OFDM) or per-symbol
// (DSSS) criterion holds N times in a row: sum_{k=0}^{N-1} sign(metric_k)
// == N. Random noise may cross the threshold once but seldom N times in a
// row, while a real preamble keeps the metric high, so a low threshold can
// be combined with a high count. One instance serves the OFDM detector
// (N = alpha) and one the DSSS detector (N = beta).
//
// States: SEARCH (no hit yet), COUNT (run of hits in progress), DECLARED
// (sticky until clear). Interface: in_valid marks a new criterion result
// hit; declare pulses for one clock in the cycle after the N-th
// consecutive hit; declared stays high until clear (or reset). run is the
// length of the current run of hits.
module consec_detect_fsm #(
  parameter int unsigned N = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     in_valid,
  input  logic                     hit,
  output logic                     declare,
  output logic                     declared,
  output logic [$clog2(N+1)-1:0]   run
);

  typedef enum logic [1:0] {SEARCH, COUNT, DECLARED} state_t;
  state_t state;

  localparam logic [$clog2(N+1)-1:0] LAST = ($clog2(N+1))'(N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= SEARCH;
      run     <= '0;
      declare <= 1'b0;
    end else if (clear) begin
      state   <= SEARCH;
      run     <= '0;
      declare <= 1'b0;
    end else begin
      declare <= 1'b0;
      if (in_valid) begin
        unique case (state)
          SEARCH, COUNT: begin
            if (!hit) begin
              state <= SEARCH;
              run   <= '0;
            end else if (run == LAST) begin
              state   <= DECLARED;
              run     <= run + 1'b1;
              declare <= 1'b1;
            end else begin
              state <= COUNT;
              run   <= run + 1'b1;
            end
          end
          DECLARED: ;
          default: state <= SEARCH;
        endcase
      end
    end
  end

  assign declared = (state == DECLARED);

endmodule
