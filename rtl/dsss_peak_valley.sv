// dsss_peak_valley: DSSS preamble test on the Barker correlator output.
//
// A DSSS preamble gives one correlation peak per 1 us symbol. Two
// properties are checked for every symbol period:
//   * peak branch: the largest d(t) of each TS-sample window is found, and
//     the distance between the peaks of adjacent windows must equal the
//     symbol period to within TOL samples (one 100 ns sample at 10 MHz);
//   * valley branch: the peak must exceed the sum of the "valley" values
//     that follow it at offsets VS..VS+ETA,
//         Lambda_DSSS = d(peak) - sum_{k=VS}^{VS+ETA} d(peak + k) > 0.
// Comparing against valleys away from the peak, rather than against the
// average, keeps the test working when multipath smears the peak over its
// neighbours.
//
// Structure: a free-running window phase counter, a running max/argmax for
// the current window, and a 2*TS-entry shift register of d values. When a
// window closes, the peak of the window before it is evaluated: its valleys
// are all in the shift register by then (requires VS+ETA <= TS).
//
// Interface: in_valid/d from the Barker correlator. Once two windows have
// been seen after clear, sym_valid pulses once per window (one clock after
// the window's last sample) with sym_hit = interval_ok && Lambda > 0, plus
// the peak and valley sum used. TS = 10 is one symbol at 10 MHz; VS = 3,
// ETA = 4 and TOL = 1 are this design's choices for the window start,
// length and interval tolerance.
module dsss_peak_valley #(
  parameter int unsigned DW  = 24,
  parameter int unsigned TS  = 10,
  parameter int unsigned VS  = 3,
  parameter int unsigned ETA = 4,
  parameter int unsigned TOL = 1,
  localparam int unsigned PB = $clog2(TS),
  localparam int unsigned VW = DW + $clog2(ETA + 2)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            in_valid,
  input  logic [DW-1:0]   d,
  output logic            sym_valid,
  output logic            sym_hit,
  output logic [DW-1:0]   peak,
  output logic [VW-1:0]   valley_sum
);

  localparam int unsigned DL = 2*TS;
  localparam int unsigned AB = $clog2(DL);

  // VS+ETA <= TS keeps every valley of the evaluated peak inside the line
  initial assert (VS + ETA <= TS && VS >= 1 && TOL < TS)
    else $error("dsss_peak_valley: valley window must lie within one period");

  logic [DW-1:0] dl [DL];
  logic [PB-1:0] ph;
  logic [DW-1:0] cur_max;
  logic [PB-1:0] cur_pos;
  logic [DW-1:0] w0_max, w1_max;
  logic [PB-1:0] w0_pos, w1_pos;
  logic [1:0]    nwin;
  logic          eval;

  // final max/argmax of the window including the incoming sample
  logic [DW-1:0] fin_max;
  logic [PB-1:0] fin_pos;
  always_comb begin
    if (ph == '0 || d > cur_max) begin
      fin_max = d;
      fin_pos = ph;
    end else begin
      fin_max = cur_max;
      fin_pos = cur_pos;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DL; k++) dl[k] <= '0;
      ph <= '0; cur_max <= '0; cur_pos <= '0;
      w0_max <= '0; w0_pos <= '0; w1_max <= '0; w1_pos <= '0;
      nwin <= '0; eval <= 1'b0;
    end else if (clear) begin
      for (int k = 0; k < DL; k++) dl[k] <= '0;
      ph <= '0; cur_max <= '0; cur_pos <= '0;
      w0_max <= '0; w0_pos <= '0; w1_max <= '0; w1_pos <= '0;
      nwin <= '0; eval <= 1'b0;
    end else begin
      eval <= 1'b0;
      if (in_valid) begin
        dl[0] <= d;
        for (int k = 1; k < DL; k++) dl[k] <= dl[k-1];
        cur_max <= fin_max;
        cur_pos <= fin_pos;
        if (ph == PB'(TS - 1)) begin
          ph     <= '0;
          w0_max <= w1_max; w0_pos <= w1_pos;
          w1_max <= fin_max; w1_pos <= fin_pos;
          if (nwin != 2'd2) nwin <= nwin + 1'b1;
          eval   <= (nwin != 2'd0);
        end else begin
          ph <= ph + 1'b1;
        end
      end
    end
  end

  // ---- evaluation of the older window's peak ------------------------------
  logic [AB-1:0] age;
  logic [VW-1:0] vsum;
  logic [PB:0]   pk_dist;
  logic          interval_ok;

  always_comb begin
    // age of the older peak in the delay line (dl[0] = last sample of w1)
    age  = AB'(2*TS - 1) - AB'(w0_pos);
    vsum = '0;
    for (int k = VS; k <= VS + ETA; k++) vsum = vsum + VW'(dl[age - AB'(k)]);
    // cyclic distance between the two peak positions
    pk_dist = (w1_pos >= w0_pos) ? (PB+1)'(w1_pos - w0_pos) : (PB+1)'(w0_pos - w1_pos);
    if (pk_dist > (PB+1)'(TS/2)) pk_dist = (PB+1)'(TS) - pk_dist;
    interval_ok = (pk_dist <= (PB+1)'(TOL));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_valid <= 1'b0; sym_hit <= 1'b0; peak <= '0; valley_sum <= '0;
    end else begin
      sym_valid <= eval && !clear;
      if (eval) begin
        sym_hit    <= interval_ok && (VW'(w0_max) > vsum);
        peak       <= w0_max;
        valley_sum <= vsum;
      end
    end
  end

endmodule
