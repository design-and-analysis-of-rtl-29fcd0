// detection_ctrl_tb: self-checking test of the synchronizer control unit.
// Random, sparse pulses on restart, ofdm_declare, dsss_declare, tau_valid
// and dsss_acq_done drive the unit for many clocks; a reference model of the
// dynamic-sampling sequence (10 MHz detect -> 20 MHz OFDM timing -> OFDM
// lock, or 10 MHz -> 22 MHz DSSS acquisition -> 11 MHz DSSS lock, OFDM
// winning a tie, restart back to 10 MHz) predicts every output each clock.
// Each transition, including a tie, must be seen at least once.
module detection_ctrl_tb;
  import sync_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic restart = 0, ofdm_declare = 0, dsss_declare = 0, tau_valid = 0, dsss_acq_done = 0;
  rate_t rate_req;
  pkt_t  mode;
  logic  sel_10m, locked, detect_en, flush, st_start;
  int checks = 0, failures = 0;

  detection_ctrl dut (.clk, .rst_n, .restart, .ofdm_declare, .dsss_declare, .tau_valid,
                      .dsss_acq_done, .rate_req, .sel_10m, .mode, .locked, .detect_en,
                      .flush, .st_start);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state: 0 detect, 1 ofdm timing, 2 ofdm lock, 3 dsss acq, 4 dsss lock
  int  ms;
  bit  mflush, mstart;
  int  seen [7];   // ofdm, dsss, tie, tau, acq, restart-flush, restart-idle

  function automatic bit pct(int p); return $urandom_range(0, 99) < p; endfunction

  initial begin
    ms = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (!flush) begin failures++; $display("no flush in reset"); end
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      restart       = pct(2);
      ofdm_declare  = pct(4);
      dsss_declare  = pct(4) || (n % 500 == 7 && ofdm_declare);
      tau_valid     = pct(5);
      dsss_acq_done = pct(5);
      @(posedge clk);
      mflush = 0; mstart = 0;
      if (restart) begin
        mflush = (ms != 0);
        seen[mflush ? 5 : 6]++;
        ms = 0;
      end else case (ms)
        0: if (ofdm_declare) begin
             ms = 1; mflush = 1; mstart = 1; seen[0]++;
             if (dsss_declare) seen[2]++;
           end else if (dsss_declare) begin ms = 3; mflush = 1; seen[1]++; end
        1: if (tau_valid) begin ms = 2; seen[3]++; end
        3: if (dsss_acq_done) begin ms = 4; mflush = 1; seen[4]++; end
        default: ;
      endcase
      #1;
      checks += 7;
      if (flush != mflush)     begin failures++; $display("flush n=%0d", n); end
      if (st_start != mstart)  begin failures++; $display("st_start n=%0d", n); end
      if (sel_10m != (ms == 0) || detect_en != (ms == 0)) begin failures++; $display("sel_10m n=%0d", n); end
      if (locked != (ms == 2 || ms == 4)) begin failures++; $display("locked n=%0d", n); end
      case (ms)
        0: begin if (rate_req != RATE_10M || mode != PKT_NONE) begin failures++; $display("rate/mode n=%0d", n); end end
        1, 2: begin if (rate_req != RATE_20M || mode != PKT_OFDM) begin failures++; $display("rate/mode n=%0d", n); end end
        3: begin if (rate_req != RATE_22M || mode != PKT_DSSS) begin failures++; $display("rate/mode n=%0d", n); end end
        default: begin if (rate_req != RATE_11M || mode != PKT_DSSS) begin failures++; $display("rate/mode n=%0d", n); end end
      endcase
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("transition %0d never seen", i); end
    end
    $display("transitions: ofdm=%0d dsss=%0d tie=%0d tau=%0d acq=%0d restart=%0d/%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5], seen[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
