// barker_correlator_tb: self-checking test of the Barker de-spreader.
// Random tap contents (including full-scale values) are applied; one clock
// later d must equal |sum_k r(k) b(k)|^2 computed here with the Barker
// code written out as +-1 integers, and out_valid must follow in_valid
// with one clock of latency. A clean Barker-spread symbol must give the
// full peak 121*A^2.
module barker_correlator_tb;
  import sync_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  cplx_t taps [SREG_DEPTH];
  logic  out_valid;
  logic [23:0] d;
  int checks = 0, failures = 0;

  barker_correlator dut (.clk, .rst_n, .in_valid, .taps, .out_valid, .d);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int b [11] = '{1, -1, 1, 1, -1, 1, 1, 1, -1, -1, -1};

  function automatic longint expect_d();
    longint sr = 0, si = 0;
    // chip b(k) meets the sample k positions after the oldest (tap 10)
    for (int k = 0; k < 11; k++) begin
      sr += b[k] * int'(taps[10-k].re);
      si += b[k] * int'(taps[10-k].im);
    end
    return sr*sr + si*si;
  endfunction

  longint exp_d;
  bit     exp_v;

  initial begin
    for (int k = 0; k < SREG_DEPTH; k++) taps[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < SREG_DEPTH; k++) begin
        case (n % 3)
          0: begin taps[k].re = 8'($urandom); taps[k].im = 8'($urandom); end
          1: begin // Barker-spread symbol, amplitude +-127/-128 extremes
               taps[k].re = (k < 11) ? ((b[10-k] > 0) ? 8'sd127 : -8'sd128) : 8'($urandom);
               taps[k].im = (k < 11) ? ((b[10-k] > 0) ? -8'sd128 : 8'sd127) : 8'($urandom);
             end
          default: begin taps[k].re = 8'($signed($urandom_range(0, 20)) - 10); taps[k].im = 8'($urandom); end
        endcase
      end
      exp_d = expect_d();
      exp_v = in_valid;
      @(posedge clk); #1;
      checks++;
      if (out_valid != exp_v) begin failures++; $display("valid mismatch at %0d", n); end
      if (exp_v) begin
        checks++;
        if (longint'(d) != exp_d) begin
          failures++;
          if (failures < 10) $display("d mismatch at %0d: %0d vs %0d", n, d, exp_d);
        end
      end
    end
    // clean symbol of amplitude 50 on I: peak 121 * 2500
    @(negedge clk);
    in_valid = 1'b1;
    for (int k = 0; k < SREG_DEPTH; k++) begin
      taps[k].re = (k < 11) ? 8'(50 * b[10-k]) : '0;
      taps[k].im = '0;
    end
    @(posedge clk); #1;
    checks++;
    if (d != 24'(121 * 2500)) begin failures++; $display("clean peak %0d", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
