// sample_shift_reg_tb: self-checking test of the shared sample shift register.
// Random samples are pushed with random gaps; after every clock all 32 taps
// and the fill count are compared with a queue model. clear is exercised in
// the middle of the run.
module sample_shift_reg_tb;
  import sync_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  cplx_t in_sample = '0;
  cplx_t taps [SREG_DEPTH];
  logic [5:0] fill;
  int checks = 0, failures = 0;

  sample_shift_reg dut (.clk, .rst_n, .clear, .in_valid, .in_sample, .taps, .fill);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t model [SREG_DEPTH];
  int    mfill;

  initial begin
    for (int k = 0; k < SREG_DEPTH; k++) model[k] = '0;
    mfill = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      clear    = (n == 700);
      in_sample.re = 8'($urandom);
      in_sample.im = 8'($urandom);
      @(posedge clk);
      if (clear) begin
        for (int k = 0; k < SREG_DEPTH; k++) model[k] = '0;
        mfill = 0;
      end else if (in_valid) begin
        for (int k = SREG_DEPTH-1; k > 0; k--) model[k] = model[k-1];
        model[0] = in_sample;
        if (mfill < SREG_DEPTH) mfill++;
      end
      #1;
      for (int k = 0; k < SREG_DEPTH; k++) begin
        checks++;
        if (taps[k] != model[k]) begin
          failures++;
          if (failures < 10) $display("tap %0d mismatch at %0d: %h vs %h", k, n, taps[k], model[k]);
        end
      end
      checks++;
      if (int'(fill) != mfill) begin
        failures++;
        $display("fill mismatch at %0d: %0d vs %0d", n, fill, mfill);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
