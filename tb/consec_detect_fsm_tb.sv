// consec_detect_fsm_tb: self-checking test of the consecutive-hit FSM.
// Random hit streams with long runs are fed with random valid gaps; a model
// counts the run and predicts the one-clock declare pulse (one clock after
// the N-th hit), the sticky declared level and the run counter. clear
// re-arms the FSM several times.
module consec_detect_fsm_tb;
  localparam int unsigned N = 5;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0, hit = 1'b0;
  logic declare, declared;
  logic [2:0] run;
  int checks = 0, failures = 0, n_decl = 0;

  consec_detect_fsm #(.N(N)) dut (.clk, .rst_n, .clear, .in_valid, .hit,
                                  .declare, .declared, .run);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  mrun;
  bit  mdecl, mpulse;

  initial begin
    mrun = 0; mdecl = 0; mpulse = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      hit      = ($urandom_range(0, 9) < 8);
      clear    = ($urandom_range(0, 99) == 0) || (mdecl && $urandom_range(0, 9) == 0);
      @(posedge clk);
      mpulse = 0;
      if (clear) begin
        mrun = 0; mdecl = 0;
      end else if (in_valid && !mdecl) begin
        if (!hit) mrun = 0;
        else begin
          mrun++;
          if (mrun == N) begin mdecl = 1; mpulse = 1; end
        end
      end
      #1;
      checks += 3;
      if (declare != mpulse)   begin failures++; $display("declare mismatch at %0d", n); end
      if (declared != mdecl)   begin failures++; $display("declared mismatch at %0d", n); end
      if (int'(run) != mrun)   begin failures++; $display("run mismatch at %0d: %0d vs %0d", n, run, mrun); end
      if (mpulse) n_decl++;
    end
    checks++;
    if (n_decl < 10) begin failures++; $display("too few declarations: %0d", n_decl); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
