// dsss_peak_valley_tb: self-checking test of the DSSS peak/valley test.
// The d(t) stream mixes pure noise, clean periodic peaks (one per 10
// samples), peaks that jitter by one sample (still a pass) or by three
// samples (interval failure), and weak peaks that lose against the valley
// sum. A model here slices the stream into 10-sample windows, finds the
// first maximum of each, and for every window after the first computes
// peak, valley sum (offsets 3..7 after the older peak) and the pass flag.
// Every sym_valid output is compared in order with the model, and each must
// arrive exactly two clocks after the in_valid of its window's last sample.
module dsss_peak_valley_tb;
  localparam int TS = 10, VS = 3, ETA = 4, TOL = 1;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic [23:0] d = '0;
  logic sym_valid, sym_hit;
  logic [23:0] peak;
  logic [26:0] valley_sum;
  int checks = 0, failures = 0;

  dsss_peak_valley #(.DW(24), .TS(TS), .VS(VS), .ETA(ETA), .TOL(TOL)) dut (
    .clk, .rst_n, .clear, .in_valid, .d, .sym_valid, .sym_hit, .peak, .valley_sum);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // observed results
  int  o_cyc [$]; bit o_hit [$]; longint o_peak [$], o_val [$];
  always @(posedge clk) if (rst_n && sym_valid) begin
    o_cyc.push_back(cyc); o_hit.push_back(sym_hit);
    o_peak.push_back(peak); o_val.push_back(valley_sum);
  end

  // model
  longint dd [$];
  int     last_cyc [$];    // cycle of each window's last sample
  int     e_cyc [$]; bit e_hit [$]; longint e_peak [$], e_val [$];
  int     n_pass = 0, n_fail = 0;

  function automatic int argmax(int w);
    int pos = 0;
    for (int k = 1; k < TS; k++) if (dd[w*TS + k] > dd[w*TS + pos]) pos = k;
    return pos;
  endfunction

  task automatic model_window(int w);
    int p0, p1, pdist;
    longint vs;
    p0 = argmax(w - 1); p1 = argmax(w);
    vs = 0;
    for (int k = VS; k <= VS + ETA; k++) vs += dd[(w-1)*TS + p0 + k];
    pdist = (p1 > p0) ? p1 - p0 : p0 - p1;
    if (pdist > TS/2) pdist = TS - pdist;
    e_peak.push_back(dd[(w-1)*TS + p0]);
    e_val.push_back(vs);
    e_hit.push_back(pdist <= TOL && dd[(w-1)*TS + p0] > vs);
    e_cyc.push_back(last_cyc[w] + 2);
    if (e_hit[$]) n_pass++; else n_fail++;
  endtask

  function automatic longint gen(int kind, int s, int jit);
    int ph = (s + jit) % TS;
    case (kind)
      0: return $urandom_range(0, 50000);                              // noise
      1: return (ph == 4) ? 2000000 + $urandom_range(0, 100000) : $urandom_range(0, 20000);
      2: return (ph == 4) ? 60000 : $urandom_range(10000, 30000);      // weak peak
      default: return $urandom_range(0, 16777215);
    endcase
  endfunction

  initial begin
    int kind, jit, s, nwin;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    s = 0;
    for (int blk = 0; blk < 60; blk++) begin
      kind = blk % 4;
      for (int w = 0; w < 8; w++) begin
        // jitter: 0 most of the time, +-1 often, 3 sometimes
        case ($urandom_range(0, 5))
          0: jit = 1; 1: jit = TS - 1; 2: jit = 3; default: jit = 0;
        endcase
        for (int k = 0; k < TS; k++) begin
          @(negedge clk);
          while ($urandom_range(0, 2) == 0) begin
            in_valid = 1'b0; @(negedge clk);
          end
          in_valid = 1'b1;
          d = 24'(gen(kind, s, jit));
          dd.push_back(d);
          if (k == TS - 1) last_cyc.push_back(cyc);
          s++;
          @(posedge clk);
        end
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (5) @(posedge clk);
    nwin = dd.size() / TS;
    for (int w = 1; w < nwin; w++) model_window(w);
    checks++;
    if (o_cyc.size() != e_cyc.size()) begin
      failures++; $display("count mismatch %0d vs %0d", o_cyc.size(), e_cyc.size());
    end
    for (int i = 0; i < e_cyc.size() && i < o_cyc.size(); i++) begin
      checks += 4;
      if (o_cyc[i] != e_cyc[i]) begin failures++; if (failures < 10) $display("latency %0d: %0d vs %0d", i, o_cyc[i], e_cyc[i]); end
      if (o_hit[i] != e_hit[i]) begin failures++; if (failures < 10) $display("hit %0d", i); end
      if (o_peak[i] != e_peak[i]) begin failures++; if (failures < 10) $display("peak %0d", i); end
      if (o_val[i] != e_val[i]) begin failures++; if (failures < 10) $display("valley %0d: %0d vs %0d", i, o_val[i], e_val[i]); end
    end
    checks++;
    if (n_pass < 20 || n_fail < 20) begin failures++; $display("coverage pass=%0d fail=%0d", n_pass, n_fail); end
    $display("pass=%0d fail=%0d", n_pass, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
