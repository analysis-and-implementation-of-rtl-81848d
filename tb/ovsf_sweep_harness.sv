// ovsf_sweep_harness: exhaustive classification of received sequences by a network of
// L OVSF address decoders, one per address, all listening to the same bit stream.
//
// For every threshold offset T = 0..3 and every one of the 2^L possible L-bit
// sequences, the harness resets the decoders, clocks the sequence in bit 0 first and
// reads the L wake-up outputs after L rising edges. It then:
//  * checks each output against the Hamming-distance rule q_j = (d(seq, s_j) <= L/4-1-T)
//    and (T <= L/4-2), with the code words s_j built by the doubling recursion;
//  * checks that no sequence wakes two nodes (no simultaneous false alarms);
//  * checks that no node wakes when the sequence's error count from some word s_i
//    lies in L/4-T..L/4+T or 3L/4-T..L, the ranges the analysis shows to contribute
//    to neither detection nor false alarm;
//  * for every target node i, histograms by the number of errors N_e = d(seq, s_i) the
//    sequences that wake i (detections) and those that wake some other node j
//    (false alarms for the pair i -> j);
//  * compares the histograms with the closed-form counts of the analysis:
//    detections C(L, N_e) for N_e <= L/4-1-T, and, per ordered pair, false alarms
//    sum over N_en of C(L/2, N_en) * C(L/2, N_e - N_en), with N_en running from
//    max(0, N_e - L/2) to floor((N_e - L/4 - 1 - T) / 2), for
//    L/4+1+T <= N_e <= 3L/4-1-T.
// Probabilities follow by weighting each count with p_b^N_e (1-p_b)^(L-N_e).
// Results are returned through `checks`, `failures` and `done`.
module ovsf_sweep_harness #(
  parameter int unsigned L = 16
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam int unsigned AW = $clog2(L);

  logic          clk;
  logic          rst_n;
  logic          d;
  logic [1:0]    t;
  logic [L-1:0]  q;
  logic [L-1:0]  code [L];
  bit            h [L][L];

  always #5 clk = ~clk;

  for (genvar j = 0; j < L; j++) begin : g_node
    ovsf_address_decoder #(.L(L)) u_dec (
      .clk   (clk),
      .rst_n (rst_n),
      .d     (d),
      .addr  (AW'(j)),
      .t     (t),
      .q     (q[j])
    );
  end

  function automatic longint choose(longint n, longint k);
    longint r = 1;
    if (k < 0 || k > n) return 0;
    for (longint i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  // Closed-form number of sequences with N_e errors from s_i that wake a given j != i.
  function automatic longint fa_closed(int ne, int tt);
    longint sum = 0;
    int lo;
    int hi;
    if (tt > int'(L / 4) - 2) return 0;
    if (ne < int'(L / 4) + 1 + tt || ne > 3 * int'(L) / 4 - 1 - tt) return 0;
    lo = (ne - int'(L / 2) > 0) ? ne - int'(L / 2) : 0;
    hi = (ne - int'(L / 4) - 1 - tt) / 2;
    for (int nen = lo; nen <= hi; nen++)
      sum += choose(longint'(L) / 2, longint'(nen)) * choose(longint'(L) / 2, longint'(ne) - longint'(nen));
    return sum;
  endfunction

  // Probability of one particular pattern of ne errors among L bits at bit error rate pb.
  function automatic real pe(real pb, int ne);
    real r = 1.0;
    for (int i = 0; i < int'(L); i++) r = r * ((i < ne) ? pb : 1.0 - pb);
    return r;
  endfunction

  initial begin
    longint det_hist [L + 1];
    longint fa_hist [L + 1];
    int     hd [L];
    int     woken;
    int     multi;
    int     invalid;
    int     dead_zone;
    int     dead_zone_fail;
    logic [L-1:0] seq;
    logic [L-1:0] expected;

    clk      = 1'b0;
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    rst_n    = 1'b0;
    d        = 1'b0;
    t        = '0;
    h[0][0]  = 1'b1;
    for (int n = 1; n < int'(L); n = n * 2)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c + n]     = h[r][c];
          h[r + n][c]     = h[r][c];
          h[r + n][c + n] = !h[r][c];
        end
    for (int r = 0; r < int'(L); r++)
      for (int c = 0; c < int'(L); c++) code[r][c] = h[r][c];

    for (int tt = 0; tt < 4; tt++) begin
      longint det_total;
      longint fa_total;
      for (int k = 0; k <= int'(L); k++) begin
        det_hist[k] = 0;
        fa_hist[k]  = 0;
      end
      multi = 0;
      invalid = 0;
      dead_zone = 0;
      dead_zone_fail = 0;
      for (longint s = 0; s < (longint'(1) << L); s++) begin
        seq = L'(s);
        @(negedge clk);
        t     = 2'(tt);
        rst_n = 1'b0;
        #1 rst_n = 1'b1;
        for (int i = 0; i < int'(L); i++) begin
          d = seq[i];
          @(negedge clk);
        end
        // L rising edges have passed: the outputs are valid.
        woken = 0;
        for (int j = 0; j < int'(L); j++) begin
          hd[j]       = $countones(seq ^ code[j]);
          expected[j] = (hd[j] <= int'(L / 4) - 1 - tt) && (tt <= int'(L / 4) - 2);
          woken      += int'(q[j]);
        end
        checks++;
        if (q !== expected) begin
          failures++;
          if (failures < 10)
            $display("FAIL L=%0d T=%0d seq=%h q=%h expected=%h", L, tt, seq, q, expected);
        end
        if (woken > 1) multi++;
        if (woken == 0) invalid++;
        // Error counts from any word in L/4-T..L/4+T or 3L/4-T..L wake no node at all.
        for (int i = 0; i < int'(L); i++)
          if ((hd[i] >= int'(L / 4) - tt && hd[i] <= int'(L / 4) + tt) || hd[i] >= 3 * int'(L) / 4 - tt) begin
            dead_zone++;
            if (woken != 0) dead_zone_fail++;
          end
        for (int j = 0; j < int'(L); j++)
          if (q[j]) begin
            det_hist[hd[j]]++;
            for (int i = 0; i < int'(L); i++)
              if (i != j) fa_hist[hd[i]]++;
          end
      end
      checks++;
      if (multi != 0) begin
        failures++;
        $display("FAIL L=%0d T=%0d: %0d sequences woke several nodes", L, tt, multi);
      end
      checks++;
      if (dead_zone == 0 || dead_zone_fail != 0) begin
        failures++;
        $display("FAIL L=%0d T=%0d: %0d of %0d sequences in the no-wake error ranges woke a node",
                 L, tt, dead_zone_fail, dead_zone);
      end
      det_total = 0;
      fa_total  = 0;
      for (int ne = 0; ne <= int'(L); ne++) begin
        longint det_ref;
        longint fa_ref;
        det_ref = (ne <= int'(L / 4) - 1 - tt && tt <= int'(L / 4) - 2) ? longint'(L) * choose(longint'(L), longint'(ne)) : 0;
        fa_ref  = longint'(L) * (longint'(L) - 1) * fa_closed(ne, tt);
        checks += 2;
        if (det_hist[ne] != det_ref) begin
          failures++;
          $display("FAIL L=%0d T=%0d Ne=%0d detections %0d, closed form %0d", L, tt, ne, det_hist[ne], det_ref);
        end
        if (fa_hist[ne] != fa_ref) begin
          failures++;
          $display("FAIL L=%0d T=%0d Ne=%0d false alarms %0d, closed form %0d", L, tt, ne, fa_hist[ne], fa_ref);
        end
        det_total += det_hist[ne];
        fa_total  += fa_hist[ne];
      end
      $display("L=%0d T=%0d: per target %0d detecting sequences, per ordered pair %0d false-alarm sequences, simultaneous wake-ups %0d, sequences waking no node %0d",
               L, tt, det_total / longint'(L), fa_total / (longint'(L) * (longint'(L) - 1)), multi, invalid);
      for (int k = 0; k < 2; k++) begin
        real pb;
        real ps;
        real pij;
        pb  = (k == 0) ? 0.01 : 0.1;
        ps  = 0.0;
        pij = 0.0;
        for (int ne = 0; ne <= int'(L); ne++) begin
          ps  += real'(det_hist[ne]) / real'(L) * pe(pb, ne);
          pij += real'(fa_hist[ne]) / real'(L * (L - 1)) * pe(pb, ne);
        end
        $display("  p_b=%.2f: p_s=%.6f p_(i->j)=%.3e p_fa(N_S=7)=%.3e p_fa(N_S=15)=%.3e", pb, ps, pij, 6.0 * pij, 14.0 * pij);
      end
    end
    done = 1'b1;
  end
endmodule
