// tb_ovsf_address_decoder: end-to-end test of the OVSF address decoder at its default
// size (L = 16, 2-bit T).
//
// Each test sends one 16-bit sequence: a short reset pulse, then one bit per clock,
// bit 0 first. The expected q is worked out from the Hamming distance between the
// sequence and the decoder's own code word, taken from an OVSF matrix that the
// testbench builds by the doubling recursion: q = 1 iff distance <= 3 - T and T <= 2.
// q must stay 0 during the 16 bit periods and be valid after exactly 16 rising edges
// (the decoder's L-bit latency), then hold while further clocks arrive.
//
// Part 1 repeats the decoder's post-layout sweep: 0, 1, 2, 3 and 4 errors for
// T = 0, 1, 2, 3 must give 4, 3, 2 and 0 wake-ups. Part 2 sends random sequences near
// the node's own code word and near other nodes' code words (false alarms), and
// random noise, and sequences for other nodes corrupted towards this node's word.
// Each mechanism of the decoder is counted and must occur: error counting,
// evaluation, error-counter saturation, an illegal T, a detection, a false alarm and
// a rejection.
module tb_ovsf_address_decoder;
  localparam int unsigned L  = 16;
  localparam int unsigned AW = $clog2(L);

  logic          clk;
  logic          rst_n;
  logic          d;
  logic [AW-1:0] addr;
  logic [1:0]    t;
  logic          q;

  int checks = 0;
  int failures = 0;
  bit h [L][L];
  logic [L-1:0] code [L];

  // Mechanism counters.
  int n_counting = 0;
  int n_evaluation = 0;
  int n_saturated = 0;
  int n_illegal_t = 0;
  int n_detect = 0;
  int n_false_alarm = 0;
  int n_reject = 0;
  int wake [4] = '{default: 0};

  ovsf_address_decoder dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic int hamming(logic [L-1:0] a, logic [L-1:0] b);
    return $countones(a ^ b);
  endfunction

  function automatic logic [L-1:0] random_errors(int n);
    logic [L-1:0] m = '0;
    while ($countones(m) < n) m[$urandom_range(0, L - 1)] = 1'b1;
    return m;
  endfunction

  // Sends `seq` to a decoder with address `a` and offset `tt`; returns q.
  // `intended` is the node the sequence was meant for, -1 for noise.
  task automatic send(input int a, input int intended, input int tt, input logic [L-1:0] seq,
                      output logic result);
    int hd;
    logic expected;
    hd     = hamming(seq, code[a]);
    expected = (hd <= int'(L / 4) - 1 - tt) && (tt <= int'(L / 4) - 2);
    @(negedge clk);
    addr  = AW'(a);
    t     = 2'(tt);
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    for (int i = 0; i < int'(L); i++) begin
      d = seq[i];
      checks++;
      if (q !== 1'b0) begin
        failures++;
        $display("FAIL q high before all bits were received (bit %0d)", i);
      end
      @(posedge clk); #1;
      if (i < int'(L) - 1) n_counting++;
      @(negedge clk);
    end
    // Exactly L edges after reset: q must now be valid.
    result = q;
    n_evaluation++;
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL addr=%0d T=%0d seq=%h hd=%0d q=%0d expected=%0d", a, tt, seq, hd, q, expected);
    end
    // L/4 or more mismatches drive the error counter into saturation.
    if (hd >= int'(L / 4)) n_saturated++;
    if (tt > int'(L / 4) - 2) n_illegal_t++;
    // q holds during evaluation whatever d does.
    repeat (3) begin
      d = 1'($urandom);
      @(posedge clk); #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL q not held in evaluation phase");
      end
      @(negedge clk);
    end
    if (q && intended == a) n_detect++;
    if (q && intended != a) n_false_alarm++;
    if (!q) n_reject++;
  endtask

  initial begin
    logic r;
    rst_n = 1'b0;
    d     = 1'b0;
    addr  = '0;
    t     = '0;
    h[0][0] = 1'b1;
    for (int n = 1; n < int'(L); n = n * 2)
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          h[i][j + n]     = h[i][j];
          h[i + n][j]     = h[i][j];
          h[i + n][j + n] = !h[i][j];
        end
    for (int i = 0; i < int'(L); i++)
      for (int j = 0; j < int'(L); j++) code[i][j] = h[i][j];
    #20;

    // Part 1: 0..4 errors for T = 0..3 at node 5.
    for (int tt = 0; tt < 4; tt++)
      for (int ne = 0; ne <= 4; ne++) begin
        send(5, 5, tt, code[5] ^ random_errors(ne), r);
        wake[tt] += int'(r);
      end
    foreach (wake[tt]) begin
      checks++;
      if (wake[tt] != ((tt <= 2) ? 4 - tt : 0)) begin
        failures++;
        $display("FAIL sweep T=%0d gave %0d wake-ups", tt, wake[tt]);
      end
    end

    // Part 2: random traffic.
    for (int k = 0; k < 400; k++) begin
      int a;
      int src;
      int tt;
      int intended;
      logic [L-1:0] seq;
      logic [L-1:0] dp;
      a        = $urandom_range(0, L - 1);
      src      = ($urandom_range(0, 1) == 0) ? a : $urandom_range(0, L - 1);
      tt       = $urandom_range(0, 3);
      intended = src;
      case ($urandom_range(0, 4))
        0, 1: seq = code[src] ^ random_errors($urandom_range(0, 4));
        2:    seq = code[src] ^ random_errors($urandom_range(4, 12));
        3: begin
          // Corrupt the other node's word mostly where it differs from ours, the
          // error pattern that produces a false alarm.
          dp  = code[src] ^ code[a];
          seq = code[src];
          for (int b = 0; b < int'(L); b++)
            if (dp[b] && $urandom_range(0, 7) < 6) seq[b] = !seq[b];
        end
        default: begin
          seq = L'($urandom);
          intended = -1;
        end
      endcase
      send(a, intended, tt, seq, r);
    end

    // Every mechanism must have happened.
    checks += 7;
    if (n_counting == 0)    begin failures++; $display("FAIL no error counting cycles"); end
    if (n_evaluation == 0)  begin failures++; $display("FAIL no evaluation"); end
    if (n_saturated == 0)   begin failures++; $display("FAIL error counter never saturated"); end
    if (n_illegal_t == 0)   begin failures++; $display("FAIL illegal T never applied"); end
    if (n_detect == 0)      begin failures++; $display("FAIL no detection"); end
    if (n_false_alarm == 0) begin failures++; $display("FAIL no false alarm"); end
    if (n_reject == 0)      begin failures++; $display("FAIL no rejection"); end
    $display("mechanisms: counting=%0d evaluation=%0d saturated=%0d illegal_T=%0d detect=%0d false_alarm=%0d reject=%0d",
             n_counting, n_evaluation, n_saturated, n_illegal_t, n_detect, n_false_alarm, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
