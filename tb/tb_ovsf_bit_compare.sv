// tb_ovsf_bit_compare: exhaustive test of the bit comparator.
//
// Builds the 16 x 16 OVSF code matrix in the testbench by the doubling recursion
// H2 = [1 1; 1 0], H2n = [Hn Hn; Hn ~Hn], independently of the parity formula the
// design uses, and applies every combination of address, index, received bit and
// enable. Expected: y = 1 exactly when enabled (enb = 0) and the received bit differs
// from the matrix entry. Also checks that every pair of code words differs in L/2
// positions, the property the decoder's error threshold relies on.
module tb_ovsf_bit_compare;
  localparam int unsigned L  = 16;
  localparam int unsigned AW = $clog2(L);

  logic          d;
  logic [AW-1:0] addr;
  logic          enb;
  logic [AW-1:0] index;
  logic          y;
  int            checks = 0;
  int            failures = 0;
  bit            h [L][L];

  ovsf_bit_compare #(.L(L)) dut (.*);

  initial begin
    int n;
    int hd;
    h[0][0] = 1'b1;
    for (n = 1; n < L; n = n * 2)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c + n]     = h[r][c];
          h[r + n][c]     = h[r][c];
          h[r + n][c + n] = !h[r][c];
        end
    // Rows 1 and 2 of H4 as printed for the recursion: 1 0 1 0 and 1 1 0 0.
    checks++;
    if ({h[1][0], h[1][1], h[1][2], h[1][3], h[2][0], h[2][1], h[2][2], h[2][3]} != 8'b1010_1100) begin
      failures++;
      $display("FAIL reference matrix construction");
    end
    for (int a = 0; a < L; a++)
      for (int b = a + 1; b < L; b++) begin
        hd = 0;
        for (int c = 0; c < L; c++) hd += int'(h[a][c] != h[b][c]);
        checks++;
        if (hd != L / 2) begin
          failures++;
          $display("FAIL distance rows %0d,%0d = %0d", a, b, hd);
        end
      end
    for (int a = 0; a < L; a++)
      for (int i = 0; i < L; i++)
        for (int e = 0; e < 2; e++)
          for (int v = 0; v < 2; v++) begin
            addr  = AW'(a);
            index = AW'(i);
            enb   = 1'(e);
            d     = 1'(v);
            #1;
            checks++;
            if (y !== ((e == 0) && (1'(v) != h[a][i]))) begin
              failures++;
              $display("FAIL addr=%0d index=%0d enb=%0d d=%0d y=%0d", a, i, e, v, y);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
