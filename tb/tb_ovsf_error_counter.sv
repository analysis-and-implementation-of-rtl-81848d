// tb_ovsf_error_counter: self-checking test of the saturating error counter.
//
// Drives a random enable for several hundred cycles with occasional asynchronous resets
// and compares the count after every rising edge with a counter modelled in the
// testbench. Checks that the count climbs 0..4 in 4 enabled cycles and then holds
// at 4 however many more mismatches arrive, and that an asynchronous reset clears
// it without a clock edge.
module tb_ovsf_error_counter;
  localparam int unsigned WIDTH = 3;
  localparam int unsigned MAX   = 4;

  logic             clk;
  logic             rst_n;
  logic             en;
  logic [WIDTH-1:0] count;
  int               checks = 0;
  int               failures = 0;
  int               model;
  int               saturated_seen = 0;

  ovsf_error_counter #(.WIDTH(WIDTH), .MAX(MAX)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input int expected, input string what);
    checks++;
    if (int'(count) != expected) begin
      failures++;
      $display("FAIL %s: count=%0d expected=%0d", what, count, expected);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    en    = 1'b0;
    #12 check(0, "reset");
    rst_n = 1'b1;
    model = 0;
    // Full run with enable held high: 16 edges to reach MAX, then hold.
    en = 1'b1;
    for (int i = 1; i <= 20; i++) begin
      @(posedge clk); #1;
      model = (i > MAX) ? MAX : i;
      check(model, "ramp");
    end
    // Random enable with occasional asynchronous resets between edges.
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 7) == 0);
      if ($urandom_range(0, 40) == 0) begin
        rst_n = 1'b0;
        #1 check(0, "async reset");
        model = 0;
        #1 rst_n = 1'b1;
      end
      @(posedge clk); #1;
      if (en && model < MAX) model++;
      if (model == MAX) saturated_seen++;
      check(model, "random");
    end
    checks++;
    if (saturated_seen == 0) begin
      failures++;
      $display("FAIL saturation never reached in random phase");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
