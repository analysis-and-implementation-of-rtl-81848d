// ovsf_error_counter: saturating counter of address-bit mismatches (N_eij).
//
// After reset the count is 0. On every rising clock edge with `en` (the mismatch flag
// y) high it advances by one until it reaches MAX, then holds. With L = 16 the decoder
// accepts at most L/4 - 1 = 3 errors, so MAX = L/4 = 4 in a 3-bit counter already
// means "too many" for every threshold and larger counts are never needed.
//
// Interface: clk, active-low asynchronous reset rst_n, enable en, count output.
// MAX = 4 and the 3-bit width come from the reference design; saturation at MAX, the
// reset polarity and the clock edge are choices of this design.
module ovsf_error_counter
  import ovsf_pkg::*;
#(
  parameter int unsigned WIDTH = $clog2(OVSF_L / 4 + 1),  // 3
  parameter int unsigned MAX   = OVSF_L / 4               // 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] count
);

  initial assert (MAX < (1 << WIDTH)) else $error("MAX does not fit in WIDTH bits");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count <= '0;
    else if (en && count != WIDTH'(MAX))
      count <= count + 1'b1;
  end

endmodule
