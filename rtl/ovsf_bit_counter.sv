// ovsf_bit_counter: saturating counter that numbers the received address bits.
//
// After reset the count is 0. On every rising clock edge with `en` high it advances
// by one until it reaches MAX, then holds until the next reset. In the decoder, with
// MAX = L = 16 and a 5-bit count, the low four bits are the index of the bit being
// received and the MSB becomes 1 exactly when all L bits have been received, which
// switches the decoder from error counting to evaluation.
//
// Interface: clk, active-low asynchronous reset rst_n, enable en, count output.
// The block, its MAX of 16 and 5-bit width come from the reference design; holding
// at MAX, the active-low asynchronous reset and the rising-edge clock are choices of
// this design.
module ovsf_bit_counter
  import ovsf_pkg::*;
#(
  parameter int unsigned WIDTH = $clog2(OVSF_L) + 1,  // 5
  parameter int unsigned MAX   = OVSF_L               // 16
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
