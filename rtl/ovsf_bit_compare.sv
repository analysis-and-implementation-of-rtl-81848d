// ovsf_bit_compare: compares one received bit with the node's own OVSF code bit.
//
// The node's address `addr` selects one of the L OVSF code words; `index` selects the
// bit of that word expected now. The code bit is generated on the fly by
// ovsf_pkg::ovsf_code_bit, so no code word is stored or shifted. While the active-low
// enable `enb` is 0 (error counting phase), y = 1 on a mismatch between `d` and the
// code bit and y = 0 on a match; while `enb` is 1 (evaluation phase) y = 0.
//
// Purely combinational. The ports and the mismatch rule come from the reference
// design; generating the code bit as a parity, reading ENB as active low and sending
// code bit 0 first are choices of this design.
module ovsf_bit_compare
  import ovsf_pkg::*;
#(
  parameter int unsigned L   = OVSF_L,
  localparam int unsigned AW = $clog2(L)
) (
  input  logic          d,
  input  logic [AW-1:0] addr,
  input  logic          enb,
  input  logic [AW-1:0] index,
  output logic          y
);

  logic code_bit;

  always_comb begin
    code_bit = ovsf_code_bit(32'(addr), 32'(index));
    y        = !enb && (d != code_bit);
  end

endmodule
