// ovsf_pkg: constants and the code generator shared by the OVSF address decoder.
//
// An OVSF (orthogonal variable spreading factor) code of length L has L code words,
// the rows of an L x L matrix built recursively from H2 = [1 1; 1 0] by
// H2n = [Hn Hn; Hn ~Hn]. Any two rows differ in exactly L/2 positions. The element in
// row r, column c of that matrix is 1 when (r AND c) has an even number of one bits,
// so a code bit is a parity of the address and the bit index and needs no table.
// The recursion and the distance property follow the decoder's source; computing the
// element as a parity is this design's own choice.
package ovsf_pkg;

  // Default code length (bits per address) of the reference design.
  localparam int unsigned OVSF_L = 16;

  // Bit `index` of the code word numbered `addr`.
  function automatic logic ovsf_code_bit(input logic [31:0] addr, input logic [31:0] index);
    return ~(^(addr & index));
  endfunction

endpackage
