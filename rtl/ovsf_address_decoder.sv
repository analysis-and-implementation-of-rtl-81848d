// ovsf_address_decoder: counter-based OVSF wake-up address decoder (top level).
//
// A wake-up receiver, once it has found a packet's preamble, feeds the L address bits
// serially into `d`, one per rising edge of `clk` (200 bps in the reference
// implementation). The node's own address `addr` selects its OVSF code word. During
// the error counting phase the bit counter supplies the index of the expected code
// bit, the bit compare flags each mismatch and the error counter accumulates N_eij.
// When the bit counter reaches L its MSB switches the decoder to the evaluation phase:
// the bit compare is disabled, N_eij freezes and the activation logic drives q = 1 if
// N_eij <= L/4 - 1 - T (and T <= L/4 - 2). q then stays valid until the next reset.
//
// Timing: after rst_n is released, bit i (i = 0 .. L-1) is sampled at rising edge
// i+1; q is valid after edge L, i.e. an L-bit latency (80 ms at 200 bps for L = 16).
// rst_n (active low, asynchronous) must be pulsed before each new address.
//
// The structure and every connection follow the reference design's block diagram; the
// reset polarity, the bit order and the need to reset between addresses are choices
// of this design. No register holds the code word: the expected bit is computed from
// addr and the bit index.
module ovsf_address_decoder
  import ovsf_pkg::*;
#(
  parameter int unsigned L    = OVSF_L,
  parameter int unsigned T_W  = 2,
  localparam int unsigned AW  = $clog2(L),
  localparam int unsigned XW  = AW + 1,            // bit counter width, 5 for L = 16
  localparam int unsigned NEW = $clog2(L / 4 + 1)  // error counter width, 3 for L = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           d,
  input  logic [AW-1:0]  addr,
  input  logic [T_W-1:0] t,
  output logic           q
);

  initial assert (L >= 4 && (1 << AW) == L) else $error("L must be a power of two >= 4");

  logic [XW-1:0]  x;      // bit counter: x[AW-1:0] = INDEX, x[AW] = evaluation phase
  logic           y;      // mismatch flag
  logic [NEW-1:0] n_eij;  // error count

  ovsf_bit_counter #(.WIDTH(XW), .MAX(L)) u_bit_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (1'b1),
    .count (x)
  );

  ovsf_bit_compare #(.L(L)) u_bit_compare (
    .d     (d),
    .addr  (addr),
    .enb   (x[AW]),
    .index (x[AW-1:0]),
    .y     (y)
  );

  ovsf_error_counter #(.WIDTH(NEW), .MAX(L / 4)) u_error_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (y),
    .count (n_eij)
  );

  ovsf_activation_logic #(.L(L), .T_W(T_W), .NE_W(NEW)) u_activation_logic (
    .en (x[AW]),
    .t  (t),
    .ne (n_eij),
    .q  (q)
  );

  // Phase rules: the activation logic is silent while bits are being counted, and the
  // error count is frozen once the evaluation phase has begun. Both need no reset
  // qualifier: during and right after a reset x[AW] is 0 and the checks are vacuous.
  a_q_only_in_evaluation: assert property (@(posedge clk) !x[AW] |-> !q)
    else $error("q raised during the error counting phase");
  a_errors_frozen: assert property (@(posedge clk) $past(x[AW]) && x[AW] |-> $stable(n_eij))
    else $error("error count changed during the evaluation phase");

endmodule
