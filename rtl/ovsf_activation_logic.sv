// ovsf_activation_logic: decides whether the received address was this node's.
//
// While `en` is 1 (evaluation phase), q = 1 when the error count `ne` is at most
// L/4 - 1 - T and the threshold offset T is itself legal, T <= L/4 - 2; otherwise
// q = 0. While `en` is 0 (error counting phase) q = 0. Raising T lowers the number of
// correctable errors, trading detection probability for fewer false alarms; a T above
// L/4 - 2 (T = 3 with L = 16) disables wake-up altogether.
//
// Purely combinational. The rule is the reference design's; forcing q to 0 outside
// the evaluation phase is this design's choice.
module ovsf_activation_logic
  import ovsf_pkg::*;
#(
  parameter int unsigned L    = OVSF_L,
  parameter int unsigned T_W  = 2,
  parameter int unsigned NE_W = 3
) (
  input  logic            en,
  input  logic [T_W-1:0]  t,
  input  logic [NE_W-1:0] ne,
  output logic            q
);

  localparam int unsigned QUARTER = L / 4;

  logic t_ok;
  logic ne_ok;

  always_comb begin
    // T <= L/4 - 2, written without a subtraction that could wrap for tiny L.
    t_ok  = (32'(t) + 2) <= QUARTER;
    // ne <= L/4 - 1 - T, i.e. ne + T + 1 <= L/4.
    ne_ok = (32'(ne) + 32'(t) + 1) <= QUARTER;
    q     = en && t_ok && ne_ok;
  end

endmodule
