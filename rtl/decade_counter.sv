// decade_counter -- modulo-10 counter that selects the wire under test.
//
// A 4-bit register counts 0,1,...,9 and wraps to 0: while the value is
// below DecadeLast it is incremented, otherwise it is reloaded with zero.
// The counter value is presented directly on output_dc.
//
// Interface
//   clk_dc     clock
//   reset      run enable, active high; low clears the counter
//              asynchronously to 0
//   en         count enable; the counter advances on a rising clock edge
//              only while en is high
//   output_dc  current count, 0..9
//
// The count range, the compare-and-reload structure and the reset polarity
// follow the published design. In the published design the counter has no
// enable and, in the assembled system, is clocked by the pulse itself; here
// it stays on the system clock and the enable carries the "advance" event,
// which keeps the whole design in one clock domain. Tie en high for a
// counter that advances every clock. The published design also passes the
// count through output latches; this one drives output_dc from the
// register.
module decade_counter
  import tdr_pkg::*;
#(
  parameter int unsigned SelWidth   = SEL_WIDTH,
  parameter int unsigned DecadeLast = DECADE_LAST
) (
  input  logic                clk_dc,
  input  logic                reset,
  input  logic                en,
  output logic [SelWidth-1:0] output_dc
);

  logic [SelWidth-1:0] qtemp;

  always_ff @(posedge clk_dc or negedge reset) begin
    if (!reset) qtemp <= '0;
    else if (en) begin
      if (qtemp < SelWidth'(DecadeLast)) qtemp <= qtemp + 1'b1;
      else                               qtemp <= '0;
    end
  end

  assign output_dc = qtemp;

endmodule
