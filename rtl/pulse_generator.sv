// pulse_generator -- periodic TDR test pulse from a two-stage counter.
//
// A divider counts clock cycles 0..DIV_LAST and wraps; each wrap ends one
// "slot" of DIV_LAST+1 cycles (8 x 20 ns = 160 ns at the defaults). A slot
// counter advances once per slot, counting 0..CNT_LAST and wrapping
// (16 slots). The output pulse is high for the whole of slot 0 and low for
// slots 1..15, which gives a 160 ns pulse followed by 15 x 160 ns = 2400 ns
// of silence, repeating every 2560 ns.
//
// Interface
//   Master_Clk2    board clock (50 MHz in the published design)
//   Master_Reset2  run enable, active high. While it is low both counters
//                  are held at their terminal counts (asynchronously) and
//                  the output is low.
//   Output_Pulse2  the pulse. It is a decode of the slot counter register.
//                  It rises at the first rising clock edge after
//                  Master_Reset2 goes high and then every
//                  (DivLast+1)*(CntLast+1) = 128 cycles, staying high for
//                  DivLast+1 = 8 cycles each time.
//
// The counter widths (16-bit divider, 5-bit slot counter), the terminal
// counts 7 and 15, the pulse being high while the slot counter is zero and
// the reset polarity follow the published design. The published design
// clears both counters to zero in reset, which would hold the output high
// while the generator is stopped; here reset loads the terminal counts
// instead, so the output is low in reset and the first edge after reset
// wraps both counters and starts a full-width pulse.
module pulse_generator
  import tdr_pkg::*;
#(
  parameter int unsigned DivWidth = DIV_WIDTH,
  parameter int unsigned DivLast  = DIV_LAST,
  parameter int unsigned CntWidth = CNT_WIDTH,
  parameter int unsigned CntLast  = CNT_LAST
) (
  input  logic Master_Clk2,
  input  logic Master_Reset2,
  output logic Output_Pulse2
);

  logic [DivWidth-1:0] divider;
  logic [CntWidth-1:0] count;
  logic                slot_end;

  assign slot_end = (divider == DivWidth'(DivLast));

  // Divider: one slot of DivLast+1 clock cycles.
  always_ff @(posedge Master_Clk2 or negedge Master_Reset2) begin
    if (!Master_Reset2)  divider <= DivWidth'(DivLast);
    else if (slot_end)   divider <= '0;
    else                 divider <= divider + 1'b1;
  end

  // Slot counter: one pulse period of CntLast+1 slots.
  always_ff @(posedge Master_Clk2 or negedge Master_Reset2) begin
    if (!Master_Reset2) count <= CntWidth'(CntLast);
    else if (slot_end) begin
      if (count == CntWidth'(CntLast)) count <= '0;
      else                             count <= count + 1'b1;
    end
  end

  assign Output_Pulse2 = (count == '0);

endmodule
