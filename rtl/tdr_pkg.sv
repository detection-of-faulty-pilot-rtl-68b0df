// tdr_pkg -- constants shared by the digital TDR pulse source.
//
// The pulse source runs from a single 50 MHz board clock (20 ns period).
// A pulse is eight clock periods wide (160 ns) and is followed by fifteen
// pulse-width slots of silence (2400 ns), so one pulse leaves every
// 16 x 160 ns = 2560 ns. Pulses are steered one wire at a time through a
// 1:16 demultiplexer whose select comes from a decade counter, so only
// the first ten demultiplexer outputs are ever used.
//
// All numbers below are those of the published design except where a
// comment says otherwise.
package tdr_pkg;

  // Board clock period in nanoseconds (50 MHz oscillator).
  localparam int unsigned CLK_PERIOD_NS = 20;

  // Pulse generator: 16-bit divider counting 0..7 marks one 160 ns slot;
  // 5-bit slot counter counting 0..15 marks one pulse period.
  localparam int unsigned DIV_WIDTH = 16;
  localparam int unsigned DIV_LAST  = 7;
  localparam int unsigned CNT_WIDTH = 5;
  localparam int unsigned CNT_LAST  = 15;

  // Demultiplexer and decade counter.
  localparam int unsigned SEL_WIDTH     = 4;
  localparam int unsigned DEMUX_OUTPUTS = 16;
  localparam int unsigned USED_OUTPUTS  = 10;
  localparam int unsigned DECADE_LAST   = 9;

  // Derived timing, in clock cycles.
  localparam int unsigned PULSE_CYCLES  = DIV_LAST + 1;                    // 8
  localparam int unsigned PERIOD_CYCLES = (DIV_LAST + 1) * (CNT_LAST + 1);  // 128
  localparam int unsigned GAP_CYCLES    = PERIOD_CYCLES - PULSE_CYCLES;     // 120

endpackage
