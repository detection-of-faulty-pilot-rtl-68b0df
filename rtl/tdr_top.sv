// tdr_top -- digital pulse source for time-domain reflectometry (TDR) on
// a multi-wire pilot cable.
//
// A pulse generator produces 160 ns pulses every 2560 ns from the 50 MHz
// board clock. Each pulse is steered by a 1:16 demultiplexer to one of ten
// cable wires; a decade counter supplies the demultiplexer select and
// advances once per pulse, so consecutive pulses visit wires 0,1,...,9 and
// then start over at wire 0. The same pulse is also brought out unsteered
// on output_cable and output_reff1 (by their names, a direct output for a
// single cable and a reference for the oscilloscope). The reflected waveform is observed on
// an external oscilloscope; no capture logic is part of this design.
//
// Interface
//   MClk          50 MHz clock
//   SeqReset      run enable, active high; low clears all counters, stops
//                 the pulses and returns the wire select to 0
//   output_dmux   one output per cable wire (ten wires)
//   output_reff1  the pulse, unsteered
//   output_cable  the pulse, unsteered
//
// Timing: the first pulse starts at the first rising clock edge after
// SeqReset rises and goes to wire 0. The wire select advances on the clock after each
// pulse ends, so it is stable for the whole of every pulse.
//
// The three blocks, their connection and the pin names follow the
// published design. In the published design the decade counter is clocked
// by the pulse; here an edge detector on the pulse gives the counter a
// one-cycle enable at the end of each pulse instead, keeping the design on
// a single clock.
module tdr_top
  import tdr_pkg::*;
#(
  parameter int unsigned DivLast     = DIV_LAST,
  parameter int unsigned CntLast     = CNT_LAST,
  parameter int unsigned UsedOutputs = USED_OUTPUTS
) (
  input  logic                   MClk,
  input  logic                   SeqReset,
  output logic [UsedOutputs-1:0] output_dmux,
  output logic                   output_reff1,
  output logic                   output_cable
);

  logic                     pulse;
  logic                     pulse_q;
  logic                     advance;
  logic [SEL_WIDTH-1:0]     sel;
  logic [DEMUX_OUTPUTS-1:0] dmux_all;

  pulse_generator #(
    .DivWidth (DIV_WIDTH),
    .DivLast  (DivLast),
    .CntWidth (CNT_WIDTH),
    .CntLast  (CntLast)
  ) u_pulse (
    .Master_Clk2   (MClk),
    .Master_Reset2 (SeqReset),
    .Output_Pulse2 (pulse)
  );

  // Falling-edge detector: advance the wire select once per pulse.
  always_ff @(posedge MClk or negedge SeqReset) begin
    if (!SeqReset) pulse_q <= 1'b0;
    else           pulse_q <= pulse;
  end
  assign advance = pulse_q & ~pulse;

  decade_counter #(
    .SelWidth   (SEL_WIDTH),
    .DecadeLast (UsedOutputs - 1)
  ) u_counter (
    .clk_dc    (MClk),
    .reset     (SeqReset),
    .en        (advance),
    .output_dc (sel)
  );

  demux_1to16 #(
    .NumOutputs  (DEMUX_OUTPUTS),
    .UsedOutputs (UsedOutputs),
    .SelWidth    (SEL_WIDTH)
  ) u_demux (
    .Input_dmux  (pulse),
    .Sel         (sel),
    .output_dmux (dmux_all)
  );

  // Demultiplexer outputs UsedOutputs..15 are never selected by the decade
  // counter and are not brought out.
  assign output_dmux  = dmux_all[UsedOutputs-1:0];
  assign output_cable = pulse;
  assign output_reff1 = pulse;

endmodule
