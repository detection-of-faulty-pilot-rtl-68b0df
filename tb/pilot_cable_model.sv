// pilot_cable_model -- behavioural model of one pilot-cable wire seen from
// its injection point (not synthesizable; testbench use only).
//
// The wire is a lossless transmission line. A voltage step applied at the
// injection point travels to the impedance mismatch (the far end of a
// healthy wire, or the fault on a damaged one) and returns after the round
// trip time RoundTripNs, scaled by the reflection coefficient Gamma:
// +1 for an open end (same polarity as the injected pulse), -1 for a short
// (opposite polarity), 0 for a matched termination. The voltage at the
// injection point is therefore
//     v_inject(t) = drive(t) + Gamma * drive(t - RoundTripNs)
// in units of the drive amplitude. Delays use the 1 ns time unit.
//
// Interface
//   drive     logic level applied to the wire by the pulse source
//   v_inject  voltage at the injection point, as an oscilloscope sees it
`timescale 1ns/1ps
module pilot_cable_model #(
  parameter real RoundTripNs = 100.0,
  parameter real Gamma       = 1.0
) (
  input  logic drive,
  output real  v_inject
);

  logic echo = 1'b0;

  // Transport delay: every edge of the drive comes back after the round trip.
  always @(drive) echo <= #(RoundTripNs) drive;

  always_comb v_inject = (drive ? 1.0 : 0.0) + Gamma * (echo ? 1.0 : 0.0);

endmodule
