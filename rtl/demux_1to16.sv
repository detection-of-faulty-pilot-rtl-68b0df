// demux_1to16 -- steers the TDR pulse to one pilot-cable wire.
//
// Output i carries Input_dmux when Sel equals i and is low otherwise, so
// the output word is always zero or one-hot. Only outputs 0..UsedOutputs-1
// (0..9 at the defaults) have a select decoder, because the select comes
// from a decade counter; the remaining outputs are held low. Purely
// combinational: an output follows Input_dmux and Sel with no clock delay.
//
// Interface
//   Input_dmux  pulse to distribute
//   Sel         index of the output that receives the pulse
//   output_dmux one bit per output
//
// The 16-output width, the ten decoded outputs and the "output equals input"
// behaviour follow the published design. The published design leaves the
// six undecoded outputs undriven (high impedance); here they are driven low
// so that every output has a defined level.
module demux_1to16
  import tdr_pkg::*;
#(
  parameter int unsigned NumOutputs  = DEMUX_OUTPUTS,
  parameter int unsigned UsedOutputs = USED_OUTPUTS,
  parameter int unsigned SelWidth    = SEL_WIDTH
) (
  input  logic                  Input_dmux,
  input  logic [SelWidth-1:0]   Sel,
  output logic [NumOutputs-1:0] output_dmux
);

  always_comb begin
    output_dmux = '0;
    for (int unsigned i = 0; i < UsedOutputs && i < NumOutputs; i++) begin
      if (Sel == SelWidth'(i)) output_dmux[i] = Input_dmux;
    end
  end

  // At most one wire is ever driven.
  always_comb begin
    assert ($countones(output_dmux) <= 1)
      else $error("demux_1to16: more than one output active");
  end

endmodule
