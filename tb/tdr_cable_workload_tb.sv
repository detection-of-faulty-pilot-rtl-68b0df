// tdr_cable_workload_tb -- the three cable measurements of the reference
// experiment, run against the full-size pulse source.
//
// Three wire models hang on demultiplexer outputs 0, 1 and 2:
//   wire 0  healthy 10 m cable, step returns after 100 ns (open far end)
//   wire 1  faulty cable 1, step returns after 36 ns (open fault)
//   wire 2  faulty cable 2, step returns after 51 ns (short fault)
// For every pulse the test acts as the oscilloscope: it takes the rising
// edge of output_reff1 as time zero, waits for the first change of the
// injection-point voltage of the wire that carries the pulse, and converts
// that time to a distance with D = t * vp, vp = 0.0995 m/ns. The distances
// must match 9.95 m, 3.582 m and 5.0745 m within 1 %, the step must land on
// the plateau of the 160 ns pulse (so the step waveform is visible), its
// polarity must match the fault type, and the wires without a pulse must
// stay at 0 V. Each wire is measured on three sweeps.
`timescale 1ns/1ps
module tdr_cable_workload_tb;

  localparam int  WIRES  = 10;
  localparam real VP_M_PER_NS = 0.0995;
  localparam real PULSE_NS = 160.0;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [9:0] dmux;
  logic       reff1;
  logic       cable;
  real        v [3];

  int checks = 0;
  int failures = 0;
  int measured [3] = '{0, 0, 0};

  tdr_top dut (
    .MClk         (clk),
    .SeqReset     (rst_n),
    .output_dmux  (dmux),
    .output_reff1 (reff1),
    .output_cable (cable)
  );

  pilot_cable_model #(.RoundTripNs(100.0), .Gamma( 1.0)) u_healthy (.drive(dmux[0]), .v_inject(v[0]));
  pilot_cable_model #(.RoundTripNs( 36.0), .Gamma( 1.0)) u_fault1  (.drive(dmux[1]), .v_inject(v[1]));
  pilot_cable_model #(.RoundTripNs( 51.0), .Gamma(-1.0)) u_fault2  (.drive(dmux[2]), .v_inject(v[2]));

  always #10 clk = ~clk;

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Oscilloscope: one measurement per pulse on the wires that have a model.
  initial begin
    real expected_m [3] = '{9.95, 3.582, 5.0745};
    real expected_v [3] = '{2.0, 2.0, 0.0};
    int  pulse_no = 0;
    forever begin
      automatic realtime t0, t1;
      automatic int      w;
      automatic real     d;
      @(posedge reff1);
      t0 = $realtime;
      w = pulse_no % WIRES;
      pulse_no++;
      #1;
      if (w < 3) begin
        checks++;
        if (v[w] != 1.0) begin
          failures++;
          $display("FAIL wire %0d: incident level %0f, expected 1.0", w, v[w]);
        end
        @(v[w]);
        t1 = $realtime;
        d = (t1 - t0) * VP_M_PER_NS;
        measured[w]++;
        $display("wire %0d: step after %0.1f ns -> D = %0.4f m (level %0.1f)", w, real'(t1 - t0), d, v[w]);
        checks++;
        if (absr(d - expected_m[w]) > 0.01 * expected_m[w]) begin
          failures++;
          $display("FAIL wire %0d: distance %0f m, expected %0f m", w, d, expected_m[w]);
        end
        checks++;
        if (!(reff1 && (t1 - t0) < PULSE_NS)) begin
          failures++;
          $display("FAIL wire %0d: reflection not on the pulse plateau", w);
        end
        checks++;
        if (v[w] != expected_v[w]) begin
          failures++;
          $display("FAIL wire %0d: level after reflection %0f, expected %0f", w, v[w], expected_v[w]);
        end
      end else begin
        checks++;
        if (v[0] != 0.0 || v[1] != 0.0 || v[2] != 0.0) begin
          failures++;
          $display("FAIL pulse for wire %0d leaked onto a modelled wire", w);
        end
      end
    end
  end

  initial begin
    repeat (40 * 128) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Hold reset long enough for any echo of power-up levels to die out.
    repeat (20) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (23 * 128) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (measured[i] != 3) begin
        failures++;
        $display("FAIL wire %0d measured %0d times, expected 3", i, measured[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
