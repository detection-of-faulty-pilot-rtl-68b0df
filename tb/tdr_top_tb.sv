// tdr_top_tb -- end-to-end test of the TDR pulse source at full size.
//
// Runs the top level with all parameters at their defaults (50 MHz clock,
// 160 ns pulses every 2560 ns, ten wires) through two complete sweeps of
// the ten wires and part of a third, then resets it in the middle of a
// pulse and sweeps again. Every cycle the outputs are compared with a
// reference: after reset release the k-th 128-cycle period carries a pulse
// during its first 8 cycles, on output_cable, output_reff1 and on wire
// (k mod 10) of output_dmux, with all other wires low. Edge times on
// output_cable are measured (160 ns high, 2400 ns low).
//
// Mechanisms counted, each of which must occur: a pulse on each of the ten
// wires, a wrap of the wire select from 9 back to 0, and a restart after
// a reset in the middle of a pulse.
`timescale 1ns/1ps
module tdr_top_tb;

  localparam int CLK_NS     = 20;
  localparam int PULSE_NS   = 160;
  localparam int GAP_NS     = 2400;
  localparam int PULSE_CYC  = PULSE_NS / CLK_NS;
  localparam int PERIOD_CYC = (PULSE_NS + GAP_NS) / CLK_NS;
  localparam int WIRES      = 10;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [9:0] dmux;
  logic       reff1;
  logic       cable;

  int checks = 0;
  int failures = 0;
  int wire_hits [WIRES];
  int wraps = 0;
  int restarts = 0;

  tdr_top dut (
    .MClk         (clk),
    .SeqReset     (rst_n),
    .output_dmux  (dmux),
    .output_reff1 (reff1),
    .output_cable (cable)
  );

  always #(CLK_NS/2) clk = ~clk;

  int cyc = -1;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) cyc <= -1;
    else        cyc <= cyc + 1;
  end

  always @(negedge clk) begin
    logic       exp_pulse;
    int         w;
    logic [9:0] exp_dmux;
    exp_pulse = (cyc >= 0) && ((cyc % PERIOD_CYC) < PULSE_CYC);
    w      = (cyc >= 0) ? (cyc / PERIOD_CYC) % WIRES : 0;
    exp_dmux  = '0;
    if (exp_pulse) exp_dmux[w] = 1'b1;
    checks++;
    if (cable !== exp_pulse || reff1 !== exp_pulse || dmux !== exp_dmux) begin
      failures++;
      if (failures < 10)
        $display("FAIL cycle %0d: cable=%0b reff1=%0b dmux=%b expected pulse=%0b dmux=%b",
                 cyc, cable, reff1, dmux, exp_pulse, exp_dmux);
    end
    // Count each pulse once, at its first cycle.
    if (exp_pulse && (cyc % PERIOD_CYC) == 0) begin
      wire_hits[w]++;
      if (w == 0 && cyc > 0) wraps++;
    end
  end

  realtime t_rise = -1, t_fall = -1;
  always @(posedge cable) begin
    if (t_fall >= 0) begin
      checks++;
      if ($realtime - t_fall != GAP_NS) begin
        failures++;
        $display("FAIL gap between pulses %0t ns, expected %0d", $realtime - t_fall, GAP_NS);
      end
    end
    t_rise = $realtime;
  end
  always @(negedge cable) begin
    if (t_rise >= 0 && rst_n) begin
      checks++;
      if ($realtime - t_rise != PULSE_NS) begin
        failures++;
        $display("FAIL pulse width %0t ns, expected %0d", $realtime - t_rise, PULSE_NS);
      end
    end
    t_fall = rst_n ? $realtime : -1;
  end

  initial begin
    repeat (60 * PERIOD_CYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (wire_hits[i]) wire_hits[i] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // 25 pulses: wires 0..9, 0..9, 0..4.
    repeat (25 * PERIOD_CYC) @(posedge clk);
    // Now inside the pulse on wire 5: reset mid-pulse.
    repeat (3) @(posedge clk);
    #3;
    checks++;
    if (dmux !== 10'b00_0010_0000) begin
      failures++;
      $display("FAIL expected pulse on wire 5 before reset, dmux=%b", dmux);
    end
    t_rise = -1; t_fall = -1;
    rst_n = 1'b0;
    #1;
    checks++;
    if (dmux !== '0 || cable !== 1'b0 || reff1 !== 1'b0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    repeat (6) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    restarts++;
    // Restart sweep: must begin again at wire 0.
    repeat (12 * PERIOD_CYC) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < WIRES; i++) begin
      checks++;
      if (wire_hits[i] == 0) begin
        failures++;
        $display("FAIL no pulse ever reached wire %0d", i);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL wire select never wrapped"); end
    checks++;
    if (restarts == 0) begin failures++; $display("FAIL no restart after reset"); end
    $display("wire hits: %p, wraps=%0d, restarts=%0d", wire_hits, wraps, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
