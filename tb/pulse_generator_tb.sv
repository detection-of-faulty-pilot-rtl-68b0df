// pulse_generator_tb -- self-checking test of the TDR pulse generator.
//
// Runs the generator at its default parameters from a 50 MHz clock and
// compares Output_Pulse2 every cycle with a reference: after reset is
// released, the pulse is high during cycles 0..7 of every 128-cycle period
// (counting the first rising edge after release as cycle 0). Edge times are
// measured as well: every pulse must be 160 ns wide and followed by
// 2400 ns of silence. A reset in the middle of a pulse must drive the
// output low at once and restart the sequence.
`timescale 1ns/1ps
module pulse_generator_tb;

  localparam int PULSE_NS  = 160;
  localparam int GAP_NS    = 2400;
  localparam int CLK_NS    = 20;
  localparam int PULSE_CYC = PULSE_NS / CLK_NS;            // 8
  localparam int PERIOD_CYC = (PULSE_NS + GAP_NS) / CLK_NS; // 128

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pulse;

  int checks = 0;
  int failures = 0;

  pulse_generator dut (
    .Master_Clk2   (clk),
    .Master_Reset2 (rst_n),
    .Output_Pulse2 (pulse)
  );

  always #(CLK_NS/2) clk = ~clk;

  // Cycle index since reset release; -1 while in reset.
  int cyc = -1;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) cyc <= -1;
    else        cyc <= cyc + 1;
  end

  // Per-cycle comparison against the reference, half a clock after the edge.
  always @(negedge clk) begin
    logic exp_pulse;
    exp_pulse = (cyc >= 0) && ((cyc % PERIOD_CYC) < PULSE_CYC);
    checks++;
    if (pulse !== exp_pulse) begin
      failures++;
      if (failures < 10)
        $display("FAIL cycle %0d: pulse=%0b expected %0b", cyc, pulse, exp_pulse);
    end
  end

  // Edge timing: widths and gaps in ns.
  realtime t_rise = -1, t_fall = -1;
  int widths = 0, gaps = 0;
  always @(posedge pulse) begin
    if (t_fall >= 0 && rst_n) begin
      checks++; gaps++;
      if ($realtime - t_fall != GAP_NS) begin
        failures++;
        $display("FAIL gap %0t ns, expected %0d", $realtime - t_fall, GAP_NS);
      end
    end
    t_rise = $realtime;
  end
  always @(negedge pulse) begin
    if (t_rise >= 0 && rst_n) begin
      checks++; widths++;
      if ($realtime - t_rise != PULSE_NS) begin
        failures++;
        $display("FAIL width %0t ns, expected %0d", $realtime - t_rise, PULSE_NS);
      end
    end
    t_fall = rst_n ? $realtime : -1;
  end

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    checks++;
    if (pulse !== 1'b0) begin
      failures++;
      $display("FAIL pulse high while in reset");
    end
    @(negedge clk) rst_n = 1'b1;
    // Five full periods.
    repeat (5 * PERIOD_CYC) @(posedge clk);
    // Reset in the middle of a pulse: output must drop at once.
    repeat (3) @(posedge clk);
    #3;
    checks++;
    if (pulse !== 1'b1) begin
      failures++;
      $display("FAIL expected to be inside a pulse before the mid-pulse reset");
    end
    t_rise = -1; t_fall = -1;
    rst_n = 1'b0;
    #1;
    checks++;
    if (pulse !== 1'b0) begin
      failures++;
      $display("FAIL pulse not cleared by asynchronous reset");
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3 * PERIOD_CYC) @(posedge clk);
    @(negedge clk);
    checks++;
    if (widths < 7 || gaps < 6) begin
      failures++;
      $display("FAIL only %0d widths and %0d gaps measured", widths, gaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
