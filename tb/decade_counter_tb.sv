// decade_counter_tb -- self-checking test of the modulo-10 counter.
//
// Drives the count enable with a random pattern (and a long stretch held
// high, which makes the counter advance every clock as in a free-running
// decade counter) and compares output_dc every cycle with a reference count
// that goes 0..9 and wraps. Also checks that the count holds while the
// enable is low, and that reset clears it asynchronously.
`timescale 1ns/1ps
module decade_counter_tb;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic [3:0] q;

  int checks = 0;
  int failures = 0;
  int wraps = 0;
  int ref_q = 0;

  decade_counter dut (
    .clk_dc    (clk),
    .reset     (rst_n),
    .en        (en),
    .output_dc (q)
  );

  always #10 clk = ~clk;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) ref_q <= 0;
    else if (en) begin
      if (ref_q == 9) wraps++;
      ref_q <= (ref_q + 1) % 10;
    end
  end

  task automatic check_now(string what);
    checks++;
    if (int'(q) != ref_q) begin
      failures++;
      if (failures < 10) $display("FAIL %s: output_dc=%0d expected %0d", what, q, ref_q);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    check_now("in reset");
    rst_n = 1'b1;
    // Free-running: exactly the sequence 0,1,...,9,0,...
    en = 1'b1;
    for (int i = 0; i < 25; i++) begin
      @(negedge clk);
      check_now("free-running");
      checks++;
      if (int'(q) != (i + 1) % 10) begin
        failures++;
        $display("FAIL step %0d: output_dc=%0d expected %0d", i, q, (i + 1) % 10);
      end
    end
    // Random enable pattern.
    for (int i = 0; i < 400; i++) begin
      en = 1'($urandom_range(0, 1));
      @(negedge clk);
      check_now("random enable");
    end
    // Asynchronous reset between clock edges.
    en = 1'b1;
    while (q == 0) @(negedge clk);
    #3 rst_n = 1'b0;
    #1;
    checks++;
    if (q != 0) begin
      failures++;
      $display("FAIL asynchronous reset did not clear output_dc");
    end
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      check_now("after reset");
    end
    checks++;
    if (wraps < 3) begin
      failures++;
      $display("FAIL counter wrapped only %0d times", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
