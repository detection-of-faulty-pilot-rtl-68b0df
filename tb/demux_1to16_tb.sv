// demux_1to16_tb -- exhaustive self-checking test of the 1:16 demultiplexer.
//
// Applies every select value with the input low and high and compares the
// 16 outputs with the expected word: a single one at position Sel when the
// input is high and Sel is 0..9, all zeros otherwise.
`timescale 1ns/1ps
module demux_1to16_tb;

  logic        din;
  logic [3:0]  sel;
  logic [15:0] dout;

  int checks = 0;
  int failures = 0;

  demux_1to16 dut (
    .Input_dmux  (din),
    .Sel         (sel),
    .output_dmux (dout)
  );

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int s = 0; s < 16; s++) begin
        for (int d = 0; d < 2; d++) begin
          logic [15:0] expected;
          din = 1'(d);
          sel = 4'(s);
          #10;
          expected = 16'h0000;
          if (d == 1 && s <= 9) expected[s] = 1'b1;
          checks++;
          if (dout !== expected) begin
            failures++;
            $display("FAIL sel=%0d in=%0d: out=%h expected %h", s, d, dout, expected);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
