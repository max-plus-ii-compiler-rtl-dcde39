// tb_jyanken_hand_decode: exhaustive self-check of one player's button decoder.
//
// Applies all 8 button patterns, several times in random order, and compares
// hand and valid with a reference that counts the pressed buttons: valid only
// for exactly one, and then the hand of that button. A free-running test clock
// paces the stimulus and drives a watchdog.
module tb_jyanken_hand_decode;
  import jyanken_pkg::*;

  logic  goo, choki, paa;
  hand_t hand;
  logic  valid;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  jyanken_hand_decode dut (.goo, .choki, .paa, .hand, .valid);

  task automatic apply(input logic [2:0] b);
    int    n;
    hand_t exp_hand;
    {goo, choki, paa} = b;
    @(posedge clk);
    n        = int'(b[0]) + int'(b[1]) + int'(b[2]);
    exp_hand = HAND_NONE;
    if (n == 1) begin
      if (b[2]) exp_hand = HAND_GOO;
      if (b[1]) exp_hand = HAND_CHOKI;
      if (b[0]) exp_hand = HAND_PAA;
    end
    checks++;
    if (valid !== (n == 1) || hand !== exp_hand) begin
      failures++;
      $display("FAIL buttons g/c/p=%b: hand=%s valid=%b, expected hand=%s valid=%b",
               b, hand.name(), valid, exp_hand.name(), n == 1);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) apply(3'(i));
    for (int i = 0; i < 64; i++) apply(3'($urandom_range(7)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
