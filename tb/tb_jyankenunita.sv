// tb_jyankenunita: end-to-end self-check of the two-player janken judge.
//
// Walks all 64 patterns of the six buttons, then 256 random ones, and
// compares kachi1/kachi2/oaiko with a reference written as the original
// sum-of-products equations over the raw buttons (each product term fixes all
// six inputs). It counts how often each situation the judge distinguishes
// occurred -- player 1 wins, player 2 wins, draw, and a rejected button
// pattern -- and counts a failure for any that never did. A test clock paces
// the stimulus and drives a watchdog. The top is used at its defaults.
module tb_jyankenunita;

  logic goo1, choki1, paa1, goo2, choki2, paa2;
  logic kachi1, kachi2, oaiko;

  int checks   = 0;
  int failures = 0;
  int n_win1 = 0, n_win2 = 0, n_draw = 0, n_reject = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  jyankenunita dut (.*);

  task automatic apply(input logic [5:0] b);
    logic g1, c1, p1, g2, c2, p2;
    logic e_k1, e_k2, e_ai;
    {g1, c1, p1, g2, c2, p2} = b;
    {goo1, choki1, paa1, goo2, choki2, paa2} = b;
    @(posedge clk);
    // Reference: one product term per winning or drawn pair of hands.
    e_k1 = ( g1 & ~c1 & ~p1 & ~g2 &  c2 & ~p2)     // rock     vs scissors
         | (~g1 &  c1 & ~p1 & ~g2 & ~c2 &  p2)     // scissors vs paper
         | (~g1 & ~c1 &  p1 &  g2 & ~c2 & ~p2);    // paper    vs rock
    e_k2 = ( g1 & ~c1 & ~p1 & ~g2 & ~c2 &  p2)     // rock     vs paper
         | (~g1 &  c1 & ~p1 &  g2 & ~c2 & ~p2)     // scissors vs rock
         | (~g1 & ~c1 &  p1 & ~g2 &  c2 & ~p2);    // paper    vs scissors
    e_ai = ( g1 & ~c1 & ~p1 &  g2 & ~c2 & ~p2)
         | (~g1 &  c1 & ~p1 & ~g2 &  c2 & ~p2)
         | (~g1 & ~c1 &  p1 & ~g2 & ~c2 &  p2);
    checks++;
    if ({kachi1, kachi2, oaiko} !== {e_k1, e_k2, e_ai}) begin
      failures++;
      $display("FAIL g1c1p1=%b%b%b g2c2p2=%b%b%b: kachi1/kachi2/oaiko=%b%b%b expected %b%b%b",
               g1, c1, p1, g2, c2, p2, kachi1, kachi2, oaiko, e_k1, e_k2, e_ai);
    end
    if (e_k1) n_win1++;
    if (e_k2) n_win2++;
    if (e_ai) n_draw++;
    if (!(e_k1 | e_k2 | e_ai)) n_reject++;
  endtask

  initial begin
    for (int i = 0; i < 64; i++) apply(6'(i));
    for (int i = 0; i < 256; i++) apply(6'($urandom_range(63)));
    $display("situations: player1 wins=%0d player2 wins=%0d draws=%0d rejected=%0d",
             n_win1, n_win2, n_draw, n_reject);
    checks++;
    if (n_win1 == 0 || n_win2 == 0 || n_draw == 0 || n_reject == 0) begin
      failures++;
      $display("FAIL a situation never occurred");
    end
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
