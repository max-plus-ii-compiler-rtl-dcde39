// jyankenunita: two-player rock-paper-scissors (janken) judge.
//
// Each player has three active-high buttons: goo (rock), choki (scissors) and
// paa (paper). The judge raises exactly one of its three outputs when both
// players show a valid hand (exactly one button each):
//   kachi1 - player 1 wins   (rock beats scissors, scissors beat paper,
//   kachi2 - player 2 wins    paper beats rock)
//   oaiko  - draw, both players show the same hand
// If either player presses no button or more than one, all outputs stay low.
// This is the truth table of the original design, a 6-input, 3-output block
// of logic fitted into 11 logic cells of a FLEX 8000 device; the pin numbers
// of that fit are noted at each port.
//
// Structure: one jyanken_hand_decode per player turns the buttons into a
// checked hand code, and a small compare stage picks the verdict. The split
// into decoders and a compare stage is this design's own; the original is a
// flat set of sum-of-products equations with the same function.
//
// Timing: purely combinational, no clock and no reset; outputs follow the
// buttons after the gate delay.
module jyankenunita
  import jyanken_pkg::*;
(
  input  logic goo1,     // player 1 rock      (pin 72)
  input  logic choki1,   // player 1 scissors  (pin 12)
  input  logic paa1,     // player 1 paper     (pin 31)
  input  logic goo2,     // player 2 rock      (pin 13)
  input  logic choki2,   // player 2 scissors  (pin 54)
  input  logic paa2,     // player 2 paper     (pin 73)
  output logic kachi1,   // player 1 wins      (pin 56)
  output logic kachi2,   // player 2 wins      (pin 22)
  output logic oaiko     // draw               (pin 62)
);

  hand_t hand1, hand2;
  logic  valid1, valid2;

  jyanken_hand_decode u_player1 (
    .goo   (goo1),
    .choki (choki1),
    .paa   (paa1),
    .hand  (hand1),
    .valid (valid1)
  );

  jyanken_hand_decode u_player2 (
    .goo   (goo2),
    .choki (choki2),
    .paa   (paa2),
    .hand  (hand2),
    .valid (valid2)
  );

  always_comb begin
    logic both_valid;
    both_valid = valid1 && valid2;
    kachi1     = both_valid && beats(hand1, hand2);
    kachi2     = both_valid && beats(hand2, hand1);
    oaiko      = both_valid && (hand1 == hand2);
  end

  // At most one verdict at a time.
  always_comb begin
    assert final ($onehot0({kachi1, kachi2, oaiko}))
      else $error("jyankenunita: more than one verdict raised");
  end

endmodule
