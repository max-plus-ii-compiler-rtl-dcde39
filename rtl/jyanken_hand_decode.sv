// jyanken_hand_decode: checks and encodes the three buttons of one player.
//
// A player shows a hand by pressing one of three active-high buttons: goo
// (rock), choki (scissors) or paa (paper). The hand counts only when exactly
// one button is high; with none or with two or three pressed, valid is low and
// hand is HAND_NONE. This follows the judge's original logic equations, in
// which every product term fixes all three buttons of each player (one high,
// two low); gathering that test into a per-player module is this design's own
// structuring.
//
// Interface: goo, choki, paa in; hand (jyanken_pkg::hand_t) and valid out.
// Timing: purely combinational, no clock.
module jyanken_hand_decode
  import jyanken_pkg::*;
(
  input  logic  goo,
  input  logic  choki,
  input  logic  paa,
  output hand_t hand,
  output logic  valid
);

  always_comb begin
    unique case ({goo, choki, paa})
      3'b100:  hand = HAND_GOO;
      3'b010:  hand = HAND_CHOKI;
      3'b001:  hand = HAND_PAA;
      default: hand = HAND_NONE;
    endcase
    valid = (hand != HAND_NONE);
  end

endmodule
