// jyanken_pkg: types shared by the rock-paper-scissors (janken) judge.
//
// hand_t is the 2-bit code of one player's hand after the button pattern has
// been checked. HAND_NONE stands for any pattern other than exactly one button
// pressed. The codes are this design's own choice; the original pins carry the
// hands one-hot (GOO = rock, CHOKI = scissors, PAA = paper).
package jyanken_pkg;

  typedef enum logic [1:0] {
    HAND_NONE  = 2'd0,
    HAND_GOO   = 2'd1,   // rock
    HAND_CHOKI = 2'd2,   // scissors
    HAND_PAA   = 2'd3    // paper
  } hand_t;

  // True when hand a beats hand b: rock > scissors > paper > rock.
  // Both hands must be valid; a HAND_NONE operand never wins.
  function automatic logic beats(hand_t a, hand_t b);
    unique case (a)
      HAND_GOO:   return b == HAND_CHOKI;
      HAND_CHOKI: return b == HAND_PAA;
      HAND_PAA:   return b == HAND_GOO;
      default:    return 1'b0;
    endcase
  endfunction

endpackage
