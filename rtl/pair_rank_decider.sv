// pair_rank_decider: comparator of the ADEM decision circuit.
//
// From the four pair-type counts it recognizes which types appear most (A),
// second most (B), third most (C) and least (D) (encoding step II), and
// forms the informed-line code that tells the decoder the order:
//   ADEM_FULL: {A, B, csel} (5 lines), ADEM_4L: {A, D} (4 lines),
//   ADEM_2L: {D} (2 lines)   -- see adem_pkg for the field meanings.
//
// Ranking is a total order: type i outranks type j when count[i] > count[j],
// or the counts are equal and i > j (a tie goes to the later type in the
// fixed sequence 00, 01, 10, 11). This matches the document's worked example,
// where equal counts of (1,0) and (0,0) give B = (1,0); the general tie rule
// is this design's choice. Each type's rank is the number of types that
// outrank it: six pairwise comparisons, no sorting network.
//
// Purely combinational. `order` is the full A..D order the encoder must use;
// it is derived from `info` exactly as the decoder derives it, so in the
// reduced policies the unreported ranks follow the fixed-sequence rule.
module pair_rank_decider
  import adem_pkg::*;
#(
  parameter int         M      = 32,
  parameter adem_mode_e MODE   = ADEM_4L,
  localparam int        NP     = M / 2,
  localparam int        CNT_W  = $clog2(NP + 1),
  localparam int        INFO_W = info_width(MODE)
) (
  input  logic [3:0][CNT_W-1:0] counts,
  output logic [INFO_W-1:0]     info,
  output order_t                order
);

  logic [3:0][1:0] rank_of;      // rank of each type
  order_t          by_rank;      // type holding each rank (true ranking)
  logic [4:0]      code;

  function automatic logic beats(logic [CNT_W-1:0] ci, logic [CNT_W-1:0] cj,
                                 int i, int j);
    return (ci > cj) || ((ci == cj) && (i > j));
  endfunction

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      rank_of[i] = 2'd0;
      for (int j = 0; j < 4; j++) begin
        if (j != i && beats(counts[j], counts[i], j, i)) rank_of[i] += 2'd1;
      end
    end
    by_rank = '0;
    for (int i = 0; i < 4; i++) by_rank[rank_of[i]] = pair_t'(i);
  end

  // csel: is C the later of the two types left after removing A and B?
  logic csel;
  always_comb begin
    csel = by_rank[RANK_C] > by_rank[RANK_D];
    case (MODE)
      ADEM_FULL: code = {by_rank[RANK_A], by_rank[RANK_B], csel};
      ADEM_4L:   code = {1'b0, by_rank[RANK_A], by_rank[RANK_D]};
      default:   code = {3'b000, by_rank[RANK_D]};
    endcase
  end

  assign info  = code[INFO_W-1:0];
  assign order = order_from_info(MODE, code);

endmodule
