// adem_pkg: types, constants and table functions shared by the ADEM bus
// encoder and decoder.
//
// A bus word of M lines is split into M/2 adjacent pairs (b[2i], b[2i+1]).
// A pair's "type" is the 2-bit value {b[2i], b[2i+1]}, so the fixed type
// sequence (0,0),(0,1),(1,0),(1,1) is simply type index 0,1,2,3.
//
// The encoder ranks the four types by how often they appear in the word:
// A (most), B, C, D (least). Every pair is then sent as a change of the
// previously transmitted encoded pair. The change ("state") depends only
// on the pair's rank and on whether the previous encoded pair is a
// "same" pair (00/11) or a "different" pair (01/10), as in the four-state
// encoding table:
//
//   previous encoded pair | A         B           C           D
//   00, 11                | unchange  all invert  even invert odd invert
//   01, 10                | unchange  even invert odd invert  all invert
//
// "even invert" flips the even line b[2i] (type bit 1), "odd invert" flips
// the odd line b[2i+1] (type bit 0). The decoder inverts this table.
//
// Three informed-line policies are supported (MODE):
//   ADEM_FULL : 5 lines, {A, B, csel}: csel=0 when C is the earlier of
//               the two remaining types in the fixed sequence, 1 if later.
//   ADEM_4L   : 4 lines, {A, D}; B and C are the earlier and later of the
//               two remaining types in the fixed sequence.
//   ADEM_2L   : 2 lines, {D}; A, B, C are the remaining three types in
//               fixed-sequence order.
// The line codes themselves (field order, csel) are this design's choice;
// the document gives only the line counts and what they must identify.
package adem_pkg;

  typedef logic [1:0] pair_t;          // pair type {b[2i], b[2i+1]}
  typedef pair_t [3:0] order_t;        // order[r] = type holding rank r (0=A .. 3=D)

  typedef enum logic [1:0] {
    ADEM_FULL = 2'd0,
    ADEM_4L   = 2'd1,
    ADEM_2L   = 2'd2
  } adem_mode_e;

  typedef enum logic [1:0] {
    RANK_A = 2'd0,
    RANK_B = 2'd1,
    RANK_C = 2'd2,
    RANK_D = 2'd3
  } rank_e;

  // XOR masks applied to a pair type by each encoding state
  localparam pair_t ST_UNCHANGE = 2'b00;
  localparam pair_t ST_ODD_INV  = 2'b01;  // flips b[2i+1]
  localparam pair_t ST_EVEN_INV = 2'b10;  // flips b[2i]
  localparam pair_t ST_ALL_INV  = 2'b11;

  // Number of informed lines of a policy
  function automatic int info_width(adem_mode_e mode);
    case (mode)
      ADEM_FULL: return 5;
      ADEM_4L:   return 4;
      default:   return 2;
    endcase
  endfunction

  // Four-state encoding table: state mask for a pair of rank r sent after
  // previous encoded pair prev.
  function automatic pair_t state_mask(pair_t prev, rank_e r);
    logic same;
    same = (prev[1] == prev[0]);
    case (r)
      RANK_A:  return ST_UNCHANGE;
      RANK_B:  return same ? ST_ALL_INV  : ST_EVEN_INV;
      RANK_C:  return same ? ST_EVEN_INV : ST_ODD_INV;
      default: return same ? ST_ODD_INV  : ST_ALL_INV;
    endcase
  endfunction

  // Four-state decoding table: rank from the previous encoded pair and the
  // observed state mask (prev XOR current).
  function automatic rank_e state_rank(pair_t prev, pair_t mask);
    logic same;
    same = (prev[1] == prev[0]);
    case (mask)
      ST_UNCHANGE: return RANK_A;
      ST_ALL_INV:  return same ? RANK_B : RANK_D;
      ST_EVEN_INV: return same ? RANK_C : RANK_B;
      default:     return same ? RANK_D : RANK_C;   // ST_ODD_INV
    endcase
  endfunction

  // The n-th (0-based) type in the fixed sequence that is not excluded:
  // type i is chosen when it is not excluded and exactly n non-excluded
  // types precede it.
  function automatic pair_t nth_remaining(logic [3:0] excluded, logic [1:0] n);
    logic [3:0][1:0] below;   // non-excluded types before type i
    pair_t t;
    below[0] = 2'd0;
    below[1] = 2'(!excluded[0]);
    below[2] = 2'(!excluded[0]) + 2'(!excluded[1]);
    below[3] = 2'(!excluded[0]) + 2'(!excluded[1]) + 2'(!excluded[2]);
    t = 2'd0;
    for (int i = 0; i < 4; i++)
      if (!excluded[i] && below[i] == n) t = pair_t'(i);
    return t;
  endfunction

  // Full type order (A, B, C, D) carried by an informed-line code. Shared by
  // encoder and decoder so that both sides derive B/C (and A) identically.
  // The code is right-aligned in a 5-bit vector.
  function automatic order_t order_from_info(adem_mode_e mode, logic [4:0] info);
    order_t o;
    logic [3:0] ex;
    case (mode)
      ADEM_FULL: begin
        o[RANK_A] = info[4:3];
        o[RANK_B] = info[2:1];
        ex = 4'b0;
        ex[info[4:3]] = 1'b1;
        ex[info[2:1]] = 1'b1;
        o[RANK_C] = nth_remaining(ex, {1'b0, info[0]});
        o[RANK_D] = nth_remaining(ex, {1'b0, !info[0]});
      end
      ADEM_4L: begin
        o[RANK_A] = info[3:2];
        o[RANK_D] = info[1:0];
        ex = 4'b0;
        ex[info[3:2]] = 1'b1;
        ex[info[1:0]] = 1'b1;
        o[RANK_B] = nth_remaining(ex, 2'd0);
        o[RANK_C] = nth_remaining(ex, 2'd1);
      end
      default: begin
        o[RANK_D] = info[1:0];
        ex = 4'b0;
        ex[info[1:0]] = 1'b1;
        o[RANK_A] = nth_remaining(ex, 2'd0);
        o[RANK_B] = nth_remaining(ex, 2'd1);
        o[RANK_C] = nth_remaining(ex, 2'd2);
      end
    endcase
    return o;
  endfunction

  // An informed-line code is valid when the types it names are distinct.
  function automatic logic info_valid(adem_mode_e mode, logic [4:0] info);
    case (mode)
      ADEM_FULL: return info[4:3] != info[2:1];
      ADEM_4L:   return info[3:2] != info[1:0];
      default:   return 1'b1;
    endcase
  endfunction

endpackage
