// pair_type_counter: appearance counters of the ADEM decision circuit.
//
// The M-bit original word is split into M/2 adjacent pairs (word[2i],
// word[2i+1]); each pair's type is {word[2i], word[2i+1]}. The block returns,
// for each of the four types 00, 01, 10 and 11, how many pairs of the word
// are of that type (encoding step I). The four counts always sum to M/2.
//
// Purely combinational: each count is a population count of a one-hot pair
// decode. The document calls this part "4 counters"; the adder-tree form is
// this design's choice.
module pair_type_counter
  import adem_pkg::*;
#(
  parameter int M = 32,                                   // bus width, even
  localparam int NP    = M / 2,                           // number of pairs
  localparam int CNT_W = $clog2(NP + 1)                   // count width
) (
  input  logic [M-1:0]           word,
  output logic [3:0][CNT_W-1:0]  counts                   // counts[t], t = pair type
);

  always_comb begin
    counts = '0;
    for (int i = 0; i < NP; i++) begin
      counts[{word[2*i], word[2*i+1]}] += CNT_W'(1);
    end
  end

endmodule
