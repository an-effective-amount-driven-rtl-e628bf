// adem_encoder: amount-driven bus encoder (ADEM).
//
// Each cycle with in_valid high, the M-bit original word is split into
// M/2 pairs, the pair types are counted (pair_type_counter), ranked A..D
// by frequency (pair_rank_decider), and every pair is encoded as a state
// change of the encoded pair last sent on the same two lines: rank A leaves
// the lines unchanged, ranks B, C, D apply even/odd/all invert as given by
// the four-state encoding table (adem_pkg::state_mask). Frequent types thus
// cause no transitions, and toggling (01<->10) is reserved for the rarest
// type. The informed lines carry the rank code so the decoder can invert
// the mapping.
//
// Timing: the codeword, the informed lines and bus_valid are registered:
// a word presented in cycle t is on the bus after the clock edge ending
// cycle t. One word per cycle, no back-pressure. When in_valid is low
// the bus lines hold their value (no transitions). The codeword register
// is the encoder's record of the previous codeword the document requires.
// Reset (active low, synchronous) clears all bus lines to 0, which the
// decoder assumes as its own reset value; reset, valid and the line-code
// format are this design's choices. Assertions check that idle cycles
// leave the bus untouched and that only rank-D pairs ever toggle.
module adem_encoder
  import adem_pkg::*;
#(
  parameter int         M      = 32,
  parameter adem_mode_e MODE   = ADEM_4L,
  localparam int        NP     = M / 2,
  localparam int        CNT_W  = $clog2(NP + 1),
  localparam int        INFO_W = info_width(MODE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [M-1:0]      in_data,
  output logic              bus_valid,
  output logic [M-1:0]      bus_data,   // encoded data lines
  output logic [INFO_W-1:0] bus_info    // informed lines
);

  logic [3:0][CNT_W-1:0] counts;
  logic [INFO_W-1:0]     info;
  order_t                order;
  logic [M-1:0]          codeword;

  pair_type_counter #(.M(M)) u_count (
    .word   (in_data),
    .counts (counts)
  );

  pair_rank_decider #(.M(M), .MODE(MODE)) u_rank (
    .counts (counts),
    .info   (info),
    .order  (order)
  );

  // rank of each pair type under the chosen order
  rank_e [3:0] rank_of;
  always_comb begin
    rank_of = '{default: RANK_A};
    for (int r = 0; r < 4; r++) rank_of[order[r]] = rank_e'(r);
  end

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      pair_t prev, orig, enc;
      prev = {bus_data[2*i], bus_data[2*i+1]};
      orig = {in_data[2*i], in_data[2*i+1]};
      enc  = prev ^ state_mask(prev, rank_of[orig]);
      codeword[2*i]   = enc[1];
      codeword[2*i+1] = enc[0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_valid <= 1'b0;
      bus_data  <= '0;
      bus_info  <= '0;
    end else begin
      bus_valid <= in_valid;
      if (in_valid) begin
        bus_data <= codeword;
        bus_info <= info;
      end
    end
  end

  // Bus rules: idle cycles leave every line untouched, and a pair toggles
  // (01 <-> 10) only when it carries the least frequent type D.
  property p_idle_holds;
    @(posedge clk) disable iff (!rst_n)
      !in_valid |=> ($stable(bus_data) && $stable(bus_info));
  endproperty
  a_idle_holds: assert property (p_idle_holds)
    else $error("adem_encoder: bus changed on an idle cycle");

  always_ff @(posedge clk) begin
    if (rst_n && in_valid) begin
      for (int i = 0; i < NP; i++) begin
        if ((bus_data[2*i] != bus_data[2*i+1]) && (codeword[2*i] != bus_data[2*i])
            && (codeword[2*i+1] != bus_data[2*i+1]))
          assert (rank_of[{in_data[2*i], in_data[2*i+1]}] == RANK_D)
            else $error("adem_encoder: pair %0d toggles for a type other than D", i);
      end
    end
  end

endmodule
