// adem_decoder: amount-driven bus decoder (ADEM).
//
// Keeps the previous codeword seen on the bus. For each new valid word it
// takes, per pair, the state change prev XOR current (unchange, odd, even
// or all invert), looks up the rank A..D in the four-state decoding table
// (adem_pkg::state_rank, which depends on whether the previous encoded pair
// is 00/11 or 01/10), and replaces the rank by the pair type the informed
// lines assign to it (adem_pkg::order_from_info, identical to the
// encoder's derivation).
//
// Timing: decoding is combinational from the bus lines and the stored
// codeword; the recovered word and out_valid are registered, so a word on
// the bus in cycle t appears on out_data after the edge ending cycle t
// (two cycles after it entered the encoder). Reset (active low,
// synchronous) sets the stored codeword to all zeros, matching the
// encoder's reset value of the bus lines. An assertion checks that a valid
// bus word carries a well-formed informed-line code.
module adem_decoder
  import adem_pkg::*;
#(
  parameter int         M      = 32,
  parameter adem_mode_e MODE   = ADEM_4L,
  localparam int        NP     = M / 2,
  localparam int        INFO_W = info_width(MODE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bus_valid,
  input  logic [M-1:0]      bus_data,
  input  logic [INFO_W-1:0] bus_info,
  output logic              out_valid,
  output logic [M-1:0]      out_data
);

  logic [M-1:0] prev_cw;
  logic [M-1:0] decoded;
  logic [4:0]   code;
  order_t       order;

  assign code  = 5'(bus_info);
  assign order = order_from_info(MODE, code);

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      pair_t prev, cur, orig;
      prev = {prev_cw[2*i],  prev_cw[2*i+1]};
      cur  = {bus_data[2*i], bus_data[2*i+1]};
      orig = order[state_rank(prev, prev ^ cur)];
      decoded[2*i]   = orig[1];
      decoded[2*i+1] = orig[0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_cw   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= bus_valid;
      if (bus_valid) begin
        prev_cw  <= bus_data;
        out_data <= decoded;
      end
    end
  end

  // informed lines must name distinct pair types
  always_ff @(posedge clk) begin
    if (rst_n && bus_valid)
      assert (info_valid(MODE, code))
        else $error("adem_decoder: malformed informed-line code %b", bus_info);
  end

endmodule
