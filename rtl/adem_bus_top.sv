// adem_bus_top: low-power data bus with ADEM coding, end to end.
//
// Original words enter the encoder, travel over M encoded data lines plus
// INFO_W informed lines (5, 4 or 2 depending on MODE) and a valid strobe,
// and leave the decoder as the original words two clock cycles later. The
// bus lines are brought out so their switching activity can be observed;
// in silicon the M data lines are routed as M/2 pairs with the gap between
// neighbouring pairs widened (spacing), which is a layout property and has
// no RTL counterpart here.
//
// Defaults follow the document's main evaluation point: M = 32 and the
// 4-informed-line policy (ADEM_4L).
module adem_bus_top
  import adem_pkg::*;
#(
  parameter int         M      = 32,
  parameter adem_mode_e MODE   = ADEM_4L,
  localparam int        INFO_W = info_width(MODE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [M-1:0]      in_data,
  output logic              out_valid,
  output logic [M-1:0]      out_data,
  output logic              bus_valid,
  output logic [M-1:0]      bus_data,
  output logic [INFO_W-1:0] bus_info
);

  adem_encoder #(.M(M), .MODE(MODE)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (in_data),
    .bus_valid (bus_valid),
    .bus_data  (bus_data),
    .bus_info  (bus_info)
  );

  adem_decoder #(.M(M), .MODE(MODE)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_valid (bus_valid),
    .bus_data  (bus_data),
    .bus_info  (bus_info),
    .out_valid (out_valid),
    .out_data  (out_data)
  );

endmodule
