// tb_adem_decoder: feeds five decoder configurations (M=32 with the 5-, 4-
// and 2-line policies, M=8 and M=16) with bus words produced by the
// reference encoder from random data (with idle cycles and a mid-run
// reset) and checks that each recovers the original word one clock after
// the bus word, and that out_valid follows bus_valid. The first word is
// the document's 8-pair example codeword, decoded at M=16.
module tb_adem_decoder;
  import adem_pkg::*;
  import adem_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [63:0] data = '0;

  always #5 clk = ~clk;

  localparam int NCFG = 5;
  localparam int         CFG_M    [NCFG] = '{32, 32, 32, 8, 16};
  localparam adem_mode_e CFG_MODE [NCFG] = '{ADEM_FULL, ADEM_4L, ADEM_2L, ADEM_4L, ADEM_FULL};

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int         M    = CFG_M[g];
    localparam adem_mode_e MODE = CFG_MODE[g];
    localparam int         IW   = info_width(MODE);
    logic          bus_valid = 1'b0;
    logic [M-1:0]  bus_data  = '0;
    logic [IW-1:0] bus_info  = '0;
    logic          out_valid;
    logic [M-1:0]  out_data;
    logic [63:0]   prev = '0;
    logic [M-1:0]  expect_data = '0;

    adem_decoder #(.M(M), .MODE(MODE)) dut (
      .clk(clk), .rst_n(rst_n), .bus_valid(bus_valid), .bus_data(bus_data),
      .bus_info(bus_info), .out_valid(out_valid), .out_data(out_data)
    );

    // drive a bus word per cycle from the reference encoder, shortly
    // after each rising edge (stimulus changes on falling edges)
    always @(posedge clk) begin
      logic [63:0] cw;
      int code;
      #2;
      if (!rst_n) begin
        prev = '0;
        bus_valid = 1'b0;
      end else begin
        bus_valid = valid;
        if (valid) begin
          encode(int'(MODE), M, data & ((64'd1 << M) - 1), prev, cw, code);
          bus_data    = cw[M-1:0];
          bus_info    = IW'(code);
          expect_data = data[M-1:0];
          prev = cw;
        end
      end
    end

    always @(posedge clk) begin
      logic was_valid;
      was_valid = bus_valid && rst_n;
      #1;
      if (rst_n) begin
        checks++;
        if (out_valid != was_valid || (was_valid && out_data != expect_data)) begin
          failures++;
          $display("FAIL cfg %0d t=%0t: out=%h v=%b exp %h v=%b", g, $time,
                   out_data, out_valid, expect_data, was_valid);
        end
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // example word of the document (chunks are {b[2i+1], b[2i]})
    valid = 1'b1;
    data = '0;
    data[15:0] = {2'b11, 2'b00, 2'b00, 2'b01, 2'b10, 2'b01, 2'b10, 2'b10};
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 4) != 0);
      case (k % 3)
        0: data = {$urandom(), $urandom()};
        1: data = {$urandom() | $urandom(), $urandom() & $urandom()};
        default: data = {48'h0, 16'($urandom())};
      endcase
      if (k == 2000) begin
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
