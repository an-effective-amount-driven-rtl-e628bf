// tb_adem_encoder: runs five encoder configurations (M=32 with the 5-, 4-
// and 2-line policies, M=8 and M=16) on the same random stimulus with
// random idle cycles, and compares codeword, informed lines and valid,
// cycle by cycle, with the reference model. The registered output must
// appear exactly one clock after the input (checked every cycle). A
// directed word from reset, the document's 8-pair example (types 01:3,
// 10:2, 00:2, 11:1), checks the expected codeword by hand.
module tb_adem_encoder;
  import adem_pkg::*;
  import adem_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [63:0] in_data = '0;

  always #5 clk = ~clk;

  localparam int NCFG = 5;
  localparam int         CFG_M    [NCFG] = '{32, 32, 32, 8, 16};
  localparam adem_mode_e CFG_MODE [NCFG] = '{ADEM_FULL, ADEM_4L, ADEM_2L, ADEM_4L, ADEM_FULL};

  logic [NCFG-1:0][63:0] cw_out;
  logic [NCFG-1:0][4:0]  info_out;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int         M    = CFG_M[g];
    localparam adem_mode_e MODE = CFG_MODE[g];
    localparam int         IW   = info_width(MODE);
    logic          bus_valid;
    logic [M-1:0]  bus_data;
    logic [IW-1:0] bus_info;
    logic [63:0]   prev = '0;
    int            prev_code = 0;

    adem_encoder #(.M(M), .MODE(MODE)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data[M-1:0]),
      .bus_valid(bus_valid), .bus_data(bus_data), .bus_info(bus_info)
    );
    assign cw_out[g]   = 64'(bus_data);
    assign info_out[g] = 5'(bus_info);

    always @(posedge clk) begin
      logic [63:0] exp_cw;
      int exp_code;
      logic exp_valid;
      if (!rst_n) begin
        exp_cw = '0; exp_code = 0; exp_valid = 1'b0;
      end else if (in_valid) begin
        encode(int'(MODE), M, in_data & ((64'd1 << M) - 1), prev, exp_cw, exp_code);
        exp_valid = 1'b1;
      end else begin
        exp_cw = prev; exp_code = prev_code; exp_valid = 1'b0;
      end
      #1;
      checks++;
      if (64'(bus_data) != exp_cw || int'(bus_info) != exp_code || bus_valid != exp_valid) begin
        failures++;
        $display("FAIL cfg %0d t=%0t data=%h: got cw=%h info=%b v=%b exp cw=%h info=%0d v=%b",
                 g, $time, in_data, bus_data, bus_info, bus_valid, exp_cw, exp_code, exp_valid);
      end
      prev = exp_cw;
      prev_code = exp_code;
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
    // directed example (chunks are {b[2i+1], b[2i]}), pairs p0..p7 = 01,01,10,01,10,00,00,11 (type {b2i,b2i+1})
    @(negedge clk);
    in_valid = 1'b1;
    in_data = '0;
    in_data[15:0] = {2'b11, 2'b00, 2'b00, 2'b01, 2'b10, 2'b01, 2'b10, 2'b10};
    @(negedge clk);
    in_valid = 1'b0;
    // from all-zero lines: A=01 unchanged -> 00, B=10 all invert -> 11,
    // C=00 even invert -> 10, D=11 odd invert -> 01
    checks++;
    // (each 2-bit chunk below is {b[2i+1], b[2i]}, i.e. the type reversed)
    if (cw_out[4][15:0] != {2'b10, 2'b01, 2'b01, 2'b11, 2'b00, 2'b11, 2'b00, 2'b00}
        || info_out[4] != 5'b01_10_0) begin
      failures++;
      $display("FAIL directed example: cw=%h info=%b", cw_out[4][15:0], info_out[4]);
    end
    // random traffic with idle cycles; biased words give uneven type counts
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      case (k % 3)
        0: in_data = {$urandom(), $urandom()};
        1: in_data = {$urandom() & $urandom(), $urandom() & $urandom()};
        default: in_data = {32'h0, 16'h0, 16'($urandom())};
      endcase
      if (k == 1500) begin
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
