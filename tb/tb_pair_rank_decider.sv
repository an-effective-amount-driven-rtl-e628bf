// tb_pair_rank_decider: checks the informed-line code and the A..D order of
// all three policies against a bubble-sort reference, for random counts
// (including many ties) and for the worked example of the document
// (counts 00:2, 01:3, 10:2, 11:1 give A=01, B=10, C=00, D=11).
module tb_pair_rank_decider;
  import adem_pkg::*;
  import adem_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0][4:0] counts;
  logic [4:0] info_f;
  logic [3:0] info_4;
  logic [1:0] info_2;
  order_t ord_f, ord_4, ord_2;

  pair_rank_decider #(.M(32), .MODE(ADEM_FULL)) dut_f (.counts(counts), .info(info_f), .order(ord_f));
  pair_rank_decider #(.M(32), .MODE(ADEM_4L))   dut_4 (.counts(counts), .info(info_4), .order(ord_4));
  pair_rank_decider #(.M(32), .MODE(ADEM_2L))   dut_2 (.counts(counts), .info(info_2), .order(ord_2));

  task automatic check_mode(int mode, int got_code, order_t got_ord);
    int c[4], full[4], ord[4], code;
    for (int t = 0; t < 4; t++) c[t] = int'(counts[t]);
    sort_types(c, full);
    policy_order(mode, full, ord, code);
    checks++;
    if (got_code != code) begin
      failures++;
      $display("FAIL mode %0d counts %p: code %b exp %b", mode, c, got_code, code);
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (int'(got_ord[r]) != ord[r]) begin
        failures++;
        $display("FAIL mode %0d counts %p: rank %0d type %0d exp %0d", mode, c, r, got_ord[r], ord[r]);
      end
    end
  endtask

  task automatic check_all();
    #1;
    check_mode(0, int'(info_f), ord_f);
    check_mode(1, int'(info_4), ord_4);
    check_mode(2, int'(info_2), ord_2);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example: explicit expected values
    counts[0] = 5'd2; counts[1] = 5'd3; counts[2] = 5'd2; counts[3] = 5'd1;
    #1;
    checks++;
    if (info_f != 5'b01_10_0) begin failures++; $display("FAIL example full code %b", info_f); end
    checks++;
    if (info_4 != 4'b01_11)   begin failures++; $display("FAIL example 4L code %b", info_4); end
    checks++;
    if (info_2 != 2'b11)      begin failures++; $display("FAIL example 2L code %b", info_2); end
    checks++;
    // 4L: A=01, D=11, B/C = former/later of {00,10}
    if (ord_4 != {2'b11, 2'b10, 2'b00, 2'b01}) begin failures++; $display("FAIL example 4L order"); end
    check_all();
    // random pair-count vectors summing to 16, small ranges to force ties
    for (int k = 0; k < 2000; k++) begin
      int a, b, c;
      a = $urandom_range(0, 16);
      b = $urandom_range(0, 16 - a);
      c = $urandom_range(0, 16 - a - b);
      counts[$urandom_range(0, 3)] = '0;
      counts[0] = 5'(a); counts[1] = 5'(b); counts[2] = 5'(c); counts[3] = 5'(16 - a - b - c);
      if (k % 2 == 1) counts = {counts[1], counts[3], counts[0], counts[2]};
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
