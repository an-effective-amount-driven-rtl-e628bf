// tb_pair_type_counter: checks the pair-type counts of random and directed
// words against a bit-by-bit reference, at M = 32 and M = 8.
module tb_pair_type_counter;
  import adem_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] w32;
  logic [7:0]  w8;
  logic [3:0][4:0] c32;
  logic [3:0][2:0] c8;

  pair_type_counter #(.M(32)) dut32 (.word(w32), .counts(c32));
  pair_type_counter #(.M(8))  dut8  (.word(w8),  .counts(c8));

  function automatic void ref_counts(input logic [63:0] w, input int m, output int c[4]);
    c = '{0, 0, 0, 0};
    for (int i = 0; i < m / 2; i++) c[2 * int'(w[2*i]) + int'(w[2*i+1])]++;
  endfunction

  task automatic check32();
    int c[4];
    ref_counts(64'(w32), 32, c);
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (int'(c32[t]) != c[t]) begin
        failures++;
        $display("FAIL M=32 word=%h type=%0d got %0d exp %0d", w32, t, c32[t], c[t]);
      end
    end
  endtask

  task automatic check8();
    int c[4];
    ref_counts(64'(w8), 8, c);
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (int'(c8[t]) != c[t]) begin
        failures++;
        $display("FAIL M=8 word=%h type=%0d got %0d exp %0d", w8, t, c8[t], c[t]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: all pairs of one type (full count 16 must not overflow)
    w32 = 32'h0000_0000; #1 check32();
    w32 = 32'hFFFF_FFFF; #1 check32();
    w32 = 32'hAAAA_AAAA; #1 check32();   // b[2i+1]=1, b[2i]=0 -> type 01
    w32 = 32'h5555_5555; #1 check32();   // type 10
    for (int k = 0; k < 500; k++) begin
      w32 = $urandom();
      w8  = 8'($urandom());
      #1;
      check32();
      check8();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
