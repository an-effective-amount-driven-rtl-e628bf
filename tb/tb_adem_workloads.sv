// tb_adem_workloads: bus-width and policy sweep on media-like data.
//
// Builds the bus for every width M = 8, 16, ..., 64 and each of the three
// informed-line policies (5, 4 and 2 lines), 24 copies in all, and streams
// the same words through all of them: two streams of slowly varying 8-bit
// samples (a small-step random walk, like audio, and a smoother one with
// occasional jumps, like image rows), packed eight samples per 64-bit word
// and truncated to each width. Every word must be recovered exactly two
// clocks after it entered.
//
// For each copy the testbench counts, per bus word, self transitions and
// coupling transitions (coefficient 1 for a charge or discharge, 4 for a
// toggle) on the encoded data lines, split into coupling inside a pair and
// between neighbouring pairs, and the transitions on the informed lines.
// The same counts are taken on the plain (unencoded) bus. Energy in units
// of C_L*Vdd^2/2 is E = self + lambda * (inside + between / (1 + alpha)),
// where alpha widens only the encoded bus's gaps between pairs. The report
// gives the saving 1 - E_encoded / E_plain for lambda = 3.9, 5.4, 7.4 and
// alpha = 0, 1, 3. Check: with the 5- and 4-line policies the energy of
// the pair transitions (self + lambda * inside, lambda = 3.9) on the data
// lines is below that of the plain bus at every width.
module tb_adem_workloads;
  import adem_pkg::*;
  import adem_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [63:0] in_data = '0, hist1 = '0, hist2 = '0;
  logic        v1 = 1'b0, v2 = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    hist1 <= in_data;  hist2 <= hist1;
    v1 <= in_valid && rst_n;  v2 <= v1;
  end

  localparam int NW = 8, NM = 3;
  localparam adem_mode_e MODES [NM] = '{ADEM_FULL, ADEM_4L, ADEM_2L};

  // per copy [width][policy]: self, inside-pair and between-pair coupling
  // on the data lines, self + coupling on the informed lines
  longint e_s[NW][NM], e_ci[NW][NM], e_co[NW][NM], e_is[NW][NM], e_ic[NW][NM];
  longint p_s[NW], p_ci[NW], p_co[NW];

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int M = 8 * (w + 1);
    logic [M-1:0] last_plain = '0;

    always @(posedge clk) begin
      int s, ci, co;
      if (rst_n && in_valid) begin
        transitions(M, 64'(last_plain), 64'(in_data[M-1:0]), s, ci, co);
        p_s[w] += s; p_ci[w] += ci; p_co[w] += co;
        last_plain = in_data[M-1:0];
      end
    end

    for (genvar j = 0; j < NM; j++) begin : g_m
      localparam adem_mode_e MODE = MODES[j];
      localparam int         IW   = info_width(MODE);
      logic          out_valid, bus_valid;
      logic [M-1:0]  out_data, bus_data, last_bus = '0;
      logic [IW-1:0] bus_info, last_info = '0;

      adem_bus_top #(.M(M), .MODE(MODE)) dut (
        .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data[M-1:0]),
        .out_valid(out_valid), .out_data(out_data),
        .bus_valid(bus_valid), .bus_data(bus_data), .bus_info(bus_info)
      );

      always @(posedge clk) begin
        int s, ci, co;
        #1;
        if (rst_n) begin
          if (out_valid || v2) begin
            checks++;
            if (out_valid != v2 || out_data != hist2[M-1:0]) begin
              failures++;
              $display("FAIL M=%0d policy %0d: out %h v=%b exp %h v=%b", M, j,
                       out_data, out_valid, hist2[M-1:0], v2);
            end
          end
          if (bus_valid) begin
            transitions(M, 64'(last_bus), 64'(bus_data), s, ci, co);
            e_s[w][j] += s; e_ci[w][j] += ci; e_co[w][j] += co;
            transitions(IW, 64'(last_info), 64'(bus_info), s, ci, co);
            e_is[w][j] += s; e_ic[w][j] += ci + co;
            last_bus = bus_data;
            last_info = bus_info;
          end
        end
      end
    end
  end

  initial begin
    for (int w = 0; w < NW; w++) begin
      p_s[w] = 0; p_ci[w] = 0; p_co[w] = 0;
      for (int j = 0; j < NM; j++) begin
        e_s[w][j] = 0; e_ci[w][j] = 0; e_co[w][j] = 0; e_is[w][j] = 0; e_ic[w][j] = 0;
      end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] walk(logic [7:0] v, int stepmax);
    int n;
    n = int'(v) + $urandom_range(0, 2 * stepmax) - stepmax;
    if (n < 0) n = 0;
    if (n > 255) n = 255;
    return 8'(n);
  endfunction

  function automatic real energy(longint s, longint ci, longint co, real lambda, real alpha);
    return real'(s) + lambda * (real'(ci) + real'(co) / (1.0 + alpha));
  endfunction

  initial begin
    logic [7:0] smp;
    real lambdas[3], alphas[3];
    lambdas = '{3.9, 5.4, 7.4};
    alphas  = '{0.0, 1.0, 3.0};
    smp = 8'd128;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    in_valid = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      for (int b = 0; b < 8; b++) begin
        if (k < 2000) smp = walk(smp, 3);                       // audio-like
        else if ($urandom_range(0, 63) == 0) smp = 8'($urandom()); // image edge
        else smp = walk(smp, 1);                                // smooth image row
        in_data[8*b +: 8] = smp;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    for (int w = 0; w < NW; w++) begin
      for (int j = 0; j < NM; j++) begin
        real ep, ee;
        string line;
        line = $sformatf("M=%0d, %0d informed lines:", 8 * (w + 1), info_width(MODES[j]));
        foreach (lambdas[l]) foreach (alphas[a]) begin
          ep = energy(p_s[w], p_ci[w], p_co[w], lambdas[l], 0.0);
          ee = energy(e_s[w][j], e_ci[w][j], e_co[w][j], lambdas[l], alphas[a])
             + energy(e_is[w][j], e_ic[w][j], 0, lambdas[l], 0.0);
          line = {line, $sformatf(" l=%.1f/a=%.0f %.1f%%", lambdas[l], alphas[a],
                                  100.0 * (1.0 - ee / ep))};
        end
        $display("%s", line);
        if (j < 2) begin
          checks++;
          if (energy(e_s[w][j], e_ci[w][j], 0, 3.9, 0.0) >= energy(p_s[w], p_ci[w], 0, 3.9, 0.0)) begin
            failures++;
            $display("FAIL M=%0d policy %0d: pair-transition energy not reduced", 8 * (w + 1), j);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
