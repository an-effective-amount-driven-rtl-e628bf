// tb_adem_bus_top: end-to-end test of encoder, bus and decoder.
//
// Five copies of the bus are driven with the same stream: the default
// configuration (M=32, 4 informed lines) and M=32 with 5 and 2 informed
// lines, M=8 and M=64. The stream mixes uniform random words, words of
// slowly varying 8-bit samples (a stand-in for the audio/image data the
// scheme targets) and constant words, with idle cycles and a reset in the
// middle. Every word must come out of the decoder unchanged exactly two
// clocks after it entered the encoder.
//
// Mechanisms counted on the default copy, each of which must occur: the
// four pair states (unchange, odd, even and all invert), words whose type
// counts tie, a change of the informed-line code, idle cycles and reset.
// The bus energy (self transitions plus lambda times coupling transitions,
// lambda = 3.9, no extra spacing) of the encoded and of the plain bus is
// reported per copy; on the sample stream the full 5-line policy must
// lower the energy of the pair transitions below that of the plain bus.
module tb_adem_bus_top;
  import adem_pkg::*;
  import adem_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [63:0] in_data = '0;
  int cycle = 0;
  bit  sample_phase = 1'b0;   // true while the stream carries sample data

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int NCFG = 5;
  localparam int         CFG_M    [NCFG] = '{32, 32, 32, 8, 64};
  localparam adem_mode_e CFG_MODE [NCFG] = '{ADEM_4L, ADEM_FULL, ADEM_2L, ADEM_4L, ADEM_FULL};

  // mechanism counters (default copy)
  int n_state[4];
  int n_tie = 0, n_info_change = 0, n_idle = 0, n_reset = 0;
  // energy accumulators in units of C_L*Vdd^2/2, times 10 (lambda = 3.9)
  longint e_plain[NCFG], e_enc[NCFG], e_info[NCFG], e_pair_plain[NCFG], e_pair_enc[NCFG];

  initial begin
    n_state = '{0, 0, 0, 0};
    for (int g = 0; g < NCFG; g++) begin
      e_plain[g] = 0; e_enc[g] = 0; e_info[g] = 0; e_pair_plain[g] = 0; e_pair_enc[g] = 0;
    end
  end

  function automatic longint energy10(int s, int c) ;
    return longint'(10 * s + 39 * c);
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int         M    = CFG_M[g];
    localparam adem_mode_e MODE = CFG_MODE[g];
    localparam int         IW   = info_width(MODE);
    logic          out_valid, bus_valid;
    logic [M-1:0]  out_data, bus_data;
    logic [IW-1:0] bus_info;
    logic [M-1:0]  exp_q[$];
    int            cyc_q[$];
    logic [M-1:0]  last_plain = '0, last_bus = '0;
    logic [IW-1:0] last_info = '0;
    bit            bus_from_sample = 1'b0;   // current bus word carries sample data

    if (g == 0) begin : g_default
      adem_bus_top dut (
        .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data[M-1:0]),
        .out_valid(out_valid), .out_data(out_data),
        .bus_valid(bus_valid), .bus_data(bus_data), .bus_info(bus_info)
      );
    end else begin : g_param
      adem_bus_top #(.M(M), .MODE(MODE)) dut (
        .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data[M-1:0]),
        .out_valid(out_valid), .out_data(out_data),
        .bus_valid(bus_valid), .bus_data(bus_data), .bus_info(bus_info)
      );
    end

    always @(posedge clk) begin
      logic          v_in;
      logic [M-1:0]  d_in;
      int            c_in;
      bit            smp_in;
      v_in = in_valid && rst_n;
      d_in = in_data[M-1:0];
      c_in = cycle;
      smp_in = sample_phase;
      #1;
      if (!rst_n) begin
        exp_q.delete();
        cyc_q.delete();
        last_plain = '0;
        last_bus = '0;
        last_info = '0;
      end else begin
        // round trip and latency
        if (out_valid) begin
          checks++;
          if (exp_q.size() == 0) begin
            failures++;
            $display("FAIL cfg %0d: unexpected output %h", g, out_data);
          end else begin
            logic [M-1:0] e;
            int ec;
            e = exp_q.pop_front();
            ec = cyc_q.pop_front();
            if (out_data != e || cycle - ec != 2) begin
              failures++;
              $display("FAIL cfg %0d: out %h exp %h latency %0d", g, out_data, e, cycle - ec);
            end
          end
        end
        // energy bookkeeping on each new bus word
        if (bus_valid) begin
          int s, ci, co;
          if (bus_from_sample) begin
            transitions(M, 64'(last_bus), 64'(bus_data), s, ci, co);
            e_enc[g] += energy10(s, ci + co);
            e_pair_enc[g] += energy10(s, ci);
            transitions(IW, 64'(last_info), 64'(bus_info), s, ci, co);
            e_info[g] += energy10(s, ci + co);
          end
          if (g == 0) begin
            for (int i = 0; i < M / 2; i++)
              n_state[{last_bus[2*i] ^ bus_data[2*i], last_bus[2*i+1] ^ bus_data[2*i+1]}]++;
            if (bus_info != last_info) n_info_change++;
          end
          last_bus = bus_data;
          last_info = bus_info;
        end
        if (v_in) begin
          int s, ci, co;
          exp_q.push_back(d_in);
          cyc_q.push_back(c_in);
          if (smp_in) begin
            transitions(M, 64'(last_plain), 64'(d_in), s, ci, co);
            e_plain[g] += energy10(s, ci + co);
            e_pair_plain[g] += energy10(s, ci);
          end
          last_plain = d_in;
        end
        bus_from_sample = v_in && smp_in;
      end
    end
  end

  // tie detection on the default copy's input words
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      int c[4];
      c = '{0, 0, 0, 0};
      for (int i = 0; i < 16; i++) c[{in_data[2*i], in_data[2*i+1]}]++;
      for (int a = 0; a < 4; a++)
        for (int b = a + 1; b < 4; b++)
          if (c[a] == c[b]) begin n_tie++; a = 4; break; end
    end
    if (rst_n && !in_valid) n_idle++;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slowly varying 8-bit samples, eight per 64-bit word
  logic [7:0] smp = 8'd128;
  function automatic logic [7:0] step(logic [7:0] v);
    int n;
    n = int'(v) + $urandom_range(0, 6) - 3;
    if (n < 0) n = 0;
    if (n > 255) n = 255;
    return 8'(n);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      sample_phase = (k >= 3000);
      if (k < 3000) begin
        case (k % 3)
          0: in_data = {$urandom(), $urandom()};
          1: in_data = {$urandom() & $urandom(), $urandom() | $urandom()};
          default: in_data = {64{k[4]}};
        endcase
      end else begin
        for (int b = 0; b < 8; b++) begin
          smp = step(smp);
          in_data[8*b +: 8] = smp;
        end
        in_valid = 1'b1;
      end
      if (k == 1000) begin
        rst_n = 1'b0;
        n_reset++;
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    // every word must have come out
    for (int g = 0; g < NCFG; g++) begin
      checks++;
    end
    if (g_cfg[0].exp_q.size() != 0 || g_cfg[1].exp_q.size() != 0 || g_cfg[2].exp_q.size() != 0
        || g_cfg[3].exp_q.size() != 0 || g_cfg[4].exp_q.size() != 0) begin
      failures++;
      $display("FAIL words left undelivered");
    end
    // mechanisms
    $display("states: unchange=%0d odd=%0d even=%0d all=%0d ties=%0d info_changes=%0d idle=%0d resets=%0d",
             n_state[0], n_state[1], n_state[2], n_state[3], n_tie, n_info_change, n_idle, n_reset);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_state[s] == 0) begin failures++; $display("FAIL state %0d never used", s); end
    end
    checks++; if (n_tie == 0)         begin failures++; $display("FAIL no tie"); end
    checks++; if (n_info_change == 0) begin failures++; $display("FAIL informed lines never changed"); end
    checks++; if (n_idle == 0)        begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (n_reset == 0)       begin failures++; $display("FAIL no reset"); end
    // energy over the sample phase, units of C_L*Vdd^2/2, informed lines
    // included in the encoded total
    for (int g = 0; g < NCFG; g++) begin
      real plain, enc;
      plain = real'(e_plain[g]) / 10.0;
      enc   = real'(e_enc[g] + e_info[g]) / 10.0;
      $display("cfg %0d (M=%0d, %0d informed lines): pair energy plain %0d encoded %0d; total plain %.0f encoded+informed %.0f; saving %.1f%%",
               g, CFG_M[g], info_width(CFG_MODE[g]), e_pair_plain[g] / 10, e_pair_enc[g] / 10,
               plain, enc, 100.0 * (1.0 - enc / plain));
    end
    checks++;
    if (e_pair_enc[1] >= e_pair_plain[1]) begin
      failures++;
      $display("FAIL 5-line policy does not lower the pair-transition energy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
