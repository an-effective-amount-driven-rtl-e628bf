// adem_ref_pkg: independent reference model of ADEM coding for the
// testbenches, plus a bus transition (energy) counter.
//
// The encoding and decoding tables are written out as literal tables of
// resulting pairs rather than as XOR masks, and the ranking is a bubble
// sort, so the model shares no code with the RTL. Pair type is
// {b[2i], b[2i+1]}; the fixed type sequence is 00, 01, 10, 11.
package adem_ref_pkg;

  // ENC[prev][rank] = encoded pair sent after previous encoded pair prev
  // for an original pair of rank A(0), B(1), C(2), D(3).
  localparam logic [1:0] ENC [4][4] = '{
    '{2'b00, 2'b11, 2'b10, 2'b01},   // prev 00
    '{2'b01, 2'b11, 2'b00, 2'b10},   // prev 01
    '{2'b10, 2'b00, 2'b11, 2'b01},   // prev 10
    '{2'b11, 2'b00, 2'b01, 2'b10}    // prev 11
  };

  // Type order A..D by count, ties to the later type of the sequence.
  function automatic void sort_types(input int cnt[4], output int ord[4]);
    int c[4];
    int t;
    for (int i = 0; i < 4; i++) begin ord[i] = 3 - i; c[i] = cnt[3 - i]; end
    // stable sort descending by count; initial order 11,10,01,00 gives the tie rule
    for (int p = 0; p < 3; p++)
      for (int i = 0; i < 3 - p; i++)
        if (c[i] < c[i+1]) begin
          t = c[i]; c[i] = c[i+1]; c[i+1] = t;
          t = ord[i]; ord[i] = ord[i+1]; ord[i+1] = t;
        end
  endfunction

  // Order actually used by encoder and decoder for a policy
  // (mode 0 = 5 lines, 1 = 4 lines, 2 = 2 lines) and the informed-line code.
  function automatic void policy_order(input int mode, input int full[4],
                                       output int ord[4], output int code);
    int rest[$];
    ord = full;
    rest.delete();
    case (mode)
      0: begin
        for (int t = 0; t < 4; t++) if (t != full[0] && t != full[1]) rest.push_back(t);
        code = (full[0] << 3) | (full[1] << 1) | ((full[2] == rest[1]) ? 1 : 0);
      end
      1: begin
        for (int t = 0; t < 4; t++) if (t != full[0] && t != full[3]) rest.push_back(t);
        ord[1] = rest[0]; ord[2] = rest[1];
        code = (full[0] << 2) | full[3];
      end
      default: begin
        for (int t = 0; t < 4; t++) if (t != full[3]) rest.push_back(t);
        ord[0] = rest[0]; ord[1] = rest[1]; ord[2] = rest[2];
        code = full[3];
      end
    endcase
  endfunction

  function automatic logic [1:0] pair_of(logic [63:0] w, int i);
    return {w[2*i], w[2*i+1]};
  endfunction

  // Reference encoder step: returns the new codeword and informed code.
  function automatic void encode(input int mode, input int m,
                                 input logic [63:0] data, input logic [63:0] prev,
                                 output logic [63:0] cw, output int code);
    int cnt[4], full[4], ord[4], rank_of[4];
    logic [1:0] e;
    cnt = '{0, 0, 0, 0};
    for (int i = 0; i < m / 2; i++) cnt[pair_of(data, i)]++;
    sort_types(cnt, full);
    policy_order(mode, full, ord, code);
    for (int r = 0; r < 4; r++) rank_of[ord[r]] = r;
    cw = '0;
    for (int i = 0; i < m / 2; i++) begin
      e = ENC[pair_of(prev, i)][rank_of[pair_of(data, i)]];
      cw[2*i] = e[1];
      cw[2*i+1] = e[0];
    end
  endfunction

  // Transition coefficients between two bus states of n lines:
  // self = sum of alpha_L, cin = sum of alpha_C inside pairs (lines 2i,2i+1),
  // cout = sum of alpha_C between neighbouring pairs (lines 2i+1,2i+2).
  function automatic void transitions(input int n, input logic [63:0] a,
                                      input logic [63:0] b, output int self_t,
                                      output int cin, output int cout);
    int dx, dy;
    self_t = 0; cin = 0; cout = 0;
    for (int i = 0; i < n; i++) if (a[i] != b[i]) self_t++;
    for (int i = 0; i + 1 < n; i++) begin
      dx = int'(b[i]) - int'(a[i]);
      dy = int'(b[i+1]) - int'(a[i+1]);
      if (i % 2 == 0) cin += (dx - dy) * (dx - dy);
      else            cout += (dx - dy) * (dx - dy);
    end
  endfunction

endpackage
