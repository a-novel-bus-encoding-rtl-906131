// Reference models for the codec testbenches.
//
// Written from the definitions of the coding scheme, independently of the
// RTL structure: transitions are classified wire by wire as rise / fall /
// quiet, couplings are found by scanning three-wire windows, and the bus
// energy is evaluated with the lumped coupled-wire model
//   E_i / (C_L Vdd^2) = V_i(final) * ((1 + k_i*lambda) dV_i - lambda * sum_adj dV_j)
// where k_i is the number of neighbours of wire i (1 at the edges, 2 inside),
// dV is +1 / -1 / 0 and lambda = C_coupling / C_substrate (3.2 for minimum
// spaced wires in 0.18 um CMOS).
package xtalk_ref_pkg;
  localparam int MAXW = 64;
  localparam real LAMBDA = 3.2;

  // transition of one wire: +1 rise, -1 fall, 0 quiet
  function automatic int tr(logic [MAXW-1:0] o, logic [MAXW-1:0] n, int i);
    if (o[i] == n[i]) return 0;
    return n[i] ? 1 : -1;
  endfunction

  // Counts of three-wire window crosstalk types on an n-wire bus.
  //   type-4: all three toggle, centre opposite to both neighbours
  //   type-3: centre toggles, one neighbour opposite, the other quiet
  //   type-2: all three toggle, centre opposite to one, same as the other
  //   type-1: exactly one of the three wires toggles
  typedef struct {
    int n4; int n3; int n2; int n1;
  } xt_counts_t;

  function automatic xt_counts_t classify(logic [MAXW-1:0] o, logic [MAXW-1:0] n, int w);
    xt_counts_t c = '{0, 0, 0, 0};
    for (int i = 1; i < w - 1; i++) begin
      int l = tr(o, n, i - 1), m = tr(o, n, i), r = tr(o, n, i + 1);
      int toggles = int'(l != 0) + int'(m != 0) + int'(r != 0);
      if (m != 0 && l == -m && r == -m) c.n4++;
      else if (m != 0 && ((l == -m && r == 0) || (r == -m && l == 0))) c.n3++;
      else if (m != 0 && ((l == -m && r == m) || (r == -m && l == m))) c.n2++;
      else if (toggles == 1) c.n1++;
    end
    return c;
  endfunction

  // Energy of one bus transition in units of C_L * Vdd^2.
  function automatic real energy(logic [MAXW-1:0] o, logic [MAXW-1:0] n, int w);
    real e = 0.0;
    for (int i = 0; i < w; i++) begin
      if (n[i]) begin
        int k = 0;
        real adj = 0.0;
        if (i > 0)     begin k++; adj += tr(o, n, i - 1); end
        if (i < w - 1) begin k++; adj += tr(o, n, i + 1); end
        e += (1.0 + k * LAMBDA) * tr(o, n, i) - LAMBDA * adj;
      end
    end
    return e;
  endfunction

  // Reference 4-bit cluster encoder. Returns the selected word and decode
  // bit and which rule decided (1: Z1 word has type-4, 2: Z2 word has type-4,
  // 3: Z2 has fewer opposite pairs, 4: default Z1).
  function automatic void encode4(input logic [3:0] d, input logic [3:0] prev,
                                  output logic [3:0] word, output logic sel, output int rule);
    logic [3:0] a = d ^ 4'b0101, b = d ^ 4'b1010;
    xt_counts_t ca = classify(MAXW'(prev), MAXW'(a), 4);
    xt_counts_t cb = classify(MAXW'(prev), MAXW'(b), 4);
    int pa = 0, pb = 0;
    for (int i = 0; i < 3; i++) begin
      if (tr(MAXW'(prev), MAXW'(a), i) != 0 && tr(MAXW'(prev), MAXW'(a), i) == -tr(MAXW'(prev), MAXW'(a), i + 1)) pa++;
      if (tr(MAXW'(prev), MAXW'(b), i) != 0 && tr(MAXW'(prev), MAXW'(b), i) == -tr(MAXW'(prev), MAXW'(b), i + 1)) pb++;
    end
    if (ca.n4 > 0)      begin sel = 1; rule = 1; end
    else if (cb.n4 > 0) begin sel = 0; rule = 2; end
    else if (pa > pb)   begin sel = 1; rule = 3; end
    else                begin sel = 0; rule = 4; end
    word = sel ? b : a;
  endfunction

  // Table-1 decode information for two clusters.
  function automatic logic [2:0] info3(logic s0, logic s1);
    case ({s0, s1})
      2'b00:   return 3'b000;
      2'b01:   return 3'b001;
      2'b10:   return 3'b011;
      default: return 3'b111;
    endcase
  endfunction


  // Reference 8-bit segment encoder: 13 wires, as laid out by the codec.
  function automatic logic [12:0] encode8(logic [7:0] d, logic [12:0] prev);
    logic [3:0] w0, w1;
    logic s0, s1;
    int r0, r1;
    encode4(d[3:0], prev[3:0], w0, s0, r0);
    encode4(d[7:4], prev[8:5], w1, s1, r1);
    return {info3(s0, s1), 1'b0, w1, 1'b0, w0};
  endfunction

  // Reference 16-bit encoder: 27 wires, lane segments grounded when disabled.
  function automatic logic [26:0] encode16(logic [15:0] d, logic [3:0] lanes, logic [26:0] prev);
    logic [12:0] s0 = lanes[0] ? encode8(d[7:0], prev[12:0]) : 13'd0;
    logic [12:0] s1 = lanes[1] ? encode8(d[15:8], prev[26:14]) : 13'd0;
    return {s1, 1'b0, s0};
  endfunction

  // Synthetic test data. "img"-like: a slowly varying value with small
  // noise (strongly correlated samples); "bio"-like: a slow periodic wave
  // around mid scale with small noise. Both stand in for the correlated
  // application data the scheme targets.
  function automatic logic [15:0] gen_sample(int kind, int k, int width);
    int v;
    real x;
    case (kind)
      0: v = int'($urandom);
      1: begin
           x = (1.0 + $sin(k * 0.013)) * (1 << (width - 2)) + (k % 97) * 0.2 * (1 << (width - 8));
           v = int'(x) + int'($urandom_range(0, 3)) - 1;
         end
      default: begin
           x = (1.0 + 0.6 * $sin(k * 0.05) + 0.2 * $sin(k * 0.31)) * (1 << (width - 2));
           v = int'(x) + int'($urandom_range(0, 2)) - 1;
         end
    endcase
    if (width == 8) return 16'(v & 8'hFF);
    return 16'(v & 16'hFFFF);
  endfunction
endpackage
