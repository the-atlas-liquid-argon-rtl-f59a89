// feb_tb_pkg: reference model of a FEB event for the testbenches.
//
// gen_word() returns the 16-bit word that ADC `adc` sends at position `n` of
// an event (n = 0 is the all-ones start tag), built from the event fields and
// a fixed hash for the sample values, with odd parity in bit 14. bus_value()
// returns the 17-bit bus value of clock k (0..15) of a word slot, given the 16
// words of that slot: even clocks carry half FEB 1, odd clocks half FEB 2,
// two bits per ADC per clock, most significant pair first.
package feb_tb_pkg;

  typedef enum int {K_START, K_CTRL1, K_CTRL2, K_RADD, K_DATA, K_CTRL3, K_END, K_IDLE} kind_t;

  typedef struct {
    kind_t kind;
    int    s, g, c;
  } pos_t;

  function automatic int words_per_adc(int ns, int ng);
    return 3 + ns * (1 + 8 * ng) + 2;  // start, ctrl1, ctrl2, samples, ctrl3, end
  endfunction

  function automatic pos_t decode(int n, int ns, int ng);
    pos_t p;
    int m, r;
    p.s = 0; p.g = 0; p.c = 0;
    if (n == 0) p.kind = K_START;
    else if (n == 1) p.kind = K_CTRL1;
    else if (n == 2) p.kind = K_CTRL2;
    else if (n < 3 + ns * (1 + 8 * ng)) begin
      m = n - 3;
      p.s = m / (1 + 8 * ng);
      r = m % (1 + 8 * ng);
      if (r == 0) p.kind = K_RADD;
      else begin
        p.kind = K_DATA;
        p.g = (r - 1) / 8;
        p.c = (r - 1) % 8;
      end
    end else if (n == 3 + ns * (1 + 8 * ng)) p.kind = K_CTRL3;
    else if (n == 4 + ns * (1 + 8 * ng)) p.kind = K_END;
    else p.kind = K_IDLE;
    return p;
  endfunction

  function automatic logic [15:0] with_parity(logic [15:0] w);
    logic [15:0] r = w;
    r[14] = 1'b0;
    r[14] = ~(^r);
    return r;
  endfunction

  function automatic logic [11:0] sample_value(int adc, int c, int s, int g, int evt);
    return 12'((adc * 97 + c * 31 + s * 211 + g * 53 + evt * 17 + 5) % 4093 + 1);
  endfunction

  function automatic logic [1:0] gain_code(int adc, int c, int g, int ng);
    if (ng > 1) return 2'(g + 1);
    return 2'(1 + ((adc + c) % 3));
  endfunction

  function automatic logic [15:0] gen_word(int adc, int n, int ns, int ng,
                                           int evt, int bcid);
    pos_t p = decode(n, ns, ng);
    logic [15:0] w;
    case (p.kind)
      K_START: return 16'hFFFF;
      K_END, K_IDLE: return 16'h0000;
      K_CTRL1: w = {4'b0000, 4'(adc), 3'(evt % 8), 5'(evt)};
      K_CTRL2: w = {4'b0000, 12'(bcid)};
      K_RADD:  w = {4'b0000, (p.s == 0), (p.s == ns - 1), 2'b00, 8'(evt * ns + p.s)};
      K_DATA:  w = {2'b00, gain_code(adc, p.c, p.g, ng), sample_value(adc, p.c, p.s, p.g, evt)};
      default: return 16'h4801;  // ctrl3: a correct SCAC trailer
    endcase
    return with_parity(w);
  endfunction

  function automatic logic [16:0] bus_value(logic [15:0] w [16], int k);
    logic [16:0] b;
    int hf = k % 2;
    int j = k / 2;
    b[16] = 1'(hf);
    for (int i = 0; i < 8; i++) begin
      b[2*i+1] = w[i + 8*hf][15 - 2*j];
      b[2*i]   = w[i + 8*hf][14 - 2*j];
    end
    return b;
  endfunction

  // Rows the InFPGA hands to the DSP for a clean event, per output format.
  function automatic void expected_rows(int fmt, int ns, int ng, int evt, int bcid,
                                        logic [31:0] status, ref logic [63:0] rows[$]);
    int nw = words_per_adc(ns, ng);
    logic [15:0] w [16][];
    for (int a = 0; a < 16; a++) begin
      w[a] = new[nw];
      for (int n = 0; n < nw; n++) w[a][n] = gen_word(a, n, ns, ng, evt, bcid);
    end
    if (fmt == 0) begin
      for (int n = 1; n < nw - 1; n++)
        for (int r = 0; r < 4; r++)
          rows.push_back({w[2*r][n], w[2*r+8][n], w[2*r+1][n], w[2*r+9][n]});
      rows.push_back({status, 16'(ng), 16'(ns)});
    end else if (fmt == 2) begin
      rows.push_back({32'h0, 11'h0, 5'(evt), 4'h0, 12'(bcid)});
      rows.push_back({w[4][1], w[4][2], 16'(ng), 16'(ns)});
      for (int n = 3; n < nw - 2; n++) begin
        pos_t p = decode(n, ns, ng);
        for (int r = 0; r < 4; r++) begin
          logic [15:0] x [4];
          x[0] = w[2*r][n]; x[1] = w[2*r+8][n]; x[2] = w[2*r+1][n]; x[3] = w[2*r+9][n];
          if (p.kind == K_DATA && p.s > 0) for (int i = 0; i < 4; i++) x[i][13:12] = 2'b00;
          rows.push_back({x[0], x[1], x[2], x[3]});
        end
      end
      rows.push_back({status, w[4][nw-2], 16'h0});
    end else begin
      logic [15:0] slots [12];
      logic [15:0] radd [5];
      for (int s = 0; s < 5; s++) radd[s] = w[4][3 + 9*s] & 16'hBFFF;
      rows.push_back({status, 11'h0, 5'(evt), 4'h0, 12'(bcid)});
      rows.push_back({w[4][1] & 16'hBFFF, w[4][2] & 16'hBFFF, w[4][nw-2] & 16'hBFFF, radd[0]});
      rows.push_back({radd[1], radd[2], radd[3], radd[4]});
      for (int pr = 0; pr < 64; pr++) begin
        for (int h = 0; h < 2; h++) begin
          int a = pr / 8 + 8 * h;
          int c = pr % 8;
          slots[6*h] = {gain_code(a, c, 0, 1), 14'h0};
          for (int s = 0; s < 5; s++)
            slots[6*h + 1 + s] = {gain_code(a, c, 0, 1), sample_value(a, c, s, 0, evt), 2'b00};
        end
        for (int r = 0; r < 3; r++)
          rows.push_back({slots[4*r], slots[4*r+1], slots[4*r+2], slots[4*r+3]});
      end
    end
  endfunction

endpackage
