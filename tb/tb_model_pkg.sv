// Reference models shared by the testbenches: the spreading codes written
// out independently of the RTL generator, a reverse-link signal source
// (pilot on I, one Walsh-covered data channel on Q, QPSK spreading, carrier
// phase rotation, additive noise, band-limited chip edges) and the 4-bit ADC.
package tb_model_pkg;
  localparam int PERIOD = 32768;
  bit short_i [PERIOD];
  bit short_q [PERIOD];

  // Short codes: m-sequences of the two 15th-degree polynomials, generated
  // from their linear recurrences, followed by one inserted zero chip.
  function automatic void init_codes();
    static int ti[6] = '{13, 9, 8, 7, 5, 0};
    static int tq[8] = '{12, 11, 10, 6, 5, 4, 3, 0};
    logic [14:0] s;
    // The first 15 chips (the epoch state) come from the shift register
    // seeded with 0x4000; every later chip from the recurrence.
    s = 15'h4000;
    for (int n = 0; n < 15; n++) begin
      short_i[n] = s[14];
      s = s[14] ? ({s[13:0], 1'b0} ^ 15'h23A1) : {s[13:0], 1'b0};
    end
    s = 15'h4000;
    for (int n = 0; n < 15; n++) begin
      short_q[n] = s[14];
      s = s[14] ? ({s[13:0], 1'b0} ^ 15'h1C79) : {s[13:0], 1'b0};
    end
    for (int n = 15; n < PERIOD - 1; n++) begin
      bit a, b;
      a = 0; b = 0;
      foreach (ti[k]) a ^= short_i[n - 15 + ti[k]];
      foreach (tq[k]) b ^= short_q[n - 15 + tq[k]];
      short_i[n] = a;
      short_q[n] = b;
    end
    short_i[PERIOD-1] = 0;
    short_q[PERIOD-1] = 0;
  endfunction

  function automatic bit walsh(int w, int k);
    return ^(w & k);
  endfunction

  function automatic int adc(real v);
    int c;
    c = $rtoi((v + 15.0) / 2.0 + 0.5 + 100.0) - 100;
    if (c < 0) c = 0;
    if (c > 15) c = 15;
    return c;
  endfunction

  // Complex baseband chip n of the test user (long code off).
  // tx = (Ap + j*Ad*w*d) * (ci + j*cq), then rotated by theta.
  function automatic void chip_value(int n, real ap, real ad, int wal, int log2sf,
                                     bit data[], real cth, real sth,
                                     output real re, output real im);
    int  m, sym, bitno;
    real ci, cq, sr, si, tr, ti;
    m   = ((n % PERIOD) + PERIOD) % PERIOD;
    sym = m % (1 << log2sf);
    bitno = (m >> log2sf) % data.size();
    ci  = short_i[m] ? -1.0 : 1.0;
    cq  = short_q[m] ? -1.0 : 1.0;
    sr  = ap;
    si  = ad * (walsh(wal, sym) ? -1.0 : 1.0) * (data[bitno] ? -1.0 : 1.0);
    tr  = sr * ci - si * cq;
    ti  = sr * cq + si * ci;
    re  = tr * cth - ti * sth;
    im  = tr * sth + ti * cth;
  endfunction

  // Sample s (8 per chip) of a path whose chip 0 starts at sample 'dly':
  // the first sample of each chip is the mean of the two neighbouring chips.
  function automatic void sample_value(longint s, longint dly, real ap, real ad,
                                       int wal, int log2sf, bit data[],
                                       real cth, real sth,
                                       output real re, output real im);
    longint rel;
    int n, p;
    real r0, i0, r1, i1;
    rel = s - dly;
    n = int'(rel >>> 3);
    p = int'(rel & 7);
    chip_value(n, ap, ad, wal, log2sf, data, cth, sth, r0, i0);
    if (p == 0) begin
      chip_value(n - 1, ap, ad, wal, log2sf, data, cth, sth, r1, i1);
      re = (r0 + r1) / 2.0;
      im = (i0 + i1) / 2.0;
    end else begin
      re = r0;
      im = i0;
    end
  endfunction

  function automatic real noise(real amp);
    return amp * (real'($urandom % 2001) / 1000.0 - 1.0);
  endfunction
endpackage
