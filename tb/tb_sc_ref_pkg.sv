// tb_sc_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: the 32-bit LFSR recurrence, the three SNG
// encodings and the three user circuits, bit by bit.
package tb_sc_ref_pkg;

  function automatic logic [31:0] lfsr_step(logic [31:0] s);
    logic fb = s[31] ^ s[21] ^ s[1] ^ s[0];
    return {s[30:0], fb};
  endfunction

  // cfg 0 unipolar, 1 bipolar, 2 two-line. Returns {m, p}.
  function automatic logic [1:0] sng_bit(int cfg, logic [31:0] s, logic [31:0] bin);
    longint unsigned thr;
    longint mag;
    logic hit;
    case (cfg)
      1: thr = bin[31] ? longint'(bin) - 64'h8000_0000 : longint'(bin) + 64'h8000_0000;
      2: begin
        mag = bin[31] ? (64'h1_0000_0000 - longint'(bin)) : longint'(bin);
        thr = 2 * mag;
        if (thr > 64'hFFFF_FFFF) thr = 64'hFFFF_FFFF;
      end
      default: thr = longint'(bin);
    endcase
    hit = (longint'(s) < thr);
    if (cfg == 2) return bin[31] ? {hit, 1'b0} : {1'b0, hit};
    return {1'b0, hit};
  endfunction

  // user circuit outputs as a bit vector (bit k = output k); uc 0 addmul,
  // 1 prod, 2 eprod; in holds input bits in wrapper order.
  function automatic logic [1023:0] user_eval(int uc, int n, logic [1023:0] in);
    logic [1023:0] o = '0;
    case (uc)
      0: begin
        o[0] = in[0] & in[1] & in[2] & in[3];
        o[1] = in[5] ? (in[4] ? in[3] : in[2]) : (in[4] ? in[1] : in[0]);
      end
      1: begin
        o[0] = 1'b1;
        for (int i = 0; i < n; i++) o[0] &= in[i];
      end
      default: for (int i = 0; i < n / 2; i++) o[i] = in[i] & in[n / 2 + i];
    endcase
    return o;
  endfunction

  // Value in [0,1) as an unsigned 32-bit unipolar word.
  function automatic logic [31:0] uni_word(real p);
    return 32'(longint'(p * 4294967296.0));
  endfunction

  // Value in [-1,1) as a signed 32-bit word (v * 2^31).
  function automatic logic [31:0] sgn_word(real v);
    return 32'(longint'(v * 2147483648.0));
  endfunction

  // Expected counter values of one run of the wrapper: nsrc SNGs with the
  // given encodings, values and seeds, `cycles` clocks of the user circuit,
  // and ndst counters with the given encodings (negative lines tied low).
  function automatic void run_ref(int uc, int n, int nsrc, int ndst, int src_cfg[], int dst_cfg[],
                                  logic [31:0] vals[], logic [31:0] seeds[], int cycles,
                                  ref int counts[]);
    logic [31:0] st [];
    logic [1023:0] in, out;
    st = new[nsrc];
    counts = new[ndst];
    foreach (counts[j]) counts[j] = 0;
    for (int k = 0; k < nsrc; k++) st[k] = (seeds[k] == 0) ? 32'h1 : seeds[k];
    for (int c = 0; c < cycles; c++) begin
      in = '0;
      for (int k = 0; k < nsrc; k++) begin
        in[k] = sng_bit(src_cfg[k], st[k], vals[k])[0];
        st[k] = lfsr_step(st[k]);
      end
      out = user_eval(uc, n, in);
      for (int j = 0; j < ndst; j++)
        if (dst_cfg[j] == 1) counts[j] += out[j] ? 1 : -1;
        else                 counts[j] += int'(out[j]);
    end
  endfunction

endpackage
