// tb_ref_pkg: reference models used by the testbenches, written apart from
// the RTL: BDI and FPC size calculation and encoding of a 64-byte line, and
// generators of lines with typical data patterns.
package tb_ref_pkg;

  typedef logic [511:0] line_t;

  // element i of size k bytes
  function automatic logic [63:0] elem(line_t l, int k, int i);
    line_t t;
    t = l >> (i * 8 * k);
    return (k == 8) ? t[63:0] : (k == 4) ? {32'b0, t[31:0]} : {48'b0, t[15:0]};
  endfunction

  // does v (k-byte value) equal the sign extension of its low d bytes?
  function automatic bit fits_sx(logic [63:0] v, int k, int d);
    logic signed [63:0] s;
    logic [63:0] m;
    m = (k == 8) ? 64'hFFFF_FFFF_FFFF_FFFF : ((64'd1 << (8 * k)) - 1);
    s = $signed(v << (64 - 8 * d)) >>> (64 - 8 * d);
    return ((s & m) == (v & m));
  endfunction

  // BDI with K/D: ok flag and payload (base, deltas, mask bits)
  function automatic bit bdi_try(line_t l, int k, int d, output line_t pl);
    int n;
    logic [63:0] base, e, m, diff;
    bit found;
    n = 64 / k;
    m = (k == 8) ? 64'hFFFF_FFFF_FFFF_FFFF : ((64'd1 << (8 * k)) - 1);
    found = 0; base = 0;
    for (int i = 0; i < n; i++) begin
      e = elem(l, k, i);
      if (!found && !fits_sx(e, k, d)) begin base = e; found = 1; end
    end
    pl = 0;
    pl = pl | line_t'(base);
    for (int i = 0; i < n; i++) begin
      e = elem(l, k, i);
      diff = (e - base) & m;
      if (fits_sx(e, k, d)) begin
        pl = pl | (line_t'(e & ((64'd1 << (8 * d)) - 1)) << (8 * k + i * 8 * d));
      end else if (fits_sx(diff, k, d)) begin
        pl = pl | (line_t'(diff & ((64'd1 << (8 * d)) - 1)) << (8 * k + i * 8 * d));
        pl[8 * k + n * 8 * d + i] = 1'b1;
      end else return 0;
    end
    return 1;
  endfunction

  // smallest BDI coding: returns enc code and segment count
  function automatic void bdi_best(line_t l, output int enc, output int segs, output line_t pl);
    int ks[6] = '{8, 4, 8, 4, 2, 8};
    int ds[6] = '{1, 1, 2, 2, 1, 4};
    int en[6] = '{2, 5, 3, 6, 7, 4};
    bit rep;
    line_t p;
    rep = 1;
    for (int i = 1; i < 8; i++) if (elem(l, 8, i) != elem(l, 8, 0)) rep = 0;
    if (l == 0) begin enc = 0; segs = 1; pl = 0; return; end
    if (rep) begin enc = 1; segs = 1; pl = line_t'(elem(l, 8, 0)); return; end
    for (int c = 0; c < 6; c++)
      if (bdi_try(l, ks[c], ds[c], p)) begin
        int n;
        n = 64 / ks[c];
        enc = en[c];
        segs = (ks[c] + n * ds[c] + (n + 7) / 8 + 7) / 8;
        pl = p;
        return;
      end
    enc = 15; segs = 8; pl = l;
  endfunction

  // FPC: prefix and length of one word
  function automatic void fpc_word(logic [31:0] w, output int p, output int len, output logic [31:0] f);
    if (w == 0)                                  begin p = 0; len = 0;  f = 0; end
    else if ($signed(w) >= -8 && $signed(w) < 8)     begin p = 1; len = 4;  f = w & 32'hF; end
    else if ($signed(w) >= -128 && $signed(w) < 128) begin p = 2; len = 8;  f = w & 32'hFF; end
    else if (w == {4{w[7:0]}})                   begin p = 6; len = 8;  f = w & 32'hFF; end
    else if ($signed(w) >= -32768 && $signed(w) < 32768) begin p = 3; len = 16; f = w & 32'hFFFF; end
    else if (w[15:0] == 0)                       begin p = 4; len = 16; f = w >> 16; end
    else if ($signed(w[31:16]) >= -128 && $signed(w[31:16]) < 128 &&
             $signed(w[15:0]) >= -128 && $signed(w[15:0]) < 128)
                                                 begin p = 5; len = 16; f = {16'b0, w[23:16], w[7:0]}; end
    else                                         begin p = 7; len = 32; f = w; end
  endfunction

  // FPC encoding: total bits (prefixes included) and block (first 512 bits)
  function automatic int fpc_encode(line_t l, output line_t blk);
    logic [575:0] t;
    int pos, p, len;
    logic [31:0] f;
    t = 0; pos = 48;
    for (int i = 0; i < 16; i++) begin
      fpc_word(l[i*32 +: 32], p, len, f);
      t = t | (576'(p) << (3 * i));
      t = t | (576'(f) << pos);
      pos += len;
    end
    blk = t[511:0];
    return pos;
  endfunction

  // test lines of various kinds
  function automatic line_t gen_line(int kind, int seed);
    line_t l;
    logic [63:0] b;
    b = {$urandom(seed), $urandom()};
    l = 0;
    case (kind % 12)
      0: l = 0;                                                   // zeros
      1: for (int i = 0; i < 8; i++) l[i*64 +: 64] = b;           // repeated
      2: for (int i = 0; i < 8; i++) l[i*64 +: 64] = b + 64'($urandom_range(0, 100)); // pointers
      3: for (int i = 0; i < 16; i++) l[i*32 +: 32] = 32'($urandom_range(0, 9)) - 32'd4; // small ints
      4: for (int i = 0; i < 16; i++) l[i*32 +: 32] = (i % 3 == 0) ? {$urandom_range(1, 65535), 16'h0}
                                                       : 32'($urandom_range(0, 200)); // mixed narrow
      5: for (int i = 0; i < 16; i++) l[i*32 +: 32] = $urandom();  // random
      6: for (int i = 0; i < 16; i++) l[i*32 +: 32] = (i % 4 == 0) ? $urandom() : 32'h0; // sparse
      8: for (int i = 0; i < 8; i++) l[i*64 +: 64] = b + 64'($signed($urandom() >> 1)); // 8/4
      9: for (int i = 0; i < 16; i++) l[i*32 +: 32] = b[31:0] + 32'($urandom_range(0, 60000)) - 32'd30000; // 4/2
      10: for (int i = 0; i < 32; i++) l[i*16 +: 16] = b[15:0] + 16'($urandom_range(0, 200)) - 16'd100; // 2/1
      11: for (int i = 0; i < 8; i++) l[i*64 +: 64] = b + 64'($urandom_range(200, 30000)); // 8/2
      default: for (int i = 0; i < 8; i++) l[i*64 +: 64] = (i % 2) ? b + 64'(i) : 64'(i); // base+immediate
    endcase
    return l;
  endfunction

endpackage
