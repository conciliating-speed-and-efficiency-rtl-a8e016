// tb_ref_pkg: reference model and stimulus for the Region-Chunk testbenches.
//
// The reference decides, for a region line of N 16-bit values, which
// sub-compressor the hardware must pick, using hand-computed payload sizes
// rather than the design's package functions:
//   enc 0 zeros 0 b, 1 repeated 16 b, 2 C16I1E0D8 64 b, 3 C16I1E1D4 52 b,
//   enc 4 C16I1E1D8 80 b, 5 C16I1E2D8 95 b, 6 stride 24 b, 7 raw 128 b.
// It also generates region lines of each class, so that every encoding is
// exercised.
package tb_ref_pkg;

  localparam int RW = 16;
  localparam int N  = 8;

  typedef logic [N*RW-1:0] rline_t;

  function automatic int ref_size(int enc);
    case (enc)
      0: return 0;   1: return 16;  2: return 64;  3: return 52;
      4: return 80;  5: return 95;  6: return 24;  default: return 128;
    endcase
  endfunction

  // Does the line fit a base-delta compressor with an optional zero base,
  // ne explicit bases and d delta bits (taken from the LSBs)?
  function automatic bit fits_bd(rline_t l, bit zero_base, int ne, int d);
    int distinct[$];
    int hi;
    for (int c = 0; c < N; c++) begin
      hi = int'(l[c*RW +: RW]) >> d;
      if (zero_base && hi == 0) continue;
      if (!(hi inside {distinct})) distinct.push_back(hi);
    end
    return distinct.size() <= ne;
  endfunction

  function automatic bit fits_stride(rline_t l);
    int s;
    s = (int'(l[RW +: RW]) - int'(l[0 +: RW])) & 16'hffff;
    if (!(s < 128 || s >= 16'hff80)) return 0;
    for (int c = 1; c < N; c++)
      if (((int'(l[c*RW +: RW]) - int'(l[(c-1)*RW +: RW])) & 16'hffff) != s) return 0;
    return 1;
  endfunction

  function automatic bit fits(rline_t l, int enc);
    case (enc)
      0: return fits_bd(l, 1, 0, 0);
      1: return fits_bd(l, 0, 1, 0);
      2: return fits_bd(l, 1, 0, 8);
      3: return fits_bd(l, 1, 1, 4);
      4: return fits_bd(l, 1, 1, 8);
      5: return fits_bd(l, 1, 2, 8);
      6: return fits_stride(l);
      default: return 1;
    endcase
  endfunction

  // Expected encoding: smallest fitting payload (sizes are all distinct).
  function automatic int ref_enc(rline_t l);
    int best;
    best = 7;
    for (int e = 0; e < 7; e++)
      if (fits(l, e) && ref_size(e) < ref_size(best)) best = e;
    return best;
  endfunction

  // A region line of class k (0..7, roughly one per encoding).
  function automatic rline_t gen_rline(int k);
    rline_t l;
    logic [15:0] b1, b2, st;
    b1 = 16'($urandom);
    b2 = 16'($urandom);
    st = 16'($urandom_range(0, 255)) - 16'd128;
    for (int c = 0; c < N; c++) begin
      case (k)
        0: l[c*RW +: RW] = '0;
        1: l[c*RW +: RW] = b1;
        2: l[c*RW +: RW] = 16'($urandom_range(0, 255));
        3: l[c*RW +: RW] = ($urandom_range(0, 3) == 0) ? 16'($urandom_range(0, 15))
                                                      : {b1[15:4], 4'($urandom)};
        4: l[c*RW +: RW] = ($urandom_range(0, 3) == 0) ? 16'($urandom_range(0, 255))
                                                      : {b1[15:8], 8'($urandom)};
        5: l[c*RW +: RW] = ($urandom_range(0, 1) == 0) ? {b2[15:8], 8'($urandom)}
                                                      : {b1[15:8], 8'($urandom)};
        6: l[c*RW +: RW] = b1 + 16'(c) * st;
        default: l[c*RW +: RW] = 16'($urandom);
      endcase
    end
    return l;
  endfunction

  typedef logic [511:0] line_t;

  // A 64-byte line of eight 64-bit chunks whose four 16-bit region lines are
  // drawn from the classes in cls[r]; region r of chunk c is bits
  // [64c + 16r +: 16].
  function automatic line_t gen_line(int cls [4]);
    line_t  l;
    rline_t rl;
    for (int r = 0; r < 4; r++) begin
      rl = gen_rline(cls[r]);
      for (int c = 0; c < N; c++) l[c*64 + r*16 +: 16] = rl[c*RW +: RW];
    end
    return l;
  endfunction

  // Region line r of a 64-byte line.
  function automatic rline_t region_of(line_t l, int r);
    rline_t rl;
    for (int c = 0; c < N; c++) rl[c*RW +: RW] = l[c*64 + r*16 +: 16];
    return rl;
  endfunction

endpackage
