// rc_pkg: shared constants, types and design-time functions of the
// Region-Chunk (RC) cache compressor.
//
// A region compressor is a multi-compressor built from NUM_SUB = 2^ENC_W - 1
// sub-compressors; the last encoding (NUM_SUB) marks a region stored
// uncompressed. Each sub-compressor is either a generic base-delta compressor
// C_w I_x E_y D_z (x implicit bases, y explicit bases, z-bit deltas) or a
// stride compressor. Because every base-delta sub-compressor stores a fixed
// number of bases, pointers and deltas, its compressed size is a constant
// known at design time; the functions below compute those sizes and the bit
// offsets of every field.
//
// The set of sub-compressors (sub_cfg) is this design's own choice: the
// selection method is only outlined, and the concrete sets are not given.
// It contains the two BDI-style special cases (all zeros, repeated value),
// three base-delta compressors with 1 or 2 explicit bases, one with only the
// implicit zero base, and the stride compressor.
package rc_pkg;

  localparam int unsigned ENC_W   = 3;               // k: encoding bits per region
  localparam int unsigned NUM_SUB = (1 << ENC_W) - 1; // S = 2^k - 1 sub-compressors

  typedef enum logic [1:0] {
    SUB_BD     = 2'd0,   // C_w I_x E_y D_z base-delta compressor
    SUB_STRIDE = 2'd1,   // base + n * stride
    SUB_RAW    = 2'd2    // uncompressed (reserved encoding)
  } sub_kind_e;

  typedef struct packed {
    sub_kind_e   kind;
    logic [7:0]  ni;     // implicit bases (0 or 1: the all-zero base)
    logic [7:0]  ne;     // explicit bases
    logic [7:0]  d;      // delta bits (stride bits for SUB_STRIDE)
  } sub_cfg_t;

  // Ceiling of log2(v), as a plain loop so it also folds inside functions.
  function automatic int unsigned clog2(int unsigned v);
    int unsigned r;
    r = 0;
    while ((64'd1 << r) < 64'(v)) r++;
    return r;
  endfunction

  // Pointer width of chunk c (0-based): the dictionary can hold at most
  // ni + min(c+1, ne) entries when chunk c is parsed.
  function automatic int unsigned bd_ptr_width(int unsigned ni, int unsigned ne, int unsigned c);
    int unsigned vals;
    vals = ni + ((c + 1 < ne) ? c + 1 : ne);
    return (vals <= 1) ? 0 : clog2(vals);
  endfunction

  // Bit offset of chunk c's pointer: pointers follow the ne stored bases.
  function automatic int unsigned bd_ptr_offset(int unsigned w, int unsigned ni, int unsigned ne,
                                                int unsigned d, int unsigned c);
    int unsigned off;
    off = ne * (w - d);
    for (int unsigned j = 0; j < c; j++) off += bd_ptr_width(ni, ne, j);
    return off;
  endfunction

  // Fixed compressed size of a C_w I_ni E_ne D_d compressor over n chunks.
  function automatic int unsigned bd_size(int unsigned w, int unsigned n, int unsigned ni,
                                          int unsigned ne, int unsigned d);
    return bd_ptr_offset(w, ni, ne, d, n) + n * d;
  endfunction

  // Widest pointer any chunk needs.
  function automatic int unsigned bd_ptr_max(int unsigned ni, int unsigned ne);
    return ((ni + ne) <= 1) ? 1 : clog2(ni + ne);
  endfunction

  // Mask of the delta bits: the d least-significant bits of a chunk.
  function automatic logic [63:0] low_mask(int unsigned d);
    return (d >= 64) ? '1 : ((64'd1 << d) - 64'd1);
  endfunction

  // Sub-compressor idx of a region compressor whose chunks are rw bits wide.
  function automatic sub_cfg_t sub_cfg(int unsigned rw, int unsigned idx);
    sub_cfg_t c;
    c.kind = SUB_BD; c.ni = 8'd0; c.ne = 8'd0; c.d = 8'd0;
    case (idx)
      0: begin c.ni = 8'd1; c.ne = 8'd0; c.d = 8'd0;          end // all zeros
      1: begin c.ni = 8'd0; c.ne = 8'd1; c.d = 8'd0;          end // repeated value
      2: begin c.ni = 8'd1; c.ne = 8'd0; c.d = 8'(rw / 2);    end // narrow values
      3: begin c.ni = 8'd1; c.ne = 8'd1; c.d = 8'(rw / 4);    end
      4: begin c.ni = 8'd1; c.ne = 8'd1; c.d = 8'(rw / 2);    end
      5: begin c.ni = 8'd1; c.ne = 8'd2; c.d = 8'(rw / 2);    end
      6: begin c.kind = SUB_STRIDE; c.d = 8'(rw / 2);         end // stride
      default: c.kind = SUB_RAW;
    endcase
    return c;
  endfunction

  // Compressed size in bits of sub-compressor idx over n chunks of rw bits.
  function automatic int unsigned sub_size(int unsigned rw, int unsigned n, int unsigned idx);
    sub_cfg_t c;
    c = sub_cfg(rw, idx);
    case (c.kind)
      SUB_BD:     return bd_size(rw, n, int'(c.ni), int'(c.ne), int'(c.d));
      SUB_STRIDE: return rw + int'(c.d);
      default:    return rw * n;
    endcase
  endfunction

endpackage
