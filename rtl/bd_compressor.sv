// bd_compressor: generic C_w I_x E_y D_z base-delta compressor (combinational).
//
// The line is parsed as N chunks of W bits, chunk 0 in the low bits. Each
// chunk is split by DELTA_MASK into its delta bits (D of them, by default the
// D least-significant bits) and its base bits (the other W-D). A chunk is
// covered if its base bits equal those of an available dictionary entry:
// the implicit all-zero base (when NI = 1), or one of up to NE explicit
// bases, each taken from the first chunk whose base bits were new. The delta
// bits of a base are assumed zero and are not stored, so every chunk,
// including the one that opened a base, keeps exactly its D delta bits.
//
// Payload layout (LSB first), fixed size SIZE known at design time:
//   NE explicit bases of W-D bits | per-chunk pointers | N deltas of D bits.
// The pointer of chunk c only indexes the entries that can exist when c is
// parsed (NI + min(c+1, NE) of them), so early chunks use fewer bits.
// Pointer value i < NI names an implicit base, NI + j the j-th explicit base.
// Unused explicit base fields are zero.
//
// ok_o is low when more than NE distinct non-implicit base values occur; the
// payload is then meaningless. Purely combinational: the region compressor
// registers the result.
//
// The base-delta formalism, the unstored delta bits of the base, the
// shrinking pointers and remappable delta bits follow the published scheme. The
// field order in the payload, the priority of the implicit base over an equal
// explicit one, and the restriction of implicit bases to the zero value are
// this design's choices.
module bd_compressor
  import rc_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned N  = 8,
  parameter int unsigned NI = 1,
  parameter int unsigned NE = 1,
  parameter int unsigned D  = 8,
  parameter logic [W-1:0] DELTA_MASK = W'(low_mask(D)),
  localparam int unsigned BW   = W - D,
  localparam int unsigned SIZE = bd_size(W, N, NI, NE, D),
  localparam int unsigned OW   = (SIZE == 0) ? 1 : SIZE
) (
  input  logic [N*W-1:0] line_i,
  output logic           ok_o,
  output logic [OW-1:0]  data_o
);

  localparam int unsigned NEA  = (NE == 0) ? 1 : NE;
  localparam int unsigned PMAX = bd_ptr_max(NI, NE);
  localparam int unsigned DOFF = bd_ptr_offset(W, NI, NE, D, N);

  // The delta mask must select exactly D bits, and only the zero base exists.
  if ($countones(DELTA_MASK) != D) begin : g_bad_mask
    $error("DELTA_MASK must have exactly D bits set");
  end
  if (NI > 1) begin : g_bad_ni
    $error("only one implicit (all-zero) base is supported");
  end

  // Packs the bits of v selected by m into the low bits, in order.
  function automatic logic [W-1:0] gather(logic [W-1:0] v, logic [W-1:0] m);
    logic [W-1:0] r;
    int unsigned  k;
    r = '0;
    k = 0;
    for (int unsigned i = 0; i < W; i++) begin
      if (m[i]) begin
        r[k] = v[i];
        k++;
      end
    end
    return r;
  endfunction

  logic [W-1:0]    bases [NEA];
  logic [PMAX-1:0] ptr   [N];
  logic [W-1:0]    delta [N];

  always_comb begin
    int unsigned  nb;
    logic         found;
    logic [W-1:0] hi;
    nb   = 0;
    ok_o = 1'b1;
    for (int unsigned b = 0; b < NEA; b++) bases[b] = '0;
    for (int unsigned c = 0; c < N; c++) begin
      hi       = gather(line_i[c*W +: W], ~DELTA_MASK);
      delta[c] = gather(line_i[c*W +: W], DELTA_MASK);
      found    = 1'b0;
      ptr[c]   = '0;
      if (NI > 0 && hi == '0) found = 1'b1;
      for (int unsigned b = 0; b < NE; b++) begin
        if (!found && b < nb && bases[b] == hi) begin
          found  = 1'b1;
          ptr[c] = PMAX'(NI + b);
        end
      end
      if (!found) begin
        if (nb < NE) begin
          for (int unsigned b = 0; b < NE; b++)
            if (b == nb) bases[b] = hi;
          ptr[c] = PMAX'(NI + nb);
          nb++;
        end else begin
          ok_o = 1'b0;
        end
      end
    end
  end

  if (SIZE == 0) begin : g_empty
    assign data_o = '0;
  end else begin : g_pack
    for (genvar b = 0; b < NE; b++) begin : g_base
      if (BW > 0) begin : g_bw
        assign data_o[b*BW +: BW] = bases[b][BW-1:0];
      end
    end
    for (genvar c = 0; c < N; c++) begin : g_chunk
      localparam int unsigned PW = bd_ptr_width(NI, NE, c);
      localparam int unsigned PO = bd_ptr_offset(W, NI, NE, D, c);
      if (PW > 0) begin : g_ptr
        assign data_o[PO +: PW] = ptr[c][PW-1:0];
      end
      if (D > 0) begin : g_delta
        assign data_o[DOFF + c*D +: D] = delta[c][D-1:0];
      end
    end
  end

endmodule
