// bd_decompressor: inverse of bd_compressor for a C_w I_x E_y D_z payload.
//
// Reads the NE stored bases, each chunk's pointer and its D delta bits from
// the fixed payload layout described in bd_compressor, and rebuilds every
// chunk by scattering the pointed base's bits into the non-delta positions and
// the delta into the DELTA_MASK positions. All chunks are rebuilt in parallel,
// so decompression is a single combinational step (the enclosing pipeline
// registers it), which is what makes base-delta sub-compressors suitable for
// single-cycle decompression. A pointer naming no existing entry yields a
// zero base.
//
// Parameters and field layout must match the bd_compressor that produced the
// payload. The layout is this design's choice; the rebuild rule (base with
// zero delta bits, plus delta) follows the published scheme.
module bd_decompressor
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
  input  logic [OW-1:0]  data_i,
  output logic [N*W-1:0] line_o
);

  localparam int unsigned DOFF = bd_ptr_offset(W, NI, NE, D, N);

  // The delta mask must select exactly D bits, and only the zero base exists.
  if ($countones(DELTA_MASK) != D) begin : g_bad_mask
    $error("DELTA_MASK must have exactly D bits set");
  end
  if (NI > 1) begin : g_bad_ni
    $error("only one implicit (all-zero) base is supported");
  end

  // Spreads the low bits of v, in order, over the positions set in m.
  function automatic logic [W-1:0] scatter(logic [W-1:0] v, logic [W-1:0] m);
    logic [W-1:0] r;
    int unsigned  k;
    r = '0;
    k = 0;
    for (int unsigned i = 0; i < W; i++) begin
      if (m[i]) begin
        r[i] = v[k];
        k++;
      end
    end
    return r;
  endfunction

  logic [W-1:0] base  [NI+NE];   // dictionary: implicit zero bases, then explicit
  logic [W-1:0] ptr   [N];
  logic [W-1:0] delta [N];

  for (genvar i = 0; i < NI; i++) begin : g_imp
    assign base[i] = '0;
  end
  for (genvar b = 0; b < NE; b++) begin : g_exp
    if (BW > 0) begin : g_bw
      assign base[NI+b] = W'(data_i[b*BW +: BW]);
    end else begin : g_nobw
      assign base[NI+b] = '0;
    end
  end

  for (genvar c = 0; c < N; c++) begin : g_chunk
    localparam int unsigned PW = bd_ptr_width(NI, NE, c);
    localparam int unsigned PO = bd_ptr_offset(W, NI, NE, D, c);
    logic [W-1:0] hi;
    if (PW > 0) begin : g_ptr
      assign ptr[c] = W'(data_i[PO +: PW]);
    end else begin : g_noptr
      assign ptr[c] = '0;
    end
    if (D > 0) begin : g_delta
      assign delta[c] = W'(data_i[DOFF + c*D +: D]);
    end else begin : g_nodelta
      assign delta[c] = '0;
    end
    always_comb begin
      hi = '0;
      for (int unsigned e = 0; e < NI + NE; e++)
        if (ptr[c] == W'(e)) hi = base[e];
    end
    assign line_o[c*W +: W] = scatter(hi, ~DELTA_MASK) | scatter(delta[c], DELTA_MASK);
  end

endmodule
