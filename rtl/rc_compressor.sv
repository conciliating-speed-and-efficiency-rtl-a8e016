// rc_compressor: Region-Chunk (R_x C_w) compressor for one cache line.
//
// The LINE_BITS line is seen as N = LINE_BITS/CW chunks of CW bits, and each
// chunk as R = CW/RW regions of RW bits. Rewiring gathers region r of every
// chunk into region line r (N values of RW bits), so each region line holds
// bits that sit at the same position of their chunks, e.g. all the
// most-significant 16 bits of the 64-bit chunks. Each region line is
// compressed independently by its own region_compressor (a multi-compressor),
// and rc_concat then lays the region payloads one after another.
//
// With ENC_IN_TAG = 0 (encodings kept in the data entry) the compressed line
// starts with an R*ENC_W-bit header, region r's encoding in bits
// [r*ENC_W +: ENC_W], followed by the region payloads. With ENC_IN_TAG = 1 the
// header is omitted: the encodings go to the tag array through enc_o, and the
// payloads start at bit 0. size_o is the compressed size in bits, header
// included; the caller decides whether the line is worth storing compressed.
//
// Timing: fully pipelined, one line per cycle, 2-cycle latency. Cycle 1 runs
// the region compressors and registers encodings, sizes and payloads;
// cycle 2 runs the adders and shifters of rc_concat and registers the
// result. valid_o follows valid_i two cycles later; rst_ni (active low,
// synchronous) clears only the valid pipeline.
//
// Region-Chunk splitting, per-region multi-compressors and the concatenation
// step follow the published scheme. The defaults are its preferred R16C64 on 64-byte
// lines. The 2-cycle split of the compression latency, the header layout and
// the reset are this design's choices.
module rc_compressor
  import rc_pkg::*;
#(
  parameter int unsigned LINE_BITS  = 512,
  parameter int unsigned CW         = 64,
  parameter int unsigned RW         = 16,
  parameter bit          ENC_IN_TAG = 1'b0,
  localparam int unsigned N    = LINE_BITS / CW,
  localparam int unsigned R    = CW / RW,
  localparam int unsigned HDR  = ENC_IN_TAG ? 0 : R * ENC_W,
  localparam int unsigned OUTW = HDR + LINE_BITS,
  localparam int unsigned TW   = $clog2(OUTW + 1)
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 valid_i,
  input  logic [LINE_BITS-1:0] line_i,
  output logic                 valid_o,
  output logic [OUTW-1:0]      data_o,
  output logic [TW-1:0]        size_o,
  output logic [R*ENC_W-1:0]   enc_o
);

  localparam int unsigned RB = N * RW;
  localparam int unsigned SW = $clog2(RB + 1);

  if (LINE_BITS % CW != 0 || CW % RW != 0 || CW > 64) begin : g_bad_geometry
    $error("CW must divide LINE_BITS, RW must divide CW, and CW must be at most 64");
  end

  logic [RB-1:0]    rline [R];
  logic [ENC_W-1:0] enc_c  [R];
  logic [SW-1:0]    size_c [R];
  logic [RB-1:0]    data_c [R];

  logic             valid_q;
  logic [ENC_W-1:0] enc_q  [R];
  logic [SW-1:0]    size_q [R];
  logic [RB-1:0]    data_q [R];

  logic [OUTW-1:0]    packed_c;
  logic [TW-1:0]      total_c;
  logic [R*ENC_W-1:0] enc_flat;

  for (genvar r = 0; r < R; r++) begin : g_region
    for (genvar c = 0; c < N; c++) begin : g_chunk
      assign rline[r][c*RW +: RW] = line_i[c*CW + r*RW +: RW];
    end
    region_compressor #(.RW(RW), .N(N)) u_rcomp (
      .line_i(rline[r]), .enc_o(enc_c[r]), .size_o(size_c[r]), .data_o(data_c[r]));
    assign enc_flat[r*ENC_W +: ENC_W] = enc_q[r];
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) valid_q <= 1'b0;
    else         valid_q <= valid_i;
    enc_q  <= enc_c;
    size_q <= size_c;
    data_q <= data_c;
  end

  rc_concat #(.R(R), .RB(RB), .HDR(HDR)) u_concat (
    .data_i(data_q), .size_i(size_q), .line_o(packed_c), .total_o(total_c));

  always_ff @(posedge clk_i) begin
    if (!rst_ni) valid_o <= 1'b0;
    else         valid_o <= valid_q;
    data_o <= packed_c | OUTW'(ENC_IN_TAG ? '0 : enc_flat);
    size_o <= total_c;
    enc_o  <= enc_flat;
  end

endmodule
