// rc_decompressor: Region-Chunk (R_x C_w) decompressor for one cache line.
//
// Undoes rc_compressor: each region's encoding gives its payload size (a
// design-time constant per encoding), prefix sums of those sizes give each
// payload's position (rc_extract), every region line is rebuilt by its
// region_decompressor, and the region lines are rewired back into chunks.
//
// ENC_IN_TAG = 0: the encodings are read from the header of the compressed
// line, which costs two extra steps before decompression proper. Latency is 3
// cycles: (1) decode the header and register the region sizes, (2) shift the
// payloads out and register them, (3) decompress and rewire, registered.
// enc_i is unused in this mode.
//
// ENC_IN_TAG = 1: the encodings come from the tag (enc_i, valid with
// valid_i), so sizes and offsets are known as the data arrives and the whole
// decompression is one cycle: shift, decompress and rewire, registered.
//
// Both modes accept one line per cycle. rst_ni (active low, synchronous)
// clears the valid pipeline only. The 1-cycle and 3-cycle latencies of the
// two placements of the encodings follow the published scheme; the exact split of
// the work over the three cycles is this design's choice.
module rc_decompressor
  import rc_pkg::*;
#(
  parameter int unsigned LINE_BITS  = 512,
  parameter int unsigned CW         = 64,
  parameter int unsigned RW         = 16,
  parameter bit          ENC_IN_TAG = 1'b0,
  localparam int unsigned N    = LINE_BITS / CW,
  localparam int unsigned R    = CW / RW,
  localparam int unsigned HDR  = ENC_IN_TAG ? 0 : R * ENC_W,
  localparam int unsigned OUTW = HDR + LINE_BITS
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 valid_i,
  input  logic [OUTW-1:0]      data_i,
  input  logic [R*ENC_W-1:0]   enc_i,
  output logic                 valid_o,
  output logic [LINE_BITS-1:0] line_o
);

  localparam int unsigned RB = N * RW;
  localparam int unsigned SW = $clog2(RB + 1);

  if (LINE_BITS % CW != 0 || CW % RW != 0 || CW > 64) begin : g_bad_geometry
    $error("CW must divide LINE_BITS, RW must divide CW, and CW must be at most 64");
  end

  // Payload size of each encoding, a constant table (the last entry is the
  // uncompressed size).
  logic [SW-1:0] size_lut [NUM_SUB+1];
  for (genvar s = 0; s <= NUM_SUB; s++) begin : g_lut
    assign size_lut[s] = SW'(sub_size(RW, N, s));
  end

  logic [ENC_W-1:0]     enc_x  [R];   // encodings entering the extraction step
  logic [SW-1:0]        size_x [R];
  logic [OUTW-1:0]      line_x;
  logic                 valid_x;
  logic [RB-1:0]        pay_c  [R];
  logic [ENC_W-1:0]     enc_d  [R];   // encodings entering the decompress step
  logic [RB-1:0]        pay_d  [R];
  logic                 valid_d;
  logic [RB-1:0]        rline  [R];
  logic [LINE_BITS-1:0] line_c;

  if (ENC_IN_TAG) begin : g_tag
    // Encodings known with the data: a single registered stage.
    for (genvar r = 0; r < R; r++) begin : g_r
      assign enc_x[r]  = enc_i[r*ENC_W +: ENC_W];
      assign size_x[r] = size_lut[enc_x[r]];
      assign enc_d[r]  = enc_x[r];
      assign pay_d[r]  = pay_c[r];
    end
    assign line_x  = data_i;
    assign valid_x = valid_i;
    assign valid_d = valid_x;
  end else begin : g_data
    logic [ENC_W-1:0] enc_q  [R];
    logic [SW-1:0]    size_q [R];
    logic [OUTW-1:0]  line_q;
    logic             valid_q;
    logic [ENC_W-1:0] enc_q2 [R];
    logic [RB-1:0]    pay_q  [R];
    logic             valid_q2;
    logic [R*ENC_W-1:0] unused_enc;
    assign unused_enc = enc_i;
    // Cycle 1: decode the header.
    always_ff @(posedge clk_i) begin
      if (!rst_ni) valid_q <= 1'b0;
      else         valid_q <= valid_i;
      line_q <= data_i;
      for (int unsigned r = 0; r < R; r++) begin
        enc_q[r]  <= data_i[r*ENC_W +: ENC_W];
        size_q[r] <= size_lut[data_i[r*ENC_W +: ENC_W]];
      end
    end
    assign enc_x   = enc_q;
    assign size_x  = size_q;
    assign line_x  = line_q;
    assign valid_x = valid_q;
    // Cycle 2: shift the payloads out.
    always_ff @(posedge clk_i) begin
      if (!rst_ni) valid_q2 <= 1'b0;
      else         valid_q2 <= valid_x;
      enc_q2 <= enc_x;
      pay_q  <= pay_c;
    end
    assign enc_d   = enc_q2;
    assign pay_d   = pay_q;
    assign valid_d = valid_q2;
  end

  rc_extract #(.R(R), .RB(RB), .HDR(HDR)) u_extract (
    .line_i(line_x), .size_i(size_x), .data_o(pay_c));

  for (genvar r = 0; r < R; r++) begin : g_region
    region_decompressor #(.RW(RW), .N(N)) u_rdec (
      .enc_i(enc_d[r]), .data_i(pay_d[r]), .line_o(rline[r]));
    for (genvar c = 0; c < N; c++) begin : g_chunk
      assign line_c[c*CW + r*RW +: RW] = rline[r][c*RW +: RW];
    end
  end

  // Last cycle: decompress and rewire, registered.
  always_ff @(posedge clk_i) begin
    if (!rst_ni) valid_o <= 1'b0;
    else         valid_o <= valid_d;
    line_o <= line_c;
  end

endmodule
