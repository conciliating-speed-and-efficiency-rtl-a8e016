// rc_codec: data-path compression engine of a Region-Chunk compressed cache.
//
// Holds the two halves a compressed last-level cache needs: an rc_compressor
// that turns each incoming 64-byte line into a compressed line plus its size
// (and its per-region encodings for the tag), and an rc_decompressor that
// rebuilds a line read from the data array. The two run independently and
// each accepts one line per cycle.
//
// Compress side:   c_valid_i/c_line_i in, c_valid_o/c_data_o/c_size_o/c_enc_o
//                  out 2 cycles later.
// Decompress side: d_valid_i/d_data_i (and d_enc_i from the tag when
//                  ENC_IN_TAG = 1) in, d_valid_o/d_line_o out 3 cycles later
//                  with the encodings in the data entry, 1 cycle later with
//                  them in the tag.
//
// The default configuration is R16C64 (64-bit chunks split in four 16-bit
// regions) with the encodings stored in the data entry. The cache array and
// its compaction layout are outside this block: c_size_o is what the
// allocation logic would use to place the line.
module rc_codec
  import rc_pkg::*;
#(
  parameter int unsigned LINE_BITS  = 512,
  parameter int unsigned CW         = 64,
  parameter int unsigned RW         = 16,
  parameter bit          ENC_IN_TAG = 1'b0,
  localparam int unsigned R    = CW / RW,
  localparam int unsigned HDR  = ENC_IN_TAG ? 0 : R * ENC_W,
  localparam int unsigned OUTW = HDR + LINE_BITS,
  localparam int unsigned TW   = $clog2(OUTW + 1)
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  // compress
  input  logic                 c_valid_i,
  input  logic [LINE_BITS-1:0] c_line_i,
  output logic                 c_valid_o,
  output logic [OUTW-1:0]      c_data_o,
  output logic [TW-1:0]        c_size_o,
  output logic [R*ENC_W-1:0]   c_enc_o,
  // decompress
  input  logic                 d_valid_i,
  input  logic [OUTW-1:0]      d_data_i,
  input  logic [R*ENC_W-1:0]   d_enc_i,
  output logic                 d_valid_o,
  output logic [LINE_BITS-1:0] d_line_o
);

  rc_compressor #(.LINE_BITS(LINE_BITS), .CW(CW), .RW(RW), .ENC_IN_TAG(ENC_IN_TAG)) u_comp (
    .clk_i, .rst_ni, .valid_i(c_valid_i), .line_i(c_line_i),
    .valid_o(c_valid_o), .data_o(c_data_o), .size_o(c_size_o), .enc_o(c_enc_o));

  rc_decompressor #(.LINE_BITS(LINE_BITS), .CW(CW), .RW(RW), .ENC_IN_TAG(ENC_IN_TAG)) u_decomp (
    .clk_i, .rst_ni, .valid_i(d_valid_i), .data_i(d_data_i), .enc_i(d_enc_i),
    .valid_o(d_valid_o), .line_o(d_line_o));

endmodule
