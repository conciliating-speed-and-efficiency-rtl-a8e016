// rc_concat: packs the compressed region lines into one compressed line.
//
// Region r's payload occupies the low size_i[r] bits of data_i[r]. Region 0 is
// placed at bit HDR, and each following region starts where the previous
// one ended: the offsets are prefix sums of the sizes (a chain of adders) and
// each payload is moved there by a shifter, after masking off bits above its
// size. Bits below HDR are left zero for the encoding header, which the
// caller fills in. total_o = HDR + sum of sizes. Combinational.
//
// The adders-and-shifters composition is the published scheme's; the order of the
// regions (region 0, the least-significant bits of each chunk, first) is this
// design's choice.
module rc_concat #(
  parameter int unsigned R   = 4,
  parameter int unsigned RB  = 128,
  parameter int unsigned HDR = 12,
  localparam int unsigned SW   = $clog2(RB + 1),
  localparam int unsigned OUTW = HDR + R * RB,
  localparam int unsigned TW   = $clog2(OUTW + 1)
) (
  input  logic [RB-1:0]   data_i [R],
  input  logic [SW-1:0]   size_i [R],
  output logic [OUTW-1:0] line_o,
  output logic [TW-1:0]   total_o
);

  always_comb begin
    logic [TW-1:0] off;
    logic [RB-1:0] keep;
    off    = TW'(HDR);
    line_o = '0;
    for (int unsigned r = 0; r < R; r++) begin
      keep   = ~({RB{1'b1}} << size_i[r]);
      line_o = line_o | (OUTW'(data_i[r] & keep) << off);
      off    = off + TW'(size_i[r]);
    end
    total_o = off;
  end

endmodule
