// rc_extract: the reverse of rc_concat. From the region sizes it computes
// each region's bit offset in the compressed line (HDR plus the sizes of the
// regions before it, by a chain of adders) and shifts that region's payload
// down to bit 0. The RB bits returned for a region hold its payload in the low
// size_i[r] bits followed by whatever comes next in the line; the region
// decompressors only read their own size. Combinational.
module rc_extract #(
  parameter int unsigned R   = 4,
  parameter int unsigned RB  = 128,
  parameter int unsigned HDR = 12,
  localparam int unsigned SW   = $clog2(RB + 1),
  localparam int unsigned OUTW = HDR + R * RB,
  localparam int unsigned TW   = $clog2(OUTW + 1)
) (
  input  logic [OUTW-1:0] line_i,
  input  logic [SW-1:0]   size_i [R],
  output logic [RB-1:0]   data_o [R]
);

  always_comb begin
    logic [TW-1:0] off;
    off = TW'(HDR);
    for (int unsigned r = 0; r < R; r++) begin
      data_o[r] = RB'(line_i >> off);
      off       = off + TW'(size_i[r]);
    end
  end

endmodule
