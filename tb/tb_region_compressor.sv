// tb_region_compressor: self-checking test of region_compressor and
// region_decompressor at RW = 16, N = 8.
//
// Region lines of every class (zeros, repeated value, narrow values, one or
// two bases with 4- or 8-bit deltas, strides, random) are compressed; the
// chosen encoding and payload size must match the reference model in
// tb_ref_pkg, the payload must be zero above its size, and decompressing
// with the chosen encoding must give the line back. Every encoding must be
// chosen at least once.
module tb_region_compressor;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int seen [8];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rline_t      line, pay, back;
  logic [2:0]  enc;
  logic [7:0]  size;
  int          e;

  region_compressor   #(.RW(16), .N(8)) u_c (.line_i(line), .enc_o(enc), .size_o(size), .data_o(pay));
  region_decompressor #(.RW(16), .N(8)) u_d (.enc_i(enc), .data_i(pay), .line_o(back));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      line = gen_rline(t % 8);
      #1;
      e = ref_enc(line);
      seen[enc]++;
      check(int'(enc) == e, $sformatf("t=%0d enc %0d expected %0d", t, enc, e));
      check(int'(size) == ref_size(e), $sformatf("t=%0d size %0d", t, size));
      check(size == 128 || (pay >> size) == '0, $sformatf("t=%0d payload clean above size", t));
      check(back == line, $sformatf("t=%0d round trip", t));
    end
    for (int i = 0; i < 8; i++) begin
      $display("encoding %0d chosen %0d times", i, seen[i]);
      check(seen[i] > 0, $sformatf("encoding %0d never chosen", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
