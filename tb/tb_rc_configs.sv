// tb_rc_configs: runs the same stream of 64-byte lines through every
// Region-Chunk configuration of the evaluation: 32-bit chunks with 8-, 16-
// and 32-bit regions, 64-bit chunks with 8-, 16-, 32- and 64-bit regions,
// each with the encodings in the data entry, and the 64-bit-chunk ones also
// with the encodings in the tag. Each configuration must return every line
// intact with its specified latency (see tb_rc_pair). The average compressed
// size of each is printed for comparison.
//
// The stream mixes zero, narrow, repeated, strided, pointer-like and random
// 64-bit and 32-bit values so that all sub-compressors of the wider and
// narrower regions see work.
module tb_rc_configs;

  localparam int NCFG = 11;
  localparam int CWS [NCFG] = '{32, 32, 32, 64, 64, 64, 64, 64, 64, 64, 64};
  localparam int RWS [NCFG] = '{ 8, 16, 32,  8, 16, 32, 64,  8, 16, 32, 64};
  localparam bit TAG [NCFG] = '{ 0,  0,  0,  0,  0,  0,  0,  1,  1,  1,  1};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         valid;
  logic [511:0] line;
  int           chk [NCFG], fail [NCFG], ret [NCFG];
  longint       bits [NCFG];
  int           checks, failures, sent;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    tb_rc_pair #(.CW(CWS[g]), .RW(RWS[g]), .ENC_IN_TAG(TAG[g])) u_pair (
      .clk, .rst_n, .valid_i(valid), .line_i(line),
      .checks(chk[g]), .failures(fail[g]), .returned(ret[g]), .bits(bits[g]));
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [511:0] gen(int k);
    logic [511:0] l;
    logic [63:0]  b, s;
    b = {$urandom, $urandom};
    s = 64'($urandom_range(1, 64));
    for (int c = 0; c < 8; c++) begin
      case (k)
        0: l[c*64 +: 64] = '0;
        1: l[c*64 +: 64] = 64'($urandom_range(0, 200));                 // small integers
        2: l[c*64 +: 64] = b;                                          // repeated
        3: l[c*64 +: 64] = b + 64'(c) * s;                              // stride
        4: l[c*64 +: 64] = {b[63:16], 16'($urandom)};                  // pointers
        5: l[c*64 +: 64] = {16'(b[15:0]) + 16'(c), 16'hFFFF & 16'(c * 3),
                            16'($urandom_range(0, 9)), 16'($urandom_range(0, 9))}; // 16-bit data
        6: l[c*64 +: 64] = {32'($urandom_range(0, 99)), 32'(b[31:0]) + 32'(c)};  // 32-bit data
        default: l[c*64 +: 64] = {$urandom, $urandom};
      endcase
    end
    return l;
  endfunction

  initial begin
    valid = 1'b0;
    line  = '0;
    sent  = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 4) != 0);
      line  = gen(t % 8);
      if (valid) sent++;
    end
    @(negedge clk);
    valid = 1'b0;
    repeat (8) @(negedge clk);
    checks = 0;
    failures = 0;
    for (int g = 0; g < NCFG; g++) begin
      checks   += chk[g] + 1;
      failures += fail[g] + ((ret[g] == sent) ? 0 : 1);
      $display("R%0dC%0d encodings in %s: %0d lines, average %0.1f bits (uncompressed 512)",
               RWS[g], CWS[g], TAG[g] ? "tag " : "data", ret[g], real'(bits[g]) / real'(sent));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
