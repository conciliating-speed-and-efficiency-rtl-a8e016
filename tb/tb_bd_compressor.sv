// tb_bd_compressor: self-checking test of bd_compressor and bd_decompressor.
//
// 1. Worked example: the 32-bit chunks 0x01234567 and 0x01234568 under
//    C32 I1 E1 D8 must store base 0x012345, both pointers naming the explicit
//    base and deltas 0x67, 0x68 (42-bit payload, checked bit for bit).
// 2. Same chunks with the delta bits moved to bytes 0 and 2 (mask 0x00FF00FF):
//    base bits 0x0145, deltas 0x2367 and 0x2368.
// 3. C32 I1 E2 D8 over a 64-byte line: payload size 2*24 + (1 + 15*2) + 16*8
//    = 207 bits, worked out by hand; random lines drawn from a few high parts
//    must be accepted exactly when at most two distinct non-zero high parts
//    occur, and must decompress to themselves.
// 4. C16 I1 E1 D4 and C16 I0 E1 D0 (repeated value) on random region lines,
//    against the same counting rule.
module tb_bd_compressor;

  int checks = 0, failures = 0;

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

  // ---- 1 and 2: two 32-bit chunks -------------------------------------------
  logic [63:0] l2;
  logic        ok_a, ok_b;
  logic [41:0] pay_a;
  logic [49:0] pay_b;   // 16 + 2 + 2*16
  logic [63:0] back_a, back_b;

  bd_compressor   #(.W(32), .N(2), .NI(1), .NE(1), .D(8)) u_a (.line_i(l2), .ok_o(ok_a), .data_o(pay_a));
  bd_decompressor #(.W(32), .N(2), .NI(1), .NE(1), .D(8)) u_ad (.data_i(pay_a), .line_o(back_a));
  bd_compressor   #(.W(32), .N(2), .NI(1), .NE(1), .D(16), .DELTA_MASK(32'h00FF00FF))
    u_b (.line_i(l2), .ok_o(ok_b), .data_o(pay_b));
  bd_decompressor #(.W(32), .N(2), .NI(1), .NE(1), .D(16), .DELTA_MASK(32'h00FF00FF))
    u_bd (.data_i(pay_b), .line_o(back_b));

  // ---- 3: C32 I1 E2 D8 over 16 chunks ----------------------------------------
  logic [511:0] l16, back16;
  logic         ok16;
  logic [206:0] pay16;
  bd_compressor   #(.W(32), .N(16), .NI(1), .NE(2), .D(8)) u_c (.line_i(l16), .ok_o(ok16), .data_o(pay16));
  bd_decompressor #(.W(32), .N(16), .NI(1), .NE(2), .D(8)) u_cd (.data_i(pay16), .line_o(back16));

  // ---- 4: 16-bit region lines -------------------------------------------------
  logic [127:0] l8, back8, back8r;
  logic         ok8, ok8r;
  logic [51:0]  pay8;    // 12 + 8 + 32
  logic [15:0]  pay8r;
  bd_compressor   #(.W(16), .N(8), .NI(1), .NE(1), .D(4)) u_e (.line_i(l8), .ok_o(ok8), .data_o(pay8));
  bd_decompressor #(.W(16), .N(8), .NI(1), .NE(1), .D(4)) u_ed (.data_i(pay8), .line_o(back8));
  bd_compressor   #(.W(16), .N(8), .NI(0), .NE(1), .D(0)) u_r (.line_i(l8), .ok_o(ok8r), .data_o(pay8r));
  bd_decompressor #(.W(16), .N(8), .NI(0), .NE(1), .D(0)) u_rd (.data_i(pay8r), .line_o(back8r));

  // Reference: count distinct high parts (zero excluded when zero_base).
  function automatic int n_distinct(logic [511:0] l, int w, int n, int d, bit zero_base);
    logic [31:0] seen[$];
    logic [31:0] hi;
    for (int c = 0; c < n; c++) begin
      hi = 32'(l[c*w +: 32]) & ((w == 32) ? 32'hffffffff : 32'h0000ffff);
      hi = hi >> d;
      if (zero_base && hi == 0) continue;
      if (!(hi inside {seen})) seen.push_back(hi);
    end
    return seen.size();
  endfunction

  logic [31:0] pool [4];

  initial begin
    // 1: left mapping of the example
    l2 = {32'h01234568, 32'h01234567};
    #1;
    check(ok_a, "example accepted");
    check(pay_a == {8'h68, 8'h67, 1'b1, 1'b1, 24'h012345}, $sformatf("example payload %h", pay_a));
    check(back_a == l2, "example round trip");
    // 2: right mapping
    check(ok_b, "remapped example accepted");
    check(pay_b[15:0] == 16'h0145, $sformatf("remapped base %h", pay_b[15:0]));
    check(pay_b[49:16] == {16'h2368, 16'h2367, 1'b1, 1'b1}, $sformatf("remapped deltas %h", pay_b[49:16]));
    check(back_b == l2, "remapped round trip");
    // a line with a zero-base chunk and one new base
    l2 = {32'h000000AB, 32'h7777_7701};
    #1;
    check(ok_a && pay_a[24] == 1'b1 && pay_a[25] == 1'b0, "zero base pointer");
    check(back_a == l2, "zero base round trip");
    // two distinct bases do not fit E1
    l2 = {32'h55555501, 32'h7777_7701};
    #1;
    check(!ok_a, "second base rejected");

    // 3: random lines from a small pool of high parts
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < 4; i++) pool[i] = (i == 0) ? 32'h0 : {$urandom} & 32'hffffff00;
      for (int c = 0; c < 16; c++)
        l16[c*32 +: 32] = pool[$urandom_range(0, (t % 4) + 0)] | 32'($urandom_range(0, 255));
      #1;
      check(ok16 == (n_distinct(l16, 32, 16, 8, 1) <= 2), $sformatf("E2 acceptance t=%0d", t));
      if (ok16) check(back16 == l16, $sformatf("E2 round trip t=%0d", t));
    end

    // 4: region lines
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < 4; i++) pool[i] = (i == 0) ? 32'h0 : 32'($urandom) & 32'hfff0;
      for (int c = 0; c < 8; c++) begin
        l8[c*16 +: 16] = 16'(pool[$urandom_range(0, t % 3)]) | 16'($urandom_range(0, 15));
        if (t % 5 == 0) l8[c*16 +: 16] = 16'(pool[1]) | 16'(pool[1] >> 8);
      end
      #1;
      check(ok8 == (n_distinct({384'd0, l8}, 16, 8, 4, 1) <= 1), $sformatf("E1D4 acceptance t=%0d", t));
      if (ok8) check(back8 == l8, $sformatf("E1D4 round trip t=%0d", t));
      check(ok8r == (n_distinct({384'd0, l8}, 16, 8, 0, 0) <= 1), $sformatf("repeat acceptance t=%0d", t));
      if (ok8r) check(back8r == l8 && pay8r == l8[15:0], $sformatf("repeat round trip t=%0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
