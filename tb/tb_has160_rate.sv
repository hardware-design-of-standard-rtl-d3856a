// tb_has160_rate -- timing of the HAS-160 core on 512-bit inputs.
//
// Streams words at one per clock and measures, per message, the clocks from
// the first accepted word to the first digest word. With 16 load clocks and
// BLOCK_CLKS = 258 processing clocks a block costs 274 clocks, so the first
// digest word appears 274 x blocks clocks after the first word. Cases: a
// 55-byte message (one padded block), and a 512-bit (64-byte) message,
// which the padding turns into two blocks. Processing alone is 258 clocks per
// 512-bit block, 2.345 us at 110 MHz, 218.3 Mbit/s. Digests are checked
// against the reference model.
module tb_has160_rate;
  import has160_pkg::*;
  import has160_ref_pkg::*;

  logic  clk = 1'b0;
  logic  rst, in_en, in_last, in_ready, hash_valid;
  word_t in_data, hash_out;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  has160_top dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Hashes nbytes random bytes at full input rate; checks digest and timing.
  task automatic run(int nbytes, int exp_blocks);
    byte unsigned p[$];
    longint unsigned bits;
    chain5_t  h;
    words16_t m;
    int       nblk;
    longint   t0, t1;
    for (int i = 0; i < nbytes; i++) p.push_back(8'($urandom()));
    bits = 64'(nbytes) * 8;
    p.push_back(8'h80);
    while (p.size() % 64 != 56) p.push_back(8'h00);
    for (int i = 0; i < 8; i++) p.push_back(bits[8*i +: 8]);
    nblk = p.size() / 64;
    check("padded blocks", longint'(nblk), longint'(exp_blocks));
    h = IV;
    t0 = -1;
    for (int b = 0; b < nblk; b++) begin
      for (int i = 0; i < 16; i++)
        m[i] = {p[64*b + 4*i + 3], p[64*b + 4*i + 2], p[64*b + 4*i + 1], p[64*b + 4*i]};
      compress(h, m);
      for (int i = 0; i < 16; i++) begin
        while (!in_ready) begin
          in_en = 1'b0; @(posedge clk); #1;
        end
        if (t0 < 0) t0 = cyc;
        in_en = 1'b1; in_data = m[i]; in_last = (b == nblk - 1) && (i == 15);
        @(posedge clk); #1;
      end
      in_en = 1'b0; in_last = 1'b0;
    end
    while (!hash_valid) begin
      @(posedge clk); #1;
    end
    t1 = cyc;
    check($sformatf("%0d-byte message: clocks to first digest word", nbytes), t1 - t0,
          longint'(nblk) * (16 + longint'(BLOCK_CLKS)));
    $display("%0d-byte message: %0d block(s), %0d clocks (%.3f us at 110 MHz)",
             nbytes, nblk, t1 - t0, real'(t1 - t0) / 110.0);
    for (int w = 0; w < 5; w++) begin
      checks++;
      if (hash_out !== h[w]) begin
        failures++;
        $display("FAIL %0d-byte message word %0d: got %08h expected %08h", nbytes, w,
                 hash_out, h[w]);
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    rst = 1'b1; in_en = 1'b0; in_last = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run(55, 1);
    run(64, 2);
    check("processing clocks per 512-bit block", longint'(BLOCK_CLKS), 258);
    $display("processing: %0d clocks per block = %.3f us = %.1f Mbit/s at 110 MHz",
             BLOCK_CLKS, real'(BLOCK_CLKS) / 110.0, 512.0 * 110.0 / real'(BLOCK_CLKS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
