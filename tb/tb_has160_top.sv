// tb_has160_top -- end-to-end, self-checking testbench of the HAS-160 core.
//
// Pads messages in the testbench, writes them word by word (with and without
// idle cycles between words), collects the five digest words and compares
// them with (a) published HAS-160 digests of fixed strings and (b) the
// behavioural reference model for random messages of 0..300 bytes, sent back
// to back. A monitor checks that every block takes 258 clocks from its 16th
// word to its final addition (2.345 us at 110 MHz, i.e. 218.3 Mbit/s) and
// counts how often each mechanism occurred: block processing, chaining of a
// block onto the previous block's result, chain restart for a new message,
// generation of X16..X19, idle input cycles and digest output.
module tb_has160_top;
  import has160_pkg::*;
  import has160_ref_pkg::*;

  logic  clk = 1'b0;
  logic  rst, in_en, in_last, in_ready, hash_valid;
  word_t in_data, hash_out;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  has160_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- monitor
  longint cyc = 0, start_cyc = -1;
  int n_blocks = 0, n_chained = 0, n_restart = 0, n_gen = 0, n_idle = 0, n_out = 0;
  int n_lat_bad = 0;
  logic first_block;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (dut.xs_init) begin n_restart <= n_restart + 1; first_block <= 1'b1; end
      if (dut.xg_in_en && dut.xg_count == 4'd15) start_cyc <= cyc;
      if (dut.gen_en) n_gen <= n_gen + 1;
      if (in_ready && !in_en) n_idle <= n_idle + 1;
      if (hash_valid) n_out <= n_out + 1;
      if (dut.xs_acc) begin
        n_blocks <= n_blocks + 1;
        if (!first_block) n_chained <= n_chained + 1;
        first_block <= 1'b0;
        if (cyc - start_cyc != longint'(BLOCK_CLKS)) begin
          n_lat_bad <= n_lat_bad + 1;
          $display("FAIL block took %0d clocks, expected %0d", cyc - start_cyc, BLOCK_CLKS);
        end
      end
    end
  end

  // ----------------------------------------------------------------- driver
  typedef byte unsigned bytes_t[$];

  function automatic bytes_t str2bytes(string s);
    bytes_t b;
    for (int i = 0; i < s.len(); i++) b.push_back(s[i]);
    return b;
  endfunction

  function automatic bytes_t pad(bytes_t m);
    bytes_t  p;
    longint unsigned bits;
    p = m;
    bits = 64'(m.size()) * 8;
    p.push_back(8'h80);
    while (p.size() % 64 != 56) p.push_back(8'h00);
    for (int i = 0; i < 8; i++) p.push_back(bits[8*i +: 8]);
    return p;
  endfunction

  // Hashes msg; compares with the reference model and, if has_exp, with exp.
  task automatic hash_msg(string name, bytes_t msg, logic [159:0] exp, bit has_exp, bit gaps);
    bytes_t  p;
    chain5_t h;
    words16_t m;
    int nblk;
    p = pad(msg);
    nblk = p.size() / 64;
    h = IV;
    for (int b = 0; b < nblk; b++) begin
      for (int i = 0; i < 16; i++)
        m[i] = {p[64*b + 4*i + 3], p[64*b + 4*i + 2], p[64*b + 4*i + 1], p[64*b + 4*i]};
      compress(h, m);
      for (int i = 0; i < 16; i++) begin
        // Inputs change 1 ns after a rising edge and are held until the next.
        while (!in_ready || (gaps && $urandom_range(0, 3) == 0)) begin
          in_en = 1'b0; @(posedge clk); #1;
        end
        in_en = 1'b1; in_data = m[i]; in_last = (b == nblk - 1) && (i == 15);
        @(posedge clk); #1;
      end
      in_en = 1'b0; in_last = 1'b0;
    end
    while (!hash_valid) begin
      @(posedge clk); #1;
    end
    for (int w = 0; w < 5; w++) begin
      check($sformatf("%s: word %0d vs model", name, w), hash_out, h[w]);
      if (has_exp) check($sformatf("%s: word %0d vs published", name, w), hash_out,
                         digest_word(exp, w));
      @(posedge clk); #1;
    end
  endtask

  initial begin
    rst = 1'b1; in_en = 1'b0; in_last = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    hash_msg("empty", str2bytes(""), 160'h307964ef34151d37c8047adec7ab50f4ff89762d, 1, 0);
    hash_msg("a", str2bytes("a"), 160'h4872bcbc4cd0f0a9dc7c2f7045e5b43b6c830db8, 1, 1);
    hash_msg("abc", str2bytes("abc"), 160'h975e810488cf2a3d49838478124afce4b1c78804, 1, 0);
    hash_msg("message digest", str2bytes("message digest"),
             160'h2338dbc8638d31225f73086246ba529f96710bc6, 1, 1);
    hash_msg("abcdbcde...", str2bytes("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"),
             160'h86ce4c4c713aa7ef6e65ab9f92353b0cfecad347, 1, 0);
    hash_msg("1234567890 x 8", str2bytes({8{"1234567890"}}),
             160'h07f05c8c0773c55ca3a5a695ce6aca4c438911b5, 1, 1);
    begin
      bytes_t k;
      for (int i = 0; i < 1000; i++) k.push_back("a");
      hash_msg("a x 1000", k, 160'h5a523572ff697f446829fa487031ac036173742e, 1, 0);
    end
    for (int n = 0; n < 30; n++) begin
      bytes_t r;
      int len;
      r.delete();
      len = $urandom_range(0, 300);
      for (int i = 0; i < len; i++) r.push_back(8'($urandom()));
      hash_msg($sformatf("random %0d (%0d bytes)", n, len), r, '0, 0, n % 2 == 1);
    end
    repeat (2) @(posedge clk);

    $display("blocks=%0d chained=%0d restarts=%0d x_gen_words=%0d idle_input=%0d out_words=%0d",
             n_blocks, n_chained, n_restart, n_gen, n_idle, n_out);
    $display("block time %0d clocks = %.3f us at 110 MHz = %.1f Mbit/s",
             BLOCK_CLKS, real'(BLOCK_CLKS) / 110.0, 512.0 * 110.0 / real'(BLOCK_CLKS));
    check("every block took BLOCK_CLKS clocks", 32'(n_lat_bad), 32'd0);
    check("BLOCK_CLKS matches 2.345 us at 110 MHz", 32'(BLOCK_CLKS), 32'd258);
    check("four generated words per round", 32'(n_gen), 32'(16 * n_blocks));
    check("one restart per message", 32'(n_restart), 32'd37);
    check("five output words per message", 32'(n_out), 32'(5 * 37));
    if (n_blocks == 0 || n_chained == 0 || n_restart < 2 || n_gen == 0 || n_idle == 0 || n_out == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
