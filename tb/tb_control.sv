// tb_control -- self-checking testbench of the control sequencer.
//
// Feeds messages of one to three blocks (random idle cycles between words)
// and, for every clock after the 16th word of a block, compares all sequencer
// outputs with the expected schedule: INIT at clock 0, per round four GEN
// clocks then 20 three-phase steps, FINAL at clock 257, so 258 clocks per
// block. Also checks the chain restart on the first word of each message and
// the five output words (taken from a fixed has_value) in order H0..H4.
module tb_control;
  import has160_pkg::*;

  logic       clk = 1'b0;
  logic       rst, in_en, in_last, in_ready, hash_valid;
  word_t      hash_out;
  logic       xg_in_en, gen_en, ml_init, step_en, xs_init, xs_acc, end_state;
  logic [3:0] xg_count;
  logic [1:0] gen_idx;
  state_t     state;
  phase_t     ph;
  chain_t     has_value;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  control dut (.*);

  // Stand-in for the x_gen word counter.
  always_ff @(posedge clk)
    if (rst) xg_count <= '0;
    else if (xg_in_en) xg_count <= xg_count + 4'd1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Expected outputs at clock t (0..257) of block processing.
  task automatic check_schedule(int t);
    logic e_init, e_gen, e_step, e_acc;
    int   e_round, e_step_no, e_ph, e_gidx, u;
    e_init = (t == 0); e_acc = (t == 257);
    e_gen = 1'b0; e_step = 1'b0; e_round = -1; e_step_no = 0; e_ph = 0; e_gidx = 0;
    if (t >= 1 && t <= 256) begin
      e_round = (t - 1) / 64;
      u = (t - 1) % 64;
      if (u < 4) begin
        e_gen = 1'b1; e_gidx = u;
      end else begin
        e_step = 1'b1; e_step_no = (u - 4) / 3; e_ph = (u - 4) % 3;
      end
    end
    check($sformatf("t=%0d ml_init", t), 32'(ml_init), 32'(e_init));
    check($sformatf("t=%0d xs_acc", t), 32'(xs_acc), 32'(e_acc));
    check($sformatf("t=%0d gen_en", t), 32'(gen_en), 32'(e_gen));
    check($sformatf("t=%0d step_en", t), 32'(step_en), 32'(e_step));
    check($sformatf("t=%0d in_ready", t), 32'(in_ready), 32'd0);
    check($sformatf("t=%0d hash_valid", t), 32'(hash_valid), 32'd0);
    if (e_gen) begin
      check($sformatf("t=%0d gen_idx", t), 32'(gen_idx), 32'(e_gidx));
      check($sformatf("t=%0d round", t), 32'(state.round), 32'(e_round));
    end
    if (e_step) begin
      check($sformatf("t=%0d ph", t), 32'(ph), 32'(e_ph));
      check($sformatf("t=%0d round", t), 32'(state.round), 32'(e_round));
      check($sformatf("t=%0d step", t), 32'(state.step), 32'(e_step_no));
    end
  endtask

  int n_init_seen;

  initial begin
    rst = 1'b1; in_en = 1'b0; in_last = 1'b0;
    has_value = '{a: 32'h11111111, b: 32'h22222222, c: 32'h33333333,
                  d: 32'h44444444, e: 32'h55555555};
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    for (int msg = 0; msg < 4; msg++) begin
      int nblk;
      nblk = 1 + msg % 3;
      n_init_seen = 0;
      for (int b = 0; b < nblk; b++) begin
        for (int i = 0; i < 16; i++) begin
          while ($urandom_range(0, 3) == 0) begin
            in_en = 1'b0; @(posedge clk); #1;
          end
          check("in_ready while loading", 32'(in_ready), 32'd1);
          in_en = 1'b1; in_last = (b == nblk - 1) && (i == 15);
          #0;
          if (xs_init) n_init_seen++;
          check("xs_init only on first word of message", 32'(xs_init),
                32'(b == 0 && i == 0));
          @(posedge clk); #1;
          in_en = 1'b0; in_last = 1'b0;
        end
        for (int t = 0; t < 258; t++) begin
          check_schedule(t);
          @(posedge clk); #1;
        end
        if (b < nblk - 1) begin
          check("in_ready after a block", 32'(in_ready), 32'd1);
          check("no output after a middle block", 32'(hash_valid), 32'd0);
        end
      end
      check("one chain restart per message", 32'(n_init_seen), 32'd1);
      for (int w = 0; w < 5; w++) begin
        check($sformatf("msg %0d hash_valid %0d", msg, w), 32'(hash_valid), 32'd1);
        check($sformatf("msg %0d end_state %0d", msg, w), 32'(end_state), 32'd1);
        check($sformatf("msg %0d word %0d", msg, w), hash_out, {8{4'(w + 1)}});
        @(posedge clk); #1;
      end
      check("output ends", 32'(hash_valid), 32'd0);
      check("ready after output", 32'(in_ready), 32'd1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
