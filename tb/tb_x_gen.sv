// tb_x_gen -- self-checking testbench of x_gen.
//
// Loads random 16-word blocks (with random idle cycles between words), checks
// the word counter, then for every round pulses gen_en four times and checks
// out_data for all 20 steps against the reference model's expanded words.
module tb_x_gen;
  import has160_pkg::*;
  import has160_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst, in_en, gen_en;
  word_t      in_data, out_data;
  logic [3:0] count;
  logic [1:0] gen_idx;
  state_t     state;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  x_gen dut (.*);

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
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  words20_t x;

  initial begin
    rst = 1'b1; in_en = 1'b0; gen_en = 1'b0; gen_idx = '0; in_data = '0;
    state = '{round: 2'd0, step: 5'd0};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int blk = 0; blk < 5; blk++) begin
      // load
      for (int i = 0; i < 16; i++) begin
        while ($urandom_range(0, 2) == 0) begin
          @(posedge clk); in_en <= 1'b0;
        end
        x[i] = $urandom();
        @(posedge clk);
        in_en <= 1'b1; in_data <= x[i];
      end
      @(posedge clk); in_en <= 1'b0;
      @(posedge clk);
      check("counter wraps after 16 words", 32'(count), 32'd0);
      for (int r = 0; r < 4; r++) begin
        expand(r, x);
        state <= '{round: 2'(r), step: 5'd0};
        for (int k = 0; k < 4; k++) begin
          @(posedge clk); gen_en <= 1'b1; gen_idx <= 2'(k);
        end
        @(posedge clk); gen_en <= 1'b0;
        for (int s = 0; s < 20; s++) begin
          @(posedge clk); state <= '{round: 2'(r), step: 5'(s)};
          #1;
          check($sformatf("blk %0d round %0d step %0d", blk, r, s), out_data, x[L_TAB[r][s]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
