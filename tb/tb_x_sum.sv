// tb_x_sum -- self-checking testbench of x_sum.
//
// Checks the initial constants after rst and after init, the modulo-2^32 word
// additions of acc over several random blocks, and the End_State routing of
// the chain to has_value or setup_data.
module tb_x_sum;
  import has160_pkg::*;
  import has160_ref_pkg::*;

  logic   clk = 1'b0;
  logic   rst, init, acc, end_state;
  chain_t end_state_data, setup_data, has_value;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  x_sum dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic chain_t pack5(chain5_t v);
    return '{a: v[0], b: v[1], c: v[2], d: v[3], e: v[4]};
  endfunction

  task automatic check(string what, chain_t got, chain_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %040h expected %040h", what, got, exp);
    end
  endtask

  chain5_t h, d;

  // Looks at both outputs in both End_State settings.
  task automatic check_outputs(string what);
    end_state = 1'b0; #1;
    check({what, " setup_data"}, setup_data, pack5(h));
    check({what, " has_value gated"}, has_value, '0);
    end_state = 1'b1; #1;
    check({what, " has_value"}, has_value, pack5(h));
    check({what, " setup_data gated"}, setup_data, '0);
    end_state = 1'b0;
  endtask

  initial begin
    rst = 1'b1; init = 1'b0; acc = 1'b0; end_state = 1'b0; end_state_data = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    h = IV;
    check_outputs("after rst");
    for (int msg = 0; msg < 4; msg++) begin
      for (int blk = 0; blk < 5; blk++) begin
        for (int i = 0; i < 5; i++) begin
          d[i] = (blk == 0) ? 32'hffffffff - 32'(i) : $urandom();
          h[i] = h[i] + d[i];
        end
        end_state_data = pack5(d);
        acc = 1'b1;
        @(posedge clk); #1;
        acc = 1'b0;
        end_state_data = '1;   // must be ignored without acc
        @(posedge clk); #1;
        check_outputs($sformatf("msg %0d blk %0d", msg, blk));
      end
      init = 1'b1;
      @(posedge clk); #1;
      init = 1'b0;
      h = IV;
      check_outputs("after init");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
