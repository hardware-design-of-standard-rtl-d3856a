// tb_main_loop -- self-checking testbench of main_loop.
//
// Starts from a random chain, feeds random message words for all 80 steps
// (inserting random idle cycles with step_en low between phases) and after
// every step compares the result row with the reference step function. Checks
// that the result row holds during the first two phases of a step, so that a
// step takes exactly three enabled clocks (240 for a block).
module tb_main_loop;
  import has160_pkg::*;
  import has160_ref_pkg::*;

  logic   clk = 1'b0;
  logic   init, step_en;
  phase_t ph;
  state_t state;
  word_t  x_in;
  chain_t setup_data, end_state_data;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  main_loop dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
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

  chain5_t v;
  int      en_clks;

  initial begin
    init = 1'b0; step_en = 1'b0; ph = PH_ROT; state = '0; x_in = '0; setup_data = '0;
    repeat (2) @(posedge clk);
    for (int run = 0; run < 8; run++) begin
      for (int i = 0; i < 5; i++) v[i] = $urandom();
      @(posedge clk);
      init <= 1'b1; setup_data <= pack5(v);
      @(posedge clk);
      init <= 1'b0;
      en_clks = 0;
      for (int r = 0; r < 4; r++) begin
        for (int s = 0; s < 20; s++) begin
          word_t xw;
          xw = $urandom();
          for (int p = 0; p < 3; p++) begin
            while (run > 0 && $urandom_range(0, 3) == 0) begin
              step_en <= 1'b0; ph <= phase_t'($urandom_range(0, 2));
              state <= '{round: 2'(r), step: 5'(s)}; x_in <= xw;
              @(posedge clk);
            end
            step_en <= 1'b1; ph <= phase_t'(p);
            state <= '{round: 2'(r), step: 5'(s)}; x_in <= xw;
            en_clks++;
            @(posedge clk);
            if (p < 2) begin
              // The result row changes only in the third clock of a step.
              #1;
              check($sformatf("run %0d round %0d step %0d phase %0d hold", run, r, s, p),
                    end_state_data, pack5(v));
            end
          end
          step_en <= 1'b0;
          #1;
          step(r, s, xw, v);
          check($sformatf("run %0d round %0d step %0d", run, r, s), end_state_data, pack5(v));
        end
      end
      checks++;
      if (en_clks != 240) begin
        failures++;
        $display("FAIL block took %0d step clocks, expected 240", en_clks);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
