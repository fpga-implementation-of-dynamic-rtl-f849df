// tb_des_ctrl: checks the round controller's sequence: load only in the
// start cycle, round_en for exactly 16 consecutive cycles with round_idx
// counting 0..15, last_round on the final one, done one cycle later, and
// start requests ignored while rounds are running.
module tb_des_ctrl;
  logic       clk = 0, rst_n = 0, start = 0;
  logic       load, round_en, last_round, done;
  logic [3:0] round_idx;
  int checks = 0, failures = 0;

  des_ctrl u_dut (.clk, .rst_n, .start, .load, .round_en, .round_idx, .last_round, .done);

  always #5 clk = ~clk;

  task automatic expect_bit(input logic got, input logic exp, input string what, input int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %b expected %b", what, cyc, got, exp);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    repeat (2) begin
      @(negedge clk);
      start = 1; #1;
      expect_bit(load, 1'b1, "load in start cycle", 0);
      @(negedge clk);
      // keep start high for a while: it must be ignored while running
      for (int c = 1; c <= 18; c++) begin
        start = (c < 5);
        #1;
        expect_bit(load, 1'b0, "no load while running", c);
        expect_bit(round_en, c <= 16, "round_en", c);
        expect_bit(last_round, c == 16, "last_round", c);
        expect_bit(done, c == 17, "done", c);
        if (c <= 16) begin
          checks++;
          if (round_idx !== 4'(c - 1)) begin
            failures++;
            $display("FAIL round_idx at cycle %0d: %0d", c, round_idx);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
