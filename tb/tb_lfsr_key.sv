// tb_lfsr_key: checks the key LFSR against reference values computed with
// the polynomial x^64+x^63+x^61+x^60+1 (one step and 64 steps from three
// seeds, one of them zero, which must be replaced by 0123456789ABCDEF), that
// each step is a right shift whose new top bit is B0^B60^B61^B63 (checked
// cycle by cycle against an in-testbench model), that the state holds without
// step, and that load has priority over step.
module tb_lfsr_key;
  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [63:0] seed, state, model;
  int checks = 0, failures = 0;

  lfsr_key u_dut (.clk, .rst_n, .load, .step, .seed, .state);

  always #5 clk = ~clk;

  localparam logic [63:0] SV  [3] = '{64'hB890B890B890B890, 64'h8A6A63EC24EDE6A4, 64'h0000000000000000};
  localparam logic [63:0] S1  [3] = '{64'hDC485C485C485C48, 64'hC53531F61276F352, 64'h8091A2B3C4D5E6F7};
  localparam logic [63:0] S64 [3] = '{64'h0C9DBA46D7F00C9D, 64'hED69FB431F84169F, 64'hDB726AC3D5A7D2CD};

  task automatic check64(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seed = 0;
    #12 rst_n = 1;
    foreach (SV[i]) begin
      @(negedge clk); load = 1; seed = SV[i];
      @(negedge clk); load = 0; step = 1;
      @(negedge clk); step = 0;
      check64(state, S1[i], "one step");
      model = state;
      @(negedge clk);
      check64(state, S1[i], "hold without step");
      step = 1;
      for (int s = 1; s < 64; s++) begin
        model = {model[0] ^ model[60] ^ model[61] ^ model[63], model[63:1]};
        @(negedge clk);
        check64(state, model, "step vs shift model");
      end
      step = 0;
      check64(state, S64[i], "64 steps");
    end
    // load wins over step
    @(negedge clk); load = 1; step = 1; seed = 64'hFFFF_0000_FFFF_0000;
    @(negedge clk); load = 0; step = 0;
    check64(state, 64'hFFFF_0000_FFFF_0000, "load priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
