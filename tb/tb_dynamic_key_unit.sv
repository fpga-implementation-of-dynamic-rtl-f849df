// tb_dynamic_key_unit: checks key generation for every SEL value with the
// key B890B890B890B890, against keys from separate reference models of the
// LFSR (64 steps) and the logistic map (16 iterations): the generated key,
// the number of cycles from start to key_valid (2, 2 + 64, 2 + 16), and that
// the key is stable after key_valid. It also gives the LFSR a seed that is
// exactly 64 steps before the weak key 0101010101010101, so one retry must be
// taken and the key 8080808080808080 delivered, and feeds a weak direct key,
// which must be passed through but flagged.
module tb_dynamic_key_unit;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [1:0]  sel;
  logic [63:0] key_in, key_out;
  logic        key_valid, busy, is_weak;
  logic [7:0]  retries;
  int checks = 0, failures = 0;

  dynamic_key_unit u_dut (.clk, .rst_n, .start, .sel, .key_in, .key_out, .key_valid,
                          .busy, .is_weak, .retries);

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input logic [1:0] s, input logic [63:0] k, input logic [63:0] exp,
                     input int exp_cycles, input int exp_retries, input logic exp_weak,
                     input string what);
    int cycles;
    @(negedge clk);
    start = 1; sel = s; key_in = k;
    @(negedge clk);
    start = 0;
    sel = ~s;   // SEL is captured at start
    cycles = 1;
    while (!key_valid && cycles < 500) begin
      @(negedge clk);
      cycles++;
    end
    check(key_out, exp, {what, " key"});
    check(64'(cycles), 64'(exp_cycles), {what, " cycles"});
    check(64'(retries), 64'(exp_retries), {what, " retries"});
    check(64'(is_weak), 64'(exp_weak), {what, " weak flag"});
    repeat (3) @(negedge clk);
    check(key_out, exp, {what, " key held"});
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 0; key_in = 0;
    #12 rst_n = 1;
    run(2'b00, 64'hB890B890B890B890, 64'h0C9DBA46D7F00C9D, 66, 0, 1'b0, "LFSR");
    run(2'b01, 64'hB890B890B890B890, 64'hB890B890B890B890,  2, 0, 1'b0, "direct 01");
    run(2'b10, 64'hB890B890B890B890, 64'hB890B890B890B890,  2, 0, 1'b0, "direct 10");
    run(2'b11, 64'hB890B890B890B890, 64'hCD991D3C0D8F6A87, 18, 0, 1'b0, "logistic");
    run(2'b00, 64'h1B1B1B1B1B1B1B1A, 64'h8080808080808080, 67, 1, 1'b0, "LFSR weak retry");
    run(2'b01, 64'hE0E0E0E0F1F1F1F1, 64'hE0E0E0E0F1F1F1F1,  2, 0, 1'b1, "weak direct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
