// tb_des_key_schedule: loads the key 133457799BBCDFF1 of the well-known DES
// worked example and checks the 16 subkeys K1..K16 round by round, first in
// encryption order, then in decryption order (K16..K1). The expected subkeys
// come from a reference DES key schedule.
module tb_des_key_schedule;
  logic        clk = 0, rst_n = 0, load = 0, mode = 0, round_en = 0;
  logic [63:0] key;
  logic [3:0]  round_idx;
  logic [47:0] subkey;
  int checks = 0, failures = 0;

  des_key_schedule u_dut (.clk, .rst_n, .load, .key, .mode, .round_en, .round_idx, .subkey);

  always #5 clk = ~clk;

  localparam logic [47:0] KS [16] = '{
    48'h1B02EFFC7072, 48'h79AED9DBC9E5, 48'h55FC8A42CF99, 48'h72ADD6DB351D,
    48'h7CEC07EB53A8, 48'h63A53E507B2F, 48'hEC84B7F618BC, 48'hF78A3AC13BFB,
    48'hE0DBEBEDE781, 48'hB1F347BA464F, 48'h215FD3DED386, 48'h7571F59467E9,
    48'h97C5D1FABA41, 48'h5F43B7F2E73A, 48'hBF918D3D3F0A, 48'hCB3D8B0E17F5};

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic dec);
    @(negedge clk);
    key = 64'h133457799BBCDFF1; mode = dec; load = 1; round_idx = 0;
    @(negedge clk);
    load = 0;
    for (int r = 0; r < 16; r++) begin
      round_en = 1; round_idx = 4'(r);
      #1;
      checks++;
      if (subkey !== (dec ? KS[15-r] : KS[r])) begin
        failures++;
        $display("FAIL %s round %0d: got %h expected %h", dec ? "dec" : "enc", r + 1,
                 subkey, dec ? KS[15-r] : KS[r]);
      end
      @(negedge clk);
    end
    round_en = 0;
  endtask

  initial begin
    round_idx = 0; key = 0;
    #12 rst_n = 1;
    run(1'b0);
    run(1'b1);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
