// tb_enc32_19: exhaustive check of the (32,19) encoder.
//
// Encodes all 2^19 messages, one per clock, and compares each codeword with
// [m P : m] from the reference model. Along the way it finds the smallest
// non-zero codeword weight, which must be 4 (the code corrects single and
// detects double errors), and checks that the message columns 14..32 carry the
// message unchanged. A watchdog ends the run with a failure if it has not
// finished in time.
module tb_enc32_19;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned WATCHDOG_CYCLES = 600_000;

  logic clk;
  initial clk = 1'b0;
  always #1 clk = ~clk;

  msg_t msg;
  cw_t  cw;
  int checks = 0, failures = 0;
  int min_weight = 32;

  enc32_19 dut (.msg(msg), .cw(cw));

  initial begin
    for (int v = 0; v < (1 << 19); v++) begin
      msg = msg_t'(v);
      @(posedge clk);
      checks++;
      if (cw !== ref_codeword(msg)) begin
        failures++;
        if (failures < 10) $display("FAIL msg=%05h cw=%08h exp=%08h", msg, cw, ref_codeword(msg));
      end
      checks++;
      if (cw[32:14] !== msg) failures++;
      if (v != 0 && $countones(cw) < min_weight) min_weight = $countones(cw);
    end
    checks++;
    if (min_weight != 4) begin
      failures++;
      $display("FAIL minimum codeword weight %0d, expected 4", min_weight);
    end
    $display("minimum distance %0d", min_weight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
