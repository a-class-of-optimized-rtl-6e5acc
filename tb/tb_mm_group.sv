// tb_mm_group: exhaustive check of the majority-message grouping unit.
//
// Applies all 2^19 messages, one per clock, and compares M1..M5 with an odd/even
// count of ones over each group's three message bits (ecc_ref_pkg). Also counts
// how often each group predicts 1 and fails if one never does. A watchdog ends
// the run with a failure if it has not finished in time.
module tb_mm_group;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned WATCHDOG_CYCLES = 600_000;

  logic clk;
  initial clk = 1'b0;
  always #1 clk = ~clk;

  msg_t msg;
  grp_t grp;
  int checks = 0, failures = 0;
  int ones [1:5] = '{default: 0};

  mm_group dut (.msg(msg), .grp(grp));

  initial begin
    for (int v = 0; v < (1 << 19); v++) begin
      msg = msg_t'(v);
      @(posedge clk);
      checks++;
      if (grp !== ref_groups(msg)) begin
        failures++;
        if (failures < 10) $display("FAIL msg=%05h grp=%b exp=%b", msg, grp, ref_groups(msg));
      end
      for (int g = 1; g <= 5; g++) if (grp[g]) ones[g]++;
    end
    for (int g = 1; g <= 5; g++) begin
      checks++;
      if (ones[g] != (1 << 18)) begin
        failures++;
        $display("FAIL M%0d predicted 1 for %0d messages, expected %0d", g, ones[g], 1 << 18);
      end
    end
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
