// tb_parity_gen: exhaustive check of the grouped parity generator.
//
// Drives every message, with group values worked out by the reference model,
// and compares p1..p13 with the XOR of the coefficient-matrix rows of the set
// message bits. Then drives each single message bit alone and each single group
// value alone (with inconsistent message bits) to check that every parity bit
// reads exactly the terms of its equation. A watchdog ends the run with a
// failure if it has not finished in time.
module tb_parity_gen;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned WATCHDOG_CYCLES = 600_000;

  logic clk;
  initial clk = 1'b0;
  always #1 clk = ~clk;

  msg_t msg;
  grp_t grp;
  par_t par;
  int checks = 0, failures = 0;

  // Which parity bits read each group directly (grouped equations).
  localparam logic [13:1] GUSE [1:5] = '{
    13'b0000000111100,  // M1: p3 p4 p5 p6
    13'b0000011100000,  // M2: p6 p7 p8
    13'b1000111100000,  // M3: p6 p7 p8 p9 p13
    13'b0001100000000,  // M4: p9 p10
    13'b1001000000000   // M5: p10 p13
  };

  parity_gen dut (.msg(msg), .grp(grp), .par(par));

  task automatic check(input par_t exp, input string what);
    checks++;
    if (par !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s msg=%05h grp=%b par=%b exp=%b", what, msg, grp, par, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 19); v++) begin
      msg = msg_t'(v);
      grp = ref_groups(msg);
      @(posedge clk);
      check(ref_parity(msg), "all");
    end
    // Each group value alone: only the parity bits that read it may change.
    msg = '0;
    for (int g = 1; g <= 5; g++) begin
      grp = '0;
      grp[g] = 1'b1;
      @(posedge clk);
      check(GUSE[g], "group");
    end
    // Each message bit alone, with consistent group values.
    for (int i = 1; i <= 19; i++) begin
      msg = '0;
      msg[i] = 1'b1;
      grp = ref_groups(msg);
      @(posedge clk);
      check(PROW[i], "unit");
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
