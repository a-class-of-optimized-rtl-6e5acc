// tb_syndrome_gen: check of the syndrome generator.
//
// 1. Random valid codewords (built by the reference model) give a zero syndrome
//    and err = 0.
// 2. Every single-bit, double-adjacent and triple-adjacent error pattern (32 +
//    31 + 30) applied to random codewords gives the syndrome E H^T worked out
//    column by column, with err = 1, and all 93 syndromes are distinct.
// 3. Random error patterns of any weight give E H^T.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_syndrome_gen;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned WATCHDOG_CYCLES = 100_000;
  localparam int unsigned NRAND = 20_000;

  logic clk;
  initial clk = 1'b0;
  always #1 clk = ~clk;

  cw_t  rx;
  par_t syn;
  logic err;
  int checks = 0, failures = 0;
  int seen [par_t];

  syndrome_gen dut (.rx(rx), .syn(syn), .err(err));

  task automatic apply(input cw_t x, input cw_t e, input string what);
    rx = x ^ e;
    @(posedge clk);
    checks++;
    if (syn !== ref_syndrome(e) || err !== (e != '0 && ref_syndrome(e) != '0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s rx=%08h syn=%b err=%b exp=%b", what, rx, syn, err, ref_syndrome(e));
    end
  endtask

  initial begin
    cw_t x, e;
    for (int n = 0; n < NRAND; n++) begin
      x = ref_codeword(msg_t'($urandom));
      apply(x, '0, "clean");
    end
    for (int w = 1; w <= 3; w++) begin
      for (int c = 1; c + w - 1 <= 32; c++) begin
        e = '0;
        for (int b = 0; b < w; b++) e[c+b] = 1'b1;
        x = ref_codeword(msg_t'($urandom));
        apply(x, e, "adjacent");
        checks++;
        if (syn == '0 || seen.exists(syn)) begin
          failures++;
          $display("FAIL syndrome %b of burst %0d at %0d not unique", syn, w, c);
        end
        seen[syn] = 1;
      end
    end
    for (int n = 0; n < NRAND; n++) begin
      x = ref_codeword(msg_t'($urandom));
      e = cw_t'($urandom);
      apply(x, e, "random");
    end
    $display("distinct burst syndromes %0d", seen.num());
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
