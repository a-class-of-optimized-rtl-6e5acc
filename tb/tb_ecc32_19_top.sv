// tb_ecc32_19_top: end-to-end test of the encoder / syndrome-check top level,
// at its default (and only) configuration.
//
// Each clock it offers, with random gaps, a random message to the write path
// and a word to the read path: either a codeword the top produced earlier or
// such a codeword with a single, double-adjacent, triple-adjacent or random
// error added. It checks against the reference model that
//   - every output appears exactly one clock after its input (latency 1, one
//     word per clock on each path),
//   - the codeword is [m P : m] and the syndrome is E H^T, with the error flag
//     set exactly when an error was added that the code can see,
//   - the data outputs hold while no new word arrives,
//   - a reset in mid-stream clears both valid outputs.
// It counts how often each mechanism occurred (encodes, idle cycles, each of the
// five shared groups predicting 1, clean reads, each error class, reset) and
// fails for any that never did. A watchdog ends the run with a failure.
module tb_ecc32_19_top;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int unsigned NCYCLES = 50_000;
  localparam int unsigned WATCHDOG_CYCLES = NCYCLES + 1_000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic enc_valid_i, enc_valid_o, chk_valid_i, chk_valid_o, chk_err_o;
  msg_t enc_msg_i;
  cw_t  enc_cw_o, chk_rx_i;
  par_t chk_syn_o;

  ecc32_19_top dut (.*);

  int checks = 0, failures = 0;

  typedef enum int {EV_ENCODE, EV_ENC_IDLE, EV_CHK_IDLE, EV_CLEAN, EV_SINGLE,
                    EV_DOUBLE_ADJ, EV_TRIPLE_ADJ, EV_RANDOM_ERR, EV_RESET,
                    EV_M1, EV_M2, EV_M3, EV_M4, EV_M5, EV_COUNT} event_e;
  int count [EV_COUNT];

  // What the outputs must show after the next clock edge.
  logic exp_enc_v, exp_chk_v, exp_err;
  cw_t  exp_cw;
  par_t exp_syn;
  cw_t  stored [$];

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t %s", $time, msg);
  endtask

  task automatic check_outputs();
    checks++;
    if (enc_valid_o !== exp_enc_v) fail($sformatf("enc_valid_o=%b exp %b", enc_valid_o, exp_enc_v));
    checks++;
    if (chk_valid_o !== exp_chk_v) fail($sformatf("chk_valid_o=%b exp %b", chk_valid_o, exp_chk_v));
    if (rst_n) begin
      checks++;
      if (enc_cw_o !== exp_cw) fail($sformatf("enc_cw_o=%08h exp %08h", enc_cw_o, exp_cw));
      checks++;
      if (chk_syn_o !== exp_syn || chk_err_o !== exp_err)
        fail($sformatf("syn=%b err=%b exp %b %b", chk_syn_o, chk_err_o, exp_syn, exp_err));
    end
  endtask

  initial begin
    cw_t e, x;
    int kind, pos;
    rst_n = 1'b0;
    enc_valid_i = 1'b0; enc_msg_i = '0;
    chk_valid_i = 1'b0; chk_rx_i = '0;
    repeat (3) @(posedge clk);
    #1;
    exp_enc_v = 1'b0; exp_chk_v = 1'b0; exp_cw = '0; exp_syn = '0; exp_err = 1'b0;
    check_outputs();
    rst_n = 1'b1;

    for (int cyc = 0; cyc < NCYCLES; cyc++) begin
      // Mid-stream reset once.
      if (cyc == NCYCLES / 2) begin
        rst_n = 1'b0;
        enc_valid_i = 1'b1; chk_valid_i = 1'b1;
        @(posedge clk); #1;
        exp_enc_v = 1'b0; exp_chk_v = 1'b0; exp_cw = '0; exp_syn = '0; exp_err = 1'b0;
        check_outputs();
        count[EV_RESET]++;
        rst_n = 1'b1;
      end

      // Write path.
      enc_valid_i = ($urandom % 4) != 0;
      enc_msg_i   = msg_t'($urandom);
      if (enc_valid_i) begin
        count[EV_ENCODE]++;
        for (int g = 1; g <= 5; g++)
          if (ref_groups(enc_msg_i)[g]) count[EV_M1 + g - 1]++;
      end else count[EV_ENC_IDLE]++;

      // Read path: a stored codeword with an error of a random class.
      chk_valid_i = ($urandom % 4) != 0 && stored.size() > 0;
      e = '0;
      x = stored.size() > 0 ? stored[$urandom % stored.size()] : '0;
      if (chk_valid_i) begin
        kind = $urandom % 5;
        pos  = 1 + $urandom % (32 - kind + 1);
        case (kind)
          0: count[EV_CLEAN]++;
          1: begin e[pos] = 1'b1; count[EV_SINGLE]++; end
          2: begin e[pos] = 1'b1; e[pos+1] = 1'b1; count[EV_DOUBLE_ADJ]++; end
          3: begin e[pos] = 1'b1; e[pos+1] = 1'b1; e[pos+2] = 1'b1; count[EV_TRIPLE_ADJ]++; end
          default: begin e = cw_t'($urandom); count[EV_RANDOM_ERR]++; end
        endcase
        // Single and adjacent bursts must always be seen.
        if (kind inside {[1:3]}) begin
          checks++;
          if (ref_syndrome(e) == '0) fail("burst with zero reference syndrome");
        end
      end else count[EV_CHK_IDLE]++;
      chk_rx_i = x ^ e;

      @(posedge clk); #1;
      exp_enc_v = enc_valid_i;
      exp_chk_v = chk_valid_i;
      if (enc_valid_i) exp_cw = ref_codeword(enc_msg_i);
      if (chk_valid_i) begin
        exp_syn = ref_syndrome(e);
        exp_err = exp_syn != '0;
      end
      check_outputs();
      if (enc_valid_o) begin
        stored.push_back(enc_cw_o);
        if (stored.size() > 64) void'(stored.pop_front());
      end
    end

    for (int k = 0; k < EV_COUNT; k++) begin
      checks++;
      if (count[k] == 0) fail($sformatf("mechanism %s never occurred", event_e'(k)));
      $display("%-14s %0d", event_e'(k), count[k]);
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
