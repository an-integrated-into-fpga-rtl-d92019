// tb_pattern_chk: drives pattern_chk with reference streams of every pattern,
// with bit errors injected at known places and with random data. Checks lock,
// exact error counting once locked, the bit counter, the bit limit (done after
// exactly limit/DATA_W words), loss of sync and a BER near 0.5 when no
// synchronisation is possible.
module tb_pattern_chk;
  import olt_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 32;
  logic clk = 0, rst_n = 0, run = 0, clr = 0;
  logic [W-1:0] rx = '0;
  pattern_t pat = PAT_PRBS31;
  logic [63:0] bit_limit = '0, bits;
  logic [31:0] errs;
  logic [15:0] sync_loss;
  logic locked, done;
  int checks = 0, failures = 0;
  ref_pattern rp;
  bit random_mode = 0;
  int flip_word = -1;       // word index to corrupt
  int flip_mask_bits = 1;   // number of bits flipped there
  int word_no = 0;

  pattern_chk #(.DATA_W(W), .LOCK_WORDS(4), .LOSS_WORDS(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // stream source: a new word after every rising edge
  always @(negedge clk) if (rp != null) begin
    bit [255:0] e;
    e = rp.next_word(W);
    if (random_mode) rx <= $urandom;
    else if (word_no == flip_word) rx <= e[W-1:0] ^ W'((64'(1) << flip_mask_bits) - 1);
    else rx <= e[W-1:0];
    word_no <= word_no + 1;
  end

  task automatic start_stream(int k);
    pattern_t p;
    p = pattern_t'(k);
    @(negedge clk);
    pat = p;
    rp = new(k);
    word_no = 0;
  endtask

  task automatic clear_counters();
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
  endtask

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 5; k++) begin
      start_stream(k);
      repeat (12) @(posedge clk);
      check(locked, $sformatf("pattern %0d locked", k));
      clear_counters();
      run = 1;
      repeat (200) @(posedge clk);
      @(negedge clk); run = 0;
      @(negedge clk);
      check(errs == 0, $sformatf("pattern %0d clean: errs=%0d", k, errs));
      check(bits == 64'(W) * 64'(bits / W) && bits >= 64'(200 * W) && bits <= 64'(202 * W),
            $sformatf("pattern %0d bit count %0d", k, bits));
      // one word with 3 flipped bits, another with 1: exactly 4 errors
      clear_counters();
      run = 1;
      flip_mask_bits = 3; flip_word = word_no + 20;
      repeat (40) @(posedge clk);
      flip_mask_bits = 1; flip_word = word_no + 20;
      repeat (40) @(posedge clk);
      @(negedge clk); run = 0; flip_word = -1;
      @(negedge clk);
      check(errs == 4, $sformatf("pattern %0d injected 4 errors, counted %0d", k, errs));
      check(locked, "still locked after isolated errors");
      check(sync_loss == 0, "no sync loss for isolated errors");
    end
    // bit limit: exactly 1000 words
    start_stream(3);
    repeat (12) @(posedge clk);
    bit_limit = 64'(1000 * W);
    clear_counters();
    run = 1;
    n0 = 0;
    while (!done && n0 < 2000) begin @(posedge clk); #1; n0++; end
    #1;
    check(done, "done raised at bit limit");
    check(n0 == 1000, $sformatf("done after %0d words, expected 1000", n0));
    repeat (20) @(posedge clk);
    check(bits == 64'(1000 * W), $sformatf("counting stops at limit: bits=%0d", bits));
    @(negedge clk); run = 0; bit_limit = '0;
    // random data: lock lost, BER close to 0.5
    clear_counters();
    random_mode = 1;
    run = 1;
    repeat (2000) @(posedge clk);
    @(negedge clk); run = 0;
    @(negedge clk);
    check(!locked, "no lock on random data");
    check(sync_loss == 1, $sformatf("one sync loss, got %0d", sync_loss));
    check(errs > 32'(bits * 45 / 100) && errs < 32'(bits * 55 / 100),
          $sformatf("BER near 0.5: %0d / %0d", errs, bits));
    random_mode = 0;
    repeat (20) @(posedge clk);
    check(locked, "relock when the pattern returns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
