// tb_pattern_gen: checks every pattern of pattern_gen word by word against the
// bit-serial reference, the PRBS7 period of 127 bits, the enable (hold) and
// the one-clock output latency.
module tb_pattern_gen;
  import olt_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 32;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  pattern_t pat = PAT_PRBS7;
  logic [W-1:0] data;
  int checks = 0, failures = 0;

  pattern_gen #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    ref_pattern rp;
    logic [W-1:0] first [8];
    logic [W-1:0] held;
    bit [255:0] e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 5; k++) begin
      @(negedge clk);
      pat = pattern_t'(k); load = 1;
      @(negedge clk);
      load = 0; en = 1;
      rp = new(k);
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);    // word produced by the step at the last edge
        e = rp.next_word(W);
        check(data == e[W-1:0], $sformatf("pattern %0d word %0d got %h exp %h", k, n, data, e[W-1:0]));
        // pause once: output must hold
        if (n == 100) begin
          en = 0; held = data;
          repeat (3) @(negedge clk);
          check(data == held, "hold while en=0");
          en = 1;
        end
      end
      en = 0;
    end
    // PRBS7 period: 127 words of 32 bits contain the sequence 32 times over,
    // so word n+127 equals word n
    @(negedge clk); pat = PAT_PRBS7; load = 1;
    @(negedge clk); load = 0; en = 1;
    for (int n = 0; n < 8; n++) begin @(negedge clk); first[n] = data; end
    repeat (127 - 8) @(negedge clk);
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      check(data == first[n], "PRBS7 period 127");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
