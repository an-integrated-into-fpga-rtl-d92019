// tb_chan_chain: random words on the generator and on every receive input;
// checks that channel 0 transmits the generator word and channel i the word
// received on channel i-1, each one clock later, and that the checker sees
// the receive data of the selected channel one clock later, for every select
// value including out-of-range ones.
module tb_chan_chain;
  localparam int NCH = 12, W = 32;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] gen_data = '0, chk_data;
  logic [W-1:0] rx_data [NCH];
  logic [W-1:0] tx_data [NCH];
  logic [3:0] sel = '0;
  int checks = 0, failures = 0;

  chan_chain #(.NCH(NCH), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [W-1:0] g_prev, rx_prev [NCH];
    logic [3:0] s_prev;
    for (int i = 0; i < NCH; i++) rx_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      g_prev = gen_data; s_prev = sel;
      for (int i = 0; i < NCH; i++) rx_prev[i] = rx_data[i];
      gen_data = $urandom;
      for (int i = 0; i < NCH; i++) rx_data[i] = $urandom;
      sel = 4'(n % 16);
      if (n > 0) begin
        check(tx_data[0] == g_prev, "tx0 = generator");
        for (int i = 1; i < NCH; i++)
          check(tx_data[i] == rx_prev[i-1], $sformatf("tx%0d = rx%0d", i, i - 1));
        check(chk_data == rx_prev[(s_prev < NCH) ? s_prev : NCH - 1],
              $sformatf("checker mux sel=%0d", s_prev));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
