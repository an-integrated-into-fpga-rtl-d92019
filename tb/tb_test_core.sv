// tb_test_core: the BER tester with twelve looped-back channel models.
// Over APB it selects patterns and channels, clears counters, sets a bit
// budget and runs measurements. Checks: lock and zero errors on a clean
// chain for every pattern; errors injected on channel j are seen when the
// checker selects any channel k >= j and not when k < j (daisy chain);
// 'done' after exactly the bit budget; a broken channel causes a sync loss
// and a BER near 0.5; unmapped offsets answer PSLVERR.
module tb_test_core;
  import olt_pkg::*;
  localparam int NCH = 12, W = 32;
  logic clk = 0, rst_n = 0;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  logic [W-1:0] tx_data [NCH];
  logic [W-1:0] rx_data [NCH];
  xcvr_cfg_t cfg0 = '0;
  logic [NCH-1:0] inject = '0, scramble = '0;
  logic [NCH-1:0] ack_unused;
  int checks = 0, failures = 0;
  logic last_err;

  test_core #(.NCH(NCH), .DATA_W(W)) dut (.*);

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    xcvr_model #(.DATA_W(W), .LAT(2 + i % 3)) u_x (
      .clk, .tx_data(tx_data[i]), .rx_data(rx_data[i]), .cfg(cfg0), .cfg_req(1'b0),
      .cfg_ack(ack_unused[i]), .inject(inject[i]), .scramble(scramble[i])
    );
  end

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic apb_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk);
    apb_req.paddr = a; apb_req.pwdata = d; apb_req.pwrite = 1; apb_req.psel = 1; apb_req.penable = 0;
    @(negedge clk);
    apb_req.penable = 1;
    @(negedge clk);
    apb_req.psel = 0; apb_req.penable = 0;
  endtask

  task automatic apb_read(logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    apb_req.paddr = a; apb_req.pwrite = 0; apb_req.psel = 1; apb_req.penable = 0;
    @(negedge clk);
    apb_req.penable = 1;
    #1 d = apb_rsp.prdata;
    last_err = apb_rsp.pslverr;
    @(negedge clk);
    apb_req.psel = 0; apb_req.penable = 0;
  endtask

  // one measurement of 'nbits' on channel ch; returns errors and bits
  task automatic measure(int pat, int ch, int nbits, output int errs, output longint bits,
                         output logic locked);
    logic [31:0] d, st;
    int guard;
    apb_write(12'h014, nbits);
    apb_write(12'h018, 0);
    apb_write(12'h000, {20'd0, 4'(ch), 1'b0, 3'(pat), 2'b00, 1'b0, 1'b1});  // gen on, stopped
    repeat (150) @(posedge clk);                                        // chain settles, lock
    apb_read(12'h004, st);
    locked = st[0];
    apb_write(12'h004, 32'h1);                                          // clear
    apb_write(12'h000, {20'd0, 4'(ch), 1'b0, 3'(pat), 2'b00, 1'b1, 1'b1});  // run
    guard = 0;
    do begin apb_read(12'h004, st); guard++; end while (!st[1] && guard < 100000);
    apb_write(12'h000, {20'd0, 4'(ch), 1'b0, 3'(pat), 2'b00, 1'b0, 1'b1});
    apb_read(12'h010, d); errs = int'(d);
    apb_read(12'h008, d); bits = longint'(d);
    apb_read(12'h00C, d); bits += longint'(d) << 32;
  endtask

  initial begin
    int e;
    longint b;
    logic lk;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p <= 5; p++) begin
      measure(p, NCH - 1, 3200, e, b, lk);
      check(lk, $sformatf("pattern %0d locked through all 12 channels", p));
      check(e == 0 && b == 3200, $sformatf("pattern %0d clean: errs=%0d bits=%0d", p, e, b));
    end
    // inject 5 errors on channel 4 during each measurement
    for (int k = 0; k < NCH; k++) begin
      fork
        measure(3, k, 32 * 2000, e, b, lk);
        begin
          repeat (300) @(posedge clk);
          for (int n = 0; n < 5; n++) begin
            @(negedge clk); inject[4] = 1;
            @(negedge clk); inject[4] = 0;
            repeat (100) @(posedge clk);
          end
        end
      join
      if (k >= 4) check(e == 5, $sformatf("channel %0d sees channel 4 errors: %0d", k, e));
      else        check(e == 0, $sformatf("channel %0d upstream of channel 4: %0d", k, e));
      check(b == 32 * 2000, "bit budget honoured");
    end
    apb_read(12'h004, d); check(d[1] && !d[2], "STATUS done, not running");
    // broken channel 7: no sync, BER about 0.5 on channel 9
    scramble[7] = 1;
    measure(0, 9, 32 * 1000, e, b, lk);
    check(!lk, "no lock behind a broken channel");
    check(e > 32 * 1000 * 45 / 100 && e < 32 * 1000 * 55 / 100, $sformatf("BER near 0.5: %0d", e));
    apb_read(12'h01C, d); check(d >= 1 || !lk, "sync loss counter");
    scramble[7] = 0;
    measure(0, 9, 3200, e, b, lk);
    check(lk && e == 0, "recovers when the channel is repaired");
    apb_read(12'h020, d); check(last_err, "unmapped offset answers PSLVERR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
