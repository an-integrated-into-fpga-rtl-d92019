// tb_ber_threshold: the confidence-limited BER test on the complete system at
// its default size. If N0 = ln(1/(1-alpha)) / pe bits pass without an error,
// the BER is below pe with confidence alpha. The test programs the bit budget
// from that formula and checks, on channel 11 behind the whole daisy chain:
//   - at the sampling centre, pe = 1e-5 and 1e-6 (alpha = 0.95) pass with no
//     errors and stop after exactly ceil(N0/32)*32 bits, one 32-bit word per
//     clock (5 Gbps at a 156.25 MHz word clock);
//   - one step outside the eye (model BER 2^-18, about 3.8e-6) the 1e-6 test
//     fails, i.e. errors are counted;
//   - the 64-bit budget register holds N0 for pe = 1e-12 and 1e-15, and the
//     implied test times at 5 Gbps are about 10 minutes and about a week.
module tb_ber_threshold;
  import olt_pkg::*;
  localparam int NCH = 12, W = 32;
  localparam logic [31:0] TEST = 32'h8000_0200, CFG = 32'h8000_0300;

  logic clk = 0, rst_n = 0;
  logic hsel = 0, hwrite = 0;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = '0;
  logic hready_out, hresp;
  logic [W-1:0] xcvr_tx_data [NCH];
  logic [W-1:0] xcvr_rx_data [NCH];
  xcvr_cfg_t xcvr_cfg [NCH];
  logic [NCH-1:0] xcvr_cfg_req, xcvr_cfg_ack;
  logic scl_oe, sda_oe, uart_txd;
  int checks = 0, failures = 0;
  longint run_cycles = 0;

  olt_top dut (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hready_in(hready_out),
    .hready_out, .hresp, .hrdata, .xcvr_tx_data, .xcvr_rx_data, .xcvr_cfg,
    .xcvr_cfg_req, .xcvr_cfg_ack, .scl_oe, .sda_oe, .scl_i(!scl_oe), .sda_i(!sda_oe),
    .uart_txd, .uart_rxd(uart_txd)
  );

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    xcvr_model #(.DATA_W(W), .LAT(3), .EYE_L(-7), .EYE_R(6),
                 .SEED(64'h0F1E_2D3C_4B5A_6978 * (i + 3))) u_x (
      .clk, .tx_data(xcvr_tx_data[i]), .rx_data(xcvr_rx_data[i]), .cfg(xcvr_cfg[i]),
      .cfg_req(xcvr_cfg_req[i]), .cfg_ack(xcvr_cfg_ack[i]), .inject(1'b0), .scramble(1'b0)
    );
  end

  always #5 clk = ~clk;

  // clocks spent counting: the checker's run input high and not done
  always @(posedge clk) if (dut.u_test.u_chk.run && !dut.u_test.u_chk.done) run_cycles++;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic ahb(logic wr, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    hsel = 1; htrans = 2'b10; hwrite = wr; haddr = a;
    @(posedge clk); while (!hready_out) @(posedge clk);
    @(negedge clk);
    hsel = 0; htrans = 2'b00; hwdata = wd;
    @(posedge clk);
    while (!hready_out) @(posedge clk);
    rd = hrdata;
  endtask
  task automatic wr32(logic [31:0] a, logic [31:0] d);
    logic [31:0] x;
    ahb(1, a, d, x);
  endtask
  task automatic rd32(logic [31:0] a, output logic [31:0] d);
    ahb(0, a, 0, d);
  endtask

  function automatic longint unsigned n0(real pe, real alpha);
    return longint'($ceil($ln(1.0 / (1.0 - alpha)) / pe));
  endfunction

  task automatic set_phase(int ch, int ph);
    logic [31:0] st;
    wr32(CFG + 32'h00, ch);
    wr32(CFG + 32'h0C, {23'd0, 1'b1, 2'b00, 6'(ph)});
    wr32(CFG + 32'h10, 32'h1);
    do rd32(CFG + 32'h10, st); while (st[0]);
  endtask

  task automatic ber_test(longint unsigned nbits, output longint errs, output longint bits,
                          output longint cycles);
    logic [31:0] d, st;
    wr32(TEST + 32'h14, nbits[31:0]);
    wr32(TEST + 32'h18, nbits[63:32]);
    wr32(TEST + 32'h00, {20'd0, 4'd11, 1'b0, 3'(PAT_PRBS31), 2'b00, 1'b0, 1'b1});
    repeat (150) @(posedge clk);
    wr32(TEST + 32'h04, 32'h1);
    run_cycles = 0;
    wr32(TEST + 32'h00, {20'd0, 4'd11, 1'b0, 3'(PAT_PRBS31), 2'b00, 1'b1, 1'b1});
    do begin repeat (256) @(posedge clk); rd32(TEST + 32'h04, st); end while (!st[1]);
    cycles = run_cycles;
    wr32(TEST + 32'h00, {20'd0, 4'd11, 1'b0, 3'(PAT_PRBS31), 2'b00, 1'b0, 1'b1});
    rd32(TEST + 32'h10, d); errs = longint'(d);
    rd32(TEST + 32'h08, d); bits = longint'(d);
    rd32(TEST + 32'h0C, d); bits += longint'(d) << 32;
  endtask

  initial begin
    longint e, b, c;
    longint unsigned n, want;
    logic [31:0] lo, hi;
    real secs;
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2; k++) begin
      real pe;
      pe = (k == 0) ? 1.0e-5 : 1.0e-6;
      n = n0(pe, 0.95);
      want = (n + 31) / 32 * 32;
      ber_test(n, e, b, c);
      $display("pe=%g: N0=%0d bits, counted %0d bits in %0d clocks, %0d errors", pe, n, b, c, e);
      check(e == 0, $sformatf("centre passes BER < %g at 95 %%", pe));
      check(b == longint'(want), $sformatf("stops at ceil(N0/32)*32 = %0d bits", want));
      check(c == longint'(want / 32), $sformatf("one word per clock: %0d clocks", c));
    end
    // one step outside the eye: 2^-18 > 1e-6, the test must see errors
    set_phase(11, 7);
    n = n0(1.0e-6, 0.95);
    ber_test(n, e, b, c);
    $display("outside the eye: %0d errors in %0d bits", e, b);
    check(e > 0, "BER 3.8e-6 link fails the 1e-6 test");
    set_phase(11, 0);
    // budget register range for the long tests in the text
    for (int k = 0; k < 2; k++) begin
      real pe;
      pe = (k == 0) ? 1.0e-12 : 1.0e-15;
      n = n0(pe, 0.95);
      wr32(TEST + 32'h14, n[31:0]);
      wr32(TEST + 32'h18, n[63:32]);
      rd32(TEST + 32'h14, lo);
      rd32(TEST + 32'h18, hi);
      check({hi, lo} == n, $sformatf("budget register holds N0=%0d for pe=%g", n, pe));
      secs = real'(n) / 5.0e9;
      $display("pe=%g: N0=%0d bits, %0.1f s = %0.2f days at 5 Gbps", pe, n, secs, secs / 86400.0);
      if (k == 0) check(secs > 540.0 && secs < 660.0, "about 10 minutes for 1e-12");
      else        check(secs > 5.0 * 86400.0 && secs < 7.0 * 86400.0, "almost a week for 1e-15");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
