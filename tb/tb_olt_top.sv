// tb_olt_top: end-to-end test of the optical link test system at its default
// size (12 channels, 32-bit words), driven like the embedded software would
// drive it, through the AHB port.
//
// Twelve transceiver models form a loopback on every channel; their eye is
// error free from -7 to +6 steps of 1/32 UI (14 steps, about 44 % of the
// unit interval) and degrades outside it. The test
//   1. checks the bridge's ERROR response, the UART through a loopback and
//      an I2C write/read of a module's monitoring registers;
//   2. runs every pattern through the whole daisy chain error free;
//   3. runs the three-step bath-tub eye-width scan on the last channel:
//      (1) scan all offsets -16..+16 with a small bit budget (high target
//      BER) to find the eye edges, (2) confirm the centre with a large
//      budget (low target BER), (3) walk from each edge towards the centre
//      with the large budget until a point is error free. The eye width
//      found must match the model's, and the scan must need fewer large
//      measurements than an exhaustive scan.
// Every mechanism exercised is counted, and one that never happened fails.
module tb_olt_top;
  import olt_pkg::*;
  localparam int NCH = 12, W = 32;
  localparam int EYE_L = -7, EYE_R = 6;
  localparam logic [31:0] UART = 32'h8000_0000, I2C = 32'h8000_0100,
                          TEST = 32'h8000_0200, CFG = 32'h8000_0300;
  localparam int N_FAST = 1 << 12;   // step 1 budget
  localparam int N_SLOW = 1 << 20;   // steps 2 and 3 budget

  logic clk = 0, rst_n = 0;
  logic hsel = 0, hwrite = 0;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = '0;
  logic hready_out, hresp;
  logic [W-1:0] xcvr_tx_data [NCH];
  logic [W-1:0] xcvr_rx_data [NCH];
  xcvr_cfg_t xcvr_cfg [NCH];
  logic [NCH-1:0] xcvr_cfg_req, xcvr_cfg_ack;
  logic scl_oe, sda_oe, s_scl_oe, s_sda_oe, uart_txd;
  wire scl = !(scl_oe | s_scl_oe);
  wire sda = !(sda_oe | s_sda_oe);
  int checks = 0, failures = 0;

  // mechanism counters
  int n_ahb_err = 0, n_uart = 0, n_i2c = 0, n_patterns = 0, n_chain = 0;
  int n_syncloss_reg = 0, n_reconf = 0, n_bcast = 0, n_lock = 0, n_syncloss = 0, n_done = 0, n_unlocked_half = 0;

  olt_top dut (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hready_in(hready_out),
    .hready_out, .hresp, .hrdata, .xcvr_tx_data, .xcvr_rx_data, .xcvr_cfg,
    .xcvr_cfg_req, .xcvr_cfg_ack, .scl_oe, .sda_oe, .scl_i(scl), .sda_i(sda),
    .uart_txd, .uart_rxd(uart_txd)
  );

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    xcvr_model #(.DATA_W(W), .LAT(2 + i % 3), .EYE_L(EYE_L), .EYE_R(EYE_R), .ACK_DLY(3 + i), .SEED(64'h0123_4567_89AB_CDEF * (i + 1))) u_x (
      .clk, .tx_data(xcvr_tx_data[i]), .rx_data(xcvr_rx_data[i]), .cfg(xcvr_cfg[i]),
      .cfg_req(xcvr_cfg_req[i]), .cfg_ack(xcvr_cfg_ack[i]), .inject(1'b0), .scramble(1'b0)
    );
  end

  i2c_slave_model #(.ADDR(7'h28), .STRETCH(10)) u_mod (.clk, .scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe));

  always #5 clk = ~clk;

  always @(posedge clk) if (|(xcvr_cfg_req & xcvr_cfg_ack)) n_reconf++;
  // lock losses seen on the checker (the register is cleared with the counters)
  always @(negedge dut.u_test.u_chk.locked) if (rst_n) n_syncloss++;

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

  logic last_err;
  task automatic ahb(logic wr, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    hsel = 1; htrans = 2'b10; hwrite = wr; haddr = a;
    @(posedge clk); while (!hready_out) @(posedge clk);
    @(negedge clk);
    hsel = 0; htrans = 2'b00; hwdata = wd;
    last_err = 0;
    @(posedge clk);
    while (!hready_out) begin
      if (hresp) last_err = 1;
      @(posedge clk);
    end
    if (hresp) last_err = 1;
    rd = hrdata;
  endtask

  task automatic wr32(logic [31:0] a, logic [31:0] d);
    logic [31:0] x;
    ahb(1, a, d, x);
  endtask
  task automatic rd32(logic [31:0] a, output logic [31:0] d);
    ahb(0, a, 0, d);
  endtask

  // set the CDR phase offset of one channel (or all) and wait for the handshake
  task automatic set_phase(int ch, int ph, bit all);
    logic [31:0] st;
    wr32(CFG + 32'h00, {23'd0, all, 4'd0, 4'(ch)});
    wr32(CFG + 32'h0C, {23'd0, 1'b1, 2'b00, 6'(ph)});
    wr32(CFG + 32'h10, 32'h1);
    if (all) n_bcast++;
    do rd32(CFG + 32'h10, st); while (st[0]);
  endtask

  // one BER measurement of nbits on channel ch with pattern pat
  task automatic measure(int pat, int ch, int nbits, output longint errs, output longint bits);
    logic [31:0] d, st;
    wr32(TEST + 32'h14, nbits);
    wr32(TEST + 32'h18, 0);
    wr32(TEST + 32'h000, {20'd0, 4'(ch), 1'b0, 3'(pat), 2'b00, 1'b0, 1'b1});
    repeat (150) @(posedge clk);   // new pattern through the chain, lock
    rd32(TEST + 32'h04, st);
    if (st[0]) n_lock++;
    wr32(TEST + 32'h04, 32'h1);
    wr32(TEST + 32'h000, {20'd0, 4'(ch), 1'b0, 3'(pat), 2'b00, 1'b1, 1'b1});
    do begin repeat (64) @(posedge clk); rd32(TEST + 32'h04, st); end while (!st[1]);
    n_done++;
    wr32(TEST + 32'h000, {20'd0, 4'(ch), 1'b0, 3'(pat), 2'b00, 1'b0, 1'b1});
    rd32(TEST + 32'h10, d); errs = longint'(d);
    rd32(TEST + 32'h08, d); bits = longint'(d);
    rd32(TEST + 32'h0C, d); bits += longint'(d) << 32;
    rd32(TEST + 32'h1C, d); if (d != 0) n_syncloss_reg++;
    if (!st[0] && errs * 100 > bits * 40) n_unlocked_half++;
    if (bits > 100000) $display("  ch %0d: %0d errors in %0d bits (model phase %0d, inserted so far %0d)", ch, errs, bits, g_ch[NCH-1].u_x.phase, g_ch[NCH-1].u_x.inserted);
  endtask

  // I2C byte command through the master
  task automatic i2c_cmd(logic [4:0] c, logic [7:0] tx, output logic [31:0] st);
    if (c[2]) wr32(I2C + 32'h04, {24'd0, tx});
    wr32(I2C + 32'h08, {27'd0, c});
    do rd32(I2C + 32'h08, st); while (st[0]);
  endtask

  initial begin
    logic [31:0] d, st;
    longint e, b;
    int pass1 [-16:16];
    int l1, r1, c2, l3, r3, n_slow;
    repeat (5) @(posedge clk);
    rst_n = 1;

    // ---- bridge error response
    rd32(32'h8000_0700, d);
    check(last_err, "unmapped APB slot gives AHB ERROR");
    if (last_err) n_ahb_err++;

    // ---- UART loopback (terminal side wired back)
    wr32(UART + 32'h08, 16);
    wr32(UART + 32'h00, 32'h5A);
    repeat (12 * 16) @(posedge clk);
    rd32(UART + 32'h04, st);
    rd32(UART + 32'h00, d);
    check(st[1] && d[7:0] == 8'h5A, $sformatf("UART loopback byte %h", d[7:0]));
    if (st[1] && d[7:0] == 8'h5A) n_uart++;

    // ---- I2C: write a control register, read back a monitor register pair
    wr32(I2C + 32'h00, 4);
    i2c_cmd(5'h05, {7'h28, 1'b0}, st); check(!st[1], "module acknowledges address");
    i2c_cmd(5'h04, 8'h60, st);
    i2c_cmd(5'h06, 8'h3C, st);         check(!st[1], "control byte acknowledged");
    check(u_mod.mem[8'h60] == 8'h3C, "module control register written");
    i2c_cmd(5'h05, {7'h28, 1'b0}, st);
    i2c_cmd(5'h04, 8'h16, st);         // e.g. a temperature/voltage monitor word
    i2c_cmd(5'h05, {7'h28, 1'b1}, st);
    i2c_cmd(5'h08, 8'h00, st);
    rd32(I2C + 32'h0C, d);
    check(d[7:0] == (8'h16 ^ 8'h5A), "monitor byte 0");
    i2c_cmd(5'h1A, 8'h00, st);
    rd32(I2C + 32'h0C, d);
    check(d[7:0] == (8'h17 ^ 8'h5A), "monitor byte 1");
    if (d[7:0] == (8'h17 ^ 8'h5A)) n_i2c++;

    // ---- all channels at the sampling centre (broadcast), every pattern
    set_phase(0, 0, 1);
    for (int p = 0; p <= 5; p++) begin
      measure(p, NCH - 1, 32 * 200, e, b);
      check(e == 0 && b == 32 * 200, $sformatf("pattern %0d through 12 channels: %0d/%0d", p, e, b));
      if (e == 0) begin n_patterns++; n_chain++; end
    end

    // ---- bath-tub scan on the last channel (all others centred)
    // step 1: coarse scan with a high target BER
    for (int ph = -16; ph <= 16; ph++) begin
      set_phase(NCH - 1, ph, 0);
      measure(3, NCH - 1, N_FAST, e, b);
      pass1[ph] = (e == 0);
    end
    l1 = 99; r1 = -99;
    for (int ph = -16; ph <= 16; ph++) if (pass1[ph]) begin
      if (ph < l1) l1 = ph;
      if (ph > r1) r1 = ph;
    end
    $display("step 1 edges: %0d .. %0d", l1, r1);
    check(l1 <= EYE_L && l1 >= EYE_L - 3 && r1 >= EYE_R && r1 <= EYE_R + 3, "coarse edges around the eye");
    // step 2: centre at the low target BER
    n_slow = 0;
    c2 = (l1 + r1) / 2;
    set_phase(NCH - 1, c2, 0);
    measure(3, NCH - 1, N_SLOW, e, b); n_slow++;
    check(e == 0, $sformatf("centre %0d reaches the target BER", c2));
    // step 3: from the coarse edges towards the centre
    l3 = l1;
    forever begin
      set_phase(NCH - 1, l3, 0);
      measure(3, NCH - 1, N_SLOW, e, b); n_slow++;
      if (e == 0 || l3 >= c2) break;
      l3++;
    end
    r3 = r1;
    forever begin
      set_phase(NCH - 1, r3, 0);
      measure(3, NCH - 1, N_SLOW, e, b); n_slow++;
      if (e == 0 || r3 <= c2) break;
      r3--;
    end
    $display("eye: %0d .. %0d steps of 1/32 UI, width %0d/32 UI, %0d low-BER measurements",
             l3, r3, r3 - l3 + 1, n_slow);
    check(l3 >= EYE_L - 1 && l3 <= EYE_L && r3 <= EYE_R + 1 && r3 >= EYE_R,
          $sformatf("eye edges %0d..%0d, model %0d..%0d", l3, r3, EYE_L, EYE_R));
    check(n_slow < 33, "fewer low-BER measurements than an exhaustive scan");
    rd32(CFG + 32'h1C, d);
    check(d[8] && $signed(d[5:0]) == 6'(r3), "applied eye offset readback");

    // ---- every mechanism happened
    check(n_ahb_err > 0, "AHB error response");
    check(n_uart > 0, "UART transfer");
    check(n_i2c > 0 && u_mod.stretches > 0, "I2C transfer with clock stretching");
    check(n_patterns == 6, "all six patterns");
    check(n_chain > 0, "data through the whole daisy chain");
    check(n_reconf >= 33, $sformatf("reconfiguration handshakes: %0d", n_reconf));
    check(n_bcast > 0, "broadcast settings");
    check(n_lock > 0, "checker lock");
    check(n_syncloss > 0, "loss of synchronisation");
    check(n_unlocked_half > 0, "BER about 0.5 outside the eye");
    check(n_done > 0, "bit budget reached");
    $display("mechanisms: ahb_err=%0d uart=%0d i2c=%0d patterns=%0d reconf=%0d bcast=%0d lock=%0d syncloss=%0d ber_half=%0d done=%0d",
             n_ahb_err, n_uart, n_i2c, n_patterns, n_reconf, n_bcast, n_lock, n_syncloss, n_unlocked_half, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
