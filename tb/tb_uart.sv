// tb_uart: sets a 16-clock bit period, sends bytes and decodes txd with an
// independent serial sampler (start bit, 8 data bits LSB first, stop bit,
// exact bit period), and drives rxd with frames to check reception, the
// rx_valid flag cleared by reading, overrun and framing error detection.
module tb_uart;
  import olt_pkg::*;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0, txd, rxd = 1;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  int checks = 0, failures = 0;

  uart #(.DIV_RST(16'd434)) dut (.*);

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
    @(negedge clk);
    apb_req.psel = 0; apb_req.penable = 0;
  endtask

  // receive one frame from txd; returns the byte and checks timing/stop bit
  task automatic sample_tx(output logic [7:0] b);
    while (txd) @(posedge clk);
    repeat (DIV / 2) @(posedge clk);
    check(txd == 0, "start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (DIV) @(posedge clk);
      b[i] = txd;
    end
    repeat (DIV) @(posedge clk);
    check(txd == 1, "stop bit");
  endtask

  task automatic send_rx(logic [7:0] b, logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (DIV) @(posedge clk);
    end
    rxd = 1;
    repeat (DIV) @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0] b;
    int len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_read(12'h008, d); check(d == 434, "reset divider 434");
    apb_write(12'h008, DIV);
    // 0x01: start bit followed by a 1 gives an exact start-bit length
    fork
      apb_write(12'h000, 32'h01);
      begin
        while (txd) @(posedge clk);
        len = 0;
        while (!txd) begin @(posedge clk); len++; end
      end
    join
    check(len == DIV, $sformatf("bit period %0d clocks", len));
    apb_read(12'h004, d); check(d[0], "tx busy during frame");
    repeat (10 * DIV) @(posedge clk);
    apb_read(12'h004, d); check(!d[0], "tx idle after frame");
    for (int k = 0; k < 4; k++) begin
      logic [7:0] v;
      v = (k == 0) ? 8'hA5 : (k == 1) ? 8'h3C : (k == 2) ? 8'h80 : 8'h7E;
      fork
        apb_write(12'h000, {24'd0, v});
        sample_tx(b);
      join
      check(b == v, $sformatf("tx byte %h decoded %h", v, b));
      repeat (2 * DIV) @(posedge clk);
    end
    // receive
    send_rx(8'h96, 1);
    apb_read(12'h004, d); check(d[1] && !d[2] && !d[3], "rx_valid set");
    apb_read(12'h000, d); check(d[7:0] == 8'h96, $sformatf("rx byte %h", d[7:0]));
    apb_read(12'h004, d); check(!d[1], "rx_valid cleared by read");
    send_rx(8'h11, 1);
    send_rx(8'h22, 1);
    apb_read(12'h004, d); check(d[2], "overrun flagged");
    apb_read(12'h000, d); check(d[7:0] == 8'h22, "newest byte kept");
    apb_write(12'h004, 32'h4);
    apb_read(12'h004, d); check(!d[2], "overrun cleared");
    send_rx(8'h55, 0);
    apb_read(12'h004, d); check(d[3] && !d[1], "framing error, no data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
