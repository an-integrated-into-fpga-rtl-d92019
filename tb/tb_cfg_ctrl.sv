// tb_cfg_ctrl: programs transmitter, receiver and eye-scan settings over APB,
// applies them to single channels and to all channels, and checks the
// applied settings, the readback registers, the req/ack handshake (request
// held until acknowledged, busy while pending, APPLY ignored while busy) and
// that other channels are left untouched.
module tb_cfg_ctrl;
  import olt_pkg::*;
  localparam int NCH = 12;
  logic clk = 0, rst_n = 0;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  xcvr_cfg_t cfg [NCH];
  logic [NCH-1:0] cfg_req, cfg_ack = '0;
  int checks = 0, failures = 0;
  logic last_err;

  cfg_ctrl #(.NCH(NCH)) dut (.*);

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

  task automatic apb_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk);
    apb_req.paddr = a; apb_req.pwdata = d; apb_req.pwrite = 1; apb_req.psel = 1; apb_req.penable = 0;
    @(negedge clk);
    apb_req.penable = 1;
    @(posedge clk); while (!apb_rsp.pready) @(posedge clk);
    @(negedge clk);
    apb_req.psel = 0; apb_req.penable = 0;
  endtask

  task automatic apb_read(logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    apb_req.paddr = a; apb_req.pwrite = 0; apb_req.psel = 1; apb_req.penable = 0;
    @(negedge clk);
    apb_req.penable = 1;
    #1; while (!apb_rsp.pready) begin @(negedge clk); #1; end
    d = apb_rsp.prdata;
    last_err = apb_rsp.pslverr;
    @(negedge clk);
    apb_req.psel = 0; apb_req.penable = 0;
  endtask

  task automatic ack(int ch);
    @(negedge clk); cfg_ack[ch] = 1;
    @(negedge clk); cfg_ack[ch] = 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // channel 5: vod 5, preemp 17, vcm 2; eq 9, dfe 1, gain 3, vcm 1, term 2; phase -7, eye on
    apb_write(12'h000, 32'd5);
    apb_write(12'h004, {22'd0, 2'd2, 5'd17, 3'd5});
    apb_write(12'h008, {20'd0, 2'd2, 2'd1, 3'd3, 1'b1, 4'd9});
    apb_write(12'h00C, {23'd0, 1'b1, 2'b0, 6'(-7)});
    apb_read(12'h004, d); check(d == {22'd0, 2'd2, 5'd17, 3'd5}, "shadow TX readback");
    apb_read(12'h014, d); check(d == 0, "channel 5 not applied yet");
    apb_write(12'h010, 32'd1);
    check(cfg_req == 12'b0000_0010_0000, $sformatf("req on channel 5 only: %b", cfg_req));
    check(cfg[5].tx_vod == 5 && cfg[5].tx_preemp == 17 && cfg[5].tx_vcm == 2, "ch5 tx fields");
    check(cfg[5].rx_eq == 9 && cfg[5].rx_dfe_en && cfg[5].rx_gain == 3 && cfg[5].rx_vcm == 1 &&
          cfg[5].rx_term == 2, "ch5 rx fields");
    check(cfg[5].eye_en && cfg[5].eye_phase == -7, "ch5 eye fields");
    check(cfg[4] == '0 && cfg[6] == '0, "neighbours untouched");
    apb_read(12'h010, d); check(d[0], "busy while request pending");
    repeat (5) @(posedge clk);
    check(cfg_req[5], "request held until ack");
    // APPLY while busy is ignored
    apb_write(12'h000, 32'd6);
    apb_write(12'h010, 32'd1);
    check(cfg_req[6] == 0 && cfg[6] == '0, "apply ignored while busy");
    ack(5);
    #1;
    check(cfg_req == '0, "request dropped on ack");
    apb_read(12'h010, d); check(!d[0], "not busy after ack");
    apb_write(12'h000, 32'd5);
    apb_read(12'h01C, d); check(d == {23'd0, 1'b1, 2'b0, 6'(-7)}, "applied EYE readback ch5");
    apb_read(12'h018, d); check(d == {20'd0, 2'd2, 2'd1, 3'd3, 1'b1, 4'd9}, "applied RX readback ch5");
    // broadcast phase +16 to all channels
    apb_write(12'h00C, {23'd0, 1'b1, 2'b0, 6'd16});
    apb_write(12'h000, 32'h100);
    apb_write(12'h010, 32'd1);
    check(cfg_req == '1, "broadcast requests every channel");
    for (int i = 0; i < NCH; i++) check(cfg[i].eye_phase == 16, $sformatf("ch%0d phase 16", i));
    for (int i = 0; i < NCH; i++) begin
      ack(i);
      #1;
      check(cfg_req == NCH'(~((1 << (i + 1)) - 1)) , $sformatf("ack %0d clears its request only", i));
    end
    apb_read(12'h040, d); check(last_err == 1, "unmapped offset answers PSLVERR");
    apb_read(12'h000, d); check(last_err == 0 && d == 32'h100, "SEL readback, no error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
