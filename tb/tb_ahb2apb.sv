// tb_ahb2apb: AHB-Lite single transfers through the bridge to four APB slave
// models (slot 2 with two wait states, slot 3 with an error register).
// Checks write and read data per slot, the slave select decoding, the 4-clock
// write latency with a zero-wait slave, wait-state stretching, the two-cycle
// ERROR response for PSLVERR and for an unmapped slot, back-to-back
// transfers and APB signal stability.
module tb_ahb2apb;
  import olt_pkg::*;
  localparam int NSLV = 4;
  logic clk = 0, rst_n = 0;
  logic hsel = 0, hwrite = 0;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = '0;
  logic hready_out, hresp;
  apb_req_t apb_req [NSLV];
  apb_rsp_t apb_rsp [NSLV];
  int checks = 0, failures = 0;

  ahb2apb #(.NSLV(NSLV), .SLOT_BITS(8)) dut (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hready_in(hready_out),
    .hready_out, .hresp, .hrdata, .apb_req, .apb_rsp
  );
  apb_slave_model #(.WAIT(0), .INIT(32'h1000_0000)) s0 (.clk, .req(apb_req[0]), .rsp(apb_rsp[0]));
  apb_slave_model #(.WAIT(0), .INIT(32'h2000_0000)) s1 (.clk, .req(apb_req[1]), .rsp(apb_rsp[1]));
  apb_slave_model #(.WAIT(2), .INIT(32'h3000_0000)) s2 (.clk, .req(apb_req[2]), .rsp(apb_rsp[2]));
  apb_slave_model #(.WAIT(0), .INIT(32'h4000_0000), .ERR_ADDR(12'h0FC)) s3 (.clk, .req(apb_req[3]), .rsp(apb_rsp[3]));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one AHB single transfer; returns read data, error flag and clock count
  // from the address phase edge to the edge that ends the data phase
  task automatic ahb(logic wr, logic [31:0] a, logic [31:0] wd,
                     output logic [31:0] rd, output logic err, output int cyc);
    @(negedge clk);
    hsel = 1; htrans = 2'b10; hwrite = wr; haddr = a;
    @(posedge clk); while (!hready_out) @(posedge clk);
    cyc = 1;
    @(negedge clk);
    hsel = 0; htrans = 2'b00; hwdata = wd;
    err = 0;
    @(posedge clk); cyc++;
    while (!hready_out) begin
      if (hresp) err = 1;
      @(posedge clk); cyc++;
    end
    if (hresp) err = 1;
    rd = hrdata;
  endtask

  initial begin
    logic [31:0] d;
    logic e;
    int c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ahb(1, 32'h8000_0010, 32'hCAFE_0001, d, e, c);
    check(!e && c == 4, $sformatf("write slot 0: err=%0d clocks=%0d", e, c));
    check(s0.regs[4] == 32'hCAFE_0001 && s1.regs[4] == 32'h2000_0004, "only slot 0 written");
    ahb(0, 32'h8000_0010, 0, d, e, c);
    check(!e && d == 32'hCAFE_0001, $sformatf("read slot 0: %h", d));
    ahb(0, 32'h8000_0104, 0, d, e, c);
    check(!e && d == 32'h2000_0001, $sformatf("read slot 1: %h", d));
    ahb(1, 32'h8000_0208, 32'h0BAD_F00D, d, e, c);
    check(!e && c == 6, $sformatf("two wait states stretch the write to %0d clocks", c));
    check(s2.regs[2] == 32'h0BAD_F00D, "slot 2 written");
    ahb(0, 32'h8000_0208, 0, d, e, c);
    check(!e && d == 32'h0BAD_F00D, "read slot 2");
    ahb(1, 32'h8000_03FC, 32'h1, d, e, c);
    check(e, "PSLVERR gives AHB ERROR");
    check(s3.regs[63] == 32'h4000_003F, "errored write not stored");
    ahb(0, 32'h8000_0500, 0, d, e, c);
    check(e, "unmapped slot gives AHB ERROR");
    // random traffic against a shadow model
    for (int n = 0; n < 200; n++) begin
      logic [1:0] s;
      logic [5:0] r;
      logic [31:0] v;
      s = 2'($urandom % 3);
      r = 6'($urandom % 63);
      v = $urandom;
      ahb(1, {20'h80000, 2'b00, s, r, 2'b00}, v, d, e, c);
      ahb(0, {20'h80000, 2'b00, s, r, 2'b00}, 0, d, e, c);
      check(!e && d == v, $sformatf("random slot %0d reg %0d", s, r));
    end
    check(s0.violations + s1.violations + s2.violations + s3.violations == 0, "APB signals stable");
    check(s0.transfers > 0 && s1.transfers > 0 && s2.transfers > 0 && s3.transfers > 0, "all slots reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
