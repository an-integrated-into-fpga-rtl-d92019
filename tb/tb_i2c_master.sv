// tb_i2c_master: drives the I2C master over APB against two behavioural
// slaves on one open-drain bus (address 0x50 without and 0x51 with clock
// stretching). Checks register writes landing in the slave, a read back with
// repeated START, ACK/NACK from the master, NACK reporting for an absent
// address, the SCL period of 4*PRESCALE clocks and correct transfers while a
// slave stretches the clock.
module tb_i2c_master;
  import olt_pkg::*;
  localparam int PRE = 5;
  logic clk = 0, rst_n = 0;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  logic scl_oe, sda_oe, s0_scl_oe, s0_sda_oe, s1_scl_oe, s1_sda_oe;
  wire scl = !(scl_oe | s0_scl_oe | s1_scl_oe);
  wire sda = !(sda_oe | s0_sda_oe | s1_sda_oe);
  int checks = 0, failures = 0;

  i2c_master #(.PRESCALE_RST(16'd125)) dut (
    .clk, .rst_n, .apb_req, .apb_rsp, .scl_oe, .sda_oe, .scl_i(scl), .sda_i(sda)
  );
  i2c_slave_model #(.ADDR(7'h50), .STRETCH(0))  s0 (.clk, .scl, .sda, .scl_oe(s0_scl_oe), .sda_oe(s0_sda_oe));
  i2c_slave_model #(.ADDR(7'h51), .STRETCH(37)) s1 (.clk, .scl, .sda, .scl_oe(s1_scl_oe), .sda_oe(s1_sda_oe));

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  localparam logic [4:0] START = 5'h01, STOP = 5'h02, WR = 5'h04, RD = 5'h08, NACK = 5'h10;

  // issue a command and wait until done; returns STATUS
  task automatic cmd(logic [4:0] c, logic [7:0] tx, output logic [31:0] st);
    if (c & WR) apb_write(12'h004, {24'd0, tx});
    apb_write(12'h008, {27'd0, c});
    do apb_read(12'h008, st); while (st[0]);
  endtask

  task automatic write_regs(logic [6:0] addr, logic [7:0] reg_a, logic [7:0] d0, logic [7:0] d1);
    logic [31:0] st;
    cmd(START | WR, {addr, 1'b0}, st); check(!st[1], $sformatf("ack on address %h", addr));
    cmd(WR, reg_a, st);                check(!st[1], "ack on pointer");
    cmd(WR, d0, st);                   check(!st[1], "ack on data 0");
    cmd(WR | STOP, d1, st);            check(!st[1], "ack on data 1");
  endtask

  task automatic read_regs(logic [6:0] addr, logic [7:0] reg_a, output logic [7:0] r0, output logic [7:0] r1);
    logic [31:0] st, d;
    cmd(START | WR, {addr, 1'b0}, st);
    cmd(WR, reg_a, st);
    cmd(START | WR, {addr, 1'b1}, st); check(!st[1], "ack on read address");
    cmd(RD, 8'h00, st);
    apb_read(12'h00C, d); r0 = d[7:0];
    cmd(RD | NACK | STOP, 8'h00, st);
    apb_read(12'h00C, d); r1 = d[7:0];
  endtask

  initial begin
    logic [31:0] st;
    logic [7:0] r0, r1;
    int t1, t2, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_read(12'h000, st); check(st == 125, "reset prescaler");
    apb_write(12'h000, PRE);
    check(scl && sda, "bus idle");
    // SCL period measured during a byte
    cyc = 0; t1 = 0; t2 = 0;
    fork
      forever begin @(posedge clk); cyc++; end
      begin
        @(negedge sda);
        @(posedge scl); t1 = cyc;
        @(posedge scl); t2 = cyc;
      end
    join_none
    write_regs(7'h50, 8'h20, 8'hAB, 8'hCD);
    check(t2 - t1 == 4 * PRE, $sformatf("SCL period %0d clocks, expected %0d", t2 - t1, 4 * PRE));
    check(s0.mem[8'h20] == 8'hAB && s0.mem[8'h21] == 8'hCD, "slave 0x50 registers written");
    check(scl && sda, "bus released after STOP");
    read_regs(7'h50, 8'h20, r0, r1);
    check(r0 == 8'hAB && r1 == 8'hCD, $sformatf("read back %h %h", r0, r1));
    read_regs(7'h50, 8'h07, r0, r1);
    check(r0 == (8'h07 ^ 8'h5A) && r1 == (8'h08 ^ 8'h5A), "read preset registers");
    // absent address
    cmd(START | WR | STOP, {7'h33, 1'b0}, st);
    check(st[1], "nack for absent address");
    // stretching slave
    write_regs(7'h51, 8'h40, 8'h12, 8'h34);
    check(s1.mem[8'h40] == 8'h12 && s1.mem[8'h41] == 8'h34, "stretching slave written");
    read_regs(7'h51, 8'h40, r0, r1);
    check(r0 == 8'h12 && r1 == 8'h34, "stretching slave read back");
    check(s1.stretches > 0, "clock stretching happened");
    check(s0.mem[8'h40] == (8'h40 ^ 8'h5A), "other slave untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
