// i2c_slave_model: behavioural I2C slave with a 256-byte register space,
// used by the testbenches. 7-bit address ADDR. A write transfer sets the
// register pointer with its first data byte and writes the following bytes
// at auto-incremented addresses; a read transfer returns bytes from the
// pointer on. After each acknowledge bit it can hold SCL low for STRETCH
// clocks of 'clk' (clock stretching). Counts transfers it acknowledged.
module i2c_slave_model #(
  parameter logic [6:0] ADDR    = 7'h50,
  parameter int         STRETCH = 0
) (
  input  logic clk,
  input  logic scl,
  input  logic sda,
  output logic scl_oe,
  output logic sda_oe
);
  logic [7:0] mem [256];
  logic [7:0] ptr = '0, sh = '0;
  int   bitcnt = 0;
  bit   active = 0, selected = 0, reading = 0, first = 0, ack_phase = 0, master_nack = 0;
  int   acks = 0, stretches = 0;

  initial begin
    scl_oe = 0;
    sda_oe = 0;
    for (int i = 0; i < 256; i++) mem[i] = 8'(i ^ 8'h5A);
  end

  bit addr_phase = 0;

  // START / STOP
  always @(negedge sda) if (scl) begin
    active = 1; addr_phase = 1; selected = 0; reading = 0; first = 0;
    bitcnt = 0; ack_phase = 0; sda_oe = 0;
  end
  always @(posedge sda) if (scl) begin
    active = 0; selected = 0; sda_oe = 0;
  end

  always @(posedge scl) if (active) begin
    if (ack_phase) begin
      if (reading) master_nack = sda;
    end else begin
      if (!reading) sh = {sh[6:0], sda};
      bitcnt++;
    end
  end

  always @(negedge scl) if (active) begin
    if (ack_phase) begin
      // end of the acknowledge bit
      ack_phase = 0;
      sda_oe = 0;
      bitcnt = 0;
      if (reading && selected) begin
        if (master_nack) selected = 0;
        else begin
          sh = mem[ptr]; ptr++;
          sda_oe = !sh[7];
        end
      end
      if (STRETCH > 0 && selected) begin
        scl_oe = 1; stretches++;
        repeat (STRETCH) @(posedge clk);
        scl_oe = 0;
      end
    end else if (bitcnt == 8) begin
      ack_phase = 1;
      if (addr_phase) begin
        addr_phase = 0;
        if (sh[7:1] == ADDR) begin
          selected = 1; reading = sh[0]; first = !sh[0];
          sda_oe = 1; acks++;
          master_nack = 0;
        end
      end else if (reading) begin
        sda_oe = 0;  // the master drives the acknowledge
      end else if (selected) begin
        if (first) begin ptr = sh; first = 0; end
        else begin mem[ptr] = sh; ptr++; end
        sda_oe = 1; acks++;
      end
    end else if (reading && selected) begin
      sda_oe = !sh[7 - bitcnt];
    end
  end
endmodule
