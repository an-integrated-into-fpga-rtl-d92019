// i2c_master: APB I2C master for the optical module management interfaces.
//
// Software issues byte-level commands; one command word can combine a
// START (or repeated START), one byte WRITE or READ and a STOP, executed in
// that order. Each bit is split into four quarter periods of PRESCALE
// clocks: SDA changes while SCL is low, SCL is released in the second
// quarter and SDA is sampled at the end of the third. A slave holding SCL
// low (clock stretching) pauses the sequence. After a WRITE the slave's
// acknowledge bit is reported (nack flag); after a READ the master sends ACK,
// or NACK if the command asked for it. Lines are open drain: *_oe = 1 pulls
// the line low; outputs are registered (one clock after the internal state).
//
// Register map (byte offsets):
//   0x00 PRESCALE rw [15:0] quarter-bit period in clocks (minimum 2)
//   0x04 TXDATA   rw [7:0]  byte for the next WRITE, MSB first
//   0x08 CMD      w  [0] START [1] STOP [2] WRITE [3] READ [4] NACK after READ
//                    (ignored while busy)
//        STATUS   r  [0] busy  [1] nack received on the last WRITE
//   0x0C RXDATA   r  [7:0]  byte of the last READ
// Command set, register layout and reset prescaler are this design's choices.
module i2c_master
  import olt_pkg::*;
#(
  parameter logic [15:0] PRESCALE_RST = 16'd125
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb_req,
  output apb_rsp_t apb_rsp,
  output logic     scl_oe,
  output logic     sda_oe,
  input  logic     scl_i,
  input  logic     sda_i
);

  typedef enum logic [1:0] {PH_IDLE, PH_START, PH_BITS, PH_STOP} phase_t;

  phase_t      ph;
  logic [1:0]  q;
  logic [15:0] presc, cnt;
  logic [7:0]  txdata, sh, rsh, rxdata;
  logic [3:0]  bitn;
  logic        do_byte, do_stop, rd_mode, nack_cmd, hold, nack;
  logic        scl_rel, sda_rel, bitval, tick;

  wire wr   = apb_req.psel && apb_req.penable && apb_req.pwrite;
  wire busy = (ph != PH_IDLE);

  // line levels wanted in the current quarter (1 = released)
  always_comb begin
    bitval = 1'b1;
    if (bitn < 4'd8) bitval = rd_mode ? 1'b1 : sh[7];
    else             bitval = rd_mode ? nack_cmd : 1'b1;
    scl_rel = 1'b1;
    sda_rel = 1'b1;
    case (ph)
      PH_IDLE:  scl_rel = !hold;
      PH_START: begin
        scl_rel = (q == 2'd0) ? !hold : (q != 2'd3);
        sda_rel = (q < 2'd2);
      end
      PH_BITS: begin
        scl_rel = (q == 2'd1) || (q == 2'd2);
        sda_rel = bitval;
      end
      PH_STOP: begin
        scl_rel = (q != 2'd0);
        sda_rel = (q >= 2'd2);
      end
      default: ;
    endcase
  end

  // a quarter ends when its count runs out, unless a slave stretches SCL
  assign tick = busy && (cnt == 0) && !((q == 2'd1 || q == 2'd2) && scl_rel && !scl_i);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph       <= PH_IDLE;
      q        <= '0;
      presc    <= PRESCALE_RST;
      cnt      <= '0;
      txdata   <= '0;
      sh       <= '0;
      rsh      <= '0;
      rxdata   <= '0;
      bitn     <= '0;
      do_byte  <= 1'b0;
      do_stop  <= 1'b0;
      rd_mode  <= 1'b0;
      nack_cmd <= 1'b0;
      hold     <= 1'b0;
      nack     <= 1'b0;
      scl_oe   <= 1'b0;
      sda_oe   <= 1'b0;
    end else begin
      scl_oe <= !scl_rel;
      sda_oe <= !sda_rel;
      if (busy && cnt != 0) cnt <= cnt - 1'b1;
      if (tick) begin
        cnt <= presc - 1'b1;
        if (ph == PH_BITS && q == 2'd2) begin
          if (bitn < 4'd8) rsh <= {rsh[6:0], sda_i};
          else if (!rd_mode) nack <= sda_i;
        end
        if (q != 2'd3) q <= q + 1'b1;
        else begin
          q <= '0;
          case (ph)
            PH_START: begin
              hold <= 1'b1;
              bitn <= '0;
              ph   <= do_byte ? PH_BITS : (do_stop ? PH_STOP : PH_IDLE);
            end
            PH_BITS: begin
              if (bitn < 4'd8) begin
                bitn <= bitn + 1'b1;
                sh   <= {sh[6:0], 1'b0};
              end else begin
                hold <= 1'b1;
                if (rd_mode) rxdata <= rsh;
                ph <= do_stop ? PH_STOP : PH_IDLE;
              end
            end
            PH_STOP: begin
              hold <= 1'b0;
              ph   <= PH_IDLE;
            end
            default: ph <= PH_IDLE;
          endcase
        end
      end
      if (wr) begin
        case (apb_req.paddr[7:0])
          8'h00: presc  <= (apb_req.pwdata[15:0] < 16'd2) ? 16'd2 : apb_req.pwdata[15:0];
          8'h04: txdata <= apb_req.pwdata[7:0];
          8'h08: if (!busy && |apb_req.pwdata[3:0]) begin
            do_byte  <= apb_req.pwdata[2] | apb_req.pwdata[3];
            rd_mode  <= apb_req.pwdata[3];
            do_stop  <= apb_req.pwdata[1];
            nack_cmd <= apb_req.pwdata[4];
            sh       <= txdata;
            bitn     <= '0;
            q        <= '0;
            cnt      <= presc - 1'b1;
            if (apb_req.pwdata[0]) ph <= PH_START;
            else if (apb_req.pwdata[2] | apb_req.pwdata[3]) ph <= PH_BITS;
            else ph <= PH_STOP;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    apb_rsp.pready  = 1'b1;
    apb_rsp.pslverr = 1'b0;
    apb_rsp.prdata  = '0;
    case (apb_req.paddr[7:0])
      8'h00: apb_rsp.prdata = {16'd0, presc};
      8'h04: apb_rsp.prdata = {24'd0, txdata};
      8'h08: apb_rsp.prdata = {30'd0, nack, busy};
      8'h0C: apb_rsp.prdata = {24'd0, rxdata};
      default: apb_rsp.pslverr = apb_req.psel;
    endcase
  end

endmodule
