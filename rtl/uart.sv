// uart: APB UART for the control terminal.
//
// 8 data bits, no parity, one stop bit, LSB first. DIV is the bit period in
// clocks. The receiver samples the middle of each bit after a start edge
// and checks the stop bit. One byte of buffering each way.
//
// Register map (byte offsets):
//   0x00 DATA   w: send byte (ignored while tx busy)   r: received byte,
//               reading clears rx_valid
//   0x04 STATUS r: [0] tx busy  [1] rx_valid  [2] overrun  [3] framing error
//               w: writing 1 to bit 2/3 clears that flag
//   0x08 DIV    rw: [15:0] clocks per bit (minimum 4)
// Framing, buffering, register layout and the reset divider (115200 baud at
// 50 MHz) are this design's choices.
module uart
  import olt_pkg::*;
#(
  parameter logic [15:0] DIV_RST = 16'd434
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb_req,
  output apb_rsp_t apb_rsp,
  output logic     txd,
  input  logic     rxd
);

  logic [15:0] div;
  // transmitter
  logic [9:0]  tx_sh;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;
  logic        tx_busy;
  // receiver
  logic [1:0]  rx_sync;
  logic        rx_act;
  logic [15:0] rx_cnt;
  logic [3:0]  rx_bits;
  logic [8:0]  rx_sh;
  logic [7:0]  rx_data;
  logic        rx_valid, overrun, frame_err;

  wire wr = apb_req.psel && apb_req.penable && apb_req.pwrite;
  wire rd = apb_req.psel && apb_req.penable && !apb_req.pwrite;

  assign tx_busy = (tx_bits != 0);
  assign txd     = tx_sh[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div       <= DIV_RST;
      tx_sh     <= '1;
      tx_bits   <= '0;
      tx_cnt    <= '0;
      rx_sync   <= '1;
      rx_act    <= 1'b0;
      rx_cnt    <= '0;
      rx_bits   <= '0;
      rx_sh     <= '0;
      rx_data   <= '0;
      rx_valid  <= 1'b0;
      overrun   <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      // ---------------- transmitter
      if (tx_busy) begin
        if (tx_cnt == div - 1'b1) begin
          tx_cnt  <= '0;
          tx_sh   <= {1'b1, tx_sh[9:1]};
          tx_bits <= tx_bits - 1'b1;
        end else tx_cnt <= tx_cnt + 1'b1;
      end
      // ---------------- receiver
      rx_sync <= {rx_sync[0], rxd};
      if (!rx_act) begin
        if (!rx_sync[1]) begin           // start bit seen
          rx_act  <= 1'b1;
          rx_cnt  <= {1'b0, div[15:1]};  // half a bit to the middle
          rx_bits <= 4'd10;
        end
      end else if (rx_cnt == 0) begin
        rx_cnt  <= div - 1'b1;
        rx_bits <= rx_bits - 1'b1;
        rx_sh   <= {rx_sync[1], rx_sh[8:1]};
        if (rx_bits == 4'd10 && rx_sync[1]) rx_act <= 1'b0;  // false start
        if (rx_bits == 4'd1) begin
          rx_act <= 1'b0;
          if (!rx_sync[1]) frame_err <= 1'b1;
          else begin
            rx_data  <= rx_sh[8:1];
            if (rx_valid) overrun <= 1'b1;
            rx_valid <= 1'b1;
          end
        end
      end else rx_cnt <= rx_cnt - 1'b1;
      // ---------------- APB
      if (rd && apb_req.paddr[7:0] == 8'h00) rx_valid <= 1'b0;
      if (wr) begin
        case (apb_req.paddr[7:0])
          8'h00: if (!tx_busy) begin
            tx_sh   <= {1'b1, apb_req.pwdata[7:0], 1'b0};
            tx_bits <= 4'd10;
            tx_cnt  <= '0;
          end
          8'h04: begin
            if (apb_req.pwdata[2]) overrun   <= 1'b0;
            if (apb_req.pwdata[3]) frame_err <= 1'b0;
          end
          8'h08: div <= (apb_req.pwdata[15:0] < 16'd4) ? 16'd4 : apb_req.pwdata[15:0];
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
      8'h00: apb_rsp.prdata = {24'd0, rx_data};
      8'h04: apb_rsp.prdata = {28'd0, frame_err, overrun, rx_valid, tx_busy};
      8'h08: apb_rsp.prdata = {16'd0, div};
      default: apb_rsp.pslverr = apb_req.psel;
    endcase
  end

endmodule
