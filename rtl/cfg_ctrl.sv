// cfg_ctrl: transceiver configuration controller.
//
// Gives software one place to set the tunable parameters of every
// transceiver channel: transmitter swing, pre-emphasis and common mode,
// receiver equalizer, decision feedback equalizer, gain, common mode and
// termination, and the CDR eye-scan sampling offset (1/32 UI steps) used for
// bath-tub scans. Software writes a shadow set over APB, selects a channel
// (or all channels) and issues APPLY; the shadow is copied into the applied
// settings of the target channels and their cfg_req raised. Each cfg_req
// stays high until the transceiver's reconfiguration logic answers cfg_ack.
// APPLY is ignored while any request is pending (STATUS busy).
//
// Register map (byte offsets):
//   0x00 SEL    rw [3:0] channel  [8] broadcast to all channels
//   0x04 TX     rw [2:0] vod  [7:3] pre-emphasis  [9:8] common mode   (shadow)
//   0x08 RX     rw [3:0] eq  [4] dfe_en  [7:5] gain  [9:8] vcm  [11:10] term (shadow)
//   0x0C EYE    rw [5:0] phase (signed)  [8] eye-scan enable          (shadow)
//   0x10 CMD    w  [0] apply;  r [0] busy
//   0x14/0x18/0x1C r applied TX / RX / EYE of the selected channel
// The parameter list follows the system description; field widths, register
// layout and the req/ack handshake are this design's choices.
module cfg_ctrl
  import olt_pkg::*;
#(
  parameter int NCH = 12
) (
  input  logic      clk,
  input  logic      rst_n,
  input  apb_req_t  apb_req,
  output apb_rsp_t  apb_rsp,
  output xcvr_cfg_t cfg     [NCH],
  output logic [NCH-1:0] cfg_req,
  input  logic [NCH-1:0] cfg_ack
);

  logic [3:0] sel;
  logic       bcast;
  xcvr_cfg_t  shadow, cur;
  logic       busy;

  wire wr = apb_req.psel && apb_req.penable && apb_req.pwrite;

  assign busy = |cfg_req;
  always_comb cur = (32'(sel) < NCH) ? cfg[sel] : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel     <= '0;
      bcast   <= 1'b0;
      shadow  <= '0;
      cfg_req <= '0;
      for (int i = 0; i < NCH; i++) cfg[i] <= '0;
    end else begin
      cfg_req <= cfg_req & ~cfg_ack;
      if (wr) begin
        case (apb_req.paddr[7:0])
          8'h00: begin
            sel   <= apb_req.pwdata[3:0];
            bcast <= apb_req.pwdata[8];
          end
          8'h04: begin
            shadow.tx_vod    <= apb_req.pwdata[2:0];
            shadow.tx_preemp <= apb_req.pwdata[7:3];
            shadow.tx_vcm    <= apb_req.pwdata[9:8];
          end
          8'h08: begin
            shadow.rx_eq     <= apb_req.pwdata[3:0];
            shadow.rx_dfe_en <= apb_req.pwdata[4];
            shadow.rx_gain   <= apb_req.pwdata[7:5];
            shadow.rx_vcm    <= apb_req.pwdata[9:8];
            shadow.rx_term   <= apb_req.pwdata[11:10];
          end
          8'h0C: begin
            shadow.eye_phase <= apb_req.pwdata[5:0];
            shadow.eye_en    <= apb_req.pwdata[8];
          end
          8'h10: if (apb_req.pwdata[0] && !busy) begin
            for (int i = 0; i < NCH; i++) begin
              if (bcast || 32'(sel) == i) begin
                cfg[i]     <= shadow;
                cfg_req[i] <= 1'b1;
              end
            end
          end
          default: ;
        endcase
      end
    end
  end

  function automatic logic [31:0] tx_word(xcvr_cfg_t c);
    return {22'd0, c.tx_vcm, c.tx_preemp, c.tx_vod};
  endfunction
  function automatic logic [31:0] rx_word(xcvr_cfg_t c);
    return {20'd0, c.rx_term, c.rx_vcm, c.rx_gain, c.rx_dfe_en, c.rx_eq};
  endfunction
  function automatic logic [31:0] eye_word(xcvr_cfg_t c);
    return {23'd0, c.eye_en, 2'b0, c.eye_phase};
  endfunction

  always_comb begin
    apb_rsp.pready  = 1'b1;
    apb_rsp.pslverr = 1'b0;
    apb_rsp.prdata  = '0;
    case (apb_req.paddr[7:0])
      8'h00: apb_rsp.prdata = {23'd0, bcast, 4'd0, sel};
      8'h04: apb_rsp.prdata = tx_word(shadow);
      8'h08: apb_rsp.prdata = rx_word(shadow);
      8'h0C: apb_rsp.prdata = eye_word(shadow);
      8'h10: apb_rsp.prdata = {31'd0, busy};
      8'h14: apb_rsp.prdata = tx_word(cur);
      8'h18: apb_rsp.prdata = rx_word(cur);
      8'h1C: apb_rsp.prdata = eye_word(cur);
      default: apb_rsp.pslverr = apb_req.psel;
    endcase
  end

  // handshake rule: a request stays up until its acknowledge
  for (genvar i = 0; i < NCH; i++) begin : g_hs
    a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
      (cfg_req[i] && !cfg_ack[i]) |=> cfg_req[i]);
  end

endmodule
