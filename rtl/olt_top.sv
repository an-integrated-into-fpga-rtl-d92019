// olt_top: FPGA-integrated optical link test system (second generation).
//
// The soft-CPU side of the system (processor, debug unit, boot ROM, on-chip
// and external memory) reaches this logic over AMBA AHB; here an AHB-Lite
// slave port feeds the AHB-to-APB bridge, which serves four peripherals:
//   slot 0 (0x000) uart        control terminal
//   slot 1 (0x100) i2c_master  optical module management (I/V/T monitor, control)
//   slot 2 (0x200) test_core   pattern generator, channel daisy chain,
//                              checker multiplexer and checker with BER counters
//   slot 3 (0x300) cfg_ctrl    per-channel transceiver PMA/CDR settings,
//                              including the eye-scan phase offset
// Towards the NCH transceivers the top carries the parallel transmit and
// receive data of every channel and each channel's settings with a req/ack
// reconfiguration handshake. One clock for all logic, synchronous active-low
// reset. The block structure and channel count follow the system
// description; the slot map, data width and handshakes are this design's.
module olt_top
  import olt_pkg::*;
#(
  parameter int NCH    = 12,
  parameter int DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // AHB-Lite slave port
  input  logic              hsel,
  input  logic [31:0]       haddr,
  input  logic [1:0]        htrans,
  input  logic              hwrite,
  input  logic [31:0]       hwdata,
  input  logic              hready_in,
  output logic              hready_out,
  output logic              hresp,
  output logic [31:0]       hrdata,
  // transceiver parallel data and configuration
  output logic [DATA_W-1:0] xcvr_tx_data [NCH],
  input  logic [DATA_W-1:0] xcvr_rx_data [NCH],
  output xcvr_cfg_t         xcvr_cfg     [NCH],
  output logic [NCH-1:0]    xcvr_cfg_req,
  input  logic [NCH-1:0]    xcvr_cfg_ack,
  // I2C (open drain: *_oe pulls low)
  output logic              scl_oe,
  output logic              sda_oe,
  input  logic              scl_i,
  input  logic              sda_i,
  // control terminal
  output logic              uart_txd,
  input  logic              uart_rxd
);

  localparam int NSLV = 4;

  apb_req_t apb_req [NSLV];
  apb_rsp_t apb_rsp [NSLV];

  ahb2apb #(.NSLV(NSLV), .SLOT_BITS(8)) u_bridge (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hready_in,
    .hready_out, .hresp, .hrdata, .apb_req, .apb_rsp
  );

  uart u_uart (
    .clk, .rst_n, .apb_req(apb_req[0]), .apb_rsp(apb_rsp[0]),
    .txd(uart_txd), .rxd(uart_rxd)
  );

  i2c_master u_i2c (
    .clk, .rst_n, .apb_req(apb_req[1]), .apb_rsp(apb_rsp[1]),
    .scl_oe, .sda_oe, .scl_i, .sda_i
  );

  test_core #(.NCH(NCH), .DATA_W(DATA_W)) u_test (
    .clk, .rst_n, .apb_req(apb_req[2]), .apb_rsp(apb_rsp[2]),
    .tx_data(xcvr_tx_data), .rx_data(xcvr_rx_data)
  );

  cfg_ctrl #(.NCH(NCH)) u_cfg (
    .clk, .rst_n, .apb_req(apb_req[3]), .apb_rsp(apb_rsp[3]),
    .cfg(xcvr_cfg), .cfg_req(xcvr_cfg_req), .cfg_ack(xcvr_cfg_ack)
  );

endmodule
