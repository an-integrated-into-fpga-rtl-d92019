// chan_chain: transceiver daisy chain and checker multiplexer.
//
// One pattern generator tests all channels: the generator word goes to the
// transmitter of channel 0, and the word received on channel i (its own data
// returned through the optical loopback) is retransmitted on channel i+1. A
// parallel multiplexer connects the receive data of channel 'sel' to the
// checker, so selecting channel k checks the path through channels 0..k.
// Every hop and the multiplexer output carry one register stage (this
// design's choice, for timing closure); all channels share one parallel
// clock. 'sel' values of NCH and above select channel NCH-1.
module chan_chain #(
  parameter int NCH    = 12,
  parameter int DATA_W = 32,
  localparam int SEL_W = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] gen_data,
  input  logic [DATA_W-1:0] rx_data [NCH],
  input  logic [SEL_W-1:0]  sel,
  output logic [DATA_W-1:0] tx_data [NCH],
  output logic [DATA_W-1:0] chk_data
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) tx_data[i] <= '0;
      chk_data <= '0;
    end else begin
      tx_data[0] <= gen_data;
      for (int i = 1; i < NCH; i++) tx_data[i] <= rx_data[i-1];
      if (32'(sel) < NCH) chk_data <= rx_data[sel];
      else chk_data <= rx_data[NCH-1];
    end
  end

endmodule
