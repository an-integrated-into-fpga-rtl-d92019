// test_core: APB-controlled bit error ratio tester for NCH transceivers.
//
// Holds the single test pattern generator, the daisy chain through all
// transceiver channels with its checker multiplexer, and the checker, and
// makes them software-controllable over APB. A measurement is: choose the
// pattern and channel, clear the counters, set a bit budget, start 'run',
// wait for 'done' and read the bit and error counts (BER = errs / bits).
//
// Register map (byte offsets, 32-bit registers, zero wait states):
//   0x00 CTRL   rw [0] gen_en  [1] run  [6:4] pattern  [11:8] channel
//                  writing a new pattern reseeds the generator
//   0x04 CMD    w  [0] clear counters  [1] reseed generator
//        STATUS r  [0] locked  [1] done  [2] run
//   0x08 BITS_LO r   0x0C BITS_HI r (bits 63:32)
//   0x10 ERRS   r    0x14 LIMIT_LO rw   0x18 LIMIT_HI rw (bits 63:32)
//   0x1C SYNCLOSS r  lock losses since the last clear
// Other offsets read 0 and answer PSLVERR. The register layout and the bit
// budget are this design's choices; the blocks follow the system description.
module test_core
  import olt_pkg::*;
#(
  parameter int NCH    = 12,
  parameter int DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  apb_req_t          apb_req,
  output apb_rsp_t          apb_rsp,
  output logic [DATA_W-1:0] tx_data [NCH],
  input  logic [DATA_W-1:0] rx_data [NCH]
);

  localparam int SEL_W = (NCH > 1) ? $clog2(NCH) : 1;

  logic        gen_en, run, gen_load, clr;
  pattern_t    pat;
  logic [3:0]  chan;
  logic [63:0] limit, bits;
  logic [31:0] errs;
  logic [15:0] sync_loss;
  logic        locked, done;
  logic [DATA_W-1:0] gen_data, chk_data;

  wire wr = apb_req.psel && apb_req.penable && apb_req.pwrite;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gen_en   <= 1'b0;
      run      <= 1'b0;
      pat      <= PAT_PRBS7;
      chan     <= '0;
      limit    <= '0;
      gen_load <= 1'b1;
      clr      <= 1'b1;
    end else begin
      gen_load <= 1'b0;
      clr      <= 1'b0;
      if (wr) begin
        case (apb_req.paddr[7:0])
          8'h00: begin
            gen_en <= apb_req.pwdata[0];
            run    <= apb_req.pwdata[1];
            chan   <= apb_req.pwdata[11:8];
            if (apb_req.pwdata[6:4] <= 3'd5) begin
              pat <= pattern_t'(apb_req.pwdata[6:4]);
              if (pattern_t'(apb_req.pwdata[6:4]) != pat) gen_load <= 1'b1;
            end
          end
          8'h04: begin
            clr      <= apb_req.pwdata[0];
            gen_load <= apb_req.pwdata[1];
          end
          8'h14: limit[31:0]  <= apb_req.pwdata;
          8'h18: limit[63:32] <= apb_req.pwdata;
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
      8'h00: apb_rsp.prdata = {20'd0, chan, 1'b0, pat, 2'b0, run, gen_en};
      8'h04: apb_rsp.prdata = {29'd0, run, done, locked};
      8'h08: apb_rsp.prdata = bits[31:0];
      8'h0C: apb_rsp.prdata = bits[63:32];
      8'h10: apb_rsp.prdata = errs;
      8'h14: apb_rsp.prdata = limit[31:0];
      8'h18: apb_rsp.prdata = limit[63:32];
      8'h1C: apb_rsp.prdata = {16'd0, sync_loss};
      default: apb_rsp.pslverr = apb_req.psel;
    endcase
  end

  pattern_gen #(.DATA_W(DATA_W)) u_gen (
    .clk, .rst_n, .en(gen_en), .load(gen_load), .pat, .data(gen_data)
  );

  chan_chain #(.NCH(NCH), .DATA_W(DATA_W)) u_chain (
    .clk, .rst_n, .gen_data, .rx_data, .sel(chan[SEL_W-1:0]), .tx_data, .chk_data
  );

  pattern_chk #(.DATA_W(DATA_W)) u_chk (
    .clk, .rst_n, .rx(chk_data), .pat, .run, .clr, .bit_limit(limit),
    .bits, .errs, .sync_loss, .locked, .done
  );

endmodule
