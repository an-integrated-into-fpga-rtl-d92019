// ahb2apb: AHB-Lite slave to APB bridge with slave select decoding.
//
// Connects the CPU's AHB bus to the low-speed peripherals. Each AHB transfer
// addressed to the bridge becomes one APB transfer to the slave whose slot
// index is haddr[SLOT_BITS +: 4]; slots are 2**SLOT_BITS bytes. The AHB data
// phase is stretched (hready_out low) through the APB SETUP and ACCESS
// phases and any APB wait states; read data is returned from a register in
// the cycle hready_out rises. A PSLVERR, or a slot without a slave, gives
// the two-cycle AHB ERROR response. Only 32-bit transfers; hsize, hburst and
// hprot are ignored. A write takes 4 clocks from address phase to the end of
// the data phase with a zero-wait APB slave.
// The protocol details are standard AMBA practice chosen for this design.
module ahb2apb
  import olt_pkg::*;
#(
  parameter int NSLV      = 4,
  parameter int SLOT_BITS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // AHB-Lite slave
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  input  logic        hready_in,
  output logic        hready_out,
  output logic        hresp,
  output logic [31:0] hrdata,
  // APB master, one request/response pair per slave
  output apb_req_t    apb_req [NSLV],
  input  apb_rsp_t    apb_rsp [NSLV]
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_ACCESS, S_DONE, S_ERR1, S_ERR2} state_t;
  state_t state;

  logic [11:0] addr_r;
  logic [3:0]  slot_r;
  logic        write_r;
  logic [31:0] wdata_r;
  logic [3:0]  slot_in;
  logic        start;
  apb_rsp_t    rsp;

  assign slot_in = haddr[SLOT_BITS +: 4];
  assign start   = hsel && htrans[1] && hready_in &&
                   (state == S_IDLE || state == S_DONE || state == S_ERR2);
  always_comb begin
    rsp = '0;
    for (int i = 0; i < NSLV; i++) if (32'(slot_r) == i) rsp = apb_rsp[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      addr_r  <= '0;
      slot_r  <= '0;
      write_r <= 1'b0;
      wdata_r <= '0;
      hrdata  <= '0;
    end else begin
      case (state)
        S_SETUP: begin
          wdata_r <= hwdata;
          state   <= S_ACCESS;
        end
        S_ACCESS: if (rsp.pready) begin
          hrdata <= rsp.prdata;
          state  <= rsp.pslverr ? S_ERR1 : S_DONE;
        end
        S_ERR1:  state <= S_ERR2;
        default: state <= S_IDLE;  // S_IDLE, S_DONE, S_ERR2
      endcase
      if (start) begin
        addr_r  <= haddr[11:0] & 12'((1 << SLOT_BITS) - 1);
        slot_r  <= slot_in;
        write_r <= hwrite;
        state   <= (32'(slot_in) < NSLV) ? S_SETUP : S_ERR1;
      end
    end
  end

  always_comb begin
    hready_out = (state == S_IDLE) || (state == S_DONE) || (state == S_ERR2);
    hresp      = (state == S_ERR1) || (state == S_ERR2);
    for (int i = 0; i < NSLV; i++) begin
      apb_req[i].paddr   = addr_r;
      apb_req[i].pwrite  = write_r;
      apb_req[i].pwdata  = (state == S_SETUP) ? hwdata : wdata_r;
      apb_req[i].psel    = (state == S_SETUP || state == S_ACCESS) && (32'(slot_r) == i);
      apb_req[i].penable = (state == S_ACCESS);
    end
  end

  // APB rule: a SETUP phase is always followed by an ACCESS phase.
  a_setup_access: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SETUP) |=> (state == S_ACCESS));

endmodule
