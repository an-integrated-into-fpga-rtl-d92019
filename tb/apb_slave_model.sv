// apb_slave_model: behavioural APB slave with 64 32-bit registers for the
// bridge testbench. WAIT extra wait states per transfer; a transfer to
// offset ERR_ADDR answers PSLVERR. Checks that PADDR/PWRITE/PWDATA stay
// stable from SETUP to the end of ACCESS and counts protocol violations.
module apb_slave_model
  import olt_pkg::*;
#(
  parameter int          WAIT     = 0,
  parameter logic [11:0] ERR_ADDR = 12'hFFF,
  parameter logic [31:0] INIT     = 32'h0
) (
  input  logic     clk,
  input  apb_req_t req,
  output apb_rsp_t rsp
);
  logic [31:0] regs [64];
  int waitc = 0;
  int violations = 0, transfers = 0;
  apb_req_t setup_q;

  initial for (int i = 0; i < 64; i++) regs[i] = INIT + 32'(i);

  always_comb begin
    rsp.pready  = req.psel && req.penable && (waitc >= WAIT);
    rsp.pslverr = rsp.pready && (req.paddr == ERR_ADDR);
    rsp.prdata  = regs[req.paddr[7:2]];
  end

  always @(posedge clk) begin
    if (req.psel && !req.penable) begin
      setup_q <= req;
      waitc   <= 0;
    end else if (req.psel && req.penable) begin
      if (req.paddr != setup_q.paddr || req.pwrite != setup_q.pwrite ||
          (req.pwrite && req.pwdata != setup_q.pwdata)) violations++;
      if (rsp.pready) begin
        transfers++;
        if (req.pwrite && !rsp.pslverr) regs[req.paddr[7:2]] <= req.pwdata;
        waitc <= 0;
      end else waitc <= waitc + 1;
    end
  end
endmodule
