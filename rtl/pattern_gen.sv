// pattern_gen: parallel test pattern generator.
//
// Produces DATA_W bits of the selected test pattern per clock for the
// transmitter's parallel interface: PRBS7, PRBS15, PRBS23, PRBS31 (the four
// lengths the system uses), an LF pattern and an HF pattern. All patterns are
// computed from one recurrence s[n] = s[n-A] ^ s[n-B] over the last 31 bits
// (see olt_pkg::pat_step), so the generator is a 31-bit history register and
// the combinational unrolling of DATA_W recurrence steps.
//
// Interface: 'load' (re)seeds the history for 'pat' (all ones for PRBS, fixed
// phase for LF/HF); 'en' advances one word per clock. 'data' is registered
// and valid one clock after the step; bit 0 is the first bit on the line.
// Polynomials (ITU-T O.150), the LF/HF contents, DATA_W and the seed are this
// design's choices; the pattern set comes from the system description.
module pattern_gen
  import olt_pkg::*;
#(
  parameter int DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              load,
  input  pattern_t          pat,
  output logic [DATA_W-1:0] data
);

  logic [HIST_W-1:0] hist;
  logic [HIST_W+255:0] step;

  always_comb step = pat_step(pat, hist, DATA_W, '0, 1'b0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist <= pat_seed(PAT_PRBS7);
      data <= '0;
    end else if (load) begin
      hist <= pat_seed(pat);
      data <= '0;
    end else if (en) begin
      hist <= step[HIST_W+255:256];
      data <= step[DATA_W-1:0];
    end
  end

  initial begin
    assert (DATA_W >= 1 && DATA_W <= 256) else $error("DATA_W out of range");
  end

endmodule
