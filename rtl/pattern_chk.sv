// pattern_chk: self-synchronising test pattern checker with BER counters.
//
// The checker plays the comparator and counters of a bit error ratio tester.
// It predicts each received word from the 31 previous bits. While not locked
// the prediction is made from the received bits themselves (the checker
// re-seeds from the line); after LOCK_WORDS consecutive error-free words it
// locks and runs its own copy of the pattern free, so every line error is
// counted once. LOSS_WORDS consecutive words with errors drop the lock, and so does a
// change of 'pat'. Words of all zeros or all ones never count towards lock,
// so an idle or stuck line cannot fake a lock (no supported pattern has
// such a word for DATA_W = 32).
//
// While 'run' is high and the measurement is not done, every word adds
// DATA_W to 'bits' and the number of mismatching bits to 'errs', whether or
// not locked: an unlockable signal then reads close to BER 0.5. 'bit_limit'
// (0 = none) ends the measurement when 'bits' reaches it ('done'). 'clr'
// clears counters and 'done'. 'sync_loss' counts lock losses.
// Counters update one clock after the word arrives. The 64-bit bit counter
// covers the 3e15 bits of a 95 % confidence test at BER 1e-15. The lock/loss rule,
// counter widths and bit limit are this design's choices.
module pattern_chk
  import olt_pkg::*;
#(
  parameter int DATA_W     = 32,
  parameter int LOCK_WORDS = 4,
  parameter int LOSS_WORDS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] rx,
  input  pattern_t          pat,
  input  logic              run,
  input  logic              clr,
  input  logic [63:0]       bit_limit,
  output logic [63:0]       bits,
  output logic [31:0]       errs,
  output logic [15:0]       sync_loss,
  output logic              locked,
  output logic              done
);

  logic [HIST_W-1:0]   hist;
  logic [HIST_W+255:0] step;
  logic [DATA_W-1:0]   expect_w, diff;
  logic [7:0]          good_cnt, bad_cnt;
  logic [$clog2(DATA_W+1)-1:0] nerr;
  logic [255:0]        rx_ext;
  logic                counting;
  pattern_t            pat_q;

  always_comb begin
    rx_ext = '0;
    rx_ext[DATA_W-1:0] = rx;
    // unlocked: new history from received bits; locked: from prediction
    step     = pat_step(pat, hist, DATA_W, rx_ext, !locked);
    expect_w = step[DATA_W-1:0];
    diff     = expect_w ^ rx;
    nerr     = '0;
    for (int i = 0; i < DATA_W; i++) nerr += diff[i];
  end

  assign counting = run && !done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist      <= '0;
      pat_q     <= PAT_PRBS7;
      locked    <= 1'b0;
      good_cnt  <= '0;
      bad_cnt   <= '0;
      bits      <= '0;
      errs      <= '0;
      sync_loss <= '0;
      done      <= 1'b0;
    end else begin
      hist <= step[HIST_W+255:256];
      pat_q <= pat;
      // lock state machine; a change of pattern forces a new search
      if (pat != pat_q) begin
        locked   <= 1'b0;
        good_cnt <= '0;
        bad_cnt  <= '0;
      end else if (!locked) begin
        bad_cnt <= '0;
        if (diff == '0 && rx != '0 && rx != '1) begin
          if (good_cnt == 8'(LOCK_WORDS - 1)) begin
            locked   <= 1'b1;
            good_cnt <= '0;
          end else good_cnt <= good_cnt + 1'b1;
        end else good_cnt <= '0;
      end else begin
        if (diff != '0) begin
          if (bad_cnt == 8'(LOSS_WORDS - 1)) begin
            locked    <= 1'b0;
            bad_cnt   <= '0;
            sync_loss <= sync_loss + 1'b1;
          end else bad_cnt <= bad_cnt + 1'b1;
        end else bad_cnt <= '0;
      end
      // counters
      if (clr) begin
        bits      <= '0;
        errs      <= '0;
        done      <= 1'b0;
        sync_loss <= '0;
      end else if (counting) begin
        bits <= bits + 64'(DATA_W);
        if (errs > 32'hFFFF_FFFF - 32'(DATA_W)) errs <= 32'hFFFF_FFFF;
        else errs <= errs + 32'(nerr);
        if (bit_limit != '0 && bits + 64'(DATA_W) >= bit_limit) done <= 1'b1;
      end
    end
  end

endmodule
