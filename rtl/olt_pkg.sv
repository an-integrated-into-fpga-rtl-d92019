// olt_pkg: types and constants shared by the optical link test system.
//
// Holds the APB request/response bundles used between the AHB-to-APB bridge
// and its peripherals, the test pattern encoding and the tap table of the
// pattern recurrences, and the per-channel transceiver settings bundle.
// The PRBS lengths 7/15/23/31 and the LF/HF pattern kinds follow the system
// description; polynomials (ITU-T O.150), LF/HF contents, field widths and
// the register layouts are this design's own choices.
package olt_pkg;

  // ---------------------------------------------------------------- APB
  typedef struct packed {
    logic [11:0] paddr;    // byte address inside the slave's slot
    logic        psel;
    logic        penable;
    logic        pwrite;
    logic [31:0] pwdata;
  } apb_req_t;

  typedef struct packed {
    logic [31:0] prdata;
    logic        pready;
    logic        pslverr;
  } apb_rsp_t;

  // ------------------------------------------------------- test patterns
  typedef enum logic [2:0] {
    PAT_PRBS7  = 3'd0,
    PAT_PRBS15 = 3'd1,
    PAT_PRBS23 = 3'd2,
    PAT_PRBS31 = 3'd3,
    PAT_LF     = 3'd4,   // 10 ones, 10 zeros
    PAT_HF     = 3'd5    // 1010...
  } pattern_t;

  // Every pattern obeys s[n] = s[n-TAP_A] ^ s[n-TAP_B] (TAP_B = 0: s[n] = s[n-TAP_A]).
  // PRBS x^A + x^B + 1 (ITU-T O.150 polynomials).
  localparam int HIST_W = 31;  // longest recurrence span (PRBS31)

  function automatic int tap_a(pattern_t p);
    case (p)
      PAT_PRBS7:  return 7;
      PAT_PRBS15: return 15;
      PAT_PRBS23: return 23;
      PAT_PRBS31: return 31;
      PAT_LF:     return 20;
      default:    return 2;
    endcase
  endfunction

  function automatic int tap_b(pattern_t p);
    case (p)
      PAT_PRBS7:  return 6;
      PAT_PRBS15: return 14;
      PAT_PRBS23: return 18;
      PAT_PRBS31: return 28;
      default:    return 0;
    endcase
  endfunction

  // Seed history (bit HIST_W-1 is the most recent bit) loaded by the generator.
  function automatic logic [HIST_W-1:0] pat_seed(pattern_t p);
    case (p)
      PAT_LF:  return 31'h001FF801;  // last 20 bits: 10 ones, then 10 zeros
      PAT_HF:  return 31'h55555555;
      default: return '1;            // PRBS: all ones
    endcase
  endfunction

  // Advance a pattern by W bits. hist holds the last HIST_W bits, bit
  // HIST_W-1 the most recent. Returns {new_hist, word}; word bit 0 is the
  // first of the W new bits. If 'ref_bits' is given (use_ref=1) the new
  // history is built from those bits instead of the predicted ones, which
  // lets a checker re-seed itself from received data.
  function automatic logic [HIST_W+255:0] pat_step(pattern_t p, logic [HIST_W-1:0] hist,
                                                   int w, logic [255:0] ref_bits, logic use_ref);
    logic [HIST_W+255:0] e;  // e[0..HIST_W-1] history oldest first, then new bits
    logic [HIST_W+255:0] r;  // same, but with the reference bits as new bits
    logic [255:0] word;
    int a, b;
    a = tap_a(p);
    b = tap_b(p);
    e = '0;
    r = '0;
    e[HIST_W-1:0] = hist;
    r[HIST_W-1:0] = hist;
    word = '0;
    for (int i = 0; i < 256; i++) begin
      if (i < w) begin
        e[HIST_W+i] = (b == 0) ? e[HIST_W+i-a] : (e[HIST_W+i-a] ^ e[HIST_W+i-b]);
        word[i] = e[HIST_W+i];
        r[HIST_W+i] = ref_bits[i];
      end
    end
    // new history = the last HIST_W bits of the extended sequence
    if (use_ref) e = r;
    e = e >> w;
    return {e[HIST_W-1:0], word};
  endfunction

  // ------------------------------------------------ transceiver settings
  typedef struct packed {
    logic [2:0]       tx_vod;      // differential output swing
    logic [4:0]       tx_preemp;   // pre-emphasis
    logic [1:0]       tx_vcm;      // output common mode
    logic [3:0]       rx_eq;       // equalizer
    logic             rx_dfe_en;   // decision feedback equalizer enable
    logic [2:0]       rx_gain;     // DC gain
    logic [1:0]       rx_vcm;      // input common mode
    logic [1:0]       rx_term;     // on-chip termination
    logic             eye_en;      // eye-scan phase offset active
    logic signed [5:0] eye_phase;  // CDR sampling offset, 1/32 UI steps, -16..+16
  } xcvr_cfg_t;

endpackage
