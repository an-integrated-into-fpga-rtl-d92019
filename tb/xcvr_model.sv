// xcvr_model: behavioural model of one transceiver channel in an optical
// loopback, for the testbenches (not synthesizable logic; the real part is a
// hard serial transceiver with PCS, PMA, CDR and PLLs plus the optical path).
// Transmit data return on the receive side after LAT clocks. Bit errors are
// drawn per bit from the CDR sampling offset in the applied settings: inside
// [EYE_L, EYE_R] (1/32 UI steps) the link is error free; d steps outside
// the eye a bit fails with probability 2^-max(1, 24-6d), i.e. about 4e-6,
// 2.4e-4, 1.6e-2 and then 0.5. A settings request is acknowledged after
// ACK_DLY clocks and the new settings take effect then. Random draws come
// from the model's own xorshift64* generator (seed SEED). 'inject' flips bit 0
// of the next received word; 'scramble' replaces received data with random
// words. Counts the bit errors it inserted.
module xcvr_model
  import olt_pkg::*;
#(
  parameter int DATA_W  = 32,
  parameter int LAT     = 3,
  parameter int EYE_L   = -9,
  parameter int EYE_R   = 8,
  parameter int ACK_DLY = 5,
  parameter longint unsigned SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic              clk,
  input  logic [DATA_W-1:0] tx_data,
  output logic [DATA_W-1:0] rx_data,
  input  xcvr_cfg_t         cfg,
  input  logic              cfg_req,
  output logic              cfg_ack,
  input  logic              inject,
  input  logic              scramble
);
  logic [DATA_W-1:0] pipe [LAT];
  int phase = 0;
  int ack_cnt = -1;
  longint inserted = 0;
  int applied = 0;
  longint unsigned rng = SEED;

  // xorshift64* generator: the model's own random source, one 32-bit draw
  function automatic int unsigned draw();
    rng ^= rng >> 12;
    rng ^= rng << 25;
    rng ^= rng >> 27;
    return int'((rng * 64'h2545_F491_4F6C_DD1D) >> 32);
  endfunction

  initial begin
    cfg_ack = 0;
    rx_data = '0;
    for (int i = 0; i < LAT; i++) pipe[i] = '0;
  end

  function automatic int err_exp(int p);
    int d;
    if (p >= EYE_L && p <= EYE_R) return 0;
    d = (p < EYE_L) ? EYE_L - p : p - EYE_R;
    return (24 - 6 * d < 1) ? 1 : 24 - 6 * d;
  endfunction

  always @(posedge clk) begin
    logic [DATA_W-1:0] w;
    int ex;
    // reconfiguration handshake
    cfg_ack <= 0;
    if (cfg_req && ack_cnt < 0 && !cfg_ack) ack_cnt = ACK_DLY;
    if (ack_cnt == 0) begin
      cfg_ack <= 1;
      phase = cfg.eye_en ? int'(cfg.eye_phase) : 0;
      applied++;
      ack_cnt = -1;
    end else if (ack_cnt > 0) ack_cnt--;
    // data path
    w = pipe[LAT-1];
    for (int i = LAT - 1; i > 0; i--) pipe[i] <= pipe[i-1];
    pipe[0] <= tx_data;
    ex = err_exp(phase);
    if (ex > 0) begin
      for (int i = 0; i < DATA_W; i++) begin
        if ((draw() >> (32 - ex)) == 0) begin
          w[i] = ~w[i];
          inserted++;
        end
      end
    end
    if (inject) begin w[0] = ~w[0]; inserted++; end
    if (scramble) w = DATA_W'(draw());
    rx_data <= w;
  end
endmodule
