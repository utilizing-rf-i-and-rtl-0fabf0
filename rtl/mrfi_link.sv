// mrfi_link: behavioural model of a multi-band RF interconnect (MRF-I).
//
// BEHAVIOURAL MODEL of an analog part: the real link is a set of ASK
// transmitters, shared VCOs, differential transmission lines and envelope
// receivers. Each differential line carries NUM_BANDS RF carriers at once,
// and each logical channel owns one band on every line, so NUM_BANDS
// independent words of WORD_W bits cross WORD_W lines in parallel.
//
// Model: transmitter k turns bit p of word k into amplitude AMP_ON or 0 on
// band k of line p (amplitude-shift keying). The line is a set of per-band
// amplitudes that arrive LATENCY clocks later, scaled by ATTEN/8. The
// receiver for band k compares the band's envelope with half of the received
// on-level and recovers the bit. Band separation is ideal; LATENCY, AMP_ON
// and ATTEN are this model's assumptions.
module mrfi_link #(
  parameter int unsigned NUM_BANDS = 4,
  parameter int unsigned WORD_W    = 8,
  parameter int unsigned LATENCY   = 1,
  parameter int unsigned AMP_ON    = 12,
  parameter int unsigned ATTEN     = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] tx_word [NUM_BANDS],
  output logic [WORD_W-1:0] rx_word [NUM_BANDS]
);

  typedef logic [7:0] amp_t;

  amp_t line_in  [WORD_W][NUM_BANDS];
  amp_t line_q   [LATENCY][WORD_W][NUM_BANDS];

  localparam int unsigned RX_ON  = (AMP_ON * ATTEN) / 8;
  localparam int unsigned THRESH = RX_ON / 2;
  // A keyed carrier arrives at the far end scaled by ATTEN/8; the carrier
  // is either off or at AMP_ON, so the received level is a constant.
  localparam amp_t        RX_AMP = amp_t'(RX_ON);

  // ASK modulation: one carrier per band, keyed by the channel's bit.
  always_comb begin
    for (int p = 0; p < WORD_W; p++)
      for (int k = 0; k < NUM_BANDS; k++)
        line_in[p][k] = tx_word[k][p] ? amp_t'(AMP_ON) : amp_t'(0);
  end

  // Propagation along the line with attenuation.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LATENCY; s++)
        for (int p = 0; p < WORD_W; p++)
          for (int k = 0; k < NUM_BANDS; k++) line_q[s][p][k] <= '0;
    end else begin
      for (int p = 0; p < WORD_W; p++)
        for (int k = 0; k < NUM_BANDS; k++)
          line_q[0][p][k] <= (line_in[p][k] == amp_t'(AMP_ON)) ? RX_AMP : '0;
      for (int s = 1; s < LATENCY; s++) line_q[s] <= line_q[s-1];
    end
  end

  // Envelope detection per band.
  always_comb begin
    for (int k = 0; k < NUM_BANDS; k++)
      for (int p = 0; p < WORD_W; p++)
        rx_word[k][p] = line_q[LATENCY-1][p][k] > amp_t'(THRESH);
  end

endmodule
