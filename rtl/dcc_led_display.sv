// dcc_led_display: front-panel status LEDs and their serial driver.
//
// 24 LEDs in three groups, each off, on or blinking:
//   LED 0 VME  activity             off: none          on: activity
//   LED 1 TTC  TTC status           off: not ready     on: ready     blink: error
//   LED 2 L1A  level-1 accepts      off: none          on: present
//   LED 3 DAQ  S-Link64             off: not enabled   on: sending   blink: error
//   LED 4 DCC  DCC status           off: not enabled   on: running   blink: errors
//   LED 5-8    RDY, BSY, OFW, SYN: the TTS outputs
//   LED 9-23   HTR 0..14            off: disabled/no data  on: data  blink: errors
// Short events (VME access, L1A, S-Link words, HTR blocks, HTR errors) and
// the TTS bits are stretched to STRETCH clocks so that they can be seen
// (100 ms at 40 MHz by default). Blinking LEDs toggle every BLINK clocks.
// The 24 states are shifted out continuously, LED 23 first, on
// led_sclk/led_sdata with one led_latch pulse after each frame; sdata
// changes on the falling edge of sclk and sclk runs at clk / 2^(SCLK_DIV+1).
// The LED list and meanings follow the specification; the stretch time,
// the blink period and the serial protocol are this design's.
module dcc_led_display
  import dcc_pkg::*;
#(
  parameter int STRETCH  = 4_000_000,
  parameter int BLINK    = 8_000_000,
  parameter int SCLK_DIV = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             vme_act,
  input  logic             ttc_ready,
  input  logic             ttc_err,
  input  logic             l1a,
  input  logic             daq_en,
  input  logic             daq_word,
  input  logic             daq_err,
  input  logic             dcc_en,
  input  logic             dcc_err,
  input  logic [3:0]       tts,          // RDY,BSY,SYN,OFW
  input  logic [N_HTR-1:0] htr_en,
  input  logic [N_HTR-1:0] htr_data,
  input  logic [N_HTR-1:0] htr_err,
  output logic [23:0]      led,          // present LED state (1 = lit)
  output logic             led_sclk,
  output logic             led_sdata,
  output logic             led_latch
);
  localparam int SW = $clog2(STRETCH + 1);
  localparam int BW = $clog2(BLINK + 1);
  localparam int NS = 4 + 4 + 2 * N_HTR;   // stretched signals

  logic [NS-1:0] ev_in, held;
  logic [SW-1:0] st [NS];
  logic [BW-1:0] bcnt;
  logic          blink;

  // stretched: vme, l1a, daq word, ttc err, tts[3:0], htr data, htr err
  assign ev_in = {htr_err, htr_data, tts, ttc_err, daq_word, l1a, vme_act};

  always_ff @(posedge clk) begin
    for (int i = 0; i < NS; i++) begin
      if (rst)           st[i] <= '0;
      else if (ev_in[i]) st[i] <= SW'(STRETCH);
      else if (st[i] != 0) st[i] <= st[i] - 1'b1;
    end
  end
  always_comb for (int i = 0; i < NS; i++) held[i] = ev_in[i] || st[i] != 0;

  always_ff @(posedge clk) begin
    if (rst) begin
      bcnt <= '0; blink <= 1'b0;
    end else if (bcnt == BW'(BLINK - 1)) begin
      bcnt <= '0; blink <= !blink;
    end else begin
      bcnt <= bcnt + 1'b1;
    end
  end

  always_comb begin
    logic h_ttc_err, h_tts0, h_tts1, h_tts2, h_tts3;
    h_ttc_err = held[3];
    {h_tts3, h_tts2, h_tts1, h_tts0} = held[7:4];
    led[0] = held[0];
    led[1] = h_ttc_err ? blink : ttc_ready;
    led[2] = held[1];
    led[3] = !daq_en ? 1'b0 : (daq_err ? blink : held[2]);
    led[4] = !dcc_en ? 1'b0 : (dcc_err ? blink : 1'b1);
    led[5] = h_tts3;   // RDY
    led[6] = h_tts2;   // BSY
    led[7] = h_tts0;   // OFW
    led[8] = h_tts1;   // SYN
    for (int i = 0; i < N_HTR; i++)
      led[9+i] = !htr_en[i] ? 1'b0 : (held[8+N_HTR+i] ? blink : held[8+i]);
  end

  // serial shifter
  logic [SCLK_DIV:0] div;
  logic [4:0]        bitn;
  logic [23:0]       frame;

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0; bitn <= '0; frame <= '0; led_sclk <= 1'b0; led_sdata <= 1'b0; led_latch <= 1'b0;
    end else begin
      div <= div + 1'b1;
      led_latch <= 1'b0;
      if (div == '0) begin
        // falling edge: present the next bit
        led_sclk <= 1'b0;
        if (bitn == 5'd0) frame <= led;
        led_sdata <= (bitn == 5'd0) ? led[23] : frame[23 - bitn];
      end else if (div == {1'b1, {SCLK_DIV{1'b0}}}) begin
        led_sclk <= 1'b1;
        if (bitn == 5'd23) begin
          bitn      <= '0;
          led_latch <= 1'b1;
        end else begin
          bitn <= bitn + 1'b1;
        end
      end
    end
  end
endmodule
