// dcc_event_builder: assembles one DCC event payload per trigger.
//
// Trigger-driven: when a trigger entry is waiting in the L1A FIFO and the
// CDF framer is free, the entry is popped and the builder waits until every
// enabled HTR input holds a complete block for that event, or until
// `timeout` clocks have passed (4000 = 100 us at 40 MHz by default). The
// event number of each HTR block is compared with the trigger's: a block
// whose number is older is stale and is dropped, and the wait goes on; a
// block whose number is newer is left for a later event and the HTR counts
// as missing. Either case sets the HTR's E bit. The payload is then sent
// as 32-bit words on a valid/ready stream to the framer:
//   word 0      DCC header 0: 000, HTR status[14:0], 6 zero bits, format version
//   word 1      DCC error summary (from the error counters)
//   words 2-16  one summary per HTR: EVT_Status[7:0], LRB_Errors, E, P, V,
//               000, word count (16-bit words)
//   words 17-19 zeroes
//   then the 32-bit words of every present HTR block, HTR 0 first.
// In the cycle after the wait ends the builder pulses the error inputs of
// the error counters: EVT_Status of each present HTR, and the DCC EvN and
// BcN mis-match conditions (L1A or calibration variants). The layout, the
// timeout and the mismatch policy follow the specification; the meanings
// of E, P, V and of the header HTR status bits, the field positions inside
// header word 0 and the stale/newer rule are this design's reading.
module dcc_event_builder
  import dcc_pkg::*;
#(
  parameter int TIMEOUT_W = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  // registers
  input  logic [N_HTR-1:0]     htr_enable,
  input  logic [TIMEOUT_W-1:0] timeout,
  input  logic [7:0]           fmt_ver,
  input  logic [31:0]          err_summary,
  // trigger FIFO
  input  logic                 l1a_empty,
  input  l1a_entry_t           l1a_head,
  output logic                 l1a_pop,
  // HTR input buffers
  input  logic [N_HTR-1:0]     desc_valid,
  input  htr_desc_t            desc    [N_HTR],
  input  logic [31:0]          rd_data [N_HTR],
  output logic [N_HTR-1:0]     rd_en,
  output logic [N_HTR-1:0]     desc_pop,
  output logic [N_HTR-1:0]     drop,
  // framer
  input  logic                 framer_busy,
  output logic                 start,
  output l1a_entry_t           ev,
  output logic                 p_valid,
  output logic [31:0]          p_data,
  output logic                 p_last,
  input  logic                 p_ready,
  // error and activity pulses
  output logic [N_HTR_ERR-1:0] htr_err [N_HTR],
  output logic [N_DCC_ERR-1:0] dcc_err,
  output logic                 timed_out,
  output logic                 dropped_any
);
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_START, S_HDRS, S_DATA} state_e;
  state_e state;

  logic [TIMEOUT_W-1:0] timer;
  logic [N_HTR-1:0]     emism, present, remaining, match_v, stale_v, ahead_v, done_v;
  htr_desc_t            snap [N_HTR];
  logic [4:0]           idx;
  logic [WC_W-1:0]      wcnt;
  logic [3:0]           cur;
  logic                 wait_done, tmo;

  // classification of the head block of every input
  always_comb begin
    for (int i = 0; i < N_HTR; i++) begin
      logic [EVN_W-1:0] diff;
      diff       = ev.evn - desc[i].evn;
      match_v[i] = htr_enable[i] && desc_valid[i] && diff == '0;
      stale_v[i] = htr_enable[i] && desc_valid[i] && diff != '0 && !diff[EVN_W-1];
      ahead_v[i] = htr_enable[i] && desc_valid[i] && diff[EVN_W-1];
      done_v[i]  = !htr_enable[i] || match_v[i] || ahead_v[i];
    end
  end
  assign tmo       = timer >= timeout;
  assign wait_done = (state == S_WAIT) && (&done_v || tmo);
  assign drop      = (state == S_WAIT && !wait_done) ? stale_v : '0;

  // lowest-numbered HTR still to be sent
  always_comb begin
    cur = '0;
    for (int i = N_HTR-1; i >= 0; i--) if (remaining[i]) cur = 4'(i);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      state <= S_IDLE; timer <= '0; emism <= '0; present <= '0; remaining <= '0;
      idx <= '0; wcnt <= '0; ev <= '0; timed_out <= 1'b0; dropped_any <= 1'b0;
      for (int i = 0; i < N_HTR; i++) snap[i] <= '0;
    end else begin
      timed_out   <= 1'b0;
      dropped_any <= |drop;
      case (state)
        S_IDLE: if (!l1a_empty && !framer_busy) begin
          ev    <= l1a_head;
          timer <= '0;
          emism <= '0;
          state <= S_WAIT;
        end
        S_WAIT: begin
          timer <= timer + 1'b1;
          emism <= emism | stale_v | ahead_v;
          if (wait_done) begin
            present   <= match_v;
            remaining <= match_v;
            timed_out <= !(&done_v);
            for (int i = 0; i < N_HTR; i++) snap[i] <= match_v[i] ? desc[i] : '0;
            state     <= S_START;
          end
        end
        S_START: begin
          idx   <= '0;
          state <= S_HDRS;
        end
        S_HDRS: if (p_ready) begin
          idx <= idx + 1'b1;
          if (idx == 5'd19) begin
            wcnt  <= '0;
            state <= (present == '0) ? S_IDLE : S_DATA;
          end
        end
        S_DATA: if (p_ready) begin
          if (wcnt == snap[cur].wc32 - 1'b1) begin
            wcnt           <= '0;
            remaining[cur] <= 1'b0;
            if ((remaining & ~(N_HTR'(1) << cur)) == '0) state <= S_IDLE;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign l1a_pop = (state == S_IDLE) && !l1a_empty && !framer_busy && !rst && !clear;
  assign start   = (state == S_START);

  // payload words
  always_comb begin
    logic [N_HTR-1:0] hstat;
    for (int i = 0; i < N_HTR; i++)
      hstat[i] = htr_enable[i] && (!present[i] || emism[i] || |snap[i].evt_status[7:0] || |snap[i].lrb_err);
    p_valid  = 1'b0;
    p_data   = '0;
    p_last   = 1'b0;
    rd_en    = '0;
    desc_pop = '0;
    if (state == S_HDRS) begin
      p_valid = 1'b1;
      if (idx == 5'd0)
        p_data = {3'b000, hstat, 6'b000000, fmt_ver};
      else if (idx == 5'd1)
        p_data = err_summary;
      else if (idx <= 5'd16)
        p_data = {snap[idx-2].evt_status[7:0], snap[idx-2].lrb_err,
                  emism[idx-2], present[idx-2], htr_enable[idx-2], 3'b000, snap[idx-2].wc16};
      p_last = (idx == 5'd19) && (present == '0);
    end else if (state == S_DATA) begin
      p_valid = 1'b1;
      p_data  = rd_data[cur];
      p_last  = (wcnt == snap[cur].wc32 - 1'b1) && ((remaining & ~(N_HTR'(1) << cur)) == '0);
      rd_en[cur]    = p_ready;
      desc_pop[cur] = p_ready && (wcnt == snap[cur].wc32 - 1'b1);
    end
  end

  // error pulses, one cycle, in S_START
  logic bcn_bad;
  always_comb begin
    bcn_bad = 1'b0;
    for (int i = 0; i < N_HTR; i++) if (present[i] && snap[i].bcn != ev.bcn) bcn_bad = 1'b1;
  end

  always_comb begin
    dcc_err = '0;
    for (int i = 0; i < N_HTR; i++) htr_err[i] = (state == S_START) ? snap[i].evt_status : '0;
    if (state == S_START) begin
      if (ev.calib) begin
        dcc_err[DERR_EVN_CAL] = |emism;
        dcc_err[DERR_BCN_CAL] = bcn_bad;
      end else begin
        dcc_err[DERR_EVN_L1A] = |emism;
        dcc_err[DERR_BCN_L1A] = bcn_bad;
      end
    end
  end
endmodule
