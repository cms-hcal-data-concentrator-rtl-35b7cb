// dcc_pkg: types and constants shared by the HCAL Data Concentrator Card
// (DCC) DAQ logic.
//
// The numbers that come from the DCC specification are the 15 HTR inputs,
// the 24-bit event number, the 12-bit bunch count with 3564 bunches per
// orbit, the 15 HTR status bits, the 11 DCC error conditions, the TTS state
// encodings (RDY,BSY,SYN,OFW) and the CDF markers BOE_1 = 0x5 and
// EOE_1 = 0xA. The structure layouts (trigger entry, HTR block descriptor,
// register bundle) are this design's own packing of those fields.
package dcc_pkg;

  localparam int N_HTR        = 15;    // active HTR inputs
  localparam int EVN_W        = 24;    // event number width
  localparam int BCN_W        = 12;    // bunch count width
  localparam int BX_PER_ORBIT = 3564;  // BcN runs 0..3563
  localparam int N_HTR_ERR    = 15;    // EVT_Status bits 14..0
  localparam int N_DCC_ERR    = 11;    // DCC error counters c0..ca
  localparam int WC_W         = 10;    // word count field of the HTR summary word

  localparam logic [3:0] BOE_1 = 4'h5;
  localparam logic [3:0] EOE_1 = 4'hA;

  // TTS values, bit order RDY,BSY,SYN,OFW
  typedef enum logic [3:0] {
    TTS_DISCONNECTED = 4'b0000,
    TTS_OFW          = 4'b0001,
    TTS_SYN          = 4'b0010,
    TTS_BSY          = 4'b0100,
    TTS_RDY          = 4'b1000,
    TTS_ERR          = 4'b1100
  } tts_e;

  // DCC error condition indices (counter offsets 0x1C0 + index)
  typedef enum int unsigned {
    DERR_OFW_ON     = 0,
    DERR_OFW_OFF    = 1,
    DERR_BSY_ON     = 2,
    DERR_BSY_OFF    = 3,
    DERR_FULL_ON    = 4,
    DERR_FULL_OFF   = 5,
    DERR_EVN_L1A    = 6,
    DERR_BCN_L1A    = 7,
    DERR_EVN_CAL    = 8,
    DERR_BCN_CAL    = 9,
    DERR_BCN_BC0    = 10
  } dcc_err_e;

  // one accepted trigger, as stored in the L1A FIFO
  typedef struct packed {
    logic             calib;   // calibration trigger (monitor buffer only)
    logic [EVN_W-1:0] evn;
    logic [BCN_W-1:0] bcn;
  } l1a_entry_t;

  // one complete HTR block waiting in an input buffer
  typedef struct packed {
    logic [EVN_W-1:0] evn;
    logic [BCN_W-1:0] bcn;
    logic [14:0]      evt_status;
    logic [7:0]       lrb_err;
    logic [WC_W-1:0]  wc16;      // 16-bit words received
    logic [WC_W-1:0]  wc32;      // 32-bit words stored (wc16 rounded up)
  } htr_desc_t;

  // per-error control register
  typedef struct packed {
    logic       change_tts;  // changeTTSstate
    logic [3:0] new_tts;     // newTTSstate[3:0]
  } err_ctrl_t;

  // programmable registers of the DAQ logic (written over VME/PCI)
  typedef struct packed {
    logic             vme_run;        // OR-ed with the TTC Start/Stop state
    logic             slink_en;       // send normal events to S-Link64
    logic [N_HTR-1:0] htr_enable;
    logic [15:0]      timeout;        // HTR wait timeout in clocks
    logic [11:0]      source_id;      // CDF Source_id
    logic [3:0]       fov;            // CDF FOV
    logic [3:0]       evt_ty;         // CDF Evt_ty
    logic [3:0]       evt_stat;       // CDF Evt_stat
    logic [7:0]       fmt_ver;        // DCC header format version
    logic [7:0]       ofw_on, ofw_off, bsy_on, bsy_off;  // L1A FIFO thresholds
    logic [3:0]       bc0_delay;
    logic [3:0]       orbit_reset_val;
    logic [15:0]      mon_prescale;   // keep 1 of N normal events in the monitor buffer
  } dcc_cfg_t;

  // 16-bit to 32-bit little-endian helper: first word in the low half
  function automatic logic [31:0] pack16(input logic [15:0] first, input logic [15:0] second);
    return {second, first};
  endfunction

endpackage
