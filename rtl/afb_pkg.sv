// afb_pkg -- types and constants shared by the Array Formatter logic.
//
// The Array Formatter is the master controller of a phase-tilt weather radar:
// a soft processor hands it words through a bank of software registers (the
// "PF" custom peripheral) and the custom logic turns them into serial traffic
// to the 64 T/R Modules, serial scan information to the Transceiver, and the
// trigger pulses that step the radar through its polarimetric pulse sequence.
//
// The register numbering follows the published register map of the
// peripheral; registers 22..29 have no hardware port and act as scratch
// storage. The timing-register split (transmit time in the upper half-word,
// receive time in the lower) is this design's reading of "the first 16-bit
// word represents the transmit time". The T/R Module word layouts follow the
// published bit maps of the look-up table word and the sequence table entry,
// most significant field first.
package afb_pkg;

  // Width of one word on the T/R Module serial link (start + 16 data + stop).
  localparam int unsigned TR_WORD_W   = 16;
  // Number of 32-bit software registers in the custom peripheral.
  localparam int unsigned PF_NUM_REGS = 30;
  localparam int unsigned PF_ADDR_W   = 5;

  // Register map of the custom peripheral.
  typedef enum logic [PF_ADDR_W-1:0] {
    PF_FIFO_RESET = 5'd0,   // Reset of Transmit and Receive FIFOs (bit 0)
    PF_RD_EN      = 5'd1,   // Software Read Enable  -> RSM
    PF_WR_EN      = 5'd2,   // Software Write Enable -> WSM
    PF_WSM_DATA   = 5'd3,   // Data In of the WSM (32 bits)
    PF_RSM_DATA   = 5'd4,   // Data Out of the RSM (16 bits, read only)
    PF_WR_ACK     = 5'd5,   // Write Ack of the WSM (read only)
    PF_RD_ACK     = 5'd6,   // Read Ack of the RSM (read only)
    PF_RXF_EMPTY  = 5'd7,   // Receive FIFO empty (read only)
    PF_LOOP_NUM   = 5'd8,   // TSM Loop Number
    PF_CH_EN      = 5'd9,   // Software Channel Enable
    PF_TSM_EN     = 5'd10,  // TSM (timing) enable
    PF_TREG1      = 5'd11,  // TSM timing registers 1..4
    PF_TREG2      = 5'd12,
    PF_TREG3      = 5'd13,
    PF_TREG4      = 5'd14,
    PF_CLOCK2     = 5'd15,  // "Clock 2" of the TSM (storage only)
    PF_TSM_ACK    = 5'd16,  // Timing Ack of the TSM (read only)
    PF_TXF_EMPTY  = 5'd17,  // Transmit FIFO empty (read only)
    PF_TRM_ADDR   = 5'd18,  // T/R Module address for the channel enable
    PF_XCVR_EN    = 5'd19,  // Transceiver interface software enable
    PF_XCVR_DATA  = 5'd20,  // Transceiver interface Data In (32 bits)
    PF_XCVR_ACK   = 5'd21   // Transceiver interface ack (read only)
  } pf_reg_e;

  // One TSM timing register: one pulse of the four-pulse sequence.
  typedef struct packed {
    logic [15:0] tx_time;   // transmit time, in TSM clock cycles
    logic [15:0] rx_time;   // receive time, in TSM clock cycles
  } timing_reg_t;

  // Sub-states of one pulse inside the 32-state TSM (8 per pulse, 4 pulses).
  typedef enum logic [2:0] {
    TS_LOAD   = 3'd0,   // select the timing register of this pulse
    TS_XCVR   = 3'd1,   // Transceiver trigger only
    TS_BOTH   = 3'd2,   // Transceiver trigger and T/R "T" trigger
    TS_TTRIG  = 3'd3,   // T/R "T" trigger only
    TS_TXWAIT = 3'd4,   // transmit time
    TS_RTRIG  = 3'd5,   // T/R "R" trigger
    TS_RXWAIT = 3'd6,   // receive time
    TS_NEXT   = 3'd7    // advance to next pulse / next pass
  } tsm_sub_e;

  // ---- T/R Module side (far end of the link) ----
  localparam int unsigned TRM_LUT_DEPTH = 1024;  // look-up table entries
  localparam int unsigned TRM_SEQ_LEN   = 8;     // sequence table entries
  localparam int unsigned TRM_COUNT     = 64;    // T/R Modules in the array

  // One look-up table word: T, R, H, V switch bits, attenuator, phase shifter.
  typedef struct packed {
    logic       t;
    logic       r;
    logic       h;
    logic       v;
    logic [5:0] atten;
    logic [5:0] phase;
  } lut_word_t;

  // One sequence table entry.
  typedef struct packed {
    logic [1:0] command;      // mode bits, interpreted by the module's decoder
    logic [3:0] temperature;  // latched by the temperature register
    logic       tr;           // 0 = transmit, 1 = receive
    logic       hv;           // 0 = vertical, 1 = horizontal
    logic [7:0] beam;         // one of 256 azimuth beam positions
  } seq_entry_t;

endpackage
