// rec_pkg: constants and types shared by the blocks of the recognition
// circuit, a real-time decoder for the card-to-reader bit-stream of a
// vicinity smart card (ISO/IEC 15693-2, high data rate, one sub-carrier).
//
// Time in this design is counted in sub-carrier periods ("pulse periods"):
// one period is one pulse of the demodulated sub-carrier. A bit lasts two
// half-bits of HALF_PULSES periods each. Logic "0" is pulses in the first
// half, logic "1" pulses in the second half. The start of frame is a quiet
// time of 3*HALF_PULSES periods, a burst of 3*HALF_PULSES pulses and a
// logic "1"; the end of frame is a logic "0", a burst of 3*HALF_PULSES
// pulses and a quiet time.
//
// From the coding definition: 8 pulses per half-bit, 24-pulse SOF/EOF
// bursts, an 8-period window, hysteresis thresholds 5 (rise) and 3 (fall).
// Own choices: 32 clock cycles per sub-carrier period (a 13.56 MHz carrier
// clock divided down to the 423.75 kHz sub-carrier) and the SOF tolerances.
package rec_pkg;

  // Clock cycles per sub-carrier period (13.56 MHz / 423.75 kHz).
  localparam int unsigned CLK_PER_PULSE = 32;
  // Pulse periods per half-bit at the high data rate.
  localparam int unsigned HALF_PULSES   = 8;
  // Length of the moving window (stages of the shift register).
  localparam int unsigned WIN           = 8;
  // Hysteresis: output rises at a count of HYST_HI, falls at HYST_LO.
  localparam int unsigned HYST_HI       = 5;
  localparam int unsigned HYST_LO       = 3;
  // Pulses in the burst of a start or end of frame.
  localparam int unsigned SOF_PULSES    = 24;

  // Recognition state of the SOF & timing block.
  typedef enum logic [1:0] {
    SOF_QUIET = 2'd0,   // waiting for a quiet time followed by a pulse
    SOF_BURST = 2'd1,   // measuring a burst of pulses
    SOF_RUN   = 2'd2    // frame running, bit-slot timing active
  } sof_state_e;

  // State of the data form block.
  typedef enum logic [1:0] {
    DF_IDLE = 2'd0,     // no frame
    DF_SOF1 = 2'd1,     // checking the logic "1" that closes the SOF
    DF_DATA = 2'd2      // decoding data bits
  } df_state_e;

  // Content of one bit slot as seen by the two comparator samples.
  typedef enum logic [1:0] {
    SLOT_NONE = 2'b00,  // no pulses in either half: coding error
    SLOT_ONE  = 2'b01,  // pulses in the second half: logic "1"
    SLOT_ZERO = 2'b10,  // pulses in the first half: logic "0"
    SLOT_BOTH = 2'b11   // pulses in both halves: the burst of an EOF
  } slot_e;

endpackage
