// dsss_pkg: constants and types shared by the DSSS power-line transceiver.
//
// The spreading code is the 11-chip Barker sequence 00011101101, one data
// bit is 11 chips, and the receiver oversamples every chip three times
// (phases 1/3 chip apart, made from a clock six times the chip rate).
// Thresholds: a correlation magnitude above 3 means "code aligned", and an
// accumulated count above 6 decides a data 1. A burst is a 42-bit preamble
// 1010...1011, 32 control bits sent MSB first, and one trailing fill bit:
// 75 bits. All of these numbers are the document's; the FSM encodings below
// are this design's.
package dsss_pkg;

  localparam int unsigned CHIPS_PER_BIT   = 11;
  localparam int unsigned FAST_PER_CHIP   = 6;   // receiver clock cycles per chip
  localparam int unsigned ACQ_THRESH      = 3;   // |2X-11| must exceed this
  localparam int unsigned DATA_THRESH     = 6;   // X above this is a data 1
  localparam int unsigned PREAMBLE_LEN    = 42;
  localparam int unsigned DATA_BITS       = 32;
  localparam int unsigned BURST_LEN       = 75;
  localparam int unsigned CONF_N          = 3;   // confidence counter size

  // Barker register reset pattern, bit 10 = leftmost flip-flop of the
  // generator, bit 0 = the output flip-flop. Shifting right from this state
  // emits 0,0,0,1,1,1,0,1,1,0,1 and then returns here.
  localparam logic [10:0] BARKER_INIT = 11'b011_0111_0001;

  // Acquisition (phase shift) FSM states.
  typedef enum logic [1:0] {PS_ST0, PS_ST1, PS_ST2} ps_state_t;

  // Sync-pattern detector states: S0 initial, S1 got 1, S2 got 10, S3 got 101.
  typedef enum logic [1:0] {SD_S0, SD_S1, SD_S2, SD_S3} sd_state_t;

  // Phase-control FSM, one-hot: C0 selects Ph0 as Ph+, C1 Ph1, C2 Ph2.
  localparam logic [2:0] PC_C0 = 3'b001;
  localparam logic [2:0] PC_C1 = 3'b010;
  localparam logic [2:0] PC_C2 = 3'b100;

  // Magnitude of the bipolar correlation: |2X - 11| for a count X of 0..11.
  function automatic logic [3:0] corr_mag(input logic [3:0] x);
    return (x >= 4'd6) ? 4'((x << 1) - 4'd11) : 4'(4'd11 - (x << 1));
  endfunction

endpackage
