// osc_pkg: constants and types shared by the oscilloscope controller.
//
// The controller runs from one 25 MHz clock, which is also the VGA pixel
// clock. A sampling frame holds 640 samples, one per screen column, and the
// sample memory is a 1024 x 8 array, so sample addresses and screen
// coordinates are all 10 bits wide. These numbers follow the original design. The
// sampling rates other than the 500 kHz maximum are this design's choice.
package osc_pkg;

  localparam int unsigned CLK_HZ      = 25_000_000;  // system / pixel clock
  localparam int unsigned SAMPLES     = 640;         // samples per frame
  localparam int unsigned ADDR_W      = 10;          // memory address width
  localparam int unsigned DATA_W      = 8;           // ADC word width
  localparam int unsigned MEM_DEPTH   = 1024;        // 1024 x 8 RAM
  localparam int unsigned NUM_RATES   = 6;           // time/div switches

  // notWE pulse length: 1 us at 25 MHz
  localparam int unsigned PULSE_CYCLES = 25;

  // Sampling-clock periods in system clocks, fastest first:
  // 500 kHz, 200 kHz, 100 kHz, 50 kHz, 20 kHz, 10 kHz.
  localparam int unsigned RATE_DIV [NUM_RATES] = '{50, 125, 250, 500, 1250, 2500};

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] sample_t;

  // Frame controller states (sampler10b)
  typedef enum logic [1:0] {
    FR_IDLE  = 2'd0,   // waiting for a trigger pulse
    FR_RUN   = 2'd1,   // sampling clock enabled
    FR_FLUSH = 2'd2    // last conversion still being written
  } frame_state_e;

  // Write sequencer states (data2mem)
  typedef enum logic [1:0] {
    WR_IDLE  = 2'd0,
    WR_SETUP = 2'd1,   // address mux switched, address/data latched
    WR_PULSE = 2'd2    // mem_we high
  } write_state_e;

endpackage
