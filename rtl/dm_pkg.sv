// dm_pkg -- types and constants shared by the synchronous demodulator.
//
// The demodulator accumulates 12-bit ADC samples into two 24-bit sums under
// the sign of two quadrature square-wave references. The sample and sum widths
// and the choice of 2, 4, 8 or 16 reference periods per measurement follow the
// design description. The host register map, the trigger-mode encoding and the
// widths of the trigger-period and readout-limit registers are this design's
// own choices.
package dm_pkg;

  // Datapath widths
  localparam int unsigned SAMPLE_W  = 12;  // ADC sample
  localparam int unsigned ACC_W     = 24;  // accumulator / readout word
  localparam int unsigned QUARTER_W = 8;   // quarter period of the reference, in clocks
  localparam int unsigned TPER_W    = 16;  // internal trigger period, in clocks
  localparam int unsigned LIMIT_W   = 16;  // readouts per cycle (0 = no limit)

  // Host bus
  localparam int unsigned HOST_AW = 4;
  localparam int unsigned HOST_DW = 8;

  // Triggering modes
  typedef enum logic [1:0] {
    TRIG_CONT = 2'd0,  // back-to-back (gapless) measurements
    TRIG_INT  = 2'd1,  // internal periodic timer
    TRIG_EXT  = 2'd2,  // rising edge on the external trigger input
    TRIG_RSVD = 2'd3   // reserved, behaves as TRIG_EXT
  } trig_mode_e;

  // Number of reference periods per measurement: 2 << code
  typedef enum logic [1:0] {
    NPER_2  = 2'd0,
    NPER_4  = 2'd1,
    NPER_8  = 2'd2,
    NPER_16 = 2'd3
  } nper_e;

  // Settings written by the host
  typedef struct packed {
    logic                  run;
    trig_mode_e            mode;
    nper_e                 nper;
    logic [QUARTER_W-1:0]  quarter;
    logic [TPER_W-1:0]     trig_period;
    logic [LIMIT_W-1:0]    limit;
  } dm_cfg_t;

  // Register addresses (host view)
  localparam logic [HOST_AW-1:0] REG_CTRL    = 4'd0;  // W/R: [0] run [2:1] mode [4:3] nper; W: [5] clear FIFO
  localparam logic [HOST_AW-1:0] REG_QUARTER = 4'd1;  // W/R: quarter period in clocks
  localparam logic [HOST_AW-1:0] REG_TPER_L  = 4'd2;  // W/R: internal trigger period, low byte
  localparam logic [HOST_AW-1:0] REG_TPER_H  = 4'd3;  // W/R: internal trigger period, high byte
  localparam logic [HOST_AW-1:0] REG_LIMIT_L = 4'd4;  // W/R: readout limit, low byte
  localparam logic [HOST_AW-1:0] REG_LIMIT_H = 4'd5;  // W/R: readout limit, high byte
  localparam logic [HOST_AW-1:0] REG_STATUS  = 4'd6;  // R: [0] data [1] overflow [2] measuring [3] done [4] FIFO full
  localparam logic [HOST_AW-1:0] REG_COUNT_L = 4'd7;  // R: words available, low byte
  localparam logic [HOST_AW-1:0] REG_COUNT_H = 4'd8;  // R: words available, high byte
  localparam logic [HOST_AW-1:0] REG_DATA    = 4'd9;  // R: next byte of the readout stream

  localparam int unsigned CTRL_CLEAR_BIT = 5;

  function automatic logic [4:0] nper_periods(nper_e code);
    return 5'd2 << code;
  endfunction

endpackage
