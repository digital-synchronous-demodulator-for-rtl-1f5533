// dm_processor -- digital synchronous demodulator (top level).
//
// Measures the complex amplitude of a narrow-band signal as the pair of
// Fourier coefficients a(t_i), b(t_i), computed over a whole number of
// reference periods. The multiplications by cos and sin are replaced by sign
// control: every 10 MHz clock the 12-bit ADC sample is added to or subtracted
// from two 24-bit sums according to two quadrature square waves R_C and R_S.
//
// Blocks: ref_gen (frequency divider making R_C, R_S and the probing output),
// processing_block (two accumulators and the readout multiplexer),
// readout_fifo (10K readouts of 48 bits, as 20480 words of 24 bits),
// control_circuit (settings, triggering, intervals, FIFO writes) and
// host_interface (PC byte bus). The ADC and the clock oscillator are outside:
// `adc_data` is the converter's parallel output and `clk` its sampling clock.
//
// Interface: `adc_data` is straight offset binary (code 2048 = mid-scale) and
// is sampled on the same edge as the references, with no extra register.
// `ext_trig` is asynchronous. `ref_out` is the probing square wave; `ref_c`,
// `ref_s` are the references themselves. `meas_active` and `readout_strobe`
// are ancillary signals for other parts of an instrument. The host bus is
// described in host_interface.
//
// Following the description: the block structure, the 10 MHz single clock,
// 12-bit samples, 24-bit accumulators, 2/4/8/16 periods, a 10K-readout FIFO
// and internal or external triggering. This design's own choices: the offset
// binary input format, the host bus and register map, and what is described
// in each block.
module dm_processor
  import dm_pkg::*;
#(
  parameter int unsigned FIFO_WORDS = 20480  // two 24-bit words per readout
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SAMPLE_W-1:0] adc_data,
  input  logic                ext_trig,
  output logic                ref_out,
  output logic                ref_c,
  output logic                ref_s,
  output logic                meas_active,
  output logic                readout_strobe,
  input  logic [HOST_AW-1:0]  host_addr,
  input  logic [HOST_DW-1:0]  host_din,
  input  logic                host_wr_n,
  input  logic                host_rd_n,
  output logic [HOST_DW-1:0]  host_dout,
  output logic                host_dout_en
);

  localparam int unsigned CW = $clog2(FIFO_WORDS + 1);

  // offset binary -> two's complement
  logic signed [SAMPLE_W-1:0] sample;
  assign sample = {~adc_data[SAMPLE_W-1], adc_data[SAMPLE_W-2:0]};

  dm_cfg_t            cfg;
  logic               period_start;
  logic               acc_en, acc_load, acc_dump, mux_sel;
  logic [ACC_W-1:0]   mux_data;
  logic signed [ACC_W-1:0] a_result, b_result;
  logic               fifo_wr, fifo_rd, fifo_clr, fifo_empty, fifo_full;
  logic [ACC_W-1:0]   fifo_rd_data;
  logic [CW-1:0]      fifo_count;
  logic               reg_wr;
  logic [HOST_AW-1:0] reg_addr;
  logic [HOST_DW-1:0] reg_wdata;
  logic               overflow, done;

  ref_gen u_ref_gen (
    .clk, .rst_n,
    .quarter      (cfg.quarter),
    .rc           (ref_c),
    .rs           (ref_s),
    .period_start (period_start),
    .ref_out      (ref_out)
  );

  processing_block u_proc (
    .clk, .rst_n,
    .sample,
    .rc       (ref_c),
    .rs       (ref_s),
    .en       (acc_en),
    .load     (acc_load),
    .dump     (acc_dump),
    .sel      (mux_sel),
    .a_result (a_result),
    .b_result (b_result),
    .data     (mux_data)
  );

  readout_fifo #(.WIDTH(ACC_W), .DEPTH(FIFO_WORDS)) u_fifo (
    .clk, .rst_n,
    .clr     (fifo_clr),
    .wr_en   (fifo_wr),
    .wr_data (mux_data),
    .rd_en   (fifo_rd),
    .rd_data (fifo_rd_data),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .count   (fifo_count)
  );

  control_circuit #(.FIFO_DEPTH(FIFO_WORDS)) u_ctrl (
    .clk, .rst_n,
    .reg_wr, .reg_addr, .reg_wdata,
    .cfg,
    .period_start,
    .ext_trig,
    .acc_en, .acc_load, .acc_dump, .mux_sel,
    .fifo_count,
    .fifo_wr,
    .fifo_clr,
    .meas_active,
    .readout_strobe,
    .overflow,
    .done
  );

  host_interface #(.FIFO_DEPTH(FIFO_WORDS)) u_host (
    .clk, .rst_n,
    .host_addr, .host_din, .host_wr_n, .host_rd_n, .host_dout, .host_dout_en,
    .reg_wr, .reg_addr, .reg_wdata,
    .cfg, .meas_active, .overflow, .done,
    .fifo_clr, .fifo_empty, .fifo_full, .fifo_count, .fifo_rd_data,
    .fifo_rd_en (fifo_rd)
  );

endmodule
