// control_circuit -- the on-chip control unit of the demodulator.
//
// It holds the settings written by the host (run, triggering mode, periods
// per measurement, quarter period of the reference, internal trigger period,
// readout limit), defines the accumulation intervals, and moves each finished
// readout into the FIFO.
//
// Intervals. A measurement always begins and ends on a reference period
// boundary (`period_start` from ref_gen) and lasts 2, 4, 8 or 16 whole
// periods. A trigger makes a measurement pending; the pending measurement
// starts at the next boundary at which the accumulators are free. The trigger
// is, by mode: continuous (always pending while running, which gives gapless
// back-to-back measurements), internal (a timer fires every `trig_period`
// clocks, the first time when `run` is set), or external (a rising edge on the
// asynchronous `ext_trig`, synchronised by two flip-flops). At the boundary
// that ends a measurement `acc_dump` latches both sums; if another measurement
// is pending, `acc_load` restarts the sums with the boundary sample in the same
// clock, so no sample is lost between readouts.
//
// FIFO flow. In the two clocks after a dump the multiplexer select steps a,
// then b, and both words are written. If the FIFO has no room for both the
// readout is dropped whole and the sticky `overflow` flag is set; writing the
// clear bit of the control register empties the FIFO and clears it. With a
// non-zero `limit` the unit starts no more than `limit` measurements per run
// and then reports `done`; setting `run` again starts a new cycle.
//
// Assertions check that intervals change only on period boundaries and that
// each readout is written as an a/b pair.
//
// Outputs `meas_active` and `readout_strobe` are ancillary signals for other
// parts of a larger instrument (for example analog multiplexers).
//
// Following the description: 2/4/8/16 periods, internal periodic or external
// triggering, gapless operation, FIFO data flow, host settings, ancillary
// signals. This design's own choices: the register map, the continuous mode
// as a separate trigger mode, the trigger timer, the readout limit, the
// overflow policy and all timing details.
module control_circuit
  import dm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 20480,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // register writes from the host interface
  input  logic               reg_wr,
  input  logic [HOST_AW-1:0] reg_addr,
  input  logic [HOST_DW-1:0] reg_wdata,
  output dm_cfg_t            cfg,
  // reference generator
  input  logic               period_start,
  // external trigger (asynchronous)
  input  logic               ext_trig,
  // processing block
  output logic               acc_en,
  output logic               acc_load,
  output logic               acc_dump,
  output logic               mux_sel,
  // FIFO
  input  logic [CW-1:0]      fifo_count,
  output logic               fifo_wr,
  output logic               fifo_clr,
  // status and ancillary signals
  output logic               meas_active,
  output logic               readout_strobe,
  output logic               overflow,
  output logic               done
);

  // ---------------------------------------------------------------- settings
  logic run_set;  // run written from 0 to 1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg      <= '{run: 1'b0, mode: TRIG_CONT, nper: NPER_16,
                    quarter: QUARTER_W'(26), trig_period: '0, limit: '0};
      run_set  <= 1'b0;
      fifo_clr <= 1'b0;
    end else begin
      run_set  <= 1'b0;
      fifo_clr <= 1'b0;
      if (reg_wr) begin
        unique case (reg_addr)
          REG_CTRL: begin
            cfg.run  <= reg_wdata[0];
            cfg.mode <= trig_mode_e'(reg_wdata[2:1]);
            cfg.nper <= nper_e'(reg_wdata[4:3]);
            run_set  <= reg_wdata[0] && !cfg.run;
            fifo_clr <= reg_wdata[CTRL_CLEAR_BIT];
          end
          REG_QUARTER: cfg.quarter           <= reg_wdata;
          REG_TPER_L:  cfg.trig_period[7:0]  <= reg_wdata;
          REG_TPER_H:  cfg.trig_period[15:8] <= reg_wdata;
          REG_LIMIT_L: cfg.limit[7:0]        <= reg_wdata;
          REG_LIMIT_H: cfg.limit[15:8]       <= reg_wdata;
          default: ;
        endcase
      end
    end
  end

  // -------------------------------------------------------------- triggering
  logic [2:0]        ext_sync;
  logic              ext_edge;
  logic [TPER_W-1:0] timer;
  logic              trig_ev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ext_sync <= '0;
    else        ext_sync <= {ext_sync[1:0], ext_trig};
  end
  assign ext_edge = ext_sync[1] && !ext_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               timer <= '0;
    else if (!cfg.run || run_set)             timer <= '0;
    else if (timer == '0)                     timer <= (cfg.trig_period == '0) ? '0 : cfg.trig_period - 1'b1;
    else                                      timer <= timer - 1'b1;
  end

  always_comb begin
    unique case (cfg.mode)
      TRIG_CONT: trig_ev = 1'b1;
      TRIG_INT:  trig_ev = (timer == '0) && !run_set;
      default:   trig_ev = ext_edge;
    endcase
    trig_ev = trig_ev && cfg.run && !run_set;
  end

  // --------------------------------------------------------------- intervals
  logic               active;
  logic               pend;
  logic [4:0]         per_cnt;
  logic [LIMIT_W-1:0] started;
  logic               allowed, end_now, start_now;

  always_comb begin
    allowed   = cfg.run && !run_set && ((cfg.limit == '0) || (started < cfg.limit));
    end_now   = period_start && active && (per_cnt == nper_periods(cfg.nper) - 5'd1);
    start_now = period_start && (!active || end_now) && (pend || trig_ev) && allowed;
    acc_en    = (active && !end_now) || start_now;
    acc_load  = start_now;
    acc_dump  = end_now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      pend    <= 1'b0;
      per_cnt <= '0;
      started <= '0;
    end else if (!cfg.run || run_set) begin
      active  <= 1'b0;
      pend    <= 1'b0;
      per_cnt <= '0;
      started <= '0;
    end else begin
      if (start_now) begin
        active  <= 1'b1;
        per_cnt <= '0;
        started <= started + 1'b1;
        pend    <= 1'b0;
      end else begin
        pend <= pend || trig_ev;
        if (end_now)                          active  <= 1'b0;
        else if (period_start && active)      per_cnt <= per_cnt + 1'b1;
      end
    end
  end

  assign meas_active    = active;
  assign readout_strobe = acc_dump;
  assign done           = cfg.run && (cfg.limit != '0) && (started == cfg.limit) && !active;

  // ---------------------------------------------------------------- FIFO flow
  typedef enum logic [1:0] {W_IDLE, W_A, W_B} wseq_e;
  wseq_e wseq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wseq     <= W_IDLE;
      overflow <= 1'b0;
    end else begin
      if (fifo_clr) overflow <= 1'b0;
      unique case (wseq)
        W_A:     wseq <= W_B;
        W_B:     wseq <= W_IDLE;
        default: wseq <= W_IDLE;
      endcase
      if (acc_dump) begin
        if ((CW+1)'(fifo_count) + (CW+1)'(2) <= (CW+1)'(FIFO_DEPTH) && !fifo_clr) wseq <= W_A;
        else if (!fifo_clr)                                      overflow <= 1'b1;
      end
    end
  end

  assign fifo_wr = (wseq == W_A) || (wseq == W_B);
  assign mux_sel = (wseq == W_B);

  // ------------------------------------------------------------- assertions
  // intervals open and close only on reference period boundaries
  a_boundary: assert property (@(posedge clk) disable iff (!rst_n)
                               (acc_load || acc_dump) |-> period_start);
  // a readout is written as a, then b, in consecutive clocks
  a_pair:     assert property (@(posedge clk) disable iff (!rst_n)
                               (fifo_wr && !mux_sel) |=> (fifo_wr && mux_sel));
  // no new dump while the previous readout is still being written
  a_spacing:  assert property (@(posedge clk) disable iff (!rst_n)
                               acc_dump |-> (wseq == W_IDLE));

endmodule
