// host_interface -- the interfacing circuit between the demodulator and a
// host PC parallel port.
//
// The host side is an asynchronous byte bus: a 4-bit register address, 8-bit
// write data, active-low write and read strobes, and 8-bit read data with an
// output enable for an external bus driver. The strobes are synchronised by
// two flip-flops. A synchronised falling edge of `host_wr_n` issues one
// register write (`reg_wr`) with the address and data on the pins; a falling
// edge of `host_rd_n` latches the addressed register into `host_dout`; the
// rising edge of `host_rd_n` completes the read and, for the data register,
// steps to the next byte. Address and data must be stable while a strobe is
// low, and a strobe must stay low (and high between strobes) for at least
// four clocks.
//
// Readout stream. A holding register prefetches the head word of the FIFO
// whenever it is empty. The data register returns that word's bytes least
// significant first, three bytes per 24-bit word; after the third byte the
// next word is fetched. One readout is therefore six bytes: a(t_i) then
// b(t_i), each a 24-bit two's complement sum. The count register reports the
// words available (FIFO plus holding register), so the host may read at any
// time without underrun. Reading the data register with nothing available
// returns 0 and does not advance.
//
// Following the description: an interfacing circuit to a PC parallel port
// through which the host sets parameters and reads the FIFO. The whole
// protocol and register map are this design's own choice.
module host_interface
  import dm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 20480,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host bus
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [HOST_DW-1:0] host_din,
  input  logic               host_wr_n,
  input  logic               host_rd_n,
  output logic [HOST_DW-1:0] host_dout,
  output logic               host_dout_en,
  // control circuit
  output logic               reg_wr,
  output logic [HOST_AW-1:0] reg_addr,
  output logic [HOST_DW-1:0] reg_wdata,
  input  dm_cfg_t            cfg,
  input  logic               meas_active,
  input  logic               overflow,
  input  logic               done,
  // FIFO
  input  logic               fifo_clr,
  input  logic               fifo_empty,
  input  logic               fifo_full,
  input  logic [CW-1:0]      fifo_count,
  input  logic [ACC_W-1:0]   fifo_rd_data,
  output logic               fifo_rd_en
);

  // ------------------------------------------------------------ synchronisers
  logic [2:0] wr_sync, rd_sync;  // bit 0 first stage; 1 = strobe active

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_sync <= '0;
      rd_sync <= '0;
    end else begin
      wr_sync <= {wr_sync[1:0], !host_wr_n};
      rd_sync <= {rd_sync[1:0], !host_rd_n};
    end
  end

  logic wr_start, rd_start, rd_end;
  assign wr_start = wr_sync[1] && !wr_sync[2];
  assign rd_start = rd_sync[1] && !rd_sync[2];
  assign rd_end   = !rd_sync[1] && rd_sync[2];

  assign reg_wr    = wr_start;
  assign reg_addr  = host_addr;
  assign reg_wdata = host_din;

  // ---------------------------------------------------------- holding register
  logic [ACC_W-1:0] hold;
  logic             hold_valid;
  logic             fetching;
  logic [1:0]       byte_idx;
  logic             data_read;   // a data-register read is in progress

  assign fifo_rd_en = !hold_valid && !fetching && !fifo_empty && !fifo_clr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold       <= '0;
      hold_valid <= 1'b0;
      fetching   <= 1'b0;
      byte_idx   <= '0;
      data_read  <= 1'b0;
    end else if (fifo_clr) begin
      hold_valid <= 1'b0;
      fetching   <= 1'b0;
      byte_idx   <= '0;
      data_read  <= 1'b0;
    end else begin
      fetching <= fifo_rd_en;
      if (fetching) begin
        hold       <= fifo_rd_data;
        hold_valid <= 1'b1;
      end
      if (rd_start) data_read <= (host_addr == REG_DATA) && hold_valid;
      if (rd_end && data_read) begin
        data_read <= 1'b0;
        if (byte_idx == 2'd2) begin
          byte_idx   <= '0;
          hold_valid <= 1'b0;
        end else begin
          byte_idx <= byte_idx + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------ read mux
  logic [15:0] avail;
  assign avail = 16'(fifo_count) + 16'(hold_valid);

  logic [HOST_DW-1:0] rmux;
  always_comb begin
    unique case (host_addr)
      REG_CTRL:    rmux = {3'b000, cfg.nper, cfg.mode, cfg.run};
      REG_QUARTER: rmux = cfg.quarter;
      REG_TPER_L:  rmux = cfg.trig_period[7:0];
      REG_TPER_H:  rmux = cfg.trig_period[15:8];
      REG_LIMIT_L: rmux = cfg.limit[7:0];
      REG_LIMIT_H: rmux = cfg.limit[15:8];
      REG_STATUS:  rmux = {3'b000, fifo_full, done, meas_active, overflow, hold_valid};
      REG_COUNT_L: rmux = avail[7:0];
      REG_COUNT_H: rmux = avail[15:8];
      REG_DATA: begin
        if (!hold_valid)          rmux = '0;
        else if (byte_idx == 2'd0) rmux = hold[7:0];
        else if (byte_idx == 2'd1) rmux = hold[15:8];
        else                       rmux = hold[23:16];
      end
      default:     rmux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        host_dout <= '0;
    else if (rd_start) host_dout <= rmux;
  end

  assign host_dout_en = !host_rd_n;

endmodule
