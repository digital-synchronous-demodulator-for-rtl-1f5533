// readout_fifo -- FIFO memory for the readouts.
//
// A circular buffer of DEPTH words of WIDTH bits with a registered read port
// (`rd_data` is valid the clock after `rd_en`), written as an array so that
// synthesis can map it to a RAM. Writes to a full FIFO and reads from an empty
// one are ignored. `count` gives the number of stored words; `clr` empties the
// buffer. DEPTH need not be a power of two: the pointers wrap explicitly.
//
// Following the description: a FIFO holding up to 10K readouts of 48 bits
// (10K taken as 10 x 1024 = 10240). This design's choices: 24-bit words, two
// per readout, hence DEPTH = 20480; synchronous single-clock operation.
module readout_fifo #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned DEPTH = 20480,
  localparam int unsigned PW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  always_comb begin
    empty = (count == '0);
    full  = (count == CW'(DEPTH));
    do_wr = wr_en && !full;
    do_rd = rd_en && !empty;
  end

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
    if (do_rd) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= incr(wr_ptr);
      if (do_rd) rd_ptr <= incr(rd_ptr);
      unique case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
