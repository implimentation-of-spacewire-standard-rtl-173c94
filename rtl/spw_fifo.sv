// spw_fifo: synchronous first-in first-out buffer.
//
// Used twice in the codec: the transmit FIFO between host and transmitter,
// and the receive FIFO, which is the receiver buffer that the flow-control
// credit refers to. The document leaves the FIFO to the target device; this
// is a generic register-array FIFO on the single Sys_clk, with show-ahead
// output (rd_data is valid whenever `empty` is low, `rd_en` pops it).
//
// `count` gives the fill level, `free` the room left. A write to a full FIFO
// and a read from an empty one are ignored (and flagged by assertions).
// Timing: a written word can be read on the next cycle.
module spw_fifo #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count,
  output logic [AW:0]      free
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign empty   = (count == '0);
  assign full    = (32'(count) == DEPTH);
  assign free    = (AW+1)'(DEPTH) - count;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));

endmodule
