// sync_fifo: single-clock byte FIFO used for both UART directions.
//
// The instrument buffers every received byte in a 128-byte FIFO and every
// byte to be sent in a second 128-byte FIFO; each has a full flag and the
// receive side reports how many unread bytes it holds. This module provides
// those three things: DEPTH entries, a 'full' flag and a 'count' output.
//
// Implementation: circular buffer with read and write pointers one bit wider
// than the address, so full and empty are told apart without a spare entry.
// The head entry is presented on rd_data combinationally (show-ahead); rd_en
// pops it on the next rising edge. A write while full and a read while empty
// are ignored. Write and read in the same cycle are allowed at any fill level
// except that a write into a full FIFO is dropped even if a read happens.
// Reset (active low, synchronous to clk via the reset synchroniser) empties it.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign count = wr_ptr - rd_ptr;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  assign rd_data = mem[rd_ptr[AW-1:0]];

endmodule
