// sync_fifo: single-clock first-in first-out buffer (helper).
//
// DEPTH words of WIDTH bits held in a memory array with read and write
// pointers one bit wider than the address, so full and empty are told apart.
// The head word is presented combinationally on rd_data whenever empty is low
// (first-word fall-through).  A write while full and a read while empty are
// ignored; a simultaneous read and write while full or empty behaves as the
// allowed one alone.  count gives the number of words held.  Synchronous
// reset empties it.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;
  logic             do_wr, do_rd;

  assign count   = wp - rp;
  assign empty   = (wp == rp);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
endmodule
