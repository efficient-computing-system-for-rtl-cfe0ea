// One image line of pixel storage for the sharpening window.
//
// A DEPTH-entry memory addressed by the column index. On a valid pixel the
// old content at that column (the pixel of the same column one line
// earlier) is presented on rd_data combinationally, and the new pixel is
// written at the clock edge. Chaining several buffers (each one's rd_data
// into the next one's wr_data) yields the same column of several earlier
// lines. This buffer belongs to the sharpening engine and is this design's
// own. The contents are not reset; the window logic ignores them until
// enough lines have been written.
module line_buffer #(
  parameter int unsigned DEPTH = 225,
  parameter int unsigned DW    = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [DW-1:0]            wr_data,
  output logic [DW-1:0]            rd_data
);
  logic [DW-1:0] mem [DEPTH];

  assign rd_data = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wr_data;
  end
endmodule
