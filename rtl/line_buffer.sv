// One image row of pixel storage for the streaming Sobel window. Each pixel
// it is addressed by the column, returns the value stored there one row
// earlier (rdata, combinational read) and, when we = 1, stores the new value
// at the clock edge, so the read sees the contents before the write. Two of
// them in series give the two rows above the current one. Streaming line
// buffers are this design's own choice; the source design processes a stored
// image array.
//
// Interface: addr column, wdata value to store, rdata old contents.
// Timing: combinational read, write on the rising clock edge. The memory is
// not reset; sobel_window only uses what it has written in the same frame.
module line_buffer #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned DATA_W = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [DATA_W-1:0]        wdata,
  output logic [DATA_W-1:0]        rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end
endmodule
