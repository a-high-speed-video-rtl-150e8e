// pointer_memory: the index memory that performs the geometric mapping.
//
// Location (r, c) holds the ordered pair (r', c') of the frame-buffer pixel
// that is to be shown at screen position (r, c).  The address generator
// scans it in raster order and its data addresses the displayed frame
// buffer, so any rotation, translation or zoom is set up by loading a
// pattern from the host; nothing in the video path computes coordinates.
// A rotation by 180 degrees of an R x C image, for example, stores
// (R-1-r, C-1-c) at (r, c).
//
// Single-port synchronous RAM: the video path reads it during active video,
// the host writes or reads it while the controller grants access.  Timing:
// a read returns the word one clock after the address (en high, we low); a
// write stores on the clock edge.  Contents are not initialised: the host
// loads a mapping before display.  Depth and width follow the frame buffer
// address ({row, col}); they are this design's choice.
module pointer_memory #(
  parameter int unsigned AW = 20,   // address: {row, col} of the screen position
  parameter int unsigned DW = 20    // data: {row, col} of the source pixel
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
