// frame_buffer: one video RAM holding a frame of digitised pixels.
//
// A single-port synchronous RAM of 2**AW words of DW bits.  One port is all
// a frame buffer has: it is either being written from the camera or being
// read for display in a given frame, which is why the system uses two of
// them and swaps their roles every frame.  The address is the ordered pair
// {row, col}.  The 10-bit pixel width follows the 10-bit A/D converter; the
// depth (1024 x 1024 pixels by default, enough for 1024 x 768 at the 65 MHz
// pixel clock the board is designed for) is this design's choice.
//
// Timing: with en high, a write stores wdata at addr on the clock edge; a
// read returns mem[addr] on rdata one clock later.  rdata holds its value
// while en is low.  The contents are not initialised.
module frame_buffer #(
  parameter int unsigned AW = 20,
  parameter int unsigned DW = 10
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
