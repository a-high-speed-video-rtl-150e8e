// lookup_table: brightness-to-colour tables (the colormap).
//
// Three tables of 2**AW entries by 8 bits, one each for red, green and
// blue, share one address: the 10-bit pixel read out of the frame buffer.
// Their three bytes form the 24-bit colour sent to the video DAC.  Loading
// other contents changes brightness and colormap (grey scale, inverted grey
// scale, false colour, level shifting, windowing) without touching the
// image.  The host writes one entry of all three tables at once with a
// 24-bit {R, G, B} word and reads entries back the same way.
//
// Timing: one clock from addr (en high, we low) to rgb.  At start-up the
// tables hold a grey scale, entry i = i * 256 / 2**AW for all three colours,
// so that a picture is visible before the host loads a colormap; that
// default is this design's choice.  The table layout follows the document;
// the shared single port is this design's choice.
module lookup_table
  import video_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  rgb_t          wdata,
  output rgb_t          rgb
);

  logic [7:0] lut_r [2**AW];
  logic [7:0] lut_g [2**AW];
  logic [7:0] lut_b [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      lut_r[i] = 8'((i * 256) >> AW);
      lut_g[i] = 8'((i * 256) >> AW);
      lut_b[i] = 8'((i * 256) >> AW);
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        lut_r[addr] <= wdata.r;
        lut_g[addr] <= wdata.g;
        lut_b[addr] <= wdata.b;
      end else begin
        rgb.r <= lut_r[addr];
        rgb.g <= lut_g[addr];
        rgb.b <= lut_b[addr];
      end
    end
  end

endmodule
