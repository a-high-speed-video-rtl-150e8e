// sync_generator: raster timing for the display and for capture.
//
// Two counters walk the raster: the pixel counter runs over one line
// (active video, front porch, sync tip, back porch, in that order) and the
// line counter over one frame with the same four phases counted in lines.
// All lengths come from the video mode registers at run time, so any
// standard whose pixel clock the board supports can be produced; changing a
// length takes effect at once, and a counter that finds itself beyond a
// shortened period wraps at the next compare.
//
// Outputs, all registered and valid together in the same clock:
//   de       pixel is inside active video (both directions)
//   hsync    horizontal sync tip,  vsync  vertical sync lines
//   hblank / vblank  outside active video in that direction
//   blank    = !de, the blank signal handed to the video DAC
//   csync    composite sync = hsync | vsync, for the DAC's sync input
// All are active high.  The phase order and the sync/blank meaning follow
// the description of a video line; polarity, the composite-sync rule and the
// reset state (counters at the first active pixel) are this design's choice.
module sync_generator
  import video_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  timing_t tim,
  output logic    de,
  output logic    hblank,
  output logic    vblank,
  output logic    hsync,
  output logic    vsync,
  output logic    blank,
  output logic    csync
);

  logic [TIM_W+1:0] hc, vc;             // pixel and line counters
  logic [TIM_W+1:0] h_total, v_total;
  logic [TIM_W+1:0] h_sync_on, h_sync_off, v_sync_on, v_sync_off;

  always_comb begin
    h_sync_on  = (TIM_W+2)'(tim.h_active) + (TIM_W+2)'(tim.h_front);
    h_sync_off = h_sync_on + (TIM_W+2)'(tim.h_sync);
    h_total    = h_sync_off + (TIM_W+2)'(tim.h_back);
    v_sync_on  = (TIM_W+2)'(tim.v_active) + (TIM_W+2)'(tim.v_front);
    v_sync_off = v_sync_on + (TIM_W+2)'(tim.v_sync);
    v_total    = v_sync_off + (TIM_W+2)'(tim.v_back);
  end

  logic line_end, frame_end;
  assign line_end  = (hc + 1'b1 >= h_total);
  assign frame_end = (vc + 1'b1 >= v_total);

  // next counter values, so that the registered flags line up with them
  logic [TIM_W+1:0] hc_n, vc_n;
  always_comb begin
    hc_n = line_end ? '0 : hc + 1'b1;
    vc_n = vc;
    if (line_end) vc_n = frame_end ? '0 : vc + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc     <= '0;
      vc     <= '0;
      hblank <= 1'b0;
      vblank <= 1'b0;
      de     <= 1'b0;
      hsync  <= 1'b0;
      vsync  <= 1'b0;
    end else begin
      hc     <= hc_n;
      vc     <= vc_n;
      hblank <= !(hc_n < (TIM_W+2)'(tim.h_active));
      vblank <= !(vc_n < (TIM_W+2)'(tim.v_active));
      de     <= (hc_n < (TIM_W+2)'(tim.h_active)) && (vc_n < (TIM_W+2)'(tim.v_active));
      hsync  <= (hc_n >= h_sync_on) && (hc_n < h_sync_off);
      vsync  <= (vc_n >= v_sync_on) && (vc_n < v_sync_off);
    end
  end

  assign blank = !de;
  assign csync = hsync | vsync;

endmodule
